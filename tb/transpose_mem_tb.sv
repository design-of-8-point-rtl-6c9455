// transpose_mem_tb -- self-check of the 8x8 transposition memory.
//
// The testbench plays the sequencer itself: shift is held high while
// NBLK blocks of random 12-bit rows are written back to back, the select
// line flipping every 8 shifts, then 8 more shifts empty the memory.  A
// few clocks with shift low are inserted inside phases to check that the
// array holds.  On the k-th shift after a block was written, output j
// must be element k of row j of that block.  The last block's 8 columns
// must all have come out within 8 clocks after its last row.
module transpose_mem_tb;
  localparam int N = 8, W = 12, NBLK = 40;

  logic clk = 0, rst = 1;
  logic shift = 0, sel = 1;
  logic signed [W-1:0] din [N];
  logic signed [W-1:0] dout [N];
  int checks = 0, failures = 0;
  int blk [NBLK][N][N];
  int holds = 0, dir_v = 0, dir_h = 0;

  transpose_mem #(.N(N), .WIDTH(W)) dut (.clk, .rst, .shift, .sel, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int out_cnt = 0;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          blk[b][r][c] = int'($urandom_range(4095)) - 2048;
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // phase p writes block p (if p < NBLK) and reads block p-1 (if p > 0)
    for (int p = 0; p <= NBLK; p++) begin
      for (int k = 0; k < N; k++) begin
        if (k == 3 && p % 3 == 1) begin   // a clock without shift
          shift = 0;
          @(negedge clk);
          holds++;
        end
        shift = 1;
        for (int i = 0; i < N; i++)
          din[i] = (p < NBLK) ? W'(blk[p][k][i]) : W'(int'($urandom));
        #1;
        if (p > 0) begin
          for (int j = 0; j < N; j++) begin
            checks++;
            if (int'(dout[j]) != blk[p-1][j][k]) begin
              failures++;
              $display("FAIL phase %0d shift %0d out[%0d]=%0d expected %0d",
                       p, k, j, dout[j], blk[p-1][j][k]);
            end
          end
        end
        @(negedge clk);
        if (p == NBLK) out_cnt++;
      end
      if (sel) dir_v++; else dir_h++;
      sel = ~sel;
    end
    checks++;
    if (out_cnt != N) begin
      failures++;
      $display("FAIL last block took %0d clocks to leave", out_cnt);
    end
    checks++;
    if (holds == 0 || dir_v == 0 || dir_h == 0) begin
      failures++;
      $display("FAIL coverage holds=%0d vertical=%0d horizontal=%0d", holds, dir_v, dir_h);
    end
    $display("phases shifting down %0d, sideways %0d, hold clocks %0d", dir_v, dir_h, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
