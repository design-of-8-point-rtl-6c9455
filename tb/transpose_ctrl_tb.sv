// transpose_ctrl_tb -- self-check of the transposition-memory sequencer.
//
// Blocks of 8 rows are offered with random gaps between them (none, a
// few clocks, or long enough for the memory to empty).  A block is only
// started on a clock where in_ready is high.  From the clocks at which
// rows were accepted the testbench predicts, ROW_LAT clocks later:
//   - shift high exactly on the clocks that carry a row into the memory
//     or a column out of it, low otherwise;
//   - out_valid with out_idx = 0..7 on the 8 clocks that follow the
//     loading of each block (the block's last row leaves 8 clocks after
//     it was written);
//   - sel constant over those 8 clocks and the opposite of the sel used
//     while the block was written.
// It also counts how often a block followed directly, how often the
// memory emptied with no input, and how often in_ready refused a start.
module transpose_ctrl_tb;
  localparam int N = 8, RL = 2, NBLK = 300;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, shift, sel, out_valid;
  logic [2:0] out_idx;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_b2b = 0, n_drain = 0, n_refused = 0;

  // expectations indexed by cycle (as seen by clocked processes)
  localparam int MAXC = 20000;
  bit exp_shift [MAXC];
  bit exp_row   [MAXC];   // a row is written into the memory
  bit exp_out   [MAXC];
  int exp_idx   [MAXC];
  int load_sel  [MAXC];   // sel seen while a row was written, -1 if none

  transpose_ctrl #(.N(N), .ROW_LAT(RL)) dut (
    .clk, .rst, .in_valid, .in_ready, .shift, .sel, .out_valid, .out_idx);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #(10 * MAXC);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record accepted rows and derive the expectations
  int row_in_blk = 0;
  int last_blk_end = -100;
  always @(posedge clk) if (!rst && in_valid && in_ready) begin
    int t;
    t = cycle + RL;
    exp_shift[t] = 1;
    exp_row[t]   = 1;
    if (row_in_blk == 0) begin
      if (cycle == last_blk_end + 1) n_b2b++;
    end
    if (row_in_blk == N - 1) begin
      last_blk_end = cycle;
      for (int k = 0; k < N; k++) begin
        exp_shift[t + 1 + k] = 1;
        exp_out[t + 1 + k]   = 1;
        exp_idx[t + 1 + k]   = k;
      end
    end
    row_in_blk = (row_in_blk + 1) % N;
  end

  always @(posedge clk) if (!rst && !in_ready) n_refused++;

  // compare the delayed controls
  always @(posedge clk) if (!rst && cycle < MAXC) begin
    load_sel[cycle] = -1;
    checks++;
    if (shift !== exp_shift[cycle]) begin
      failures++;
      $display("FAIL cycle %0d shift=%0d expected %0d", cycle, shift, exp_shift[cycle]);
    end
    checks++;
    if (out_valid !== exp_out[cycle]) begin
      failures++;
      $display("FAIL cycle %0d out_valid=%0d expected %0d", cycle, out_valid, exp_out[cycle]);
    end
    if (exp_out[cycle]) begin
      checks++;
      if (int'(out_idx) != exp_idx[cycle]) begin
        failures++;
        $display("FAIL cycle %0d out_idx=%0d expected %0d", cycle, out_idx, exp_idx[cycle]);
      end
      // the block read now was written 8 shifts ago with the other sel
      checks++;
      if (load_sel[cycle - N] != int'(!sel)) begin
        failures++;
        $display("FAIL cycle %0d sel=%0d, block was written with sel=%0d",
                 cycle, sel, load_sel[cycle - N]);
      end
      if (exp_idx[cycle] == 0 && !exp_row[cycle]) n_drain++;
    end
    if (exp_row[cycle]) load_sel[cycle] = int'(sel);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < NBLK; b++) begin
      int gap;
      gap = (b % 4 == 0) ? 0 : int'($urandom_range(12));
      repeat (gap) @(negedge clk);
      while (!in_ready) @(negedge clk);
      for (int r = 0; r < N; r++) begin
        in_valid = 1;
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (30) @(negedge clk);
    checks++;
    if (n_b2b == 0 || n_drain == 0 || n_refused == 0) begin
      failures++;
      $display("FAIL coverage back-to-back=%0d emptying=%0d refused=%0d",
               n_b2b, n_drain, n_refused);
    end
    $display("blocks back to back %0d, emptying phases %0d, in_ready low clocks %0d",
             n_b2b, n_drain, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
