// appdct2d_top_tb -- end-to-end self-check of the 8x8 approximate 2-D DCT.
//
// Runs the design with its default parameters.  Blocks of signed 8-bit
// samples are offered with random gaps (none, short, or long enough for
// the transposition memory to empty with no input), each block started
// only when in_ready is high.  The first blocks are extreme ones (all
// +127, all -128, alternating signs) that drive the 12-bit words to the
// ends of their range; the rest are random.  The expected result
// Y = T * X * T' is computed in integers from the matrix T; the k-th
// valid output vector of a block must equal column k of Y, and the first
// one must leave 12 clocks after the block's first row went in.
// Counted mechanisms, each of which must occur: blocks streamed back to
// back (the select line flipping while a new block is written), the
// memory emptying with no input, in_ready refusing a start, and an
// output at the negative end of the 12-bit range.
module appdct2d_top_tb;
  localparam int NBLK = 400;
  localparam int LAT = 12;

  localparam int T [8][8] = '{
    '{1, 0, 0, 0, 0, 0, 0, 1},
    '{1, 1, 0, 0, 0, 0, 1, 1},
    '{0, 0, 1, 0, 0, 1, 0, 0},
    '{0, 0, 1, 1, 1, 1, 0, 0},
    '{0, 0, 1, 1,-1,-1, 0, 0},
    '{0, 0, 1, 0, 0,-1, 0, 0},
    '{1, 1, 0, 0, 0, 0,-1,-1},
    '{1, 0, 0, 0, 0, 0, 0,-1}};

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [7:0]  x_in  [8];
  logic signed [11:0] y_out [8];

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_b2b = 0, n_drain = 0, n_refused = 0, n_minval = 0, n_blocks_out = 0;

  typedef struct { int y[8][8]; int t0; } blk_t;
  blk_t q[$];

  appdct2d_top dut (.clk, .rst, .in_valid, .in_ready, .x_in, .out_valid, .y_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  int col = 0;
  blk_t cur;
  int last_out = -100;
  always @(posedge clk) if (!rst && out_valid) begin
    if (col == 0) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output with no block outstanding at cycle %0d", cycle);
      end else begin
        cur = q.pop_front();
        if (cycle - cur.t0 != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - cur.t0, LAT);
        end
      end
    end
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (int'(y_out[j]) != cur.y[j][col]) begin
        failures++;
        $display("FAIL block %0d column %0d y[%0d]=%0d expected %0d",
                 n_blocks_out, col, j, y_out[j], cur.y[j][col]);
      end
      if (y_out[j] == -12'sd2048) n_minval++;
    end
    // the columns of one block leave on consecutive clocks
    if (col != 0) begin
      checks++;
      if (cycle != last_out + 1) begin
        failures++;
        $display("FAIL gap inside an output block at cycle %0d", cycle);
      end
    end
    last_out = cycle;
    col = (col + 1) % 8;
    if (col == 0) n_blocks_out++;
  end

  always @(posedge clk) if (!rst && !in_ready) n_refused++;

  task automatic send_block(input int x[8][8], input int gap, inout int last_end);
    blk_t b;
    int r[8][8];
    // row pass R = X * T', then Y = T * R
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 8; k++) begin
        r[i][k] = 0;
        for (int c = 0; c < 8; c++) r[i][k] += T[k][c] * x[i][c];
      end
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 8; k++) begin
        b.y[j][k] = 0;
        for (int i = 0; i < 8; i++) b.y[j][k] += T[j][i] * r[i][k];
      end
    repeat (gap) @(negedge clk);
    while (!in_ready) @(negedge clk);
    if (cycle == last_end + 1) n_b2b++;
    else if (cycle > last_end + 9) n_drain++;
    b.t0 = cycle;
    q.push_back(b);
    for (int row = 0; row < 8; row++) begin
      checks++;
      if (!in_ready) begin
        failures++;
        $display("FAIL in_ready low inside a block");
      end
      for (int c = 0; c < 8; c++) x_in[c] = 8'(x[row][c]);
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    last_end = cycle - 1;
  endtask

  initial begin
    int x[8][8];
    int last_end = -100;
    for (int c = 0; c < 8; c++) x_in[c] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 8; i++)
        for (int c = 0; c < 8; c++)
          case (b)
            0:       x[i][c] = 127;
            1:       x[i][c] = -128;
            2:       x[i][c] = ((i + c) % 2 == 0) ? 127 : -128;
            3:       x[i][c] = ((c / 2 + i / 2) % 2 == 0) ? 127 : -128;
            default: x[i][c] = int'($urandom_range(255)) - 128;
          endcase
      send_block(x, (b % 3 == 0) ? 0 : int'($urandom_range(14)), last_end);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_blocks_out != NBLK) begin
      failures++;
      $display("FAIL %0d blocks out of %0d, %0d outstanding", n_blocks_out, NBLK, q.size());
    end
    checks++;
    if (n_b2b == 0 || n_drain == 0 || n_refused == 0 || n_minval == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("blocks %0d: back to back %0d, after emptying %0d, in_ready low clocks %0d, outputs at -2048: %0d",
             n_blocks_out, n_b2b, n_drain, n_refused, n_minval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
