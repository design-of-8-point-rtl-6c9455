// appdct2d_image_tb -- image workload for the 8x8 approximate 2-D DCT.
//
// A 64x64 8-bit test image (smooth gradients, a bright disc and some
// pseudo-random texture, generated here) is level-shifted by -128, cut
// into 8x8 blocks in raster order and streamed with no gap, one row per
// clock, as a JPEG encoder would feed it.  Checked:
//   - in_ready never drops while blocks follow each other;
//   - every block's result equals T * X * T' (integer reference);
//   - the transform loses nothing: with the inverse T^-1 = M / 2,
//     M * Y * M' / 4 gives back every sample of the image exactly;
//   - throughput: the last result column leaves 8 * 64 + 12 - 1 clocks
//     after the first row went in (one block every 8 clocks).
// It also reports how much of the signal energy lands in the four
// entries {y1, y3} x {y1, y3}, the half-block sums (y1 + y3 is the sum of
// all eight inputs), as a rough measure of energy compaction.
module appdct2d_image_tb;
  localparam int IMG = 64;
  localparam int NB  = (IMG / 8) * (IMG / 8);

  localparam int T [8][8] = '{
    '{1, 0, 0, 0, 0, 0, 0, 1},
    '{1, 1, 0, 0, 0, 0, 1, 1},
    '{0, 0, 1, 0, 0, 1, 0, 0},
    '{0, 0, 1, 1, 1, 1, 0, 0},
    '{0, 0, 1, 1,-1,-1, 0, 0},
    '{0, 0, 1, 0, 0,-1, 0, 0},
    '{1, 1, 0, 0, 0, 0,-1,-1},
    '{1, 0, 0, 0, 0, 0, 0,-1}};
  // 2 * inverse of T
  localparam int M [8][8] = '{
    '{ 1, 0, 0, 0, 0, 0, 0, 1},
    '{-1, 1, 0, 0, 0, 0, 1,-1},
    '{ 0, 0, 1, 0, 0, 1, 0, 0},
    '{ 0, 0,-1, 1, 1,-1, 0, 0},
    '{ 0, 0,-1, 1,-1, 1, 0, 0},
    '{ 0, 0, 1, 0, 0,-1, 0, 0},
    '{-1, 1, 0, 0, 0, 0,-1, 1},
    '{ 1, 0, 0, 0, 0, 0, 0,-1}};

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [7:0]  x_in  [8];
  logic signed [11:0] y_out [8];

  int checks = 0, failures = 0;
  int cycle = 0;
  int img [IMG][IMG];
  int res [NB][8][8];      // res[b][j][k] = Y[j][k] of block b
  int nout = 0;            // result columns received
  int t_first = -1, t_last = -1;

  appdct2d_top dut (.clk, .rst, .in_valid, .in_ready, .x_in, .out_valid, .y_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    if (nout < NB * 8)
      for (int j = 0; j < 8; j++) res[nout / 8][j][nout % 8] = int'(y_out[j]);
    nout++;
    t_last = cycle;
  end

  function automatic int sample(int r, int c);
    int v, dr, dc;
    v = 40 + 2 * r + c;                          // gradients
    dr = r - 40; dc = c - 24;
    if (dr * dr + dc * dc < 196) v += 90;        // bright disc
    v += int'((r * 131 + c * 71 + r * c * 7) % 23) - 11;  // texture
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  initial begin
    longint e_total = 0, e_low = 0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) img[r][c] = sample(r, c) - 128;
    for (int c = 0; c < 8; c++) x_in[c] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // stream every block, rows in order, no gaps
    for (int b = 0; b < NB; b++) begin
      int br, bc;
      br = (b / (IMG / 8)) * 8;
      bc = (b % (IMG / 8)) * 8;
      for (int row = 0; row < 8; row++) begin
        checks++;
        if (!in_ready) begin
          failures++;
          $display("FAIL in_ready low during a continuous stream, block %0d", b);
        end
        for (int c = 0; c < 8; c++) x_in[c] = 8'(img[br + row][bc + c]);
        in_valid = 1;
        if (b == 0 && row == 0) t_first = cycle;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);

    checks++;
    if (nout != NB * 8) begin
      failures++;
      $display("FAIL %0d result columns, expected %0d", nout, NB * 8);
    end
    checks++;
    if (t_last - t_first != NB * 8 + 12 - 1) begin
      failures++;
      $display("FAIL stream took %0d clocks, expected %0d", t_last - t_first, NB * 8 + 11);
    end

    for (int b = 0; b < NB; b++) begin
      int br, bc;
      int x[8][8], r[8][8], y[8][8], z[8][8], w[8][8];
      br = (b / (IMG / 8)) * 8;
      bc = (b % (IMG / 8)) * 8;
      for (int i = 0; i < 8; i++)
        for (int c = 0; c < 8; c++) x[i][c] = img[br + i][bc + c];
      // reference Y = T X T'
      for (int i = 0; i < 8; i++)
        for (int k = 0; k < 8; k++) begin
          r[i][k] = 0;
          for (int c = 0; c < 8; c++) r[i][k] += T[k][c] * x[i][c];
        end
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) begin
          y[j][k] = 0;
          for (int i = 0; i < 8; i++) y[j][k] += T[j][i] * r[i][k];
          checks++;
          if (res[b][j][k] != y[j][k]) begin
            failures++;
            $display("FAIL block %0d Y[%0d][%0d]=%0d expected %0d", b, j, k, res[b][j][k], y[j][k]);
          end
          e_total += longint'(y[j][k]) * y[j][k];
          if ((j == 1 || j == 3) && (k == 1 || k == 3)) e_low += longint'(y[j][k]) * y[j][k];
        end
      // reconstruction from the hardware result: X = M Y M' / 4
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) begin
          z[j][k] = 0;
          for (int i = 0; i < 8; i++) z[j][k] += M[j][i] * res[b][i][k];
        end
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) begin
          w[j][k] = 0;
          for (int i = 0; i < 8; i++) w[j][k] += z[j][i] * M[k][i];
          checks++;
          if (w[j][k] != 4 * x[j][k]) begin
            failures++;
            $display("FAIL block %0d sample [%0d][%0d] rebuilt as %0d/4, was %0d",
                     b, j, k, w[j][k], x[j][k]);
          end
        end
    end
    $display("%0d blocks in %0d clocks; energy in the half-block-sum entries: %0d%%",
             NB, t_last - t_first + 1, int'(100 * e_low / e_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
