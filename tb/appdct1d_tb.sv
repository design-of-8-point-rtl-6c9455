// appdct1d_tb -- self-check of the 8-point 12-addition approximate DCT.
//
// Input vectors (a fixed sample-row vector, extremes of the 8-bit signed
// range, then random ones, with random idle clocks in between) are
// streamed in.  Each expected output is the product of the matrix T
// written out below and the input, computed in integers.  Every output
// is also checked to leave exactly LATENCY = 2 clocks after its input.
module appdct1d_tb;
  localparam int W = 12;
  localparam int LAT = 2;
  localparam int NVEC = 3000;

  // the transform matrix, row k gives output k
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
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] x [8];
  logic signed [W-1:0] y [8];

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { int v[8]; int t; } exp_t;
  exp_t q[$];

  appdct1d #(.WIDTH(W)) dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: compare every valid output with the oldest expectation
  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output at cycle %0d", cycle);
    end else begin
      e = q.pop_front();
      if (cycle - e.t != LAT) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cycle - e.t, LAT);
      end
      for (int k = 0; k < 8; k++) if (int'(y[k]) != e.v[k]) begin
        failures++;
        $display("FAIL y[%0d]=%0d expected %0d", k, y[k], e.v[k]);
      end
    end
  end

  task automatic send(input int v[8]);
    exp_t e;
    for (int k = 0; k < 8; k++) begin
      e.v[k] = 0;
      for (int i = 0; i < 8; i++) e.v[k] += T[k][i] * v[i];
    end
    @(negedge clk);
    for (int i = 0; i < 8; i++) x[i] = W'(v[i]);
    in_valid = 1;
    e.t = cycle;   // value the checker sees at the sampling edge
    q.push_back(e);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int v[8];
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // a row of raw pixel values of an image
    v = '{38, 38, 38, 38, 38, 33, 31, 31}; send(v);
    v = '{34, 34, 34, 34, 34, 32, 35, 34}; send(v);
    v = '{127, 127, 127, 127, 127, 127, 127, 127}; send(v);
    v = '{-128, -128, -128, -128, -128, -128, -128, -128}; send(v);
    v = '{127, 127, -128, -128, 127, 127, -128, -128}; send(v);
    // back-to-back random samples in [-128, 127], some idle clocks
    fork
      begin
        for (int n = 0; n < NVEC; n++) begin
          exp_t e;
          for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(255)) - 128;
          for (int k = 0; k < 8; k++) begin
            e.v[k] = 0;
            for (int i = 0; i < 8; i++) e.v[k] += T[k][i] * v[i];
          end
          @(negedge clk);
          if ($urandom_range(3) == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
          for (int i = 0; i < 8; i++) x[i] = W'(v[i]);
          in_valid = 1;
          e.t = cycle;
          q.push_back(e);
        end
        @(negedge clk);
        in_valid = 0;
      end
    join
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
