// a1csa_tb -- self-check of the 12-bit add-one carry-select adder.
// Operand pairs that exercise every slice-carry pattern (all-ones runs,
// carries into and through each 4-bit slice) are applied, followed by
// random operands; sum and carry out are compared with the 13-bit
// integer result of a + b + cin.  Subtraction is checked as a + ~b + 1.
module a1csa_tb;
  localparam int W = 12;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  a1csa #(.WIDTH(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check(input logic [W-1:0] ta, tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %h exp %h", ta, tb_, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carry rippling through whole slices
    check(12'hFFF, 12'h000, 1'b1);
    check(12'hFFF, 12'h001, 1'b0);
    check(12'h0FF, 12'h001, 1'b0);
    check(12'h00F, 12'h001, 1'b0);
    check(12'hF0F, 12'h0F1, 1'b0);
    check(12'h7FF, 12'h7FF, 1'b1);
    check(12'h800, 12'h800, 1'b0);
    for (int i = 0; i < 4096; i++) begin
      check(12'(i), 12'(4095 - i), 1'b1);
      check(12'(i), 12'(i * 37), 1'(i));
    end
    for (int i = 0; i < 20000; i++)
      check(12'($urandom), 12'($urandom), 1'($urandom));
    // subtraction as used by the DCT butterflies
    for (int i = 0; i < 2000; i++) begin
      logic signed [W-1:0] p, q;
      p = 12'($urandom); q = 12'($urandom);
      a = p; b = ~q; cin = 1'b1;
      #1;
      checks++;
      if (sum !== 12'(p - q)) begin
        failures++;
        $display("FAIL %0d - %0d got %0d", p, q, $signed(sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
