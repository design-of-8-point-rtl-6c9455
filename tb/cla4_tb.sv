// cla4_tb -- exhaustive self-check of the 4-bit carry look-ahead adder.
// All 512 combinations of a, b and cin are applied and {cout, s} is
// compared with the integer sum a + b + cin.
module cla4_tb;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla4 dut (.a, .b, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
