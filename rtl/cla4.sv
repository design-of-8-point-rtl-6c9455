// cla4 -- 4-bit carry look-ahead adder.
//
// The basic block of the A1CSA adder (a1csa.sv).  Generate g = a & b and
// propagate p = a ^ b are formed per bit; every internal carry and the
// carry out are then written directly as two-level functions of g, p and
// cin, so no carry ripples through the block.  s = a + b + cin, cout is
// the carry out of bit 3.  Purely combinational.
//
// The block width (4) is the published one; the look-ahead equations are
// the textbook ones, as the block's insides are not given further.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    s    = p ^ c[3:0];
    cout = c[4];
  end
endmodule
