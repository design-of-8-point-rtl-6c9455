// a1csa -- add-one carry-select adder (A1CSA), WIDTH bits.
//
// The operands are cut into 4-bit slices, each added by a carry
// look-ahead block (cla4).  The least significant slice gets the real
// carry in.  Every higher slice is added once, with carry in 0, giving a
// provisional sum s0 and a slice carry cb.  Instead of a second adder
// for carry in 1 (as a classic carry-select adder would have), the slice
// is corrected by an "add one" stage once its real carry in c is known:
//   sum bit j = s0[j] ^ (c & s0[j-1] & ... & s0[0])
//   P         = &s0                 (adding one ripples through the slice)
//   carry out = cb | (P & c)
// The only path that crosses slices is the chain of (P & c) | cb terms,
// which keeps the critical delay short.
//
// Interface: sum = a + b + cin (mod 2^WIDTH), cout = carry out of the
// top bit.  Combinational, no clock.  A subtraction a - b is made by the
// caller as a + ~b + 1.
//
// The 12-bit width, the 4-bit look-ahead slices, the single adder per
// upper slice, P as the AND of the provisional sum bits and the carry
// chain follow the published architecture.  That the first slice takes
// the carry in (used for subtraction) is this design's choice: the
// published figure shows it tied to 0 for plain addition.
module a1csa #(
  parameter int unsigned WIDTH = appdct_pkg::DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned BW   = appdct_pkg::BLK_W;
  localparam int unsigned NBLK = WIDTH / BW;

  initial assert (WIDTH % BW == 0 && NBLK >= 1)
    else $error("a1csa: WIDTH must be a positive multiple of %0d", BW);

  // c[i] is the real carry into slice i; c[NBLK] is the carry out
  logic [NBLK:0] c;
  assign c[0] = cin;

  // least significant slice: plain look-ahead add with the carry in
  cla4 u_blk0 (
    .a   (a[BW-1:0]),
    .b   (b[BW-1:0]),
    .cin (c[0]),
    .s   (sum[BW-1:0]),
    .cout(c[1])
  );

  for (genvar i = 1; i < NBLK; i++) begin : g_slice
    logic [BW-1:0] s0;     // provisional sum, carry in 0
    logic          cb;     // provisional slice carry
    logic [BW-1:0] run;    // run[j]: c & s0[j-1:0] all ones
    logic          p_all;  // slice propagates an added one

    cla4 u_blk (
      .a   (a[i*BW +: BW]),
      .b   (b[i*BW +: BW]),
      .cin (1'b0),
      .s   (s0),
      .cout(cb)
    );

    assign run[0] = c[i];
    for (genvar j = 0; j < BW-1; j++) begin : g_run
      assign run[j+1] = run[j] & s0[j];
    end
    assign p_all = &s0;

    assign sum[i*BW +: BW] = s0 ^ run;
    assign c[i+1]          = cb | (p_all & c[i]);
  end

  assign cout = c[NBLK];
endmodule
