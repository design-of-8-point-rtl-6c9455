// appdct2d_top -- 8x8 approximate 2-D DCT, row-column architecture.
//
// The 2-D transform Y = T * X * T' of an 8x8 block X is computed as two
// passes of the 12-addition 1-D transform T (appdct1d.sv):
//   row pass     each input row of X is transformed as it arrives;
//   transpose    the transposition memory (transpose_mem.sv, sequenced
//                by transpose_ctrl.sv) turns the eight transformed rows
//                into eight column vectors;
//   column pass  each column vector is transformed again.
// No multiplier or shifter is used: 24 additions per 8-point row/column
// pair, every one a 12-bit A1CSA adder.
//
// Input: one row of eight signed PIX_W-bit samples per clock (in_valid),
// a block being eight rows on eight consecutive clocks, row 0 first.
// Samples are expected level-shifted as in JPEG (pixel - 128); they are
// sign-extended to 12 bits.  in_ready low means a row may not be given on
// this clock (the memory is emptying the previous block); it is never low
// while blocks follow each other without gaps.
// Output: out_valid marks the eight clocks carrying one block's result;
// on the k-th of them y_out[j] = Y[j][k] with Y = T * X * T' (X[r][c]
// being sample c of row r): the block's result leaves column by column.
// Timing: the first column of a block leaves 12 clocks after its first
// row entered (2 row pass + 8 transpose + 2 column pass); a block every
// 8 clocks when fed back to back.  rst is synchronous, active high.
//
// The structure row DCT -> transposition buffer -> column DCT, the
// 12-bit words and the adders follow the published architecture; the
// handshake, the input sample format and the output order are this
// design's choices.
module appdct2d_top #(
  parameter int unsigned PIX_W = appdct_pkg::PIX_W,
  parameter int unsigned WIDTH = appdct_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [PIX_W-1:0] x_in  [8],
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] y_out [8]
);
  localparam int unsigned N = appdct_pkg::N_PT;

  logic signed [WIDTH-1:0] row_x [N];
  logic signed [WIDTH-1:0] row_y [N];
  logic signed [WIDTH-1:0] col_x [N];
  logic                    row_v;
  logic                    accept;
  logic                    tp_shift, tp_sel, tp_valid;
  logic [$clog2(N)-1:0]    tp_idx;

  assign accept = in_valid && in_ready;

  always_comb
    for (int i = 0; i < N; i++) row_x[i] = WIDTH'(x_in[i]);

  appdct1d #(.WIDTH(WIDTH)) u_row_dct (
    .clk, .rst,
    .in_valid (accept),
    .x        (row_x),
    .out_valid(row_v),
    .y        (row_y)
  );

  transpose_ctrl #(.N(N), .ROW_LAT(2)) u_ctrl (
    .clk, .rst,
    .in_valid (accept),
    .in_ready (in_ready),
    .shift    (tp_shift),
    .sel      (tp_sel),
    .out_valid(tp_valid),
    .out_idx  (tp_idx)
  );

  transpose_mem #(.N(N), .WIDTH(WIDTH)) u_tmem (
    .clk, .rst,
    .shift(tp_shift),
    .sel  (tp_sel),
    .din  (row_y),
    .dout (col_x)
  );

  appdct1d #(.WIDTH(WIDTH)) u_col_dct (
    .clk, .rst,
    .in_valid (tp_valid),
    .x        (col_x),
    .out_valid(out_valid),
    .y        (y_out)
  );

  // the row pass and the controller's delayed view must agree on which
  // clocks carry rows into the memory
  a_row_in_shift: assert property (@(posedge clk) disable iff (rst)
    row_v |-> tp_shift)
    else $error("appdct2d_top: row reached the memory without a shift");

  logic [$clog2(N)-1:0] unused_idx;
  assign unused_idx = tp_idx;
endmodule
