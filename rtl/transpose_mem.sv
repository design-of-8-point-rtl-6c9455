// transpose_mem -- real-time row-parallel transposition memory.
//
// An N x N array of WIDTH-bit registers, each with a 2:1 multiplexer in
// front of it.  One select line drives every multiplexer:
//   sel = 1  vertical:   the array shifts down one row per clock; the
//                        N input words enter the top row and the bottom
//                        row is the output.
//   sel = 0  horizontal: the array shifts right one column per clock;
//                        the N input words enter the left column and the
//                        right column is the output.
// A block of N row vectors written in one direction is read out as its
// N column vectors while the array shifts in the other direction, and
// those same shifts write the next block.  Alternating the direction
// every N clocks therefore transposes a continuous stream of blocks with
// a single array: N vectors in and N vectors out, one per clock each.
//
// Interface: when shift is high the array moves one step in the
// direction given by sel.  dout is combinational from the array and sel:
// during the N shifts that follow the loading of a block (sel now the
// other way), dout on the k-th of them is column k of that block,
// dout[j] = row j, element k.  Input words are entered in reverse index
// order so that no reordering is needed at the output.  The caller
// (transpose_ctrl.sv) produces shift and sel.  rst (synchronous, active
// high) clears the array.
//
// The 8 x 8 array of 12-bit registers, the multiplexer per register, the
// shifting down while rows are loaded and the select line that turns the
// shift sideways for read-out follow the published architecture.  Loading
// the next block during read-out (alternating directions) is this
// design's reading of "real-time"; the entry order is its own choice.
module transpose_mem #(
  parameter int unsigned N     = appdct_pkg::N_PT,
  parameter int unsigned WIDTH = appdct_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    shift,
  input  logic                    sel,
  input  logic signed [WIDTH-1:0] din  [N],
  output logic signed [WIDTH-1:0] dout [N]
);
  logic signed [WIDTH-1:0] r [N][N];   // r[row][col]

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          r[i][j] <= '0;
    end else if (shift) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (sel) r[i][j] <= (i == 0) ? din[N-1-j] : r[i-1][j];
          else     r[i][j] <= (j == 0) ? din[N-1-i] : r[i][j-1];
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++)
      dout[k] = sel ? r[N-1][N-1-k] : r[N-1-k][N-1];
  end
endmodule
