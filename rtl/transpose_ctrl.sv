// transpose_ctrl -- block sequencer for the transposition memory.
//
// Time is cut into phases of N shifts of the transposition memory.  A
// phase loads a block (N consecutive input rows) and at the same time
// reads out the block loaded in the phase before, if there was one.  The
// select line flips at the end of every phase, so the memory alternates
// between shifting down and shifting sideways (see transpose_mem.sv).
// When no input follows a block, a phase is still run to empty the
// memory: the last block leaves in the N clocks after its last row.
//
// Handshake at the input of the 2-D transform: a block is N rows on N
// consecutive clocks with in_valid high.  in_ready says whether a row
// may be given now; it is low only while a memory-emptying phase with no
// input is under way, because a block must start on a phase boundary.
// Once a block has started, in_valid must stay high for all its N rows
// (checked by an assertion).
//
// The state is kept in the time frame of the input; shift, sel,
// out_valid and out_idx are delayed by ROW_LAT clocks, the latency of the
// row transform between the input and the memory, so that they line up
// with the rows reaching the memory.  out_valid marks the clocks on which
// the memory's output holds a column vector, out_idx its column number.
// rst is synchronous, active high; after reset the first block is loaded
// shifting down (sel = 1).
//
// That a select line steers the multiplexers, and that it is low during
// read-out after the rows were loaded shifting down, follows the
// published architecture; how the sequencer is built (counter, phases,
// handshake) is this design's choice.
module transpose_ctrl #(
  parameter int unsigned N       = appdct_pkg::N_PT,
  parameter int unsigned ROW_LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 shift,
  output logic                 sel,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx
);
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] cnt;          // position within the current phase
  logic          dir;          // select line of the current phase
  logic          loading;      // current phase is loading a block
  logic          reading;      // current phase is reading a block out
  logic          pending;      // a loaded block waits for read-out

  logic          at_start, phase_start, shift_now, load_now, read_now;

  always_comb begin
    at_start    = (cnt == '0);
    phase_start = at_start && (pending || in_valid);
    shift_now   = !at_start || phase_start;
    load_now    = at_start ? in_valid : loading;
    read_now    = at_start ? pending  : reading;
    in_ready    = at_start || loading;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      dir     <= 1'b1;
      loading <= 1'b0;
      reading <= 1'b0;
      pending <= 1'b0;
    end else if (shift_now) begin
      if (at_start) begin
        loading <= in_valid;
        reading <= pending;
      end
      if (cnt == CW'(N-1)) begin
        cnt     <= '0;
        dir     <= ~dir;
        pending <= load_now;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // align the controls with the rows arriving at the memory
  typedef struct packed {
    logic          shift;
    logic          sel;
    logic          valid;
    logic [CW-1:0] idx;
  } ctl_t;

  ctl_t ctl_now;
  ctl_t dly [ROW_LAT+1];

  assign ctl_now = '{shift: shift_now, sel: dir, valid: read_now, idx: cnt};
  assign dly[0]  = ctl_now;

  for (genvar i = 0; i < ROW_LAT; i++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) dly[i+1] <= '0;
      else     dly[i+1] <= dly[i];
    end
  end

  assign shift     = dly[ROW_LAT].shift;
  assign sel       = dly[ROW_LAT].sel;
  assign out_valid = dly[ROW_LAT].valid;
  assign out_idx   = dly[ROW_LAT].idx;

  // a started block must be delivered on consecutive clocks
  a_block_contiguous: assert property (@(posedge clk) disable iff (rst)
    (!at_start && loading) |-> in_valid)
    else $error("transpose_ctrl: in_valid dropped inside a block");
endmodule
