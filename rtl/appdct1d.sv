// appdct1d -- 8-point approximate 1-D DCT with 12 additions.
//
// Computes y = T * x for the multiplier-free matrix
//        | 1  0  0  0  0  0  0  1 |
//        | 1  1  0  0  0  0  1  1 |
//        | 0  0  1  0  0  1  0  0 |
//    T = | 0  0  1  1  1  1  0  0 |
//        | 0  0  1  1 -1 -1  0  0 |
//        | 0  0  1  0  0 -1  0  0 |
//        | 1  1  0  0  0  0 -1 -1 |
//        | 1  0  0  0  0  0  0 -1 |
// as a two-stage butterfly:
//   stage 1 (8 adders): s_i = x_i + x_(7-i), d_i = x_i - x_(7-i), i = 0..3
//   stage 2 (4 adders): y1 = s0 + s1   y3 = s2 + s3
//                       y4 = d2 + d3   y6 = d0 + d1
//   pass-through:       y0 = s0  y2 = s2  y5 = d2  y7 = d0
// Every adder is a WIDTH-bit A1CSA (a1csa.sv); a subtraction is
// a + ~b + 1.  The entries of T are 0 and +-1 only, so there is no
// multiplier and no shifter; the scale factor 1/2 of the inverse is left
// to the quantiser.
//
// Timing: fully pipelined, one vector in and one out per clock.  Each
// stage ends in a register, so y appears two clocks after x
// (LATENCY = 2).  in_valid travels alongside as out_valid.  rst is
// synchronous, active high, and clears the data and valid registers.
//
// Words are WIDTH-bit two's complement and wrap on overflow.  A sum of
// four inputs grows by two bits: with 8-bit signed samples the row pass
// stays within [-512, 510] and the column pass within [-2048, 2044], so
// at WIDTH = 12 nothing wraps.
//
// The matrix T, the 12-adder count, the 8 + 4 split into two registered
// stages and the 12-bit A1CSA adders follow the published architecture.
// The output order (y_k is row k of T), the valid signal and the reset
// are this design's choices.
module appdct1d #(
  parameter int unsigned WIDTH = appdct_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x [8],
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] y [8]
);
  // ---------------- stage 1: 4 sums and 4 differences ----------------
  logic [WIDTH-1:0] s_c [4];  // combinational adder outputs
  logic [WIDTH-1:0] d_c [4];
  logic [WIDTH-1:0] s_q [4];  // stage-1 registers
  logic [WIDTH-1:0] d_q [4];
  logic             v1_q;

  for (genvar i = 0; i < 4; i++) begin : g_st1
    logic unused_cs, unused_cd;
    a1csa #(.WIDTH(WIDTH)) u_sum (
      .a(x[i]), .b(x[7-i]), .cin(1'b0), .sum(s_c[i]), .cout(unused_cs));
    a1csa #(.WIDTH(WIDTH)) u_dif (
      .a(x[i]), .b(~x[7-i]), .cin(1'b1), .sum(d_c[i]), .cout(unused_cd));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        s_q[i] <= '0;
        d_q[i] <= '0;
      end
    end else begin
      v1_q <= in_valid;
      s_q  <= s_c;
      d_q  <= d_c;
    end
  end

  // ---------------- stage 2: 4 more additions ----------------
  logic [WIDTH-1:0] y_c [8];
  logic [3:0]       unused_c2;

  a1csa #(.WIDTH(WIDTH)) u_y1 (.a(s_q[0]), .b(s_q[1]), .cin(1'b0), .sum(y_c[1]), .cout(unused_c2[0]));
  a1csa #(.WIDTH(WIDTH)) u_y3 (.a(s_q[2]), .b(s_q[3]), .cin(1'b0), .sum(y_c[3]), .cout(unused_c2[1]));
  a1csa #(.WIDTH(WIDTH)) u_y4 (.a(d_q[2]), .b(d_q[3]), .cin(1'b0), .sum(y_c[4]), .cout(unused_c2[2]));
  a1csa #(.WIDTH(WIDTH)) u_y6 (.a(d_q[0]), .b(d_q[1]), .cin(1'b0), .sum(y_c[6]), .cout(unused_c2[3]));

  assign y_c[0] = s_q[0];
  assign y_c[2] = s_q[2];
  assign y_c[5] = d_q[2];
  assign y_c[7] = d_q[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) y[k] <= '0;
    end else begin
      out_valid <= v1_q;
      for (int k = 0; k < 8; k++) y[k] <= signed'(y_c[k]);
    end
  end
endmodule
