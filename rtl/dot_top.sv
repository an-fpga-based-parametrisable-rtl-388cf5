// dot_top - FPGA coprocessor core for discrete orthogonal transforms (DOTs):
// Y = A X for a fixed N x N kernel A (DCT, DHT or Hadamard, see dot_pkg).
//
// Two engines that compute the same transform stand side by side, each with
// its own ports:
//   * dot_da - distributed arithmetic with offset binary coding: no
//     multipliers, N small ROMs and shift-accumulators, the whole vector
//     loaded in parallel and processed bit-serially in W cycles;
//   * dot_sa - systolic array of N Booth/Wallace multiply-accumulate units,
//     fed one vector element per cycle, results after about 2N cycles.
// Defaults are the evaluated configuration N = 4, W = 8; the coefficient width
// L = 8 and the DCT kernel are this design's choices, YW = 32 matches the
// 32-bit final adder of the MAC.  Both engines share clock and a synchronous
// active-low reset; their timing is described in their own headers.
module dot_top
  import dot_pkg::*;
#(
  parameter int         N         = 4,
  parameter int         W         = 8,
  parameter int         L         = 8,
  parameter int         YW        = 32,
  parameter transform_e TRANSFORM = DOT_DCT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // Distributed-arithmetic engine
  input  logic                        da_in_valid,
  output logic                        da_in_ready,
  input  logic signed [N-1:0][W-1:0]  da_x,
  output logic                        da_y_valid,
  output logic signed [N-1:0][YW-1:0] da_y,
  // Systolic engine
  input  logic                        sa_x_valid,
  input  logic signed [W-1:0]         sa_x,
  output logic                        sa_y_valid,
  output logic signed [N-1:0][YW-1:0] sa_y
);
  dot_da #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(TRANSFORM)) u_da (
    .clk, .rst_n, .in_valid(da_in_valid), .in_ready(da_in_ready), .x(da_x),
    .y_valid(da_y_valid), .y(da_y)
  );

  dot_sa #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(TRANSFORM)) u_sa (
    .clk, .rst_n, .x_valid(sa_x_valid), .x(sa_x), .y_valid(sa_y_valid), .y(sa_y)
  );
endmodule
