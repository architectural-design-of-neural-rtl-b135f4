// lrnn_top: the optimization hardware of the LRNN job shop scheduler.
//
// The scheduler pairs a micro-controller, which moves job shop data between
// the host PC and the hardware and decides which part subproblem to solve
// next, with an optimization chip that solves one part subproblem by
// neuron-based dynamic programming and then updates the Lagrange multipliers
// itself. The micro-controller is a programmable part outside this RTL; its
// side of the chip interface is brought out as ports (see
// opt_chip_parallel for their protocol).
//
// The document proposes two architectures for the optimization chip and
// leaves the choice between them open, so both are here, side by side, each
// with its own copy of the interface:
//   par_*   parallel architecture: K state cells, about K*J_i cycles per
//           subproblem, multipliers kept locally in the cells
//   pipe_*  pipeline architecture: J stage cells, about K cycles per
//           subproblem, global multi-read multiplier memory
// Both produce bit-identical costs, schedules and multipliers.
//
// Defaults: K = 5000 time slots, J = 20 operations per part, H = 11 machine
// types, I = 500 parts: the largest job shop the document evaluates
// (500 parts, 20 operations, 5000 slots, 10 machine types), with H raised
// to 11 so that every evaluated case fits.
module lrnn_top
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int J  = 20,
  parameter int H  = 11,
  parameter int I  = 500,
  parameter int PMAX = 256,
  localparam int TW = $clog2(K + 1) + 1,
  localparam int HW = (H > 1) ? $clog2(H) : 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1,
  localparam int NW = $clog2(J + 1),
  localparam int IW = (I > 1) ? $clog2(I) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic            par_part_wr,
  input  logic [IW-1:0]   par_part_wi,
  input  logic [TW-1:0]   par_part_wdue,
  input  logic [SHW-1:0]  par_part_wwsh,
  input  logic [NW-1:0]   par_part_wnops,
  input  logic            par_op_wr,
  input  logic [IW-1:0]   par_op_wi,
  input  logic [JW-1:0]   par_op_wj,
  input  logic [HW-1:0]   par_op_wh,
  input  logic [TW-1:0]   par_op_wp,
  input  logic            par_mw_en,
  input  logic [TW-1:0]   par_mw_k,
  input  logic [HW-1:0]   par_mw_h,
  input  cost_t           par_mw_pi,
  input  dir_t            par_mw_g,
  input  logic [TW-1:0]   par_mr_k,
  input  logic [HW-1:0]   par_mr_h,
  output cost_t           par_mr_pi,
  output dir_t            par_mr_g,
  input  logic [IW-1:0]   par_hs_i,
  input  logic [JW-1:0]   par_hs_j,
  output logic [TW-1:0]   par_hs_b,
  output logic            par_hs_valid,
  input  logic            par_start,
  input  logic [IW-1:0]   par_part,
  input  logic [SHW-1:0]  par_step_n,
  output logic            par_busy,
  output logic            par_done,
  output logic            par_fail,
  output cost_t           par_sub_cost,
  input  logic            pipe_part_wr,
  input  logic [IW-1:0]   pipe_part_wi,
  input  logic [TW-1:0]   pipe_part_wdue,
  input  logic [SHW-1:0]  pipe_part_wwsh,
  input  logic [NW-1:0]   pipe_part_wnops,
  input  logic            pipe_op_wr,
  input  logic [IW-1:0]   pipe_op_wi,
  input  logic [JW-1:0]   pipe_op_wj,
  input  logic [HW-1:0]   pipe_op_wh,
  input  logic [TW-1:0]   pipe_op_wp,
  input  logic            pipe_mw_en,
  input  logic [TW-1:0]   pipe_mw_k,
  input  logic [HW-1:0]   pipe_mw_h,
  input  cost_t           pipe_mw_pi,
  input  dir_t            pipe_mw_g,
  input  logic [TW-1:0]   pipe_mr_k,
  input  logic [HW-1:0]   pipe_mr_h,
  output cost_t           pipe_mr_pi,
  output dir_t            pipe_mr_g,
  input  logic [IW-1:0]   pipe_hs_i,
  input  logic [JW-1:0]   pipe_hs_j,
  output logic [TW-1:0]   pipe_hs_b,
  output logic            pipe_hs_valid,
  input  logic            pipe_start,
  input  logic [IW-1:0]   pipe_part,
  input  logic [SHW-1:0]  pipe_step_n,
  output logic            pipe_busy,
  output logic            pipe_done,
  output logic            pipe_fail,
  output cost_t           pipe_sub_cost
);

  opt_chip_parallel #(.K(K), .J(J), .H(H), .I(I)) u_par (
    .clk, .rst_n,
    .part_wr(par_part_wr),
    .part_wi(par_part_wi),
    .part_wdue(par_part_wdue),
    .part_wwsh(par_part_wwsh),
    .part_wnops(par_part_wnops),
    .op_wr(par_op_wr),
    .op_wi(par_op_wi),
    .op_wj(par_op_wj),
    .op_wh(par_op_wh),
    .op_wp(par_op_wp),
    .mw_en(par_mw_en),
    .mw_k(par_mw_k),
    .mw_h(par_mw_h),
    .mw_pi(par_mw_pi),
    .mw_g(par_mw_g),
    .mr_k(par_mr_k),
    .mr_h(par_mr_h),
    .mr_pi(par_mr_pi),
    .mr_g(par_mr_g),
    .hs_i(par_hs_i),
    .hs_j(par_hs_j),
    .hs_b(par_hs_b),
    .hs_valid(par_hs_valid),
    .start(par_start),
    .part(par_part),
    .step_n(par_step_n),
    .busy(par_busy),
    .done(par_done),
    .fail(par_fail),
    .sub_cost(par_sub_cost)
  );

  opt_chip_pipeline #(.K(K), .J(J), .H(H), .I(I), .PMAX(PMAX)) u_pipe (
    .clk, .rst_n,
    .part_wr(pipe_part_wr),
    .part_wi(pipe_part_wi),
    .part_wdue(pipe_part_wdue),
    .part_wwsh(pipe_part_wwsh),
    .part_wnops(pipe_part_wnops),
    .op_wr(pipe_op_wr),
    .op_wi(pipe_op_wi),
    .op_wj(pipe_op_wj),
    .op_wh(pipe_op_wh),
    .op_wp(pipe_op_wp),
    .mw_en(pipe_mw_en),
    .mw_k(pipe_mw_k),
    .mw_h(pipe_mw_h),
    .mw_pi(pipe_mw_pi),
    .mw_g(pipe_mw_g),
    .mr_k(pipe_mr_k),
    .mr_h(pipe_mr_h),
    .mr_pi(pipe_mr_pi),
    .mr_g(pipe_mr_g),
    .hs_i(pipe_hs_i),
    .hs_j(pipe_hs_j),
    .hs_b(pipe_hs_b),
    .hs_valid(pipe_hs_valid),
    .start(pipe_start),
    .part(pipe_part),
    .step_n(pipe_step_n),
    .busy(pipe_busy),
    .done(pipe_done),
    .fail(pipe_fail),
    .sub_cost(pipe_sub_cost)
  );

endmodule
