// opt_chip_parallel: optimization chip of the LRNN scheduler, parallel
// architecture. One neuron-based DP (NBDP) engine plus multiplier updating,
// so that the host only loads data, issues one command per part subproblem
// and reads back schedules.
//
// Structure: K state cells (one per time slot, each with its multipliers,
// directions and minimum-indicating bits in local memory) chained to their
// neighbours, a global memory for part and schedule data, a forward sweep
// circuit and an internal sequence controller. A stage of the backward DP
// takes P_ij + K + 1 cycles (parallel stage-wise and cumulative costs, then
// the sequential pair-wise comparison from cell K-1 to cell 0), so one
// subproblem takes about K*J_i cycles, the comparison being the bottleneck.
//
// Host interface (all synchronous to clk, one record per cycle):
//   part_wr/op_wr       load part data (D_i, w_i, J_i) and operations (h, P)
//   mw_en               write pi[k][h] and g[k][h] (initialisation:
//                       pi = 0 or a warm start, g = -M_kh, the capacity)
//   mr_k/mr_h           read pi and g of one slot (combinational)
//   hs_i/hs_j           read a stored beginning time (combinational)
//   start/part/step_n   solve one part subproblem, adjust directions and
//                       update multipliers with step 2^-step_n; busy stays
//                       high until the one-cycle done pulse, which comes
//                       with sub_cost (L_i*) and fail (no feasible schedule)
// The block split follows the document's figure of this chip; all port
// encodings are this design's choice. The comparison token leaving cell 0
// (tok_ch[0]) is left unused on purpose: the sequence controller ends the
// comparison phase by counting K cycles instead.
module opt_chip_parallel
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int J  = 20,
  parameter int H  = 11,
  parameter int I  = 500,
  localparam int TW = $clog2(K + 1) + 1,
  localparam int HW = (H > 1) ? $clog2(H) : 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1,
  localparam int NW = $clog2(J + 1),
  localparam int IW = (I > 1) ? $clog2(I) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            part_wr,
  input  logic [IW-1:0]   part_wi,
  input  logic [TW-1:0]   part_wdue,
  input  logic [SHW-1:0]  part_wwsh,
  input  logic [NW-1:0]   part_wnops,
  input  logic            op_wr,
  input  logic [IW-1:0]   op_wi,
  input  logic [JW-1:0]   op_wj,
  input  logic [HW-1:0]   op_wh,
  input  logic [TW-1:0]   op_wp,
  input  logic            mw_en,
  input  logic [TW-1:0]   mw_k,
  input  logic [HW-1:0]   mw_h,
  input  cost_t           mw_pi,
  input  dir_t            mw_g,
  input  logic [TW-1:0]   mr_k,
  input  logic [HW-1:0]   mr_h,
  output cost_t           mr_pi,
  output dir_t            mr_g,
  input  logic [IW-1:0]   hs_i,
  input  logic [JW-1:0]   hs_j,
  output logic [TW-1:0]   hs_b,
  output logic            hs_valid,
  input  logic            start,
  input  logic [IW-1:0]   part,
  input  logic [SHW-1:0]  step_n,
  output logic            busy,
  output logic            done,
  output logic            fail,
  output cost_t           sub_cost
);

  // global memory <-> controller
  logic [IW-1:0]  ci;
  logic [JW-1:0]  cj;
  logic [TW-1:0]  c_due, c_p, c_b;
  logic [SHW-1:0] c_wsh;
  logic [NW-1:0]  c_nops;
  logic [HW-1:0]  c_h;
  logic           c_bvalid;
  logic           sched_wr, sched_commit;
  logic [JW-1:0]  sched_wj;
  logic [TW-1:0]  sched_wb;

  // broadcast to cells
  cell_op_e       op;
  logic [HW-1:0]  h;
  logic [JW-1:0]  stage, mib_sel;
  logic [TW-1:0]  due, plen, old_b, new_b;
  logic [SHW-1:0] wsh, nsh;
  logic           old_valid, tok_start;
  cost_t          m_boundary;

  // forward sweep
  logic           sw_start, sw_done, sw_fail;
  logic [NW-1:0]  sw_nops;
  logic [JW-1:0]  sw_sel_j;
  logic [TW-1:0]  sw_b [J];

  // neighbour chains, index K is the boundary beyond the last cell
  cost_t          pi_ch [K+1];
  cost_t          m_ch  [K+1];
  cost_t          mr_ch [K+1];
  logic [K:0]     tok_ch;
  logic [K-1:0]   mib;
  cost_t          rd_pi [K];
  dir_t           rd_g  [K];

  assign pi_ch[K]  = COST_INF;
  assign m_ch[K]   = m_boundary;
  assign mr_ch[K]  = COST_INF;
  assign tok_ch[K] = tok_start;

  global_memory #(.K(K), .J(J), .H(H), .I(I)) u_gmem (
    .clk, .rst_n,
    .part_wr, .part_wi, .part_wdue, .part_wwsh, .part_wnops,
    .op_wr, .op_wi, .op_wj, .op_wh, .op_wp,
    .hs_i, .hs_j, .hs_b, .hs_valid,
    .ci, .cj, .c_due, .c_wsh, .c_nops, .c_h, .c_p, .c_b, .c_bvalid,
    .sched_wr, .sched_wj, .sched_wb, .sched_commit
  );

  sequence_controller #(.K(K), .J(J), .H(H), .I(I)) u_ctrl (
    .clk, .rst_n,
    .start, .part, .step_n, .busy, .done, .fail, .sub_cost,
    .ci, .cj, .c_due, .c_wsh, .c_nops, .c_h, .c_p, .c_b, .c_bvalid,
    .sched_wr, .sched_wj, .sched_wb, .sched_commit,
    .op, .h, .stage, .due, .wsh, .nsh, .plen, .old_valid, .old_b, .new_b,
    .tok_start, .m_boundary, .cell0_m(mr_ch[0]),
    .sw_start, .sw_nops, .sw_sel_j, .sw_done, .sw_fail, .sw_b, .mib_sel
  );

  forward_sweep #(.K(K), .J(J)) u_sweep (
    .clk, .rst_n,
    .start(sw_start), .nops(sw_nops), .mib, .p_j(c_p),
    .sel_j(sw_sel_j), .done(sw_done), .fail(sw_fail), .b(sw_b)
  );

  for (genvar k = 0; k < K; k++) begin : g_cell
    state_cell #(.K(K), .J(J), .H(H)) u_cell (
      .clk, .rst_n,
      .idx(TW'(k)),
      .op, .h, .stage, .due, .wsh, .nsh, .plen, .old_valid, .old_b, .new_b,
      .pi_in(pi_ch[k+1]), .pi_out(pi_ch[k]),
      .m_in(m_ch[k+1]),   .m_out(m_ch[k]),
      .mr_in(mr_ch[k+1]), .mr_out(mr_ch[k]),
      .tok_in(tok_ch[k+1]), .tok_out(tok_ch[k]),
      .mib_sel, .mib_out(mib[k]),
      .wr_en(mw_en), .wr_k(mw_k), .wr_h(mw_h), .wr_pi(mw_pi), .wr_g(mw_g),
      .rd_h(mr_h), .rd_pi(rd_pi[k]), .rd_g(rd_g[k])
    );
  end

  assign mr_pi = (mr_k < TW'(K)) ? rd_pi[mr_k[$clog2(K+1)-1:0]] : COST_INF;
  assign mr_g  = (mr_k < TW'(K)) ? rd_g[mr_k[$clog2(K+1)-1:0]]  : '0;

endmodule
