// opt_chip_pipeline: optimization chip of the LRNN scheduler, pipeline
// architecture. Same host interface and same results as opt_chip_parallel,
// but a part subproblem takes about K cycles instead of K*J_i.
//
// Structure: J stage cells (one per DP stage, i.e. per operation), each
// handling one state per cycle in a four-step pipeline; stage cell j runs
// one cycle behind stage cell j+1 on the same state index and takes the
// running minimum of stage j+1 from it. Because every stage cell needs
// multipliers of every time slot, they sit in a global multiplier memory
// with one read port per stage cell, and a separate updating circuit
// adjusts directions and multipliers for all slots in parallel. The
// minimum-indicating bits are stored in the forward sweep circuit. A
// controller copies the part's operation data into the stage cells, starts
// the pipeline, and runs sweep and updates as in the parallel chip.
//
// Host interface: identical to opt_chip_parallel (part_wr/op_wr loading,
// mw_*/mr_* multiplier access, hs_* schedule read, start/part/step_n command
// with busy, done, fail and sub_cost). Processing times must not exceed
// PMAX, the depth of the stage cells' delay buffers (a power of two).
// The architecture is the document's; all interface encodings, buffer
// depths and the control sequence are this design's choices.
module opt_chip_pipeline
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

  // controller -> stage cells and updating circuit
  logic           go;
  logic [NW-1:0]  nops;
  logic [TW-1:0]  cell_p [J];
  logic [HW-1:0]  cell_h [J];
  logic [TW-1:0]  due, plen, old_b, new_b;
  logic [SHW-1:0] wsh, nsh;
  cell_op_e       op;
  logic [HW-1:0]  h;
  logic           old_valid;

  // forward sweep
  logic           sw_start, sw_done, sw_fail;
  logic [NW-1:0]  sw_nops;
  logic [JW-1:0]  sw_sel_j;
  logic [TW-1:0]  sw_b [J];

  // stage cells
  logic           go_ch  [J+1];
  cost_t          m_ch   [J+1];
  logic           cgo    [J];
  logic [TW-1:0]  rd_k   [J];
  cost_t          rd_pi  [J];
  logic           bit_we [J];
  logic [TW-1:0]  bit_k  [J];
  logic           bit_val[J];
  logic           fin    [J];

  assign go_ch[J] = 1'b0;
  assign m_ch[J]  = COST_INF;

  global_memory #(.K(K), .J(J), .H(H), .I(I)) u_gmem (
    .clk, .rst_n,
    .part_wr, .part_wi, .part_wdue, .part_wwsh, .part_wnops,
    .op_wr, .op_wi, .op_wj, .op_wh, .op_wp,
    .hs_i, .hs_j, .hs_b, .hs_valid,
    .ci, .cj, .c_due, .c_wsh, .c_nops, .c_h, .c_p, .c_b, .c_bvalid,
    .sched_wr, .sched_wj, .sched_wb, .sched_commit
  );

  pipe_controller #(.K(K), .J(J), .H(H), .I(I)) u_ctrl (
    .clk, .rst_n,
    .start, .part, .step_n, .busy, .done, .fail, .sub_cost,
    .ci, .cj, .c_due, .c_wsh, .c_nops, .c_h, .c_p, .c_b, .c_bvalid,
    .sched_wr, .sched_wj, .sched_wb, .sched_commit,
    .go, .nops, .cell_p, .cell_h, .due, .wsh, .fin0(fin[0]), .m0(m_ch[0]),
    .op, .h, .nsh, .plen, .old_valid, .old_b, .new_b,
    .sw_start, .sw_nops, .sw_sel_j, .sw_done, .sw_fail, .sw_b
  );

  pipe_mult_memory #(.K(K), .H(H), .NR(J)) u_mem (
    .clk, .rst_n,
    .rd_k, .rd_h(cell_h), .rd_pi,
    .op, .h, .nsh, .plen, .old_valid, .old_b, .new_b,
    .wr_en(mw_en), .wr_k(mw_k), .wr_h(mw_h), .wr_pi(mw_pi), .wr_g(mw_g),
    .hr_k(mr_k), .hr_h(mr_h), .hr_pi(mr_pi), .hr_g(mr_g)
  );

  pipe_forward_sweep #(.K(K), .J(J)) u_sweep (
    .clk, .rst_n,
    .bit_we, .bit_k, .bit_val,
    .start(sw_start), .nops(sw_nops), .p_j(c_p),
    .sel_j(sw_sel_j), .done(sw_done), .fail(sw_fail), .b(sw_b)
  );

  for (genvar j = 0; j < J; j++) begin : g_stage
    // the last operation's cell is started by the controller, the others
    // by the cell above them
    assign cgo[j] = (NW'(j) + 1'b1 == nops) ? go : go_ch[j+1];
    pipe_stage_cell #(.K(K), .PMAX(PMAX)) u_cell (
      .clk, .rst_n,
      .go(cgo[j]), .go_out(go_ch[j]),
      .plen(cell_p[j]), .is_last(NW'(j) + 1'b1 == nops), .due, .wsh,
      .rd_k(rd_k[j]), .rd_pi(rd_pi[j]),
      .m_in(m_ch[j+1]), .m_out(m_ch[j]),
      .bit_we(bit_we[j]), .bit_k(bit_k[j]), .bit_val(bit_val[j]), .fin(fin[j])
    );
  end

endmodule
