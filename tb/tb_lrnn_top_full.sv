// tb_lrnn_top_full: the LRNN optimization hardware at its full default size
// (K = 5000 time slots, J = 20 operations, H = 11 machine types, I = 500
// parts), taken through complete subproblem operations on both chips.
//
// One part with 20 operations and random processing times of 40 to 120
// slots is loaded, multipliers of three machine types are set to random
// values and all directions to minus the capacity (1 everywhere, except 0
// for machine type 0 in the first half of the horizon, so that booking it
// raises its price). The due date of 600 is shorter than the part's total
// processing time, so the part always finishes late. The part is then solved
// twice (the second time its first schedule is taken out of the directions
// again). After each run both chips are compared with the reference model
// and with each other: cost, beginning times, all 55,000 multipliers and
// directions, and the cycle counts (about K*J for the parallel chip and
// about K for the pipeline chip).
`timescale 1ns/1ps
module tb_lrnn_top_full;
  import lrnn_pkg::*;
  import lrnn_ref_pkg::*;

  localparam int K = 5000, J = 20, H = 11, I = 500, PMAX = 256;
  localparam int TW = $clog2(K + 1) + 1;
  localparam int HW = $clog2(H), JW = $clog2(J), NW = $clog2(J + 1), IW = $clog2(I);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // one set of host signals drives both chips
  logic part_wr = 0, op_wr = 0, mw_en = 0, start = 0;
  logic [IW-1:0] part_wi = 0, op_wi = 0, hs_i = 0, part = 0;
  logic [TW-1:0] part_wdue = 0, op_wp = 0, mw_k = 0, mr_k = 0;
  logic [SHW-1:0] part_wwsh = 0, step_n = 0;
  logic [NW-1:0] part_wnops = 0;
  logic [JW-1:0] op_wj = 0, hs_j = 0;
  logic [HW-1:0] op_wh = 0, mw_h = 0, mr_h = 0;
  cost_t mw_pi = 0;
  dir_t  mw_g = 0;
  cost_t par_mr_pi, pipe_mr_pi, par_sub_cost, pipe_sub_cost;
  dir_t  par_mr_g, pipe_mr_g;
  logic [TW-1:0] par_hs_b, pipe_hs_b;
  logic par_hs_valid, pipe_hs_valid, par_busy, pipe_busy, par_done, pipe_done, par_fail, pipe_fail;

  lrnn_top dut (
    .clk, .rst_n,
    .par_part_wr(part_wr), .par_part_wi(part_wi), .par_part_wdue(part_wdue),
    .par_part_wwsh(part_wwsh), .par_part_wnops(part_wnops),
    .par_op_wr(op_wr), .par_op_wi(op_wi), .par_op_wj(op_wj), .par_op_wh(op_wh), .par_op_wp(op_wp),
    .par_mw_en(mw_en), .par_mw_k(mw_k), .par_mw_h(mw_h), .par_mw_pi(mw_pi), .par_mw_g(mw_g),
    .par_mr_k(mr_k), .par_mr_h(mr_h), .par_mr_pi, .par_mr_g,
    .par_hs_i(hs_i), .par_hs_j(hs_j), .par_hs_b, .par_hs_valid,
    .par_start(start), .par_part(part), .par_step_n(step_n),
    .par_busy, .par_done, .par_fail, .par_sub_cost,
    .pipe_part_wr(part_wr), .pipe_part_wi(part_wi), .pipe_part_wdue(part_wdue),
    .pipe_part_wwsh(part_wwsh), .pipe_part_wnops(part_wnops),
    .pipe_op_wr(op_wr), .pipe_op_wi(op_wi), .pipe_op_wj(op_wj), .pipe_op_wh(op_wh), .pipe_op_wp(op_wp),
    .pipe_mw_en(mw_en), .pipe_mw_k(mw_k), .pipe_mw_h(mw_h), .pipe_mw_pi(mw_pi), .pipe_mw_g(mw_g),
    .pipe_mr_k(mr_k), .pipe_mr_h(mr_h), .pipe_mr_pi, .pipe_mr_g,
    .pipe_hs_i(hs_i), .pipe_hs_j(hs_j), .pipe_hs_b, .pipe_hs_valid,
    .pipe_start(start), .pipe_part(part), .pipe_step_n(step_n),
    .pipe_busy, .pipe_done, .pipe_fail, .pipe_sub_cost
  );

  int checks = 0, failures = 0;
  int n_tardy = 0, n_infeasible = 0, n_resolve = 0, n_moved = 0, n_clamp = 0, n_rise = 0;
  int n_p1 = 0, n_pmax = 0, n_faster = 0;
  int cap [K][H];
  lrnn_model m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_part(int i, int n);
    int cpar = 0, cpipe = 0, exp_par, exp_pipe, sum_p = 0, old_b [J];
    bit pd = 0, qd = 0, was_valid;
    cost_t old_pi [K][H];
    was_valid = m.svalid[i];
    for (int j = 0; j < m.nops[i]; j++) old_b[j] = m.sched[i][j];
    for (int k = 0; k < K; k++) for (int h = 0; h < H; h++) old_pi[k][h] = m.pi[k][h];
    @(negedge clk);
    part = IW'(i); step_n = SHW'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (!(pd && qd)) begin
      if (par_done) pd = 1;
      if (pipe_done) qd = 1;
      if (!pd) cpar++;
      if (!qd) cpipe++;
      @(negedge clk);
      if (par_done) pd = 1;
      if (pipe_done) qd = 1;
      if (pd && qd) break;
    end
    @(negedge clk);  // let the last done's schedule commit take effect
    m.run_part(i, n);
    for (int j = 0; j < m.nops[i]; j++) sum_p += m.opp[i][j];
    exp_par  = 1 + sum_p + m.nops[i] * (K + 1) + 1 + m.sweep_cycles + 1;
    exp_pipe = 2 * m.nops[i] + K + 6 + m.sweep_cycles;
    if (!m.fail) begin exp_par += m.nops[i] + H; exp_pipe += m.nops[i] + H; end
    check(cpar == exp_par, $sformatf("parallel: part %0d %0d cycles, expected %0d", i, cpar, exp_par));
    check(cpipe == exp_pipe, $sformatf("pipeline: part %0d %0d cycles, expected %0d", i, cpipe, exp_pipe));
    if (cpipe < cpar) n_faster++;
    check(par_fail == m.fail && pipe_fail == m.fail, $sformatf("part %0d fail flags", i));
    check(par_sub_cost == m.cost && pipe_sub_cost == m.cost,
          $sformatf("part %0d cost %0d/%0d expected %0d", i, par_sub_cost, pipe_sub_cost, m.cost));
    if (m.fail) n_infeasible++;
    else begin
      int last = m.nops[i] - 1;
      if (m.b[last] + m.opp[i][last] - 1 > m.due[i]) n_tardy++;
      if (was_valid) begin
        n_resolve++;
        for (int j = 0; j < m.nops[i]; j++) if (old_b[j] != m.b[j]) begin n_moved++; break; end
      end
    end
    for (int j = 0; j < m.nops[i]; j++) begin
      hs_i = IW'(i); hs_j = JW'(j); #1;
      check(par_hs_valid == m.svalid[i] && pipe_hs_valid == m.svalid[i],
            $sformatf("part %0d schedule valid %0b/%0b expected %0b", i, par_hs_valid, pipe_hs_valid, m.svalid[i]));
      if (m.svalid[i])
        check(par_hs_b == TW'(m.sched[i][j]) && pipe_hs_b == TW'(m.sched[i][j]),
              $sformatf("part %0d op %0d b=%0d/%0d expected %0d", i, j, par_hs_b, pipe_hs_b, m.sched[i][j]));
    end
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        mr_k = TW'(k); mr_h = HW'(h); #1;
        check(par_mr_pi == m.pi[k][h] && pipe_mr_pi == m.pi[k][h] &&
              par_mr_g == m.g[k][h] && pipe_mr_g == m.g[k][h],
              $sformatf("pi/g[%0d][%0d]", k, h));
        if (!m.fail && m.pi[k][h] == 0 && m.g[k][h] < 0) n_clamp++;
        if (m.pi[k][h] > old_pi[k][h]) n_rise++;
      end
  endtask

  initial begin
    m = new(K, J, H, I);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    m.nops[7] = J; m.due[7] = 600; m.wsh[7] = 2; m.svalid[7] = 0;
    part_wr = 1; part_wi = IW'(7); part_wdue = TW'(m.due[7]);
    part_wwsh = SHW'(m.wsh[7]); part_wnops = NW'(m.nops[7]);
    @(negedge clk);
    part_wr = 0;
    for (int j = 0; j < J; j++) begin
      m.oph[7][j] = $urandom_range(2);
      m.opp[7][j] = 40 + $urandom_range(80);
      op_wr = 1; op_wi = IW'(7); op_wj = JW'(j);
      op_wh = HW'(m.oph[7][j]); op_wp = TW'(m.opp[7][j]);
      @(negedge clk);
      op_wr = 0;
    end
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        cap[k][h] = (h == 0 && k < 2500) ? 0 : 1;
        m.pi[k][h] = (h < 3) ? cost_t'($urandom_range(20)) : 0;
        m.g[k][h]  = dir_t'(-cap[k][h]);
      end
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        mw_en = 1; mw_k = TW'(k); mw_h = HW'(h); mw_pi = m.pi[k][h]; mw_g = m.g[k][h];
        @(negedge clk);
      end
    mw_en = 0;
    for (int r = 0; r < 2; r++) run_part(7, r);
    $display("mechanisms: tardy=%0d resolve=%0d moved=%0d clamp=%0d rise=%0d faster=%0d",
             n_tardy, n_resolve, n_moved, n_clamp, n_rise, n_faster);
    check(n_resolve > 0, "part not solved twice");
    check(n_faster > 0, "pipeline never faster");
    check(n_tardy > 0, "part never tardy");
    check(n_rise > 0, "no multiplier ever rose");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
