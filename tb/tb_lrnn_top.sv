// tb_lrnn_top: end-to-end test of the LRNN optimization hardware.
//
// The testbench acts as the micro-controller: it loads a random job shop
// into both optimization chips (parallel and pipeline architecture), sets
// the multipliers to zero and the directions to minus the machine capacity
// M_kh, and then runs LRNN iterations, one part subproblem per command,
// with a fixed step 2^-n. After every subproblem both chips are compared
// with the reference model and with each other (cost L_i*, fail flag,
// beginning times, all multipliers and directions) and their cycle counts
// with the expected timing. The surrogate dual value
// sum_i L_i* - sum_kh pi_kh M_kh is tracked as the micro-controller would.
// Every mechanism must occur at least once: tardy completion, an infeasible
// part, re-solving a part (old schedule removed from the directions), a
// schedule that moves between iterations, a multiplier clamped at zero, a
// multiplier that rises, a processing time of one slot and one of PMAX
// (the pipeline delay-buffer limit), and the pipeline finishing a
// subproblem faster than the parallel chip.
`timescale 1ns/1ps
module tb_lrnn_top;
  import lrnn_pkg::*;
  import lrnn_ref_pkg::*;

  localparam int K = 36, J = 5, H = 3, I = 6, PMAX = 8;
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

  lrnn_top #(.K(K), .J(J), .H(H), .I(I), .PMAX(PMAX)) dut (
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
    repeat (400000) @(posedge clk);
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
    longint dual;
    m = new(K, J, H, I);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < I; i++) begin
      m.nops[i] = (i == I - 1) ? J : 2 + $urandom_range(J - 2);
      m.due[i]  = 5 + $urandom_range(K / 3);
      m.wsh[i]  = 1 + $urandom_range(2);
      m.svalid[i] = 0;
      part_wr = 1; part_wi = IW'(i); part_wdue = TW'(m.due[i]);
      part_wwsh = SHW'(m.wsh[i]); part_wnops = NW'(m.nops[i]);
      @(negedge clk);
      part_wr = 0;
      for (int j = 0; j < m.nops[i]; j++) begin
        m.oph[i][j] = $urandom_range(H - 1);
        if (i == I - 1) m.opp[i][j] = PMAX;   // J*PMAX = 40 > K: cannot fit
        else if (i == 0 && j == 0) m.opp[i][j] = PMAX;
        else if (i == 0 && j == 1) m.opp[i][j] = 1;
        else m.opp[i][j] = 1 + $urandom_range(5);
        if (m.opp[i][j] == 1) n_p1++;
        if (m.opp[i][j] == PMAX) n_pmax++;
        op_wr = 1; op_wi = IW'(i); op_wj = JW'(j);
        op_wh = HW'(m.oph[i][j]); op_wp = TW'(m.opp[i][j]);
        @(negedge clk);
        op_wr = 0;
      end
    end
    // multipliers 0, directions -M_kh (one or two machines per type)
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        cap[k][h] = 1 + (h % 2);
        m.pi[k][h] = 0;
        m.g[k][h]  = -dir_t'(cap[k][h]);
        mw_en = 1; mw_k = TW'(k); mw_h = HW'(h); mw_pi = 0; mw_g = m.g[k][h];
        @(negedge clk);
        mw_en = 0;
      end
    for (int it = 0; it < 6; it++) begin
      dual = 0;
      for (int i = 0; i < I; i++) begin
        run_part(i, (it < 3) ? 0 : 1);
        if (m.cost != COST_INF) dual += m.cost;
      end
      for (int k = 0; k < K; k++) for (int h = 0; h < H; h++) dual -= longint'(m.pi[k][h]) * cap[k][h];
      $display("iteration %0d: surrogate dual %0d", it, dual);
    end
    $display("mechanisms: tardy=%0d infeasible=%0d resolve=%0d moved=%0d clamp=%0d rise=%0d p1=%0d pmax=%0d faster=%0d",
             n_tardy, n_infeasible, n_resolve, n_moved, n_clamp, n_rise, n_p1, n_pmax, n_faster);
    check(n_tardy > 0, "no tardy schedule");
    check(n_infeasible > 0, "no infeasible part");
    check(n_resolve > 0, "no part solved twice");
    check(n_moved > 0, "no schedule moved between iterations");
    check(n_clamp > 0, "no multiplier clamped at zero");
    check(n_rise > 0, "no multiplier rose");
    check(n_p1 > 0 && n_pmax > 0, "processing-time extremes not exercised");
    check(n_faster > 0, "pipeline never faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
