// tb_opt_chip_parallel: self-checking test of the parallel optimization chip.
//
// A small job shop (K=24 slots, up to J=4 operations, H=3 machine types,
// I=5 parts) is generated at random. Several LRNN iterations are run, one
// subproblem per command, exactly as a micro-controller would drive the
// chip. After each subproblem the testbench compares, against the reference
// model: the subproblem cost L_i*, the fail flag, every stored beginning
// time, every multiplier and direction, and the cycle count predicted from
// the stage timing (P_ij + K + 1 cycles per stage). The DP cost is further
// checked against an exhaustive search whenever no saturation can occur.
// Part 4 needs more time than the horizon holds, so the infeasible path is
// exercised.
`timescale 1ns/1ps
module tb_opt_chip_parallel;
  import lrnn_pkg::*;
  import lrnn_ref_pkg::*;

  localparam int K = 24, J = 4, H = 3, I = 5;
  localparam int TW = $clog2(K + 1) + 1;
  localparam int HW = $clog2(H), JW = $clog2(J), NW = $clog2(J + 1), IW = $clog2(I);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic part_wr = 0, op_wr = 0, mw_en = 0, start = 0;
  logic [IW-1:0] part_wi = 0, op_wi = 0, hs_i = 0, part = 0;
  logic [TW-1:0] part_wdue = 0, op_wp = 0, mw_k = 0, mr_k = 0;
  logic [SHW-1:0] part_wwsh = 0, step_n = 0;
  logic [NW-1:0] part_wnops = 0;
  logic [JW-1:0] op_wj = 0, hs_j = 0;
  logic [HW-1:0] op_wh = 0, mw_h = 0, mr_h = 0;
  cost_t mw_pi = 0, mr_pi, sub_cost;
  dir_t  mw_g = 0, mr_g;
  logic [TW-1:0] hs_b;
  logic hs_valid, busy, done, fail;

  opt_chip_parallel #(.K(K), .J(J), .H(H), .I(I)) dut (.*);

  int checks = 0, failures = 0;
  int n_fail = 0, n_tardy = 0, n_clamp = 0, n_brute = 0;
  lrnn_model m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic solve_and_check(int i, int n);
    int cyc = 0, exp_cyc, sum_p = 0;
    longint bf;
    bit can_brute = 1;
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) if (m.pi[k][h] > 1000) can_brute = 0;
    bf = m.brute(i);
    @(negedge clk);
    part = IW'(i); step_n = SHW'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    m.run_part(i, n);
    for (int j = 0; j < m.nops[i]; j++) sum_p += m.opp[i][j];
    exp_cyc = 1 + sum_p + m.nops[i] * (K + 1) + 1 + m.sweep_cycles + 1;
    if (!m.fail) exp_cyc += m.nops[i] + H;
    check(cyc == exp_cyc, $sformatf("part %0d cycles %0d expected %0d", i, cyc, exp_cyc));
    check(fail == m.fail, $sformatf("part %0d fail %0b expected %0b", i, fail, m.fail));
    check(sub_cost == m.cost, $sformatf("part %0d cost %0d expected %0d", i, sub_cost, m.cost));
    if (can_brute) begin
      n_brute++;
      check((bf < 0 && sub_cost == COST_INF) || (bf >= 0 && longint'(sub_cost) == bf),
            $sformatf("part %0d cost %0d brute force %0d", i, sub_cost, bf));
    end
    if (m.fail) n_fail++;
    else if (m.b[m.nops[i]-1] + m.opp[i][m.nops[i]-1] - 1 > m.due[i]) n_tardy++;
    @(negedge clk);
    for (int j = 0; j < m.nops[i]; j++) begin
      hs_i = IW'(i); hs_j = JW'(j); #1;
      check(hs_valid == m.svalid[i] && (!m.svalid[i] || hs_b == TW'(m.sched[i][j])),
            $sformatf("part %0d op %0d b=%0d expected %0d", i, j, hs_b, m.sched[i][j]));
    end
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        mr_k = TW'(k); mr_h = HW'(h); #1;
        check(mr_pi == m.pi[k][h] && mr_g == m.g[k][h],
              $sformatf("pi/g[%0d][%0d] = %0d/%0d expected %0d/%0d", k, h, mr_pi, mr_g,
                        m.pi[k][h], m.g[k][h]));
        if (m.pi[k][h] == 0 && m.g[k][h] < 0) n_clamp++;
      end
  endtask

  initial begin
    m = new(K, J, H, I);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // parts
    for (int i = 0; i < I; i++) begin
      m.nops[i] = (i == I - 1) ? J : 1 + $urandom_range(J - 1);
      m.due[i]  = $urandom_range(K / 2);
      m.wsh[i]  = $urandom_range(3);
      m.svalid[i] = 0;
      part_wr = 1; part_wi = IW'(i); part_wdue = TW'(m.due[i]);
      part_wwsh = SHW'(m.wsh[i]); part_wnops = NW'(m.nops[i]);
      @(negedge clk);
      part_wr = 0;
      for (int j = 0; j < m.nops[i]; j++) begin
        m.oph[i][j] = $urandom_range(H - 1);
        m.opp[i][j] = (i == I - 1) ? K / J + 2 : 1 + $urandom_range(4);
        op_wr = 1; op_wi = IW'(i); op_wj = JW'(j);
        op_wh = HW'(m.oph[i][j]); op_wp = TW'(m.opp[i][j]);
        @(negedge clk);
        op_wr = 0;
      end
    end
    // multipliers start at small values, directions at -capacity
    for (int k = 0; k < K; k++)
      for (int h = 0; h < H; h++) begin
        m.pi[k][h] = cost_t'($urandom_range(3));
        m.g[k][h]  = -dir_t'(1 + $urandom_range(1));
        mw_en = 1; mw_k = TW'(k); mw_h = HW'(h); mw_pi = m.pi[k][h]; mw_g = m.g[k][h];
        @(negedge clk);
        mw_en = 0;
      end
    for (int it = 0; it < 4; it++)
      for (int i = 0; i < I; i++) solve_and_check(i, it % 2);
    $display("mechanisms: infeasible=%0d tardy=%0d clamped=%0d brute=%0d",
             n_fail, n_tardy, n_clamp, n_brute);
    check(n_fail > 0, "infeasible part never seen");
    check(n_tardy > 0, "tardy schedule never seen");
    check(n_clamp > 0, "multiplier clamp at zero never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
