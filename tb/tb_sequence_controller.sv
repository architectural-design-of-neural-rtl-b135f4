// tb_sequence_controller: self-checking test of the parallel chip's
// internal sequence controller.
//
// The testbench plays the global memory (part with J_i operations of random
// processing times and machine types), the state cells (it returns a cost
// from "cell 0") and the forward sweep (it answers sw_start after a random
// delay with random beginning times, sometimes with fail). It records the
// broadcast operation of every cycle and compares it with the sequence
// expected from the stage timing: TARDY, then per stage j = J_i-1..0 one
// LOAD, P_j-1 ACC, one CC and K CMP cycles (token at the first), then the
// sweep, J_i DIR cycles writing b_j, H MULT cycles, and done. It also checks
// the boundary value, the schedule writes, the commit, the latched cost and
// that a failed sweep skips the updates.
`timescale 1ns/1ps
module tb_sequence_controller;
  import lrnn_pkg::*;

  localparam int K = 12, J = 4, H = 3, I = 3;
  localparam int TW = $clog2(K + 1) + 1, HW = $clog2(H), JW = $clog2(J);
  localparam int NW = $clog2(J + 1), IW = $clog2(I);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [IW-1:0] part = 0;
  logic [SHW-1:0] step_n = 0;
  logic busy, done, fail;
  cost_t sub_cost;
  logic [IW-1:0] ci;
  logic [JW-1:0] cj;
  logic [TW-1:0] c_due, c_p, c_b;
  logic [SHW-1:0] c_wsh;
  logic [NW-1:0] c_nops;
  logic [HW-1:0] c_h;
  logic c_bvalid;
  logic sched_wr, sched_commit;
  logic [JW-1:0] sched_wj;
  logic [TW-1:0] sched_wb;
  cell_op_e op;
  logic [HW-1:0] h;
  logic [JW-1:0] stage, mib_sel;
  logic [TW-1:0] due, plen, old_b, new_b;
  logic [SHW-1:0] wsh, nsh;
  logic old_valid, tok_start;
  cost_t m_boundary;
  cost_t cell0_m = 0;
  logic sw_start;
  logic [NW-1:0] sw_nops;
  logic [JW-1:0] sw_sel_j = 0;
  logic sw_done = 0, sw_fail = 0;
  logic [TW-1:0] sw_b [J];

  // behavioural global memory
  int pdue = 5, pw = 1, pn = 3, ph [J], pp [J];
  assign c_due = TW'(pdue);
  assign c_wsh = SHW'(pw);
  assign c_nops = NW'(pn);
  assign c_h = HW'(ph[cj]);
  assign c_p = TW'(pp[cj]);
  assign c_b = '0;
  assign c_bvalid = 1'b0;

  sequence_controller #(.K(K), .J(J), .H(H), .I(I)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < J; j++) sw_b[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      cell_op_e exp_ops [$];
      int exp_stage [$];
      int delay, ncyc, nwr, ncommit, sfail;
      exp_ops.delete(); exp_stage.delete();
      pn = 1 + $urandom_range(J - 1);
      pdue = $urandom_range(K); pw = $urandom_range(3);
      for (int j = 0; j < J; j++) begin ph[j] = $urandom_range(H - 1); pp[j] = 1 + $urandom_range(3); end
      for (int j = 0; j < J; j++) sw_b[j] = TW'($urandom_range(K - 1));
      sfail = (trial % 5 == 4);
      delay = 1 + $urandom_range(6);
      cell0_m = cost_t'($urandom_range(1000));
      // expected broadcast sequence
      exp_ops.push_back(OP_TARDY); exp_stage.push_back(-1);
      for (int j = pn - 1; j >= 0; j--) begin
        exp_ops.push_back(OP_LOAD); exp_stage.push_back(j);
        for (int t = 1; t < pp[j]; t++) begin exp_ops.push_back(OP_ACC); exp_stage.push_back(j); end
        exp_ops.push_back(OP_CC); exp_stage.push_back(j);
        for (int t = 0; t < K; t++) begin exp_ops.push_back(OP_CMP); exp_stage.push_back(j); end
      end
      @(negedge clk);
      part = IW'(trial % I); step_n = SHW'(trial % 3); start = 1;
      @(negedge clk);
      start = 0;
      // backward pass
      foreach (exp_ops[x]) begin
        check(op == exp_ops[x], $sformatf("trial %0d cycle %0d op %s expected %s", trial, x,
                                          op.name(), exp_ops[x].name()));
        if (exp_ops[x] == OP_CMP || exp_ops[x] == OP_LOAD)
          check(stage == JW'(exp_stage[x]), "stage index");
        if (exp_ops[x] == OP_LOAD) begin
          check(h == HW'(ph[exp_stage[x]]), "machine type broadcast");
          if (exp_stage[x] == pn - 1)
            check(m_boundary == tardy_cost(32'(K - 1 - pdue), SHW'(pw)), "tardiness boundary");
          else check(m_boundary == COST_INF, "infinite boundary");
        end
        check(tok_start == (exp_ops[x] == OP_CMP && (x == 0 || exp_ops[x-1] != OP_CMP)),
              "token start at first compare cycle");
        @(negedge clk);
      end
      // sweep handshake
      check(sw_start == 1'b1 && op == OP_NOP && sw_nops == NW'(pn), "sweep started");
      @(negedge clk);
      repeat (delay) begin
        check(op == OP_NOP && !done, "waiting for sweep");
        @(negedge clk);
      end
      sw_done = 1; sw_fail = sfail[0];
      @(negedge clk);
      sw_done = 0; sw_fail = 0;
      nwr = 0; ncommit = 0; ncyc = 0;
      if (!sfail) begin
        for (int j = 0; j < pn; j++) begin
          check(op == OP_DIR && sched_wr && sched_wj == JW'(j) && sched_wb == sw_b[j] &&
                new_b == sw_b[j] && h == HW'(ph[j]) && plen == TW'(pp[j]),
                $sformatf("direction cycle %0d", j));
          @(negedge clk);
        end
        for (int x = 0; x < H; x++) begin
          check(op == OP_MULT && h == HW'(x) && nsh == SHW'(trial % 3), $sformatf("multiplier cycle %0d", x));
          @(negedge clk);
        end
      end
      check(done && fail == sfail[0] && sched_commit == !sfail[0] && sub_cost == cell0_m,
            $sformatf("trial %0d done/fail/commit/cost", trial));
      @(negedge clk);
      check(!busy && !done, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
