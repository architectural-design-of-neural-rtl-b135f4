// tb_pipe_controller: self-checking test of the pipeline chip's controller.
//
// The testbench plays the global memory, the stage cells (it answers the go
// pulse with fin0 after a random delay and offers a cost on m0) and the
// forward sweep. It checks the phase sequence cycle by cycle: J_i cycles
// copying operation data into the stage-cell registers (checked afterwards),
// one go pulse, waiting for fin0 with the cost latched, the sweep start,
// J_i direction cycles writing the beginning times, H multiplier cycles with
// the step exponent, and the done pulse with commit, or fail without
// updates.
`timescale 1ns/1ps
module tb_pipe_controller;
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
  logic go;
  logic [NW-1:0] nops;
  logic [TW-1:0] cell_p [J];
  logic [HW-1:0] cell_h [J];
  logic [TW-1:0] due, plen, old_b, new_b;
  logic [SHW-1:0] wsh, nsh;
  logic fin0 = 0;
  cost_t m0 = 0;
  cell_op_e op;
  logic [HW-1:0] h;
  logic old_valid;
  logic sw_start;
  logic [NW-1:0] sw_nops;
  logic [JW-1:0] sw_sel_j = 0;
  logic sw_done = 0, sw_fail = 0;
  logic [TW-1:0] sw_b [J];

  int pdue = 5, pw = 1, pn = 3, ph [J], pp [J];
  assign c_due = TW'(pdue);
  assign c_wsh = SHW'(pw);
  assign c_nops = NW'(pn);
  assign c_h = HW'(ph[cj]);
  assign c_p = TW'(pp[cj]);
  assign c_b = '0;
  assign c_bvalid = 1'b0;

  pipe_controller #(.K(K), .J(J), .H(H), .I(I)) dut (.*);

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
      int delay, sfail;
      pn = 1 + $urandom_range(J - 1);
      pdue = $urandom_range(K); pw = $urandom_range(3);
      for (int j = 0; j < J; j++) begin
        ph[j] = $urandom_range(H - 1); pp[j] = 1 + $urandom_range(5);
        sw_b[j] = TW'($urandom_range(K - 1));
      end
      sfail = (trial % 5 == 4);
      delay = 1 + $urandom_range(20);
      m0 = cost_t'($urandom_range(1000));
      @(negedge clk);
      part = IW'(trial % I); step_n = SHW'(trial % 3); start = 1;
      @(negedge clk);
      start = 0;
      for (int j = 0; j < pn; j++) begin
        check(!go && op == OP_NOP && busy, "operation copy phase");
        @(negedge clk);
      end
      for (int j = 0; j < pn; j++)
        check(cell_p[j] == TW'(pp[j]) && cell_h[j] == HW'(ph[j]), $sformatf("stage cell %0d data", j));
      check(go && nops == NW'(pn) && due == TW'(pdue) && wsh == SHW'(pw), "go pulse");
      @(negedge clk);
      repeat (delay) begin
        check(!go && !sw_start, "waiting for the pipeline");
        @(negedge clk);
      end
      fin0 = 1;
      @(negedge clk);
      fin0 = 0;
      check(sw_start && sub_cost == m0 && sw_nops == NW'(pn), "sweep start and cost latch");
      @(negedge clk);
      repeat (3) @(negedge clk);
      sw_done = 1; sw_fail = sfail[0];
      @(negedge clk);
      sw_done = 0; sw_fail = 0;
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
      check(done && fail == sfail[0] && sched_commit == !sfail[0], $sformatf("trial %0d done", trial));
      @(negedge clk);
      check(!busy && !done, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
