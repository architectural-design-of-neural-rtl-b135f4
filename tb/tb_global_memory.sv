// tb_global_memory: self-checking test of the part and schedule memory.
//
// Random part records, operation records and schedules are written through
// the host and chip ports and read back through both read ports against a
// shadow copy kept by the testbench. Also checked: a schedule becomes valid
// only on commit, and rewriting a part's record invalidates its schedule.
`timescale 1ns/1ps
module tb_global_memory;
  import lrnn_pkg::*;

  localparam int K = 40, J = 4, H = 5, I = 6;
  localparam int TW = $clog2(K + 1) + 1, HW = $clog2(H), JW = $clog2(J);
  localparam int NW = $clog2(J + 1), IW = $clog2(I);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic part_wr = 0, op_wr = 0, sched_wr = 0, sched_commit = 0;
  logic [IW-1:0] part_wi = 0, op_wi = 0, hs_i = 0, ci = 0;
  logic [TW-1:0] part_wdue = 0, op_wp = 0, sched_wb = 0;
  logic [SHW-1:0] part_wwsh = 0;
  logic [NW-1:0] part_wnops = 0;
  logic [JW-1:0] op_wj = 0, hs_j = 0, cj = 0, sched_wj = 0;
  logic [HW-1:0] op_wh = 0;
  logic [TW-1:0] hs_b, c_due, c_p, c_b;
  logic hs_valid, c_bvalid;
  logic [SHW-1:0] c_wsh;
  logic [NW-1:0] c_nops;
  logic [HW-1:0] c_h;

  global_memory #(.K(K), .J(J), .H(H), .I(I)) dut (.*);

  int checks = 0, failures = 0;
  int sdue [I], swsh [I], snops [I], sh [I][J], sp [I][J], sb [I][J];
  bit sv [I];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < I; i++)
      for (int j = 0; j < J; j++) begin
        ci = IW'(i); cj = JW'(j); hs_i = IW'(i); hs_j = JW'(j); #1;
        check(c_due == TW'(sdue[i]) && c_wsh == SHW'(swsh[i]) && c_nops == NW'(snops[i]),
              $sformatf("part %0d record", i));
        check(c_h == HW'(sh[i][j]) && c_p == TW'(sp[i][j]), $sformatf("op %0d/%0d record", i, j));
        check(c_bvalid == sv[i] && hs_valid == sv[i], $sformatf("part %0d valid", i));
        if (sv[i]) check(c_b == TW'(sb[i][j]) && hs_b == TW'(sb[i][j]),
                         $sformatf("sched %0d/%0d = %0d/%0d expected %0d", i, j, c_b, hs_b, sb[i][j]));
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < I; i++) begin
      sv[i] = 0;
      sdue[i] = $urandom_range(K); swsh[i] = $urandom_range(15); snops[i] = 1 + $urandom_range(J - 1);
      part_wr = 1; part_wi = IW'(i); part_wdue = TW'(sdue[i]); part_wwsh = SHW'(swsh[i]);
      part_wnops = NW'(snops[i]);
      @(negedge clk);
      part_wr = 0;
      for (int j = 0; j < J; j++) begin
        sh[i][j] = $urandom_range(H - 1); sp[i][j] = 1 + $urandom_range(9);
        op_wr = 1; op_wi = IW'(i); op_wj = JW'(j); op_wh = HW'(sh[i][j]); op_wp = TW'(sp[i][j]);
        @(negedge clk);
        op_wr = 0;
      end
    end
    read_all();
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < I; i++) begin
        ci = IW'(i);
        for (int j = 0; j < J; j++) begin
          sb[i][j] = $urandom_range(K - 1);
          sched_wr = 1; sched_wj = JW'(j); sched_wb = TW'(sb[i][j]);
          @(negedge clk);
        end
        sched_wr = 0;
        if ((i + round) % 2 == 0) begin
          sched_commit = 1; sv[i] = 1;
          @(negedge clk);
          sched_commit = 0;
        end
      end
      read_all();
      // rewriting a part drops its schedule
      part_wr = 1; part_wi = IW'(round); part_wdue = TW'(sdue[round]);
      part_wwsh = SHW'(swsh[round]); part_wnops = NW'(snops[round]);
      @(negedge clk);
      part_wr = 0; sv[round] = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
