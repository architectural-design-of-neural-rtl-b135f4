// tb_forward_sweep: self-checking test of the forward sweep circuit.
//
// Random minimum-indicating bit patterns for up to J=5 stages over K=32
// states are presented combinationally for the stage the circuit selects.
// The expected beginning times are found by the testbench's own search
// (first set bit at or after the earliest allowed time, stage by stage),
// and the cycle count must equal the slack scanned plus one cycle per stage
// (plus one cycle for running off the horizon). Sparse patterns make some
// sweeps fail, which must be reported.
`timescale 1ns/1ps
module tb_forward_sweep;
  import lrnn_pkg::*;

  localparam int K = 32, J = 5;
  localparam int TW = $clog2(K + 1) + 1, JW = $clog2(J), NW = $clog2(J + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [NW-1:0] nops = 0;
  logic [K-1:0] bits [J];
  logic [K-1:0] mib;
  logic [TW-1:0] p_j;
  logic [JW-1:0] sel_j;
  logic done, fail;
  logic [TW-1:0] b [J];
  int plen [J];

  assign mib = bits[sel_j];
  assign p_j = TW'(plen[sel_j]);

  forward_sweep #(.K(K), .J(J)) dut (.*);

  int checks = 0, failures = 0, n_fail = 0, n_ok = 0;

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
    for (int j = 0; j < J; j++) begin bits[j] = '0; plen[j] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      int n, ptr, cyc, exp_cyc, eb [J];
      bit efail;
      n = 1 + $urandom_range(J - 1);
      for (int j = 0; j < J; j++) begin
        plen[j] = 1 + $urandom_range(5);
        bits[j] = '0;
        for (int k = 0; k < K; k++)
          if ($urandom_range(99) < ((trial % 3 == 0) ? 4 : 25)) bits[j][k] = 1'b1;
      end
      // expected result
      ptr = 0; exp_cyc = 0; efail = 0;
      for (int j = 0; j < n; j++) begin
        while (ptr < K && !bits[j][ptr]) begin ptr++; exp_cyc++; end
        exp_cyc++;
        if (ptr >= K) begin efail = 1; break; end
        eb[j] = ptr;
        ptr += plen[j];
      end
      @(negedge clk);
      nops = NW'(n); start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(fail == efail, $sformatf("trial %0d fail %0b expected %0b", trial, fail, efail));
      check(cyc == exp_cyc + 1, $sformatf("trial %0d cycles %0d expected %0d", trial, cyc, exp_cyc + 1));
      if (efail) n_fail++;
      else begin
        n_ok++;
        for (int j = 0; j < n; j++)
          check(b[j] == TW'(eb[j]), $sformatf("trial %0d b[%0d]=%0d expected %0d", trial, j, b[j], eb[j]));
      end
    end
    check(n_fail > 0 && n_ok > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
