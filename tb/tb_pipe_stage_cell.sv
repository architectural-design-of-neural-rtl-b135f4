// tb_pipe_stage_cell: self-checking test of the pipeline stage cell.
//
// Two stage cells are chained as in the chip: cell 1 computes the last
// stage (tardiness successor cost), cell 0 the stage before it, taking the
// running minimum of cell 1. The testbench serves their multiplier reads
// from its own array and records every minimum-indicating bit they write.
// Each trial (random multipliers, processing times up to PMAX=8, due date
// and weight) is compared with a direct DP computed here: every bit of both
// stages, the minimum M_0(0), one state per cycle and the finish time.
`timescale 1ns/1ps
module tb_pipe_stage_cell;
  import lrnn_pkg::*;

  localparam int K = 20, PMAX = 8;
  localparam int TW = $clog2(K + 1) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go = 0;
  logic [TW-1:0] plen [2], due = 0;
  logic [SHW-1:0] wsh = 0;
  logic go1, go0;
  logic [TW-1:0] rd_k [2];
  cost_t rd_pi [2], m1, m0;
  logic bit_we [2], bit_val [2], fin [2];
  logic [TW-1:0] bit_k [2];
  cost_t pim [2][K];
  logic got [2][K];
  int   nbits [2];

  assign rd_pi[0] = (rd_k[0] < K) ? pim[0][rd_k[0]] : COST_INF;
  assign rd_pi[1] = (rd_k[1] < K) ? pim[1][rd_k[1]] : COST_INF;

  pipe_stage_cell #(.K(K), .PMAX(PMAX)) c1 (
    .clk, .rst_n, .go, .go_out(go1), .plen(plen[1]), .is_last(1'b1), .due, .wsh,
    .rd_k(rd_k[1]), .rd_pi(rd_pi[1]), .m_in(COST_INF), .m_out(m1),
    .bit_we(bit_we[1]), .bit_k(bit_k[1]), .bit_val(bit_val[1]), .fin(fin[1]));
  pipe_stage_cell #(.K(K), .PMAX(PMAX)) c0 (
    .clk, .rst_n, .go(go1), .go_out(go0), .plen(plen[0]), .is_last(1'b0), .due, .wsh,
    .rd_k(rd_k[0]), .rd_pi(rd_pi[0]), .m_in(m1), .m_out(m0),
    .bit_we(bit_we[0]), .bit_k(bit_k[0]), .bit_val(bit_val[0]), .fin(fin[0]));

  always @(posedge clk)
    for (int j = 0; j < 2; j++)
      if (bit_we[j]) begin got[j][bit_k[j]] <= bit_val[j]; nbits[j] <= nbits[j] + 1; end

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
    plen[0] = 1; plen[1] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      int p [2], d, w, cyc;
      longint V [2][K+1], M [2][K+2];
      bit eb [2][K];
      p[0] = 1 + $urandom_range(PMAX - 1); p[1] = 1 + $urandom_range(PMAX - 1);
      if (trial % 10 == 9) p[1] = PMAX;
      d = $urandom_range(K); w = $urandom_range(3);
      for (int j = 0; j < 2; j++) for (int k = 0; k < K; k++) pim[j][k] = cost_t'($urandom_range(50));
      // reference DP with infinity as -1 ... use a large sentinel
      for (int j = 1; j >= 0; j--) begin
        M[j][K] = 64'h7fff_ffff;
        for (int k = K - 1; k >= 0; k--) begin
          longint s, nx;
          s = 0;
          if (k + p[j] > K) V[j][k] = 64'h7fff_ffff;
          else begin
            for (int t = 0; t < p[j]; t++) s += pim[j][k+t];
            if (j == 1) nx = (k + p[j] - 1 > d) ? longint'(k + p[j] - 1 - d) << w : 0;
            else nx = M[1][k + p[j]];
            V[j][k] = (nx >= 64'h7fff_ffff) ? 64'h7fff_ffff : s + nx;
          end
          eb[j][k] = (V[j][k] < 64'h7fff_ffff) && (V[j][k] <= M[j][k+1]);
          M[j][k] = eb[j][k] ? V[j][k] : M[j][k+1];
        end
      end
      for (int j = 0; j < 2; j++) begin
        for (int k = 0; k < K; k++) got[j][k] = 1'b0;
        nbits[j] = 0;
      end
      plen[0] = TW'(p[0]); plen[1] = TW'(p[1]); due = TW'(d); wsh = SHW'(w);
      @(negedge clk);
      go = 1;
      @(negedge clk);
      go = 0; cyc = 1;
      while (!fin[0]) begin @(negedge clk); cyc++; end
      // state K-1 of cell 0 is read two cycles after go, state 0 K-1
      // cycles later, and its result lands four cycles after that
      check(cyc == K + 5, $sformatf("trial %0d finish after %0d cycles", trial, cyc));
      @(negedge clk);  // the recorder takes the last bit at this edge
      check(nbits[0] == K && nbits[1] == K, "one bit per state and stage");
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < K; k++)
          check(got[j][k] == eb[j][k], $sformatf("trial %0d bit[%0d][%0d]=%0b expected %0b",
                                                 trial, j, k, got[j][k], eb[j][k]));
      check((M[0][0] >= 64'h7fff_ffff) ? (m0 == COST_INF) : (longint'(m0) == M[0][0]),
            $sformatf("trial %0d M0(0)=%0d expected %0d", trial, m0, M[0][0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
