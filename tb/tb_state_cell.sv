// tb_state_cell: self-checking test of one state cell of the parallel chip.
//
// The cell (time index 7 of K=16, H=3 machine types, J=4 stages) is driven
// directly with the broadcast operations while the testbench plays its right
// neighbour on the chains. Random trials check: host writes and reads of the
// local multipliers and directions, the tardiness preset, the stage-wise
// cost accumulated over P cycles plus the successor minimum shifted in on
// the chain (observed through the comparison and the minimum-indicating
// bit), the chain outputs, the comparison token delay, saturation at the
// infeasible code, and the direction and multiplier updates.
`timescale 1ns/1ps
module tb_state_cell;
  import lrnn_pkg::*;

  localparam int K = 16, J = 4, H = 3;
  localparam int TW = $clog2(K + 1) + 1, HW = $clog2(H), JW = $clog2(J);
  localparam int IDX = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cell_op_e op = OP_NOP;
  logic [HW-1:0] h = 0, wr_h = 0, rd_h = 0;
  logic [JW-1:0] stage = 0, mib_sel = 0;
  logic [TW-1:0] due = 0, plen = 0, old_b = 0, new_b = 0, wr_k = 0;
  logic [SHW-1:0] wsh = 0, nsh = 0;
  logic old_valid = 0, tok_in = 0, wr_en = 0;
  cost_t pi_in = 0, m_in = 0, mr_in = 0, wr_pi = 0;
  dir_t wr_g = 0;
  cost_t pi_out, m_out, mr_out, rd_pi;
  dir_t rd_g;
  logic tok_out, mib_out;

  state_cell #(.K(K), .J(J), .H(H)) dut (.clk, .rst_n, .idx(TW'(IDX)), .*);

  int checks = 0, failures = 0;
  cost_t mpi [H];
  dir_t  mg  [H];

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int p, hh, dd, ww, late, mnext, exp_sum, exp_v, exp_m, j;
      cost_t chain_pi [8];
      bit inf_case;
      // host writes to every machine type, and one write to another slot
      for (int x = 0; x < H; x++) begin
        @(negedge clk);
        mpi[x] = cost_t'($urandom_range(200));
        mg[x]  = dir_t'($urandom_range(6)) - 3;
        wr_en = 1; wr_k = TW'(IDX); wr_h = HW'(x); wr_pi = mpi[x]; wr_g = mg[x];
      end
      @(negedge clk);
      wr_k = TW'(IDX + 1); wr_h = 0; wr_pi = 999; wr_g = 9;
      @(negedge clk);
      wr_en = 0;
      for (int x = 0; x < H; x++) begin
        rd_h = HW'(x); #1;
        check(rd_pi == mpi[x] && rd_g == mg[x], $sformatf("read h=%0d %0d/%0d", x, rd_pi, rd_g));
      end
      // tardiness preset
      dd = $urandom_range(10); ww = $urandom_range(3);
      due = TW'(dd); wsh = SHW'(ww); op = OP_TARDY;
      @(negedge clk);
      late = IDX - 1 - dd;
      check(mr_out == cost_t'(late > 0 ? late << ww : 0),
            $sformatf("tardy preset %0d (late %0d w %0d)", mr_out, late, ww));
      // one stage with processing time p on machine hh
      p = 1 + $urandom_range(5); hh = $urandom_range(H - 1);
      inf_case = (trial % 7 == 3);
      h = HW'(hh); op = OP_LOAD;
      for (int t = 1; t < 8; t++) chain_pi[t] = cost_t'($urandom_range(300));
      if (inf_case) chain_pi[p-1 > 0 ? p-1 : 1] = COST_INF;
      mnext = $urandom_range(500);
      pi_in = chain_pi[1]; m_in = COST_INF;
      #1 check(pi_out == mpi[hh] && m_out == mr_out, "chain outputs in load cycle");
      @(negedge clk);
      exp_sum = mpi[hh];
      for (int t = 1; t < p; t++) begin
        op = OP_ACC;
        pi_in = chain_pi[t+1];
        m_in = (t == p - 1) ? cost_t'(mnext) : COST_INF;
        #1 check(pi_out == chain_pi[t], "chain shift of multipliers");
        @(negedge clk);
        exp_sum += chain_pi[t];
      end
      if (p == 1) begin
        // with P=1 the successor minimum comes straight in the load cycle;
        // redo the load with it
        op = OP_LOAD; m_in = cost_t'(mnext);
        @(negedge clk);
      end
      op = OP_CC;
      @(negedge clk);
      if (inf_case && p > 1) exp_v = COST_INF;
      else exp_v = exp_sum + mnext;
      if (exp_v != COST_INF && exp_v > COST_MAX) exp_v = COST_MAX;
      // compare against a successor minimum just above or below
      j = $urandom_range(J - 1);
      stage = JW'(j); mib_sel = JW'(j);
      op = OP_CMP; tok_in = 1;
      mr_in = (trial % 2) ? cost_t'(exp_v == COST_INF ? 5 : exp_v + 1)
                          : cost_t'(exp_v == COST_INF ? 5 : (exp_v > 0 ? exp_v - 1 : 0));
      exp_m = (exp_v != COST_INF && exp_v <= mr_in) ? exp_v : mr_in;
      @(negedge clk);
      tok_in = 0; op = OP_NOP;
      check(tok_out == 1'b1, "token passed on one cycle later");
      check(mr_out == cost_t'(exp_m), $sformatf("p=%0d running min %0d expected %0d (v %0d)",
                                                p, mr_out, exp_m, exp_v));
      check(mib_out == (exp_v != COST_INF && exp_v <= mr_in), "minimum-indicating bit");
      op = OP_CMP; mr_in = 0;
      @(negedge clk);
      op = OP_NOP;
      check(tok_out == 1'b0 && mr_out == cost_t'(exp_m), "cell idle without token");
      // direction adjustment: old interval out, new interval in
      begin
        int ob, nb, pl, d;
        bit ov;
        ob = $urandom_range(10); nb = $urandom_range(10); pl = 1 + $urandom_range(4);
        ov = 1'($urandom_range(1)); d = 0;
        if (IDX >= nb && IDX < nb + pl) d++;
        if (ov && IDX >= ob && IDX < ob + pl) d--;
        op = OP_DIR; h = HW'(hh); old_b = TW'(ob); new_b = TW'(nb); plen = TW'(pl); old_valid = ov;
        @(negedge clk);
        mg[hh] += dir_t'(d);
        op = OP_NOP; rd_h = HW'(hh); #1;
        check(rd_g == mg[hh], $sformatf("direction %0d expected %0d", rd_g, mg[hh]));
      end
      // multiplier update for every machine type with step 2^-n
      nsh = SHW'($urandom_range(1));
      for (int x = 0; x < H; x++) begin
        int e;
        e = 0;
        op = OP_MULT; h = HW'(x);
        @(negedge clk);
        e = int'(mpi[x]) + (int'(mg[x]) >>> nsh);
        mpi[x] = cost_t'(e < 0 ? 0 : e);
      end
      op = OP_NOP;
      for (int x = 0; x < H; x++) begin
        rd_h = HW'(x); #1;
        check(rd_pi == mpi[x], $sformatf("multiplier h=%0d %0d expected %0d", x, rd_pi, mpi[x]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
