// tb_pipe_mult_memory: self-checking test of the pipeline chip's multiplier
// memory and updating circuit.
//
// A shadow copy of all multipliers and directions (K=20 slots, H=3 machine
// types) is kept by the testbench. Random host writes, random concurrent
// reads on all three read ports, direction adjustments with random old and
// new intervals (with and without an old schedule) and multiplier updates
// with step 2^-n are applied to both and compared after every operation.
`timescale 1ns/1ps
module tb_pipe_mult_memory;
  import lrnn_pkg::*;

  localparam int K = 20, H = 3, NR = 3;
  localparam int TW = $clog2(K + 1) + 1, HW = $clog2(H);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [TW-1:0] rd_k [NR];
  logic [HW-1:0] rd_h [NR];
  cost_t rd_pi [NR];
  cell_op_e op = OP_NOP;
  logic [HW-1:0] h = 0, wr_h = 0, hr_h = 0;
  logic [SHW-1:0] nsh = 0;
  logic [TW-1:0] plen = 1, old_b = 0, new_b = 0, wr_k = 0, hr_k = 0;
  logic old_valid = 0, wr_en = 0;
  cost_t wr_pi = 0, hr_pi;
  dir_t wr_g = 0, hr_g;

  pipe_mult_memory #(.K(K), .H(H), .NR(NR)) dut (.*);

  int checks = 0, failures = 0;
  int spi [K][H], sg [K][H];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_all();
    for (int k = 0; k < K; k++)
      for (int x = 0; x < H; x++) begin
        hr_k = TW'(k); hr_h = HW'(x);
        for (int r = 0; r < NR; r++) begin
          rd_k[r] = TW'($urandom_range(K - 1)); rd_h[r] = HW'($urandom_range(H - 1));
        end
        #1;
        check(hr_pi == cost_t'(spi[k][x]) && hr_g == dir_t'(sg[k][x]),
              $sformatf("slot %0d/%0d: %0d/%0d expected %0d/%0d", k, x, hr_pi, hr_g, spi[k][x], sg[k][x]));
        for (int r = 0; r < NR; r++)
          check(rd_pi[r] == cost_t'(spi[rd_k[r]][rd_h[r]]), $sformatf("read port %0d", r));
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
    for (int r = 0; r < NR; r++) begin rd_k[r] = 0; rd_h[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++)
      for (int x = 0; x < H; x++) begin
        spi[k][x] = $urandom_range(40); sg[k][x] = -1 - $urandom_range(1);
        wr_en = 1; wr_k = TW'(k); wr_h = HW'(x); wr_pi = cost_t'(spi[k][x]); wr_g = dir_t'(sg[k][x]);
        @(negedge clk);
      end
    wr_en = 0;
    compare_all();
    for (int round = 0; round < 10; round++) begin
      for (int j = 0; j < 4; j++) begin
        int ob, nb, pl, x;
        bit ov;
        ob = $urandom_range(K - 1); nb = $urandom_range(K - 1); pl = 1 + $urandom_range(5);
        ov = 1'($urandom_range(1)); x = $urandom_range(H - 1);
        op = OP_DIR; h = HW'(x); old_b = TW'(ob); new_b = TW'(nb); plen = TW'(pl); old_valid = ov;
        @(negedge clk);
        for (int k = 0; k < K; k++) begin
          if (k >= nb && k < nb + pl) sg[k][x]++;
          if (ov && k >= ob && k < ob + pl) sg[k][x]--;
        end
      end
      nsh = SHW'(round % 3);
      for (int x = 0; x < H; x++) begin
        op = OP_MULT; h = HW'(x);
        @(negedge clk);
        for (int k = 0; k < K; k++) begin
          int e;
          e = spi[k][x] + (sg[k][x] >>> (round % 3));
          spi[k][x] = (e < 0) ? 0 : e;
        end
      end
      op = OP_NOP;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
