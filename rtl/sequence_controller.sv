// sequence_controller: internal sequence controller of the parallel
// optimization chip. It runs one part subproblem of the LRNN iteration per
// start command and then updates directions and multipliers.
//
// Sequence for part i with J_i operations (stages), all broadcast to the K
// state cells:
//   TARDY        1 cycle    preset successor minimum with tardiness costs
//   per stage j = J_i-1 .. 0 (backward DP):
//     LOAD, ACC  P_j cycles stage-wise cost sum, successor minimum shift
//     CC         1 cycle    cumulative cost
//     CMP        K cycles   comparison token from cell K-1 down to cell 0
//   SWS, SWEEP   forward sweep over the minimum-indicating bits
//   DIR          J_i cycles move each operation's direction contribution
//                           from its old to its new interval, store b_ij
//   MULT         H cycles   pi <- max(0, pi + g*2^-n), one machine type each
//   DONE         1 cycle    done pulse, schedule marked valid
// One stage thus takes P_ij + K + 1 cycles, as the document states, and one
// subproblem about K*J_i. The subproblem cost L_i* (the minimum cumulative
// cost of the first stage, read from cell 0) is latched when the backward
// pass ends. If the sweep finds no feasible schedule, DIR and MULT are
// skipped, fail is raised and the stored schedule is left unchanged.
// The state order follows the document; the exact cycle split is this
// design's own.
module sequence_controller
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int J  = 20,
  parameter int H  = 11,
  parameter int I  = 500,
  localparam int TW = $clog2(K + 1) + 1,
  localparam int HW = (H > 1) ? $clog2(H) : 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1,
  localparam int NW = $clog2(J + 1),
  localparam int IW = (I > 1) ? $clog2(I) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // command from the micro-controller
  input  logic            start,
  input  logic [IW-1:0]   part,
  input  logic [SHW-1:0]  step_n,
  output logic            busy,
  output logic            done,
  output logic            fail,
  output cost_t           sub_cost,
  // global memory
  output logic [IW-1:0]   ci,
  output logic [JW-1:0]   cj,
  input  logic [TW-1:0]   c_due,
  input  logic [SHW-1:0]  c_wsh,
  input  logic [NW-1:0]   c_nops,
  input  logic [HW-1:0]   c_h,
  input  logic [TW-1:0]   c_p,
  input  logic [TW-1:0]   c_b,
  input  logic            c_bvalid,
  output logic            sched_wr,
  output logic [JW-1:0]   sched_wj,
  output logic [TW-1:0]   sched_wb,
  output logic            sched_commit,
  // state cells (broadcast)
  output cell_op_e        op,
  output logic [HW-1:0]   h,
  output logic [JW-1:0]   stage,
  output logic [TW-1:0]   due,
  output logic [SHW-1:0]  wsh,
  output logic [SHW-1:0]  nsh,
  output logic [TW-1:0]   plen,
  output logic            old_valid,
  output logic [TW-1:0]   old_b,
  output logic [TW-1:0]   new_b,
  output logic            tok_start,
  output cost_t           m_boundary,
  input  cost_t           cell0_m,
  // forward sweep
  output logic            sw_start,
  output logic [NW-1:0]   sw_nops,
  input  logic [JW-1:0]   sw_sel_j,
  input  logic            sw_done,
  input  logic            sw_fail,
  input  logic [TW-1:0]   sw_b [J],
  output logic [JW-1:0]   mib_sel
);

  typedef enum logic [3:0] {
    S_IDLE, S_TARDY, S_LOAD, S_ACC, S_CC, S_CMP, S_SWS, S_SWEEP,
    S_DIR, S_MULT, S_DONE
  } state_e;

  state_e          st;
  logic [IW-1:0]   part_q;
  logic [SHW-1:0]  n_q;
  logic [JW-1:0]   j_q;
  logic [TW-1:0]   cnt;
  logic [HW-1:0]   h_q;
  logic            fail_q;

  assign busy     = (st != S_IDLE);
  assign ci       = part_q;
  assign cj       = (st == S_SWEEP) ? sw_sel_j : j_q;
  assign mib_sel  = sw_sel_j;
  assign sw_nops  = c_nops;
  assign due      = c_due;
  assign wsh      = c_wsh;
  assign nsh      = n_q;
  assign stage    = j_q;
  assign plen     = c_p;
  assign old_valid = c_bvalid;
  assign old_b    = c_b;
  assign new_b    = sw_b[j_q];
  assign sched_wj = j_q;
  assign sched_wb = sw_b[j_q];
  assign fail     = fail_q;

  always_comb begin
    op           = OP_NOP;
    h            = c_h;
    tok_start    = 1'b0;
    sw_start     = (st == S_SWS);
    sched_wr     = 1'b0;
    sched_commit = 1'b0;
    done         = 1'b0;
    // successor minimum entering cell K-1: tardiness of finishing at K-1
    // for the last stage, no successor state otherwise
    m_boundary   = (NW'(j_q) + 1'b1 == c_nops)
                 ? tardy_cost(32'(K) - 32'sd1 - 32'(c_due), c_wsh) : COST_INF;
    unique case (st)
      S_TARDY: op = OP_TARDY;
      S_LOAD:  op = OP_LOAD;
      S_ACC:   op = OP_ACC;
      S_CC:    op = OP_CC;
      S_CMP: begin
        op        = OP_CMP;
        tok_start = (cnt == '0);
      end
      S_DIR: begin
        op       = OP_DIR;
        sched_wr = 1'b1;
      end
      S_MULT: begin
        op = OP_MULT;
        h  = h_q;
      end
      S_DONE: begin
        done         = 1'b1;
        sched_commit = !fail_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      part_q   <= '0;
      n_q      <= '0;
      j_q      <= '0;
      cnt      <= '0;
      h_q      <= '0;
      fail_q   <= 1'b0;
      sub_cost <= COST_INF;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          part_q <= part;
          n_q    <= step_n;
          fail_q <= 1'b0;
          st     <= S_TARDY;
        end
        S_TARDY: begin
          if (c_nops == '0) st <= S_DONE;
          else begin
            j_q <= JW'(c_nops - 1'b1);
            st  <= S_LOAD;
          end
        end
        S_LOAD: begin
          cnt <= TW'(1);
          st  <= (c_p <= TW'(1)) ? S_CC : S_ACC;
        end
        S_ACC: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= c_p) st <= S_CC;
        end
        S_CC: begin
          cnt <= '0;
          st  <= S_CMP;
        end
        S_CMP: begin
          cnt <= cnt + 1'b1;
          if (cnt == TW'(K - 1)) begin
            if (j_q == '0) st <= S_SWS;
            else begin
              j_q <= j_q - 1'b1;
              st  <= S_LOAD;
            end
          end
        end
        S_SWS: begin
          sub_cost <= cell0_m;
          st       <= S_SWEEP;
        end
        S_SWEEP: if (sw_done) begin
          j_q <= '0;
          if (sw_fail) begin
            fail_q <= 1'b1;
            st     <= S_DONE;
          end else st <= S_DIR;
        end
        S_DIR: begin
          if (NW'(j_q) + 1'b1 >= c_nops) begin
            h_q <= '0;
            st  <= S_MULT;
          end else j_q <= j_q + 1'b1;
        end
        S_MULT: begin
          if (h_q == HW'(H - 1)) st <= S_DONE;
          else h_q <= h_q + 1'b1;
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
