// pipe_controller: sequence control of the pipeline optimization chip.
//
// For one part subproblem it
//   OPS    J_i cycles  copies each operation's machine type and processing
//                      time from the global memory into the register that
//                      configures stage cell j
//   GO     1 cycle     starts stage cell J_i-1; each lower stage cell
//                      starts one cycle after the one above it
//   RUN                waits for stage cell 0 to finish state 0 (about
//                      K + J_i cycles) and latches L_i* = M_0(0)
//   SWS, SWEEP         forward sweep over the stored bits
//   DIR    J_i cycles  direction adjustment, old to new interval, and
//                      storing the new beginning times
//   MULT   H cycles    multiplier update, all time slots in parallel
//   DONE   1 cycle     done pulse, schedule marked valid
// A failed sweep skips DIR and MULT. The phase order follows the document;
// the register copy of the operation data is this design's choice, made
// because all stage cells need their operation data at the same time.
module pipe_controller
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
  // stage cells
  output logic            go,
  output logic [NW-1:0]   nops,
  output logic [TW-1:0]   cell_p [J],
  output logic [HW-1:0]   cell_h [J],
  output logic [TW-1:0]   due,
  output logic [SHW-1:0]  wsh,
  input  logic            fin0,
  input  cost_t           m0,
  // multiplier updating circuit
  output cell_op_e        op,
  output logic [HW-1:0]   h,
  output logic [SHW-1:0]  nsh,
  output logic [TW-1:0]   plen,
  output logic            old_valid,
  output logic [TW-1:0]   old_b,
  output logic [TW-1:0]   new_b,
  // forward sweep
  output logic            sw_start,
  output logic [NW-1:0]   sw_nops,
  input  logic [JW-1:0]   sw_sel_j,
  input  logic            sw_done,
  input  logic            sw_fail,
  input  logic [TW-1:0]   sw_b [J]
);

  typedef enum logic [3:0] {
    S_IDLE, S_OPS, S_GO, S_RUN, S_SWS, S_SWEEP, S_DIR, S_MULT, S_DONE
  } state_e;

  state_e          st;
  logic [IW-1:0]   part_q;
  logic [SHW-1:0]  n_q;
  logic [JW-1:0]   j_q;
  logic [HW-1:0]   h_q;
  logic            fail_q;

  assign busy      = (st != S_IDLE);
  assign ci        = part_q;
  assign cj        = (st == S_SWEEP) ? sw_sel_j : j_q;
  assign nops      = c_nops;
  assign sw_nops   = c_nops;
  assign due       = c_due;
  assign wsh       = c_wsh;
  assign nsh       = n_q;
  assign plen      = c_p;
  assign old_valid = c_bvalid;
  assign old_b     = c_b;
  assign new_b     = sw_b[j_q];
  assign sched_wj  = j_q;
  assign sched_wb  = sw_b[j_q];
  assign fail      = fail_q;
  assign go        = (st == S_GO);
  assign sw_start  = (st == S_SWS);
  assign sched_wr  = (st == S_DIR);
  assign done      = (st == S_DONE);
  assign sched_commit = (st == S_DONE) && !fail_q;

  always_comb begin
    op = OP_NOP;
    h  = c_h;
    if (st == S_DIR) op = OP_DIR;
    if (st == S_MULT) begin
      op = OP_MULT;
      h  = h_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      part_q   <= '0;
      n_q      <= '0;
      j_q      <= '0;
      h_q      <= '0;
      fail_q   <= 1'b0;
      sub_cost <= COST_INF;
      for (int j = 0; j < J; j++) begin
        cell_p[j] <= TW'(1);
        cell_h[j] <= '0;
      end
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          part_q <= part;
          n_q    <= step_n;
          fail_q <= 1'b0;
          j_q    <= '0;
          st     <= S_OPS;
        end
        S_OPS: begin
          if (c_nops == '0) st <= S_DONE;
          else begin
            cell_p[j_q] <= c_p;
            cell_h[j_q] <= c_h;
            if (NW'(j_q) + 1'b1 >= c_nops) st <= S_GO;
            else j_q <= j_q + 1'b1;
          end
        end
        S_GO: st <= S_RUN;
        S_RUN: if (fin0) begin
          sub_cost <= m0;
          st       <= S_SWS;
        end
        S_SWS: st <= S_SWEEP;
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
