// state_cell: one state cell of the parallel-architecture optimization chip.
//
// Cell k holds, in local memory, the Lagrange multipliers pi[k][h] and the
// subgradient directions g[k][h] of time slot k for every machine type h,
// plus one minimum-indicating bit per DP stage. It realises, for state k
// (operation beginning time k), the "state neuron" (one adder) and the
// "comparison neuron" (one comparator) of neuron-based dynamic programming.
//
// Work of one DP stage j with processing time P and machine type h
// (P+1 cycles, all cells in parallel, then K cycles of sequential compare):
//   OP_LOAD (1 cycle)  acc <= pi[k][h]; the neighbour chain is loaded with
//                      the right neighbour's pi[k+1][h] and its running
//                      minimum M(k+1) of the succeeding stage.
//   OP_ACC  (P-1 cyc.) acc += chain value; both chains shift one cell left,
//                      so after them acc = sum pi[k..k+P-1][h] (stage-wise
//                      cost) and the M chain holds M(k+P).
//   OP_CC   (1 cycle)  v <= acc + M(k+P)   (cumulative cost of state k).
//   OP_CMP  (token)    when the comparison token arrives from cell k+1:
//                      M(k) <= min(v, M(k+1)), bit[j] <= (v <= M(k+1)),
//                      token passed to cell k-1 on the next cycle.
// Values past the horizon enter cell K-1 as COST_INF, so a state whose
// operation would not end inside the horizon gets an infinite cost.
// Before the last stage, OP_TARDY presets M(k) with the weighted tardiness of
// a part completing at time k-1, so the last stage needs no special case.
// After the forward sweep, OP_DIR (one cycle per operation) moves that
// operation's contribution to g from its old interval to its new one and
// OP_MULT (one cycle per machine type) sets pi <- max(0, pi + g*2^-n).
//
// The stage-wise cost, the sequential compare from the last cell to the
// first, the local storage and the timing of P+1 cycles per stage follow the
// document; the neighbour shift chain used to gather pi[k..k+P-1] and
// M(k+P), the tardiness preset and the tie rule (earliest state wins) are
// this design's choices. The host port writes pi and g of slot wr_k.
module state_cell
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,                 // number of time slots / cells
  parameter int J  = 20,                   // maximum operations per part
  parameter int H  = 11,                   // machine types
  localparam int TW = $clog2(K + 1) + 1,   // time index width
  localparam int HW = (H > 1) ? $clog2(H) : 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TW-1:0]     idx,         // this cell's time index k
  // broadcast control
  input  cell_op_e          op,
  input  logic [HW-1:0]     h,           // machine type of current operation
  input  logic [JW-1:0]     stage,       // stage whose bit OP_CMP writes
  input  logic [TW-1:0]     due,         // due date D_i
  input  logic [SHW-1:0]    wsh,         // weight exponent w (W_i = 2^w)
  input  logic [SHW-1:0]    nsh,         // step exponent n (step = 2^-n)
  input  logic [TW-1:0]     plen,        // processing time for OP_DIR
  input  logic              old_valid,   // an old schedule exists
  input  logic [TW-1:0]     old_b,
  input  logic [TW-1:0]     new_b,
  // neighbour chains: *_in from cell k+1, *_out to cell k-1
  input  cost_t             pi_in,
  output cost_t             pi_out,
  input  cost_t             m_in,
  output cost_t             m_out,
  input  cost_t             mr_in,       // running minimum M(k+1)
  output cost_t             mr_out,      // running minimum M(k)
  input  logic              tok_in,
  output logic              tok_out,
  // minimum-indicating bit read by the forward sweep
  input  logic [JW-1:0]     mib_sel,
  output logic              mib_out,
  // host access to local memory
  input  logic              wr_en,
  input  logic [TW-1:0]     wr_k,
  input  logic [HW-1:0]     wr_h,
  input  cost_t             wr_pi,
  input  dir_t              wr_g,
  input  logic [HW-1:0]     rd_h,
  output cost_t             rd_pi,
  output dir_t              rd_g
);

  cost_t          pi_mem [H];
  dir_t           g_mem  [H];
  logic [J-1:0]   mib;
  cost_t          acc, sr_pi, sr_m, v, m_reg;
  logic           tok_q;

  // Interval membership of this slot for direction adjustment.
  logic in_new, in_old;
  always_comb begin
    in_new = (idx >= new_b) && (idx < new_b + plen);
    in_old = old_valid && (idx >= old_b) && (idx < old_b + plen);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < H; i++) begin
        pi_mem[i] <= '0;
        g_mem[i]  <= '0;
      end
      mib   <= '0;
      acc   <= '0;
      sr_pi <= COST_INF;
      sr_m  <= COST_INF;
      v     <= COST_INF;
      m_reg <= COST_INF;
      tok_q <= 1'b0;
    end else begin
      tok_q <= (op == OP_CMP) && tok_in;
      unique case (op)
        OP_TARDY: m_reg <= tardy_cost(32'(idx) - 32'sd1 - 32'(due), wsh);
        OP_LOAD: begin
          acc   <= pi_mem[h];
          sr_pi <= pi_in;
          sr_m  <= m_in;
        end
        OP_ACC: begin
          acc   <= cost_add(acc, sr_pi);
          sr_pi <= pi_in;
          sr_m  <= m_in;
        end
        OP_CC: v <= cost_add(acc, sr_m);
        OP_CMP: if (tok_in) begin
          if (v != COST_INF && v <= mr_in) begin
            m_reg      <= v;
            mib[stage] <= 1'b1;
          end else begin
            m_reg      <= mr_in;
            mib[stage] <= 1'b0;
          end
        end
        OP_DIR: g_mem[h] <= g_mem[h] + dir_t'(in_new) - dir_t'(in_old);
        OP_MULT: pi_mem[h] <= mult_update(pi_mem[h], g_mem[h], nsh);
        default: ;
      endcase
      if (wr_en && wr_k == idx) begin
        pi_mem[wr_h] <= wr_pi;
        g_mem[wr_h]  <= wr_g;
      end
    end
  end

  // The chains expose local memory / running minimum in the load cycle and
  // the shifted values afterwards.
  assign pi_out  = (op == OP_LOAD) ? pi_mem[h] : sr_pi;
  assign m_out   = (op == OP_LOAD) ? m_reg     : sr_m;
  assign mr_out  = m_reg;
  assign tok_out = tok_q;
  assign mib_out = mib[mib_sel];
  assign rd_pi   = pi_mem[rd_h];
  assign rd_g    = g_mem[rd_h];

endmodule
