// pipe_mult_memory: global multiplier memory of the pipeline chip, with its
// multi-reading capability and the separate multiplier updating circuit.
//
// Every stage cell needs multipliers of all time indices, so pi[k][h] and the
// directions g[k][h] live here rather than in the cells. NR read ports (one
// per stage cell) each return pi[rd_k][rd_h] combinationally in the same
// cycle, so all stage cells read concurrently at different addresses.
// Updating works on all K time slots in parallel:
//   OP_DIR   one operation per cycle: g[k][h] += [k in new interval]
//                                               - [k in old interval]
//   OP_MULT  one machine type per cycle: pi[k][h] <- max(0, pi + g*2^-n)
// The host port writes pi and g of one slot (initialisation) and reads one.
// The need for concurrent reads and a parallel updating circuit is the
// document's; combinational read ports on a register array and the update
// order are this design's choices.
module pipe_mult_memory
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int H  = 11,
  parameter int NR = 20,                    // read ports (stage cells)
  localparam int TW = $clog2(K + 1) + 1,
  localparam int HW = (H > 1) ? $clog2(H) : 1,
  localparam int KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // concurrent reads
  input  logic [TW-1:0]   rd_k [NR],
  input  logic [HW-1:0]   rd_h [NR],
  output cost_t           rd_pi [NR],
  // updating circuit
  input  cell_op_e        op,
  input  logic [HW-1:0]   h,
  input  logic [SHW-1:0]  nsh,
  input  logic [TW-1:0]   plen,
  input  logic            old_valid,
  input  logic [TW-1:0]   old_b,
  input  logic [TW-1:0]   new_b,
  // host access
  input  logic            wr_en,
  input  logic [TW-1:0]   wr_k,
  input  logic [HW-1:0]   wr_h,
  input  cost_t           wr_pi,
  input  dir_t            wr_g,
  input  logic [TW-1:0]   hr_k,
  input  logic [HW-1:0]   hr_h,
  output cost_t           hr_pi,
  output dir_t            hr_g
);

  cost_t pi_mem [K][H];
  dir_t  g_mem  [K][H];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++)
        for (int x = 0; x < H; x++) begin
          pi_mem[k][x] <= '0;
          g_mem[k][x]  <= '0;
        end
    end else begin
      for (int k = 0; k < K; k++) begin
        if (op == OP_DIR)
          g_mem[k][h] <= g_mem[k][h]
                       + dir_t'(TW'(k) >= new_b && TW'(k) < new_b + plen)
                       - dir_t'(old_valid && TW'(k) >= old_b && TW'(k) < old_b + plen);
        else if (op == OP_MULT)
          pi_mem[k][h] <= mult_update(pi_mem[k][h], g_mem[k][h], nsh);
      end
      if (wr_en && wr_k < TW'(K)) begin
        pi_mem[wr_k[KW-1:0]][wr_h] <= wr_pi;
        g_mem[wr_k[KW-1:0]][wr_h]  <= wr_g;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++)
      rd_pi[r] = (rd_k[r] < TW'(K)) ? pi_mem[rd_k[r][KW-1:0]][rd_h[r]] : COST_INF;
    hr_pi = (hr_k < TW'(K)) ? pi_mem[hr_k[KW-1:0]][hr_h] : COST_INF;
    hr_g  = (hr_k < TW'(K)) ? g_mem[hr_k[KW-1:0]][hr_h] : '0;
  end

endmodule
