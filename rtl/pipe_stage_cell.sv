// pipe_stage_cell: one stage cell of the pipeline-architecture optimization
// chip. Stage cell j computes DP stage j (operation j of the part) for all
// states, one state per clock, from the largest beginning time K-1 down to 0.
//
// Each state passes four pipeline steps, one per cycle, so four states are
// in flight at once:
//   SC1  x(k)  = pi[k][h] - pi[k+P][h]        (pi[k+P] is 0 past the horizon)
//   SC2  S(k)  = S(k+1) + x(k)                sliding-window stage-wise cost
//   CC   V(k)  = S(k) + Mnext(k+P)            cumulative cost
//   MC   M(k)  = min(V(k), M(k+1)), bit(k) = V(k) <= M(k+1)
// (two adders SC, one adder CC and one comparator MC, as the document gives).
// pi[k][h] arrives combinationally from the multiplier memory on the read
// port this cell addresses with rd_k; pi[k+P][h] is taken from a circular
// buffer of the last PMAX values read. Mnext is the running minimum M of
// stage cell j+1, which runs one cycle ahead of this cell on the same state
// index; it is buffered in a second circular buffer and read P-1 cycles
// late, which is exactly when M_{j+1}(k+P) was produced. For the last stage
// Mnext(k+P) is the weighted tardiness of finishing at k+P-1; a state
// whose operation would end past the horizon costs COST_INF.
//
// Timing: pulse go (with P, h, is_last, due, w stable for the whole run);
// go_out repeats it one cycle later for stage cell j-1. The bit of state k
// is written (bit_we, bit_k, bit_val) four cycles after state k was read,
// m_out holds M of the last finished state, and fin pulses with M(0).
// The four steps and the one-cycle stagger between stage cells follow the
// document's figure of the pipeline; the circular buffers (depth PMAX, the
// largest supported processing time) and the exact data alignment are this
// design's choices.
module pipe_stage_cell
  import lrnn_pkg::*;
#(
  parameter int K    = 5000,
  parameter int PMAX = 256,                 // largest processing time
  localparam int TW  = $clog2(K + 1) + 1,
  localparam int BW  = $clog2(PMAX),
  localparam int SW  = COST_W + TW          // exact stage-sum width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  output logic              go_out,
  input  logic [TW-1:0]     plen,           // P_ij, 1..PMAX
  input  logic              is_last,        // last operation of the part
  input  logic [TW-1:0]     due,
  input  logic [SHW-1:0]    wsh,
  // multiplier read port
  output logic [TW-1:0]     rd_k,
  input  cost_t             rd_pi,
  // running minimum of stage cell j+1, and ours for stage cell j-1
  input  cost_t             m_in,
  output cost_t             m_out,
  // minimum-indicating bit
  output logic              bit_we,
  output logic [TW-1:0]     bit_k,
  output logic              bit_val,
  output logic              fin
);

  // state counter of the SC1 step
  logic [TW-1:0]  k0;
  logic           act;
  // pipeline registers
  logic           v1, v2, v3;
  logic [TW-1:0]  k1, k2, k3;
  logic signed [COST_W+1:0] x1;
  logic [SW-1:0]  s2;
  cost_t          v3c;
  cost_t          m_q;
  logic           first3;
  // circular buffers
  cost_t          pbuf [PMAX];
  cost_t          mbuf [PMAX];
  logic [BW-1:0]  pwp, mwp;

  assign rd_k  = k0;

  // SC1: difference of entering and leaving multipliers
  logic [TW:0]    kp0;
  cost_t          pi_old;
  logic signed [COST_W+1:0] x0;
  always_comb begin
    kp0    = {1'b0, k0} + {1'b0, plen};
    pi_old = (kp0 < (TW+1)'(K)) ? pbuf[BW'(pwp - BW'(plen))] : '0;
    x0     = $signed({2'b00, rd_pi}) - $signed({2'b00, pi_old});
  end

  // CC: successor minimum for state k2
  logic [TW:0]    kp2;
  cost_t          mnext, stage_cost;
  always_comb begin
    kp2 = {1'b0, k2} + {1'b0, plen};
    if (is_last)
      mnext = tardy_cost(32'(kp2) - 32'sd1 - 32'(due), wsh);
    else if (kp2 >= (TW+1)'(K))
      mnext = COST_INF;
    else if (plen == TW'(1))
      mnext = m_in;
    else
      mnext = mbuf[BW'(mwp - BW'(plen - 1'b1))];
    if (kp2 > (TW+1)'(K)) stage_cost = COST_INF;
    else if (s2 > SW'(COST_MAX)) stage_cost = COST_MAX;
    else stage_cost = s2[COST_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (act) pbuf[pwp] <= rd_pi;
    mbuf[mwp] <= m_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k0 <= '0; act <= 1'b0; go_out <= 1'b0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      k1 <= '0; k2 <= '0; k3 <= '0;
      x1 <= '0; s2 <= '0; v3c <= COST_INF; m_q <= COST_INF; first3 <= 1'b0;
      pwp <= '0; mwp <= '0;
      bit_we <= 1'b0; bit_k <= '0; bit_val <= 1'b0; fin <= 1'b0;
    end else begin
      go_out <= go;
      mwp    <= mwp + 1'b1;
      // SC1
      if (go) begin
        k0  <= TW'(K - 1);
        act <= 1'b1;
      end else if (act) begin
        pwp <= pwp + 1'b1;
        if (k0 == '0) act <= 1'b0;
        else k0 <= k0 - 1'b1;
      end
      v1 <= act;
      k1 <= k0;
      x1 <= x0;
      // SC2: running stage sum, restarted at the first state
      v2 <= v1;
      k2 <= k1;
      if (v1) s2 <= ((k1 == TW'(K - 1)) ? '0 : s2) + SW'(x1);
      // CC
      v3     <= v2;
      k3     <= k2;
      first3 <= (k2 == TW'(K - 1));
      v3c    <= cost_add(stage_cost, mnext);
      // MC
      bit_we <= v3;
      bit_k  <= k3;
      fin    <= v3 && (k3 == '0);
      if (v3) begin
        if (v3c != COST_INF && (first3 || v3c <= m_q)) begin
          m_q     <= v3c;
          bit_val <= 1'b1;
        end else begin
          m_q     <= first3 ? COST_INF : m_q;
          bit_val <= 1'b0;
        end
      end
    end
  end

  assign m_out = m_q;

endmodule
