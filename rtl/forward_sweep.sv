// forward_sweep: traces the minimum-indicating bits of a solved part
// subproblem forward, from the first stage to the last, to recover the
// optimal operation beginning times.
//
// After the backward DP pass, bit k of stage j is set when state k is the
// cheapest of all states k' >= k of that stage. Starting at time 0 with the
// first stage, the circuit looks at one state per cycle: if its bit is set,
// that state is the stage's beginning time b_j and the search for the next
// stage starts at b_j + P_j (the precedence constraint); otherwise it moves
// to the next state. The search pointer only moves forward, so a whole part
// takes (total slack between operations) + J_i cycles, at most K + J_i.
// Running past the horizon (no set bit left) ends the sweep with fail = 1.
//
// The document gives the function and its cycle budget of alpha*K*J with
// alpha below 0.05; the one-state-per-cycle scan is this design's choice and
// meets that budget as alpha = (K + J)/(K*J), about 1/J.
//
// Interface: pulse start with nops = J_i; the circuit selects a stage with
// sel_j and expects, combinationally, that stage's K bits on mib and its
// processing time on p_j. done pulses for one cycle when b[] is final.
module forward_sweep
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int J  = 20,
  localparam int TW = $clog2(K + 1) + 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1,
  localparam int NW = $clog2(J + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NW-1:0]  nops,
  input  logic [K-1:0]   mib,
  input  logic [TW-1:0]  p_j,
  output logic [JW-1:0]  sel_j,
  output logic           done,
  output logic           fail,
  output logic [TW-1:0]  b [J]
);

  logic [TW-1:0] ptr;
  logic [JW-1:0] j_q;
  logic          run;

  assign sel_j = j_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      j_q  <= '0;
      run  <= 1'b0;
      done <= 1'b0;
      fail <= 1'b0;
      for (int i = 0; i < J; i++) b[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ptr  <= '0;
        j_q  <= '0;
        run  <= 1'b1;
        fail <= 1'b0;
      end else if (run) begin
        if (ptr >= TW'(K)) begin
          run  <= 1'b0;
          done <= 1'b1;
          fail <= 1'b1;
        end else if (mib[ptr[$clog2(K+1)-1:0]]) begin
          b[j_q] <= ptr;
          ptr    <= ptr + p_j;
          if (NW'(j_q) + 1'b1 >= nops) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
