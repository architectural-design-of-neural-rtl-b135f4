// pipe_forward_sweep: forward sweep of the pipeline chip, which, unlike the
// parallel chip, keeps the minimum-indicating bits itself.
//
// A J x K bit store takes one bit per cycle from every stage cell (row j is
// written only by stage cell j, at the state index the cell reports). After
// the backward pass the row of the stage being traced is handed to a
// forward_sweep tracer, which returns the beginning times as in the parallel
// chip (one state per cycle, at most K + J_i cycles). Storing the bits in
// the sweep circuit is the document's; the store layout is this design's.
module pipe_forward_sweep
  import lrnn_pkg::*;
#(
  parameter int K  = 5000,
  parameter int J  = 20,
  localparam int TW = $clog2(K + 1) + 1,
  localparam int JW = (J > 1) ? $clog2(J) : 1,
  localparam int NW = $clog2(J + 1),
  localparam int KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bit_we  [J],
  input  logic [TW-1:0]  bit_k   [J],
  input  logic           bit_val [J],
  input  logic           start,
  input  logic [NW-1:0]  nops,
  input  logic [TW-1:0]  p_j,
  output logic [JW-1:0]  sel_j,
  output logic           done,
  output logic           fail,
  output logic [TW-1:0]  b [J]
);

  logic [K-1:0] bits [J];

  always_ff @(posedge clk) begin
    for (int j = 0; j < J; j++)
      if (bit_we[j] && bit_k[j] < TW'(K)) bits[j][bit_k[j][KW-1:0]] <= bit_val[j];
  end

  forward_sweep #(.K(K), .J(J)) u_trace (
    .clk, .rst_n, .start, .nops, .mib(bits[sel_j]), .p_j,
    .sel_j, .done, .fail, .b
  );

endmodule
