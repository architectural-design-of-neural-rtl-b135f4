// global_memory: part and schedule information of the optimization chip.
//
// Holds, for each of I parts, its due date D_i, weight exponent w_i
// (W_i = 2^w_i) and number of operations J_i, and for each operation j its
// machine type h_ij and processing time P_ij. It also keeps the most recent
// schedule of every part (operation beginning times b_ij) with a valid flag,
// because the directions are adjusted by removing a part's old schedule and
// adding its new one. The document names this memory and its contents; the
// organisation (three arrays, asynchronous reads, one write per cycle per
// port) is this design's choice.
//
// Host side: part/op writes (one record per cycle) and a schedule read
// port. Chip side: asynchronous reads addressed by (part, op) and a schedule
// write port; sched_commit marks the part's stored schedule valid.
module global_memory
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
  // host writes
  input  logic            part_wr,
  input  logic [IW-1:0]   part_wi,
  input  logic [TW-1:0]   part_wdue,
  input  logic [SHW-1:0]  part_wwsh,
  input  logic [NW-1:0]   part_wnops,
  input  logic            op_wr,
  input  logic [IW-1:0]   op_wi,
  input  logic [JW-1:0]   op_wj,
  input  logic [HW-1:0]   op_wh,
  input  logic [TW-1:0]   op_wp,
  // host schedule read
  input  logic [IW-1:0]   hs_i,
  input  logic [JW-1:0]   hs_j,
  output logic [TW-1:0]   hs_b,
  output logic            hs_valid,
  // chip reads
  input  logic [IW-1:0]   ci,
  input  logic [JW-1:0]   cj,
  output logic [TW-1:0]   c_due,
  output logic [SHW-1:0]  c_wsh,
  output logic [NW-1:0]   c_nops,
  output logic [HW-1:0]   c_h,
  output logic [TW-1:0]   c_p,
  output logic [TW-1:0]   c_b,
  output logic            c_bvalid,
  // chip schedule writes
  input  logic            sched_wr,
  input  logic [JW-1:0]   sched_wj,
  input  logic [TW-1:0]   sched_wb,
  input  logic            sched_commit
);

  typedef struct packed {
    logic [TW-1:0]  due;
    logic [SHW-1:0] wsh;
    logic [NW-1:0]  nops;
  } part_rec_t;

  typedef struct packed {
    logic [HW-1:0] h;
    logic [TW-1:0] p;
  } op_rec_t;

  part_rec_t     parts [I];
  op_rec_t       ops   [I][J];
  logic [TW-1:0] sched [I][J];
  logic [I-1:0]  svalid;

  // schedule writes always go to the part the chip is addressing (ci)
  always_ff @(posedge clk) begin
    if (part_wr) parts[part_wi] <= '{due: part_wdue, wsh: part_wwsh, nops: part_wnops};
    if (op_wr)   ops[op_wi][op_wj] <= '{h: op_wh, p: op_wp};
    if (sched_wr) sched[ci][sched_wj] <= sched_wb;
  end

  // A part whose data is rewritten loses its old schedule.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) svalid <= '0;
    else begin
      if (part_wr) svalid[part_wi] <= 1'b0;
      if (sched_commit) svalid[ci] <= 1'b1;
    end
  end

  always_comb begin
    c_due    = parts[ci].due;
    c_wsh    = parts[ci].wsh;
    c_nops   = parts[ci].nops;
    c_h      = ops[ci][cj].h;
    c_p      = ops[ci][cj].p;
    c_b      = sched[ci][cj];
    c_bvalid = svalid[ci];
    hs_b     = sched[hs_i][hs_j];
    hs_valid = svalid[hs_i];
  end

endmodule
