// lrnn_pkg: constants, types and arithmetic shared by the LRNN optimization
// chips (Lagrangian relaxation neural network for job shop scheduling).
//
// All costs, multipliers and cumulative costs are 16-bit unsigned integers,
// as the design trades numerical accuracy for area (16-bit integer arithmetic,
// no floating point). The all-ones code COST_INF marks an infeasible state
// (an operation that would run past the scheduling horizon). Finite sums
// saturate one below it so that a large but feasible cost is never mistaken
// for an infeasible one; this saturation rule is a choice of this design.
// Multiplication only happens by powers of two, done with shifts: the part
// weight W_i = 2^w and the multiplier step size 2^-n.
package lrnn_pkg;

  localparam int COST_W = 16;
  typedef logic [COST_W-1:0] cost_t;          // unsigned cost / multiplier
  typedef logic signed [COST_W-1:0] dir_t;    // signed subgradient direction

  localparam cost_t COST_INF = '1;            // infeasible
  localparam cost_t COST_MAX = COST_INF - 1;  // largest finite cost

  localparam int SHW = 4;                     // width of shift exponents (w, n)

  // Operation broadcast by a sequence controller to all state cells (or to
  // the multiplier updating circuit of the pipeline chip) in one cycle.
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,  // hold
    OP_TARDY = 3'd1,  // preset running minimum with the tardiness cost
    OP_LOAD  = 3'd2,  // first cycle of a stage: start stage-wise cost sum
    OP_ACC   = 3'd3,  // accumulate next multiplier from the neighbour chain
    OP_CC    = 3'd4,  // cumulative cost = stage-wise cost + successor minimum
    OP_CMP   = 3'd5,  // sequential pair-wise comparison (token driven)
    OP_DIR   = 3'd6,  // adjust directions with one operation's old/new interval
    OP_MULT  = 3'd7   // multiplier update for one machine type
  } cell_op_e;

  // Saturating add: INF is absorbing, finite sums clip at COST_MAX.
  function automatic cost_t cost_add(cost_t a, cost_t b);
    logic [COST_W:0] s;
    if (a == COST_INF || b == COST_INF) return COST_INF;
    s = {1'b0, a} + {1'b0, b};
    if (s > {1'b0, COST_MAX}) return COST_MAX;
    return s[COST_W-1:0];
  endfunction

  // Weighted tardiness W*T with W = 2^w and T = max(0, late), saturating.
  // "late" is completion time minus due date, already computed by the caller.
  function automatic cost_t tardy_cost(logic signed [31:0] late, logic [SHW-1:0] w);
    logic [47:0] t;
    if (late <= 0) return '0;
    t = 48'(late) << w;
    if (t > 48'(COST_MAX)) return COST_MAX;
    return t[COST_W-1:0];
  endfunction

  // Multiplier update pi <- max(0, pi + g * 2^-n), kept finite.
  function automatic cost_t mult_update(cost_t pi, dir_t g, logic [SHW-1:0] n);
    logic signed [COST_W+1:0] s;
    s = $signed({2'b00, pi}) + $signed(18'(g >>> n));
    if (s < 0) return '0;
    if (s > $signed({2'b00, COST_MAX})) return COST_MAX;
    return s[COST_W-1:0];
  endfunction

endpackage
