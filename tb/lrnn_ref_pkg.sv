// lrnn_ref_pkg: behavioural reference model of one LRNN iteration step, used
// by the testbenches to predict what the optimization chips compute.
//
// It works on whole arrays instead of cells and cycles: for a part it forms,
// stage by stage from the last, the stage-wise costs (sum of P multipliers),
// the cumulative costs and the running minima, then traces the schedule
// forward and applies the direction and multiplier updates. A brute-force
// search over all beginning-time vectors is also provided, to check the DP
// result itself on small problems. The model also predicts the forward
// sweep length, from which the testbenches derive expected cycle counts.
package lrnn_ref_pkg;
  import lrnn_pkg::*;

  class lrnn_model;
    int K, J, H, I;
    cost_t pi[][];
    dir_t  g[][];
    int    due[], wsh[], nops[];
    int    oph[][], opp[][], sched[][];
    bit    svalid[];
    // results of the last run_part
    cost_t cost;
    bit    fail;
    int    b[];
    int    sweep_cycles;

    function new(int K, int J, int H, int I);
      this.K = K; this.J = J; this.H = H; this.I = I;
      pi = new[K]; g = new[K];
      foreach (pi[k]) begin pi[k] = new[H]; g[k] = new[H]; end
      due = new[I]; wsh = new[I]; nops = new[I]; svalid = new[I];
      oph = new[I]; opp = new[I]; sched = new[I];
      foreach (oph[i]) begin oph[i] = new[J]; opp[i] = new[J]; sched[i] = new[J]; end
      b = new[J];
    endfunction

    function cost_t tard(int i, int knext);  // cost of finishing at knext-1
      return tardy_cost(32'(knext - 1 - due[i]), 4'(wsh[i]));
    endfunction

    function cost_t stage_cost(int k, int h, int p);
      cost_t s = 0;
      if (k + p > K) return COST_INF;
      for (int t = 0; t < p; t++) s = cost_add(s, pi[k+t][h]);
      return s;
    endfunction

    // Backward DP, forward sweep, then updates with step 2^-n.
    function void run_part(int i, int n);
      cost_t V[], M[], Mn[];
      bit    bits[][];
      int    ptr, slack;
      int    jn = nops[i];
      V = new[K]; M = new[K+1]; Mn = new[K+1];
      bits = new[jn];
      for (int k = 0; k <= K; k++) Mn[k] = tard(i, k);
      for (int j = jn - 1; j >= 0; j--) begin
        bits[j] = new[K];
        for (int k = 0; k < K; k++)
          V[k] = cost_add(stage_cost(k, oph[i][j], opp[i][j]),
                          (k + opp[i][j] <= K) ? Mn[k + opp[i][j]] : COST_INF);
        M[K] = COST_INF;
        for (int k = K - 1; k >= 0; k--) begin
          bits[j][k] = (V[k] != COST_INF) && (V[k] <= M[k+1]);
          M[k] = bits[j][k] ? V[k] : M[k+1];
        end
        Mn = M;
      end
      cost = Mn[0];
      fail = 0; ptr = 0; slack = 0;
      for (int j = 0; j < jn; j++) begin
        while (ptr < K && !bits[j][ptr]) begin ptr++; slack++; end
        if (ptr >= K) begin fail = 1; slack++; break; end
        b[j] = ptr;
        ptr += opp[i][j];
      end
      sweep_cycles = fail ? slack + 0 : slack + jn;
      if (fail) begin
        // count of hits before running off the end
        sweep_cycles = 0; ptr = 0;
        for (int j = 0; j < jn; j++) begin
          while (ptr < K && !bits[j][ptr]) begin ptr++; sweep_cycles++; end
          if (ptr >= K) begin sweep_cycles++; break; end
          sweep_cycles++; ptr += opp[i][j];
        end
        return;
      end
      for (int j = 0; j < jn; j++)
        for (int k = 0; k < K; k++) begin
          int d = 0;
          if (k >= b[j] && k < b[j] + opp[i][j]) d++;
          if (svalid[i] && k >= sched[i][j] && k < sched[i][j] + opp[i][j]) d--;
          g[k][oph[i][j]] += dir_t'(d);
        end
      for (int k = 0; k < K; k++)
        for (int h = 0; h < H; h++) pi[k][h] = mult_update(pi[k][h], g[k][h], 4'(n));
      for (int j = 0; j < jn; j++) sched[i][j] = b[j];
      svalid[i] = 1;
    endfunction

    // Exhaustive minimum of L_i = sum of stage costs + tardiness, exact
    // integers (no saturation); -1 when no feasible schedule exists.
    function longint brute(int i);
      longint best = -1;
      int bb[];
      bb = new[nops[i]];
      brute_rec(i, 0, 0, 0, bb, best);
      return best;
    endfunction

    function void brute_rec(int i, int j, int earliest, longint acc, ref int bb[],
                            ref longint best);
      if (j == nops[i]) begin
        int c = bb[j-1] + opp[i][j-1] - 1;
        longint t = (c > due[i]) ? longint'(c - due[i]) << wsh[i] : 0;
        if (best < 0 || acc + t < best) best = acc + t;
        return;
      end
      for (int k = earliest; k + opp[i][j] <= K; k++) begin
        longint s = 0;
        for (int t = 0; t < opp[i][j]; t++) s += pi[k+t][oph[i][j]];
        bb[j] = k;
        brute_rec(i, j + 1, k + opp[i][j], acc + s, bb, best);
      end
    endfunction
  endclass

endpackage
