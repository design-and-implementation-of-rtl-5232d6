// Reference model of the modified Viterbi decoder for the testbenches.
//
// Written from the code's state diagram (state {X(n-1), X(n-2)}, on input u
// the next state is {u, X(n-1)} and the pair sent is {u^X(n-1)^X(n-2),
// u^X(n-2)}), not from the RTL.  decode() runs one frame through the same
// rules the hardware implements: hard-decision distances, extension of
// surviving states only, keep the smaller sum (tie: the predecessor with
// X(n-2) = 0), keep a path if its metric <= best of previous stage +
// thresh or it is the best, then keep at most max_paths best (ties by state
// number, 0 = no limit), trace back from the best final state.
package mva_ref_pkg;

  typedef struct {
    bit [63:0] bits;      // decoded bit per stage
    int        metric;    // final best metric
    int        ops[64];   // additions per stage
    int        paths[64]; // survivors per stage
    int        thr[64];   // removed by threshold per stage
    int        lim[64];   // removed by limit per stage
  } ref_result_t;

  function automatic bit [1:0] ref_out(int s, bit u);
    bit x1, x2;
    x1 = s[1]; x2 = s[0];
    return {u ^ x1 ^ x2, u ^ x2};
  endfunction

  function automatic int ref_dist(bit [1:0] a, bit [1:0] b);
    return int'(a[1] != b[1]) + int'(a[0] != b[0]);
  endfunction

  function automatic ref_result_t decode(bit [1:0] rx[], int thresh, int max_paths);
    ref_result_t r;
    int pm[4], npm[4], rk[4];
    bit val[4], cv[4], kt[4], nv[4];
    int pred[64][4];
    int bprev, best, st;
    pm = '{0, 0, 0, 0};
    val = '{1, 0, 0, 0};
    bprev = 0;
    r.bits = '0;
    for (int t = 0; t < rx.size(); t++) begin
      r.ops[t] = 0;
      for (int s = 0; s < 4; s++) if (val[s]) r.ops[t] += 2;
      for (int ns = 0; ns < 4; ns++) begin
        bit u;
        u = ns[1];
        cv[ns] = 0;
        npm[ns] = 0;
        pred[t][ns] = 0;
        // predecessors: states s with {u, s[1]} == ns, i.e. s[1] == ns[0]
        for (int x2 = 0; x2 < 2; x2++) begin
          int s, c;
          s = ns[0] * 2 + x2;
          if (!val[s]) continue;
          c = pm[s] + ref_dist(rx[t], ref_out(s, u));
          if (!cv[ns] || c < npm[ns]) begin
            npm[ns] = c; pred[t][ns] = s; cv[ns] = 1;
          end
        end
      end
      for (int i = 0; i < 4; i++) begin
        rk[i] = 0;
        for (int j = 0; j < 4; j++)
          if (cv[j] && (npm[j] < npm[i] || (npm[j] == npm[i] && j < i))) rk[i]++;
      end
      r.paths[t] = 0; r.thr[t] = 0; r.lim[t] = 0;
      for (int i = 0; i < 4; i++) begin
        kt[i] = cv[i] && (npm[i] <= bprev + thresh || rk[i] == 0);
        nv[i] = kt[i] && (max_paths == 0 || rk[i] < max_paths);
        if (cv[i] && rk[i] == 0) begin bprev = npm[i]; best = i; end
        if (nv[i]) r.paths[t]++;
        if (cv[i] && !kt[i]) r.thr[t]++;
        if (kt[i] && !nv[i]) r.lim[t]++;
      end
      pm = npm;
      val = nv;
    end
    r.metric = bprev;
    st = best;
    for (int t = rx.size() - 1; t >= 0; t--) begin
      r.bits[t] = st[1];
      st = pred[t][st];
    end
    return r;
  endfunction

  // Encode a frame of bits into pairs, starting from state 0.
  function automatic void encode(bit b[], ref bit [1:0] y[]);
    int s;
    s = 0;
    y = new[b.size()];
    foreach (b[i]) begin
      y[i] = ref_out(s, b[i]);
      s = int'({b[i], s[1]});
    end
  endfunction

endpackage
