// Add-compare-select unit (ACSU) with the modified-Viterbi (MVA) pruning.
//
// One trellis stage per call, purely combinational.  For every next state
// ns = {u, s[M-1:1]} (u = input bit, M = CL-1) the two predecessors are
// p_b = {ns[M-2:0], b}, b = 0/1.  Only predecessors that survived the
// previous stage (pvalid) are extended: the unit adds the branch metric of
// the pair the encoder would emit on p_b -> ns to the path metric of p_b,
// compares the two sums and keeps the smaller (a tie keeps b = 0).  The
// decision bit dec[ns] is the b chosen; it is what the survivor memory
// stores.  Skipping pruned predecessors is where the MVA saves work:
// ops reports the number of additions done, 2 per surviving predecessor,
// against 2 * 2^M for the full algorithm.
//
// Pruning, applied to the new candidates in this order:
//  * threshold: a candidate stays only if its metric <= bmin_prev + THRESH,
//    where bmin_prev is the smallest metric kept at the previous stage;
//  * survivor limit: of those, only the max_paths smallest stay (ties by
//    lower state number); max_paths = 0 means no limit.
// The smallest candidate is always kept, so a stage is never left empty
// even with THRESH = 0.  The threshold rule and T follow the document; the
// "<=" comparison, the tie orders and the fallback are this design's.
//
// Outputs also give the new smallest metric (nmin), its state (nbest) and
// how many candidates each rule removed, for statistics.
module acsu
  import mva_pkg::*;
#(
  parameter int unsigned   CL     = CL_DEF,
  parameter logic [CL-1:0] G0     = G0_DEF,
  parameter logic [CL-1:0] G1     = G1_DEF,
  parameter int unsigned   MW     = 5,           // path metric width
  parameter int unsigned   THRESH = THRESH_DEF,
  localparam int unsigned  M      = CL - 1,
  localparam int unsigned  NS     = 1 << M,      // number of states
  localparam int unsigned  LW     = $clog2(NS + 1)
) (
  input  logic [3:0][1:0]    bm,         // branch metrics from the BMU
  input  logic [NS-1:0][MW-1:0] pm,      // path metrics of previous stage
  input  logic [NS-1:0]      pvalid,     // previous-stage survivors
  input  logic [MW-1:0]      bmin_prev,  // smallest previous-stage metric
  input  logic [LW-1:0]      max_paths,  // survivor limit, 0 = none
  output logic [NS-1:0][MW-1:0] npm,     // new path metrics
  output logic [NS-1:0]      nvalid,     // new survivors
  output logic [NS-1:0]      dec,        // decision bit per new state
  output logic [MW-1:0]      nmin,       // smallest new survivor metric
  output logic [M-1:0]       nbest,      // state holding nmin
  output logic [LW:0]        ops,        // branch additions performed
  output logic [LW-1:0]      npaths,     // survivors kept
  output logic [LW-1:0]      thr_pruned, // candidates removed by threshold
  output logic [LW-1:0]      lim_pruned  // candidates removed by the limit
);
  logic [NS-1:0][MW-1:0] cand;
  logic [NS-1:0]         cvalid;
  logic [NS-1:0]         keep_thr;
  logic [NS-1:0][LW-1:0] rank;

  // Add, compare, select.
  always_comb begin
    for (int ns = 0; ns < NS; ns++) begin
      logic [MW-1:0] c [2];
      logic          v [2];
      for (int b = 0; b < 2; b++) begin
        logic [M-1:0]  p;
        logic [CL-1:0] win;
        sym_t          y;
        p      = M'((ns << 1) | b);
        win    = {ns[M-1], p};
        y      = {^(win & G0), ^(win & G1)};
        c[b]   = pm[p] + MW'(bm[y]);
        v[b]   = pvalid[p];
      end
      if (v[0] && (!v[1] || c[0] <= c[1])) begin
        cand[ns] = c[0];
        dec[ns]  = 1'b0;
      end else begin
        cand[ns] = c[1];
        dec[ns]  = 1'b1;
      end
      cvalid[ns] = v[0] || v[1];
    end
  end

  // Rank of each candidate among the valid ones (0 = smallest).
  always_comb begin
    for (int i = 0; i < NS; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NS; j++) begin
        if (cvalid[j] && (cand[j] < cand[i] || (cand[j] == cand[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
      end
    end
  end

  // Threshold and survivor limit.
  always_comb begin
    logic [MW+31:0] lim;
    lim        = (MW+32)'(bmin_prev) + (MW+32)'(THRESH);
    nmin       = '0;
    nbest      = '0;
    npaths     = '0;
    thr_pruned = '0;
    lim_pruned = '0;
    for (int i = 0; i < NS; i++) begin
      keep_thr[i] = cvalid[i] && ((MW+32)'(cand[i]) <= lim || rank[i] == '0);
      nvalid[i]   = keep_thr[i] && (max_paths == '0 || rank[i] < max_paths);
      npm[i]      = cand[i];
      if (cvalid[i] && rank[i] == '0) begin
        nmin  = cand[i];
        nbest = M'(i);
      end
      if (nvalid[i])                 npaths     = npaths + 1'b1;
      if (cvalid[i] && !keep_thr[i]) thr_pruned = thr_pruned + 1'b1;
      if (keep_thr[i] && !nvalid[i]) lim_pruned = lim_pruned + 1'b1;
    end
  end

  // Additions performed: two per surviving predecessor.
  always_comb begin
    ops = '0;
    for (int i = 0; i < NS; i++) begin
      if (pvalid[i]) ops = ops + (LW+1)'(2);
    end
  end

endmodule
