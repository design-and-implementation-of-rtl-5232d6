// Testbench for acsu: random previous-stage metrics, survivor sets, best
// metrics, survivor limits and received pairs.  The expected new metrics,
// decisions, survivors, best state and counts are worked out here from the
// state diagram of the code and the pruning rules, then compared with the
// unit.  Counts how often each pruning rule removed a path.
module acsu_tb;
  import mva_ref_pkg::*;
  localparam int MW = 5;
  logic [3:0][1:0] bm;
  logic [3:0][MW-1:0] pm, npm;
  logic [3:0] pvalid, nvalid, dec;
  logic [MW-1:0] bmin_prev, nmin;
  logic [2:0] max_paths;
  logic [1:0] nbest;
  logic [3:0] ops;
  logic [2:0] npaths, thr_pruned, lim_pruned;
  int checks = 0, failures = 0, n_thr = 0, n_lim = 0;

  acsu dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      bit [1:0] rx;
      int c[4], rk[4], e_best, e_min, e_paths, e_thr, e_lim, e_ops;
      bit cv[4], d[4], kt[4], nv[4];
      rx = 2'($urandom_range(0, 3));
      for (int i = 0; i < 4; i++) bm[i] = 2'(ref_dist(rx, 2'(i)));
      pvalid = 4'($urandom_range(1, 15));
      bmin_prev = MW'($urandom_range(0, 12));
      for (int i = 0; i < 4; i++) pm[i] = bmin_prev + MW'($urandom_range(0, 3));
      max_paths = 3'($urandom_range(0, 4));
      #1;
      e_ops = 0;
      for (int s = 0; s < 4; s++) if (pvalid[s]) e_ops += 2;
      for (int ns = 0; ns < 4; ns++) begin
        cv[ns] = 0; c[ns] = 0; d[ns] = 0;
        for (int x2 = 0; x2 < 2; x2++) begin
          int s, v;
          s = ns[0] * 2 + x2;
          if (!pvalid[s]) continue;
          v = int'(pm[s]) + ref_dist(rx, ref_out(s, ns[1]));
          if (!cv[ns] || v < c[ns]) begin c[ns] = v; d[ns] = x2[0]; cv[ns] = 1; end
        end
      end
      e_paths = 0; e_thr = 0; e_lim = 0; e_min = 0; e_best = 0;
      for (int i = 0; i < 4; i++) begin
        rk[i] = 0;
        for (int j = 0; j < 4; j++) if (cv[j] && (c[j] < c[i] || (c[j] == c[i] && j < i))) rk[i]++;
      end
      for (int i = 0; i < 4; i++) begin
        kt[i] = cv[i] && (c[i] <= int'(bmin_prev) + 1 || rk[i] == 0);
        nv[i] = kt[i] && (max_paths == 0 || rk[i] < int'(max_paths));
        if (cv[i] && rk[i] == 0) begin e_min = c[i]; e_best = i; end
        if (nv[i]) e_paths++;
        if (cv[i] && !kt[i]) e_thr++;
        if (kt[i] && !nv[i]) e_lim++;
      end
      for (int i = 0; i < 4; i++) begin
        chk(nvalid[i] == nv[i], "survivor");
        if (cv[i]) begin
          chk(int'(npm[i]) == c[i], "metric");
          chk(dec[i] == d[i], "decision");
        end
      end
      chk(int'(nmin) == e_min, "nmin");
      chk(int'(nbest) == e_best, "nbest");
      chk(int'(ops) == e_ops, "ops");
      chk(int'(npaths) == e_paths, "npaths");
      chk(int'(thr_pruned) == e_thr, "thr_pruned");
      chk(int'(lim_pruned) == e_lim, "lim_pruned");
      if (e_thr > 0) n_thr++;
      if (e_lim > 0) n_lim++;
    end
    chk(n_thr > 0, "threshold pruning exercised");
    chk(n_lim > 0, "limit pruning exercised");
    $display("threshold prunes: %0d, limit prunes: %0d", n_thr, n_lim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
