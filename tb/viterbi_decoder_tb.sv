// Testbench for viterbi_decoder.
//
// 1. A hand-worked four-stage example: received pairs 00 11 11 00, threshold
//    1, no survivor limit.  Stage by stage the kept metrics are {00:0},
//    {10:0}, {01:1, 11:1}, {10:1, 01:2, 11:2} (state 00 with metric 3 is
//    dropped), so the frame decodes to 0,1,0,1 with metric 1 and the
//    threshold removes one path at stages 0, 1 and 3.
// 2. Random frames of eight symbols: random data with a zero tail, up to
//    three flipped bits, a random survivor limit and random input gaps.
//    Every output and per-stage count is compared with the reference model,
//    zero-error frames must decode to the data, and out_valid must come
//    FRAME_LEN + 1 edges after the last symbol is accepted.
module viterbi_decoder_tb;
  import mva_ref_pkg::*;
  localparam int FL = 8;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // Main instance, default frame length.
  logic [2:0] max_paths;
  logic sym_valid, sym_ready, out_valid, stage_valid;
  logic [1:0] sym;
  logic [FL-1:0] out_bits;
  logic [4:0] out_metric;
  logic [3:0] stage_ops;
  logic [2:0] stage_paths, stage_thr_pruned, stage_lim_pruned;
  viterbi_decoder dut (.*);

  // Four-stage instance for the hand-worked example.
  logic s_valid, s_ready, s_out_valid, s_stage_valid;
  logic [1:0] s_sym;
  logic [3:0] s_bits;
  logic [3:0] s_metric;
  logic [3:0] s_ops;
  logic [2:0] s_paths, s_thr, s_lim;
  viterbi_decoder #(.FRAME_LEN(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .max_paths(3'd0), .sym_valid(s_valid), .sym_ready(s_ready),
    .sym(s_sym), .out_valid(s_out_valid), .out_bits(s_bits), .out_metric(s_metric),
    .stage_valid(s_stage_valid), .stage_ops(s_ops), .stage_paths(s_paths),
    .stage_thr_pruned(s_thr), .stage_lim_pruned(s_lim));

  int n_thr = 0, n_lim = 0, n_corr = 0;

  initial begin
    bit [1:0] ex [4] = '{2'b00, 2'b11, 2'b11, 2'b00};
    int ex_thr [4] = '{1, 1, 0, 1};
    sym_valid = 0; sym = 0; max_paths = 0; s_valid = 0; s_sym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Part 1.
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); s_valid = 1; s_sym = ex[t];
      #1 chk(s_ready && int'(s_thr) == ex_thr[t], "example threshold prunes");
    end
    @(negedge clk); s_valid = 0;
    while (!s_out_valid) @(negedge clk);
    chk(s_bits == 4'b1010, "example decoded bits 0,1,0,1");
    chk(s_metric == 4'd1, "example final metric");

    // Part 2.
    for (int f = 0; f < 300; f++) begin
      bit b[] = new[FL];
      bit [1:0] y[], rx[];
      ref_result_t r;
      bit [FL-1:0] data;
      int nerr, cyc;
      for (int i = 0; i < FL; i++) b[i] = (i < FL - 2) ? 1'($urandom) : 1'b0;
      foreach (b[i]) data[i] = b[i];
      encode(b, y);
      rx = new[FL];
      foreach (y[i]) rx[i] = y[i];
      nerr = $urandom_range(0, 3);
      for (int e = 0; e < nerr; e++) begin
        int p;
        p = $urandom_range(0, 2 * FL - 1);
        rx[p / 2][p % 2] ^= 1'b1;
      end
      max_paths = 3'($urandom_range(0, 4));
      r = decode(rx, 1, int'(max_paths));
      for (int t = 0; t < FL; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin sym_valid = 0; @(negedge clk); end
        sym_valid = 1; sym = rx[t];
        #1;
        chk(sym_ready, "ready while taking a frame");
        chk(int'(stage_ops) == r.ops[t] && int'(stage_paths) == r.paths[t] &&
            int'(stage_thr_pruned) == r.thr[t] && int'(stage_lim_pruned) == r.lim[t],
            "per-stage counts");
        if (r.thr[t] > 0) n_thr++;
        if (r.lim[t] > 0) n_lim++;
      end
      @(posedge clk); #1 sym_valid = 0;
      cyc = 0;
      while (!out_valid) begin
        chk(!sym_ready, "not ready during trace back");
        @(posedge clk); #1 cyc++;
      end
      chk(cyc == FL + 1, "latency FRAME_LEN + 1");
      chk(out_bits == r.bits[FL-1:0], "decoded bits vs reference");
      chk(int'(out_metric) == r.metric, "final metric");
      if (nerr == 0) chk(out_bits == data, "error-free frame");
      if (nerr > 0 && out_bits == data) n_corr++;
    end
    chk(n_thr > 0 && n_lim > 0 && n_corr > 0, "pruning and correction exercised");
    $display("threshold stages %0d, limit stages %0d, corrected frames %0d", n_thr, n_lim, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
