// End-to-end testbench for mva_top at its default parameters.
//
// Random data bits (with random gaps) are encoded, a sparse random error
// pattern flips received bits, and the decoder and checker run frame after
// frame.  The testbench rebuilds each received frame from rx_sym, runs the
// reference decoder on it and compares the decoded bits, the final metric
// and the per-stage counts; it compares decode_out with its own comparison
// of decoded and sent bits.  It runs in four phases with survivor limits
// 0 (none), 2, 1 and 3, changed only between frames.  Each mechanism must
// occur at least once: threshold pruning, survivor-limit pruning, input
// stall while the decoder traces back, a corrected error, a reported
// error, and a saving in additions against the full Viterbi algorithm.
module mva_top_tb;
  import mva_ref_pkg::*;
  localparam int FL = mva_pkg::FRAME_LEN_DEF;
  logic clk = 0, rst_n = 0;
  logic [2:0] max_paths;
  logic data_valid, data_ready, data_bit, rx_valid, dec_valid, chk_valid, decode_out;
  logic [1:0] chan_err, tx_sym, rx_sym;
  logic [FL-1:0] dec_bits, err_bits;
  logic [4:0] dec_metric;
  logic [3:0] nerr, stage_ops;
  logic [2:0] stage_paths, stage_thr_pruned, stage_lim_pruned;

  mva_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_thr = 0, n_lim = 0, n_stall = 0, n_corrected = 0, n_reported = 0;
  int n_frames = 0, ops_done = 0, ops_full = 0, n_injected = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // Monitor: collect received frames and the bits sent, predict results.
  bit [1:0] rxf [];
  bit [FL-1:0] sentf;
  int pos = 0, errs_in_frame = 0;
  ref_result_t exp_q [$];
  bit [FL-1:0] sent_q [$];
  int errs_q [$];
  bit [FL-1:0] last_sent, last_dec;
  int last_errs;
  bit [1:0] data_hist [$];

  always @(posedge clk) if (rst_n) begin
    if (data_valid && !data_ready) n_stall++;
    if (data_valid && data_ready) data_hist.push_back({1'b1, data_bit});
    if (rx_valid) begin
      if (pos == 0) rxf = new[FL];
      rxf[pos] = rx_sym;
      sentf[pos] = (pos < FL - 2) ? data_hist.pop_front() [0] : 1'b0;
      if (chan_err != 0) errs_in_frame++;
      pos++;
      if (pos == FL) begin
        exp_q.push_back(decode(rxf, 1, int'(max_paths)));
        sent_q.push_back(sentf);
        errs_q.push_back(errs_in_frame);
        pos = 0; errs_in_frame = 0;
      end
    end
    if (dec_valid) begin
      ref_result_t r;
      r = exp_q.pop_front();
      last_sent = sent_q.pop_front();
      last_errs = errs_q.pop_front();
      last_dec = dec_bits;
      chk(dec_bits == r.bits[FL-1:0], "decoded bits vs reference");
      chk(int'(dec_metric) == r.metric, "final metric vs reference");
      for (int t = 0; t < FL; t++) begin
        ops_done += r.ops[t]; ops_full += 8;
        if (r.thr[t] > 0) n_thr++;
        if (r.lim[t] > 0) n_lim++;
      end
      if (last_errs == 0) chk(dec_bits == last_sent, "error-free frame decodes exactly");
      n_frames++;
    end
    if (chk_valid) begin
      chk(decode_out == (last_dec != last_sent), "decode_out flag");
      chk(err_bits == (last_dec ^ last_sent), "error positions");
      if (last_errs > 0) n_injected++;
      if (last_errs > 0 && !decode_out) n_corrected++;
      if (decode_out) n_reported++;
    end
  end

  // Per-stage counts against a stage-by-stage reference on the live frame.
  always @(posedge clk) if (rst_n && rx_valid) begin
    bit [1:0] part [];
    ref_result_t r;
    part = new[pos + 1];
    for (int i = 0; i < pos; i++) part[i] = rxf[i];
    part[pos] = rx_sym;
    r = decode(part, 1, int'(max_paths));
    chk(int'(stage_ops) == r.ops[pos] && int'(stage_paths) == r.paths[pos] &&
        int'(stage_thr_pruned) == r.thr[pos] && int'(stage_lim_pruned) == r.lim[pos],
        "per-stage counts");
  end

  // Errors are injected on about one symbol in twelve; the pattern is held
  // while a symbol waits for the decoder, as the decoder requires.
  logic held = 0;
  always @(posedge clk) held <= dut.u_dec.sym_valid && !dut.u_dec.sym_ready;
  always @(negedge clk)
    if (!held && !(dut.u_dec.sym_valid && !dut.u_dec.sym_ready))
      chan_err = ($urandom_range(0, 11) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;

  task automatic run_phase(int limit, int nbits);
    max_paths = 3'(limit);
    for (int i = 0; i < nbits; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin data_valid = 0; @(negedge clk); end
      data_valid = 1;
      data_bit = 1'($urandom);
      @(posedge clk);
      while (!data_ready) @(posedge clk);
      #1 data_valid = 0;
    end
    // Let the last frame drain before changing the limit.
    @(negedge clk); data_valid = 0;
    repeat (6 * FL) @(negedge clk);
  endtask

  initial begin
    data_valid = 0; data_bit = 0; max_paths = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase(0, 60 * (FL - 2));
    run_phase(2, 60 * (FL - 2));
    run_phase(1, 60 * (FL - 2));
    run_phase(3, 60 * (FL - 2));
    chk(exp_q.size() == 0, "every frame decoded");
    chk(n_frames == 240, "frame count");
    chk(n_thr > 0, "threshold pruning occurred");
    chk(n_lim > 0, "survivor limit occurred");
    chk(n_stall > 0, "input stalled during trace back");
    chk(n_corrected > 0, "an injected error was corrected");
    chk(n_reported > 0, "a wrong frame was reported");
    chk(ops_done < ops_full, "fewer additions than full Viterbi");
    $display("frames %0d, with errors %0d, corrected %0d, reported %0d", n_frames, n_injected, n_corrected, n_reported);
    $display("threshold stages %0d, limit stages %0d, stalls %0d", n_thr, n_lim, n_stall);
    $display("additions %0d of %0d (%0d%% saved)", ops_done, ops_full, 100 * (ops_full - ops_done) / ops_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
