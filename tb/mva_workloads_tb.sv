// The worked examples and the error-correction claim of the design, run on
// viterbi_decoder.
//
// 1. Full Viterbi (threshold large enough never to prune), three stages,
//    data 0,1,0 sent as 00 11 10 and received as 00 11 11: the final path
//    metrics must be 3, 1, 2, 1 for states 00, 01, 10, 11, every state
//    survives, and trace back gives 0,1,0 with metric 1.
// 2. Modified Viterbi with T = 1, four stages, received 00 11 11 00: stage by
//    stage the kept states and metrics must be {00:0}, {10:0}, {01:1, 11:1},
//    {01:2, 10:1, 11:2}; 10 additions are done instead of 22.
// 3. Two-bit errors in a frame of 16 channel bits: for random data frames
//    every placement of two flipped bits (120 per frame) and of one flipped
//    bit (16 per frame) is decoded by the modified (T = 1) and the full
//    decoder side by side; outputs are checked against the reference model
//    and the rates of exact recovery are printed for both.
module mva_workloads_tb;
  import mva_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // --- 1: three-stage full Viterbi ---
  logic a_v, a_r, a_ov, a_sv;
  logic [1:0] a_sym;
  logic [2:0] a_bits;
  logic [2:0] a_met;
  logic [3:0] a_ops;
  logic [2:0] a_p, a_t, a_l;
  viterbi_decoder #(.FRAME_LEN(3), .THRESH(16)) dut_a (
    .clk(clk), .rst_n(rst_n), .max_paths(3'd0), .sym_valid(a_v), .sym_ready(a_r), .sym(a_sym),
    .out_valid(a_ov), .out_bits(a_bits), .out_metric(a_met), .stage_valid(a_sv),
    .stage_ops(a_ops), .stage_paths(a_p), .stage_thr_pruned(a_t), .stage_lim_pruned(a_l));

  // --- 2: four-stage modified Viterbi ---
  logic b_v, b_r, b_ov, b_sv;
  logic [1:0] b_sym;
  logic [3:0] b_bits;
  logic [3:0] b_met;
  logic [3:0] b_ops;
  logic [2:0] b_p, b_t, b_l;
  viterbi_decoder #(.FRAME_LEN(4)) dut_b (
    .clk(clk), .rst_n(rst_n), .max_paths(3'd0), .sym_valid(b_v), .sym_ready(b_r), .sym(b_sym),
    .out_valid(b_ov), .out_bits(b_bits), .out_metric(b_met), .stage_valid(b_sv),
    .stage_ops(b_ops), .stage_paths(b_p), .stage_thr_pruned(b_t), .stage_lim_pruned(b_l));

  // --- 3: default-size modified and full decoders ---
  logic c_v, m_r, f_r, m_ov, f_ov, m_sv, f_sv;
  logic [1:0] c_sym;
  logic [7:0] m_bits, f_bits;
  logic [4:0] m_met, f_met;
  logic [3:0] m_ops, f_ops;
  logic [2:0] m_p, m_t, m_l, f_p, f_t, f_l;
  viterbi_decoder dut_m (
    .clk(clk), .rst_n(rst_n), .max_paths(3'd0), .sym_valid(c_v), .sym_ready(m_r), .sym(c_sym),
    .out_valid(m_ov), .out_bits(m_bits), .out_metric(m_met), .stage_valid(m_sv),
    .stage_ops(m_ops), .stage_paths(m_p), .stage_thr_pruned(m_t), .stage_lim_pruned(m_l));
  viterbi_decoder #(.THRESH(16)) dut_f (
    .clk(clk), .rst_n(rst_n), .max_paths(3'd0), .sym_valid(c_v), .sym_ready(f_r), .sym(c_sym),
    .out_valid(f_ov), .out_bits(f_bits), .out_metric(f_met), .stage_valid(f_sv),
    .stage_ops(f_ops), .stage_paths(f_p), .stage_thr_pruned(f_t), .stage_lim_pruned(f_l));

  initial begin
    int b_ops_sum;
    int n2 = 0, m_ok2 = 0, f_ok2 = 0, n1 = 0, m_ok1 = 0, f_ok1 = 0, m_ops_sum = 0, f_ops_sum = 0;
    bit [1:0] a_rx [3] = '{2'b00, 2'b11, 2'b11};
    bit [1:0] b_rx [4] = '{2'b00, 2'b11, 2'b11, 2'b00};
    a_v = 0; b_v = 0; c_v = 0; a_sym = 0; b_sym = 0; c_sym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1
    for (int t = 0; t < 3; t++) begin
      @(negedge clk); a_v = 1; a_sym = a_rx[t];
    end
    @(posedge clk); #1;
    a_v = 0;
    chk(dut_a.pvalid == 4'b1111, "fig-4 example: all states survive");
    chk(dut_a.pm[0] == 3 && dut_a.pm[1] == 1 && dut_a.pm[2] == 2 && dut_a.pm[3] == 1,
        "fig-4 example: final metrics 3,1,2,1");
    while (!a_ov) @(negedge clk);
    chk(a_bits == 3'b010 && a_met == 1, "fig-4 example: decodes 0,1,0 with metric 1");

    // 2
    b_ops_sum = 0;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); b_v = 1; b_sym = b_rx[t];
      #1 b_ops_sum += int'(b_ops);
      @(posedge clk); #1;
      b_v = 0;
      case (t)
        0: chk(dut_b.pvalid == 4'b0001 && dut_b.pm[0] == 0, "fig-5 example stage 1");
        1: chk(dut_b.pvalid == 4'b0100 && dut_b.pm[2] == 0, "fig-5 example stage 2");
        2: chk(dut_b.pvalid == 4'b1010 && dut_b.pm[1] == 1 && dut_b.pm[3] == 1, "fig-5 example stage 3");
        3: chk(dut_b.pvalid == 4'b1110 && dut_b.pm[1] == 2 && dut_b.pm[2] == 1 && dut_b.pm[3] == 2,
               "fig-5 example stage 4");
        default: ;
      endcase
    end
    chk(b_ops_sum == 10, "fig-5 example: 10 additions");
    while (!b_ov) @(negedge clk);
    chk(b_bits == 4'b1010 && b_met == 1, "fig-5 example: decodes 0,1,0,1 with metric 1");

    // 3
    for (int f = 0; f < 12; f++) begin
      bit b[] = new[8];
      bit [1:0] y[];
      bit [7:0] data;
      for (int i = 0; i < 8; i++) b[i] = (i < 6) ? 1'($urandom) : 1'b0;
      foreach (b[i]) data[i] = b[i];
      encode(b, y);
      for (int p = 0; p < 16; p++) begin
        for (int q = p; q < 16; q++) begin
          bit [1:0] rx[] = new[8];
          ref_result_t rm, rf;
          foreach (y[i]) rx[i] = y[i];
          rx[p / 2][p % 2] ^= 1'b1;
          if (q != p) rx[q / 2][q % 2] ^= 1'b1;
          rm = decode(rx, 1, 0);
          rf = decode(rx, 16, 0);
          for (int t = 0; t < 8; t++) begin
            @(negedge clk); c_v = 1; c_sym = rx[t];
            #1 m_ops_sum += int'(m_ops); f_ops_sum += int'(f_ops);
          end
          @(posedge clk); #1 c_v = 0;
          while (!m_ov) @(posedge clk);
          #1;
          chk(m_bits == rm.bits[7:0] && f_bits == rf.bits[7:0], "both decoders vs reference");
          if (q == p) begin
            n1++; if (m_bits == data) m_ok1++; if (f_bits == data) f_ok1++;
          end else begin
            n2++; if (m_bits == data) m_ok2++; if (f_bits == data) f_ok2++;
          end
        end
      end
    end
    $display("one error : modified %0d/%0d, full %0d/%0d frames recovered", m_ok1, n1, f_ok1, n1);
    $display("two errors: modified %0d/%0d, full %0d/%0d frames recovered", m_ok2, n2, f_ok2, n2);
    $display("additions: modified %0d, full %0d (%0d%% saved)", m_ops_sum, f_ops_sum,
             100 * (f_ops_sum - m_ops_sum) / f_ops_sum);
    chk(m_ops_sum < f_ops_sum, "modified decoder does fewer additions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
