// Modified Viterbi decoder (MVA) for the rate-1/2 convolutional code.
//
// The four units of the classic decoder are wired as a loop: the BMU turns
// each received pair into four distances, the ACSU extends the surviving
// paths by one trellis stage and prunes them, the PMU holds the path
// metrics between stages, and the SMU stores one decision bit per state and
// stage and traces back once a frame is complete.  The MVA part is the
// pruning in the ACSU: a path survives only if its metric is within THRESH
// of the previous stage's best and it is among the max_paths best, and
// only survivors are extended at the next stage.
//
// Frames: the trellis starts in state 0 at every frame of FRAME_LEN
// symbols (the encoder ends each frame with a zero tail).  After the last
// symbol the trace back starts from the state of smallest metric.
//
// Interface and timing: sym_valid/sym_ready/sym accepts one received pair
// {Y0, Y1} per clock while a frame is being taken in.  Counting from the
// clock edge that accepts the last symbol of a frame, out_valid pulses
// FRAME_LEN + 1 edges later with the decoded frame in out_bits (bit t =
// bit of stage t, tail bits included) and its final metric in out_metric.
// sym_ready is low from the edge after the last symbol until out_valid, so
// a frame takes 2 * FRAME_LEN + 1 cycles at full input rate.  stage_* give,
// for the symbol being accepted (stage_valid), the additions done, the
// survivors kept and the candidates removed by each rule.  The frame
// structure and the handshake are this design's choices; the unit split,
// the hard-decision metrics, the threshold rule and trace back from the
// best state follow the document.
module viterbi_decoder
  import mva_pkg::*;
#(
  parameter int unsigned   CL        = CL_DEF,
  parameter logic [CL-1:0] G0        = G0_DEF,
  parameter logic [CL-1:0] G1        = G1_DEF,
  parameter int unsigned   FRAME_LEN = FRAME_LEN_DEF,
  parameter int unsigned   THRESH    = THRESH_DEF,
  localparam int unsigned  M         = CL - 1,
  localparam int unsigned  NS        = 1 << M,
  localparam int unsigned  LW        = $clog2(NS + 1),
  localparam int unsigned  MW        = $clog2(2 * FRAME_LEN + 1),
  localparam int unsigned  AW        = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LW-1:0]        max_paths,   // survivor limit, 0 = none
  input  logic                 sym_valid,
  output logic                 sym_ready,
  input  sym_t                 sym,
  output logic                 out_valid,
  output logic [FRAME_LEN-1:0] out_bits,
  output logic [MW-1:0]        out_metric,
  output logic                 stage_valid,
  output logic [LW:0]          stage_ops,
  output logic [LW-1:0]        stage_paths,
  output logic [LW-1:0]        stage_thr_pruned,
  output logic [LW-1:0]        stage_lim_pruned
);
  logic [3:0][1:0]      bm;
  logic [NS-1:0][MW-1:0] pm, npm;
  logic [NS-1:0]        pvalid, nvalid, dec;
  logic [MW-1:0]        bmin, nmin;
  logic [M-1:0]         best, nbest;
  logic                 accept;
  logic [AW-1:0]        cnt;
  logic                 tb_start;
  logic                 smu_busy;

  assign sym_ready   = !smu_busy && !tb_start;
  assign accept      = sym_valid && sym_ready;
  assign stage_valid = accept;

  bmu u_bmu (.rx(sym), .bm(bm));

  acsu #(.CL(CL), .G0(G0), .G1(G1), .MW(MW), .THRESH(THRESH)) u_acsu (
    .bm(bm), .pm(pm), .pvalid(pvalid), .bmin_prev(bmin), .max_paths(max_paths),
    .npm(npm), .nvalid(nvalid), .dec(dec), .nmin(nmin), .nbest(nbest),
    .ops(stage_ops), .npaths(stage_paths), .thr_pruned(stage_thr_pruned),
    .lim_pruned(stage_lim_pruned)
  );

  pmu #(.CL(CL), .MW(MW)) u_pmu (
    .clk(clk), .rst_n(rst_n), .init(tb_start), .load(accept),
    .npm(npm), .nvalid(nvalid), .nmin(nmin), .nbest(nbest),
    .pm(pm), .pvalid(pvalid), .bmin(bmin), .best(best)
  );

  smu #(.CL(CL), .FRAME_LEN(FRAME_LEN)) u_smu (
    .clk(clk), .rst_n(rst_n), .we(accept), .waddr(cnt), .wdec(dec),
    .start(tb_start), .start_state(best),
    .busy(smu_busy), .done(out_valid), .bits(out_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      tb_start   <= 1'b0;
      out_metric <= '0;
    end else begin
      tb_start <= 1'b0;
      if (tb_start) out_metric <= bmin;
      if (accept) begin
        if (cnt == AW'(FRAME_LEN - 1)) begin
          cnt      <= '0;
          tb_start <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Input must be held while it waits for sym_ready.
  a_sym_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (sym_valid && !sym_ready) |=> (sym_valid && $stable(sym)));

endmodule
