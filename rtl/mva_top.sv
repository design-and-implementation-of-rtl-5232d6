// Modified Viterbi codec test system: encoder, channel error injection,
// MVA decoder and error checker, end to end.
//
// Data bits enter the rate-1/2 convolutional encoder, which appends a zero
// tail to every frame.  Each encoded pair tx_sym = {Y0, Y1} is XORed with
// chan_err on its way to the decoder, so a 1 in chan_err flips that
// received bit: this is how errors are introduced to exercise the decoder.
// The decoder prunes its trellis with threshold THRESH and at most
// max_paths survivors (0 = no limit) and traces back each frame.  The error
// checker then compares the decoded frame with the bits sent: decode_out
// is low when they agree.
//
// Interface and timing: data_valid/data_ready/data_bit is a valid-ready
// input of data bits, FRAME_LEN-(CL-1) per frame.  chan_err is applied to
// the symbol passed to the decoder in that cycle (rx_valid high).  dec_valid
// pulses with each decoded frame (dec_bits, bit t = stage t, tail bits
// included, dec_metric its final path metric); chk_valid pulses one cycle
// later with decode_out and the error positions.  The stage_* outputs report
// the decoder's work per received symbol.  The decoder takes in a frame,
// then holds the encoder off for FRAME_LEN + 1 cycles while it traces back.
module mva_top
  import mva_pkg::*;
#(
  parameter int unsigned   CL        = CL_DEF,
  parameter logic [CL-1:0] G0        = G0_DEF,
  parameter logic [CL-1:0] G1        = G1_DEF,
  parameter int unsigned   FRAME_LEN = FRAME_LEN_DEF,
  parameter int unsigned   THRESH    = THRESH_DEF,
  localparam int unsigned  NS        = 1 << (CL - 1),
  localparam int unsigned  LW        = $clog2(NS + 1),
  localparam int unsigned  MW        = $clog2(2 * FRAME_LEN + 1),
  localparam int unsigned  NW        = $clog2(FRAME_LEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LW-1:0]        max_paths,
  input  logic                 data_valid,
  output logic                 data_ready,
  input  logic                 data_bit,
  input  sym_t                 chan_err,
  output logic                 rx_valid,
  output sym_t                 tx_sym,
  output sym_t                 rx_sym,
  output logic                 dec_valid,
  output logic [FRAME_LEN-1:0] dec_bits,
  output logic [MW-1:0]        dec_metric,
  output logic                 chk_valid,
  output logic                 decode_out,
  output logic [FRAME_LEN-1:0] err_bits,
  output logic [NW-1:0]        nerr,
  output logic [LW:0]          stage_ops,
  output logic [LW-1:0]        stage_paths,
  output logic [LW-1:0]        stage_thr_pruned,
  output logic [LW-1:0]        stage_lim_pruned
);
  logic enc_valid, enc_bit, enc_last, dec_ready;

  conv_encoder #(.CL(CL), .G0(G0), .G1(G1), .FRAME_LEN(FRAME_LEN)) u_enc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(data_valid), .in_ready(data_ready), .in_bit(data_bit),
    .out_valid(enc_valid), .out_ready(dec_ready), .out_sym(tx_sym),
    .out_bit(enc_bit), .out_last(enc_last)
  );

  assign rx_sym = tx_sym ^ chan_err;

  viterbi_decoder #(.CL(CL), .G0(G0), .G1(G1), .FRAME_LEN(FRAME_LEN), .THRESH(THRESH)) u_dec (
    .clk(clk), .rst_n(rst_n), .max_paths(max_paths),
    .sym_valid(enc_valid), .sym_ready(dec_ready), .sym(rx_sym),
    .out_valid(dec_valid), .out_bits(dec_bits), .out_metric(dec_metric),
    .stage_valid(rx_valid), .stage_ops(stage_ops), .stage_paths(stage_paths),
    .stage_thr_pruned(stage_thr_pruned), .stage_lim_pruned(stage_lim_pruned)
  );

  error_checker #(.FRAME_LEN(FRAME_LEN)) u_chk (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rx_valid), .in_bit(enc_bit), .in_last(enc_last),
    .dec_valid(dec_valid), .dec_bits(dec_bits),
    .chk_valid(chk_valid), .decode_out(decode_out), .err_bits(err_bits), .nerr(nerr)
  );

endmodule
