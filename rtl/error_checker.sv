// Error checker: compares each decoded frame with the bits that were sent.
//
// The bits fed to the encoder (data and tail, in_valid/in_bit/in_last) are
// collected into a frame word; at in_last the word is pushed into a small
// FIFO of DEPTH frames, which covers the time the decoder needs for its
// trace back.  When the decoder delivers a frame (dec_valid, dec_bits) the
// oldest stored frame is popped and XORed with it bit by bit.  On the next
// clock chk_valid pulses with err_bits (1 where the decoded bit is wrong),
// nerr (how many) and decode_out, which is low when the frames are equal
// and high when any bit differs.  The XOR comparison and the low-when-equal
// flag follow the document; the FIFO and counts are this design's.
module error_checker #(
  parameter int unsigned  FRAME_LEN = mva_pkg::FRAME_LEN_DEF,
  parameter int unsigned  DEPTH     = 2,
  localparam int unsigned NW        = $clog2(FRAME_LEN + 1),
  localparam int unsigned PW        = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned IW        = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_bit,
  input  logic                 in_last,
  input  logic                 dec_valid,
  input  logic [FRAME_LEN-1:0] dec_bits,
  output logic                 chk_valid,
  output logic                 decode_out,
  output logic [FRAME_LEN-1:0] err_bits,
  output logic [NW-1:0]        nerr
);
  logic [FRAME_LEN-1:0] cur;
  logic [FRAME_LEN-1:0] word;
  logic [IW-1:0]        idx;
  logic [FRAME_LEN-1:0] fifo [DEPTH];
  logic [PW-1:0]        wp, rp;
  logic [PW:0]          level;
  logic                 push, pop;
  logic [FRAME_LEN-1:0] diff;
  logic [NW-1:0]        diff_n;

  // Frame word including the bit being taken now.
  always_comb begin
    word      = cur;
    word[idx] = in_bit;
  end

  assign push = in_valid && in_last;
  assign pop  = dec_valid && (level != '0);
  assign diff = fifo[rp] ^ dec_bits;

  always_comb begin
    diff_n = '0;
    for (int i = 0; i < FRAME_LEN; i++) diff_n = diff_n + NW'(diff[i]);
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur        <= '0;
      idx        <= '0;
      wp         <= '0;
      rp         <= '0;
      level      <= '0;
      chk_valid  <= 1'b0;
      decode_out <= 1'b0;
      err_bits   <= '0;
      nerr       <= '0;
    end else begin
      if (in_valid) begin
        cur <= word;
        idx <= in_last ? '0 : idx + 1'b1;
      end
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level     <= level + (PW+1)'(push) - (PW+1)'(pop);
      chk_valid <= pop;
      if (pop) begin
        err_bits   <= diff;
        nerr       <= diff_n;
        decode_out <= (diff != '0);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (level < (PW+1)'(DEPTH) || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid |-> (level != '0));

endmodule
