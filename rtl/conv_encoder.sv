// Convolutional encoder, rate 1/2, constraint length CL (default 3).
//
// A shift register of CL-1 flip-flops holds X(n-1) .. X(n-CL+1).  Each
// accepted input bit X(n) forms the window {X(n), X(n-1), .., X(n-CL+1)};
// two modulo-2 adders (XOR trees) take the bits picked by generator G0 and
// G1 to give Y0 and Y1, and the register then shifts X(n) in.  With the
// default generators this is Y0 = X(n)^X(n-1)^X(n-2), Y1 = X(n)^X(n-2).
//
// Framing: a frame is FRAME_LEN symbols.  The first FRAME_LEN-(CL-1) come
// from input bits; for the last CL-1 the encoder feeds zeros by itself
// (in_ready is low), so the register is back at the all-zero state at
// every frame boundary, where the decoder starts its trellis.  The register
// starts at zero after reset.  The shift register, adders and zero tail
// follow the published encoder; the frame length and the handshakes are
// choices of this design.
//
// Interface: in_valid/in_ready/in_bit is a valid-ready input; out_valid/
// out_ready/out_sym is a valid-ready output held in a register (one symbol
// of buffering).  out_bit is the X(n) that produced out_sym (a data bit or
// a tail zero) and out_last marks the last symbol of a frame.  A symbol
// appears at the output the cycle after its input bit is accepted; at full
// rate the encoder issues one symbol per clock.
module conv_encoder
  import mva_pkg::*;
#(
  parameter int unsigned          CL        = CL_DEF,
  parameter logic [CL-1:0]        G0        = G0_DEF,
  parameter logic [CL-1:0]        G1        = G1_DEF,
  parameter int unsigned          FRAME_LEN = FRAME_LEN_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output sym_t out_sym,
  output logic out_bit,
  output logic out_last
);
  localparam int unsigned M      = CL - 1;
  localparam int unsigned DATA_N = FRAME_LEN - M;
  localparam int unsigned CW     = $clog2(FRAME_LEN + 1);

  logic [M-1:0]  sr;       // {X(n-1), .., X(n-CL+1)}
  logic [CW-1:0] cnt;      // symbol index inside the frame
  logic          tail;     // current index is in the zero tail
  logic          can_load; // output register free or being emptied
  logic          load;
  logic          x;
  logic [CL-1:0] win;

  assign tail     = (cnt >= CW'(DATA_N));
  assign can_load = !out_valid || out_ready;
  assign in_ready = can_load && !tail;
  assign load     = can_load && (tail || in_valid);
  assign x        = tail ? 1'b0 : in_bit;
  assign win      = {x, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (load) begin
        out_sym   <= {^(win & G0), ^(win & G1)};
        out_bit   <= x;
        out_last  <= (cnt == CW'(FRAME_LEN - 1));
        out_valid <= 1'b1;
        sr        <= win[CL-1:1];
        cnt       <= (cnt == CW'(FRAME_LEN - 1)) ? '0 : cnt + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // The zero tail must bring the register back to state 0 at each frame end.
  a_zero_at_frame_start: assert property (@(posedge clk) disable iff (!rst_n)
    (cnt == '0) |-> (sr == '0));

endmodule
