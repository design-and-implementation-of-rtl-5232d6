// Branch metric unit (BMU).
//
// For a received hard-decision symbol {Y0, Y1} it gives the Hamming
// distance to each of the four ideal symbols 00, 01, 10 and 11: bm[i] is
// the number of bits in which the received pair differs from pair i (0, 1
// or 2).  Each distance is an XOR of the two pairs followed by a one-bit
// population count.  Which pair belongs to which trellis branch is decided
// by the add-compare-select unit, so four distances serve every state.
//
// The document defines the branch metric as this distance to the four
// ideal pairs; hard decisions (one bit per received code bit) are this
// design's reading of it.  Purely combinational, no clock.
module bmu
  import mva_pkg::*;
(
  input  sym_t             rx,  // received pair {Y0, Y1}
  output logic [3:0][1:0]  bm   // bm[i]: distance from rx to pair i
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bm[i] = sym_dist(rx, sym_t'(i));
    end
  end
endmodule
