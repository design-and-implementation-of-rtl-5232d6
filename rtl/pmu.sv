// Path metric unit (PMU): the storage the add-compare-select unit reads
// and writes back every trellis stage.
//
// It holds, per state, the accumulated metric and a survivor flag, plus the
// smallest kept metric (bm of the threshold rule) and the state holding it
// (where trace back starts).  init puts the trellis at its start: state 0
// survives with metric 0, all other states are pruned.  load takes a new
// stage from the ACSU; init wins if both are high.  All registers reset to
// the init values.  The document shows this unit only as a box beside the
// ACSU; its contents here are what the pruning rule and trace back need.
module pmu
  import mva_pkg::*;
#(
  parameter int unsigned  CL = CL_DEF,
  parameter int unsigned  MW = 5,
  localparam int unsigned M  = CL - 1,
  localparam int unsigned NS = 1 << M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic                  load,
  input  logic [NS-1:0][MW-1:0] npm,
  input  logic [NS-1:0]         nvalid,
  input  logic [MW-1:0]         nmin,
  input  logic [M-1:0]          nbest,
  output logic [NS-1:0][MW-1:0] pm,
  output logic [NS-1:0]         pvalid,
  output logic [MW-1:0]         bmin,
  output logic [M-1:0]          best
);
  localparam logic [NS-1:0] START_VALID = NS'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm     <= '0;
      pvalid <= START_VALID;
      bmin   <= '0;
      best   <= '0;
    end else if (init) begin
      pm     <= '0;
      pvalid <= START_VALID;
      bmin   <= '0;
      best   <= '0;
    end else if (load) begin
      pm     <= npm;
      pvalid <= nvalid;
      bmin   <= nmin;
      best   <= nbest;
    end
  end

  a_never_empty: assert property (@(posedge clk) disable iff (!rst_n) pvalid != '0);

endmodule
