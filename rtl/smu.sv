// Survivor management unit (SMU): decision memory and trace back.
//
// The memory keeps one decision bit per state per trellis stage, written by
// the ACSU as the frame is decoded (we, waddr, wdec): only which of the two
// predecessors was chosen is stored, not the paths themselves.  The memory
// is addressed directly by the stage number.  After the
// last stage, start with start_state (the state of smallest path metric)
// begins the trace back: one stage per clock, from stage FRAME_LEN-1 down
// to 0, the decoded bit of a stage is the newest bit of the current state
// (its MSB) and the predecessor is {state[M-2:0], decision}.
//
// Timing: start is sampled on a clock edge; FRAME_LEN edges later done
// pulses for one cycle with all decoded bits in bits (bit t = input bit of
// stage t).  busy is high from the edge after start until done.  Writes
// must not be issued while busy.  Trace back from the best state follows
// the document; the frame-wise (not sliding-window) memory is this design's
// choice.
module smu
  import mva_pkg::*;
#(
  parameter int unsigned  CL        = CL_DEF,
  parameter int unsigned  FRAME_LEN = FRAME_LEN_DEF,
  localparam int unsigned M         = CL - 1,
  localparam int unsigned NS        = 1 << M,
  localparam int unsigned AW        = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [NS-1:0]        wdec,
  input  logic                 start,
  input  logic [M-1:0]         start_state,
  output logic                 busy,
  output logic                 done,
  output logic [FRAME_LEN-1:0] bits
);
  logic [NS-1:0] mem [FRAME_LEN];
  logic [AW-1:0] ptr;
  logic [M-1:0]  st;
  logic [M-1:0]  prev;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdec;
  end

  if (M > 1) begin : g_prev_wide
    assign prev = {st[M-2:0], mem[ptr][st]};
  end else begin : g_prev_narrow
    assign prev = mem[ptr][st];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      ptr  <= '0;
      st   <= '0;
      bits <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        bits[ptr] <= st[M-1];
        st        <= prev;
        if (ptr == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          ptr <= ptr - 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        ptr  <= AW'(FRAME_LEN - 1);
        st   <= start_state;
      end
    end
  end

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(we && busy));

endmodule
