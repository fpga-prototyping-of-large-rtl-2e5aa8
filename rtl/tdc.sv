// tdc -- time-to-digital converter built as a digital chronometer.
//
// An FPGA cannot build a tapped delay line with a chosen stage delay, so the
// length of the MODE pulse is measured by counting the events of a separate
// TDC clock (here a one-cycle strobe `tdc_tick` in the fast clock domain; its
// period is the PFD resolution, 149.88 ns in the reference configuration).
// The count restarts at the start of each MODE pulse and saturates at the
// largest code (the flat ends of the PFD transfer curve).  Because the TDC
// clock is not aligned to the start of the interval, an interval shorter
// than one step can still read 1: the +/-1 signal-correlated fluctuation of
// the FPGA detector is a property of this structure, not an error.
//
// Dout is the count latched when `done` closes an interval and is held until
// the next one; it is valid from the cycle after `done`.  A done without a
// MODE pulse (coincident edges) yields zero.  Counter width and saturation
// value follow from the 5-bit signed PFD output; the latch-on-done handshake
// is this design's choice.
module tdc
  import adpll_pkg::*;
#(
  parameter int unsigned W = DOUT_W   // magnitude width, 4 for a 5-bit signed error
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tdc_tick,  // TDC clock event
  input  logic         mode,      // interval to measure
  input  logic         done,      // interval closed: latch the count
  output logic [W-1:0] dout,      // absolute phase error in TDC steps
  output logic         sat        // the last latched count hit full scale
);

  localparam logic [W-1:0] MAX = '1;
  logic [W-1:0] cnt;
  logic         mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      mode_q <= 1'b0;
      dout   <= '0;
      sat    <= 1'b0;
    end else begin
      mode_q <= mode;
      if (mode && !mode_q)                  // new interval: restart the chronometer
        cnt <= W'(tdc_tick);
      else if (mode && tdc_tick && cnt != MAX)
        cnt <= cnt + 1'b1;
      if (done) begin
        dout <= mode_q ? cnt : '0;
        sat  <= mode_q && (cnt == MAX);
      end
    end
  end

endmodule
