// pfd -- phase-frequency detector between two neighbouring clock areas.
//
// Three parts, as in the PFD block diagram: the bang-bang detector (bb_pfd)
// finds which clock leads (SIGN) and opens the interval MODE; the TDC
// measures the length of MODE in TDC steps (Dout); the arithmetic block
// turns SIGN and Dout into a 5-bit two's-complement code ERROR, positive when
// the "+" input (ref_rise) leads.  The result is in [-(2^4-1), 2^4-1], so it
// can be negated without overflow: one PFD serves both of the nodes it sits
// between, one using ERROR and the other its negation.
//
// Timing: ERROR changes the cycle after the interval closes (one cycle after
// the lagging edge strobe plus one) and is held until the next measurement.
// `sat` flags a measurement that hit full scale (frequency acquisition or a
// phase error beyond the linear range).  The sign-magnitude to two's
// complement conversion and the saturation at +/-15 are this design's
// reading of the 5-bit signed output.
module pfd
  import adpll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tdc_tick,   // TDC clock event
  input  logic ref_rise,   // "+" input: rising-edge event
  input  logic div_rise,   // "-" input: rising-edge event
  output err_t err,        // signed phase error, + when ref leads
  output logic sat         // last measurement saturated
);

  logic              sign, mode, done;
  logic [DOUT_W-1:0] dout;
  logic              sign_l;

  bb_pfd u_bb (
    .clk, .rst_n, .ref_rise, .div_rise,
    .sign, .mode, .done
  );

  tdc #(.W(DOUT_W)) u_tdc (
    .clk, .rst_n, .tdc_tick, .mode, .done,
    .dout, .sat
  );

  // Arithmetic block: sign-magnitude to two's complement.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sign_l <= 1'b1;
    else if (done) sign_l <= sign;
  end

  always_comb begin
    err = err_t'({1'b0, dout});
    if (!sign_l) err = -err;
  end

endmodule
