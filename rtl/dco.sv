// dco -- digitally controlled oscillator built as a pre-loaded counter.
//
// An Nc-bit counter runs on the fast DCO clock.  When it reaches its full
// value (2^Nc - 1) it produces an output event and is reloaded with the
// control code C_in, so the output period is (2^Nc - C_in) fast-clock
// periods: the code sets the period, not the frequency.  One code step
// changes the frequency by about T_clk/T_o^2 around the nominal period T_o.
//
// Outputs: `rise`, a one-cycle strobe at each reload (the rising edge of the
// local clock, used by the PFDs and the loop filter), and `clk_out`, a
// clock-shaped copy that is high for the first half (rounded down) of each
// period.  The code is sampled only at reload, so a period in progress is
// never disturbed.  Reset loads the middle code 512.  Nc is not given by the
// design; 11 is the smallest width whose period range (1025..2048 cycles at
// 10-bit codes) contains the 1250-cycle nominal period of 50 kHz at 62.5 MHz.
// The half-period output shape is this design's choice.
module dco
  import adpll_pkg::*;
#(
  parameter int unsigned NC = 11   // counter width Nc
) (
  input  logic  clk,       // fast DCO clock (62.5 MHz in the reference configuration)
  input  logic  rst_n,
  input  code_t code,      // C_in
  output logic  rise,      // local clock rising edge, one cycle
  output logic  clk_out    // local clock, about 50 % duty cycle
);

  localparam logic [NC-1:0] FULL = '1;

  logic [NC-1:0] cnt;
  logic [NC-1:0] cin_l;    // code of the period in progress
  logic [NC-1:0] half;     // cycles the output stays high

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= NC'(CODE_OFFSET);
      cin_l <= NC'(CODE_OFFSET);
      half  <= NC'(((1 << NC) - CODE_OFFSET) / 2);
      rise  <= 1'b0;
    end else begin
      rise <= 1'b0;
      if (cnt == FULL) begin
        cnt   <= NC'(code);
        cin_l <= NC'(code);
        half  <= NC'(((NC+1)'(FULL) + 1'b1 - (NC+1)'(code)) >> 1);
        rise  <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign clk_out = (cnt - cin_l) < half;

endmodule
