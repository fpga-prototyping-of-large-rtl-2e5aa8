// loop_filter -- programmable proportional-integral loop filter.
//
// Transfer function H(z) = (Kp + Ki/(1 - z^-1)) * z^-2 with Kp = K1/2^5 and
// Ki = K2/2^12, computed in fixed point on the widths of the filter diagram:
//   x      = total error, registered (first z^-1), 9 bits signed
//   p      = (K1 * x) >>> 5            14-bit product, 9-bit result
//   s      = acc + K2 * x              21-bit product and accumulator
//   code   = 512 + p + (s >>> 12)      registered (second z^-1), 10 bits
// The constant 512 places the start-up code in the middle of the DCO range.
// With these widths the code can never leave 0..1023.  The integrator is
// saturated at the 21-bit limits instead of wrapping; the design does not
// say how overflow is handled, so that is this design's choice, flagged on
// `int_sat`.
//
// All registers advance on `en`, a one-cycle strobe marking a rising edge of
// the node's own (divided) clock; `code` is thus two local clock periods
// behind the error that caused it.  K1 and K2 may change at any time
// (on-the-fly reprogramming); they are used as they stand at each `en`.
module loop_filter
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // local clock rising edge
  input  tot_err_t          total,     // combined phase error
  input  logic [K1_W-1:0]   k1,        // Kp = k1 / 2^5
  input  logic [K2_W-1:0]   k2,        // Ki = k2 / 2^12
  output code_t             code,      // DCO control word
  output logic              int_sat    // integrator at a limit
);

  localparam logic signed [ACC_W:0] ACC_MAX = (ACC_W+1)'((1 << (ACC_W-1)) - 1);
  localparam logic signed [ACC_W:0] ACC_MIN = -(ACC_W+1)'(1 << (ACC_W-1));

  tot_err_t                 x_q;
  logic signed [ACC_W-1:0]  acc;
  logic signed [PROD1_W-1:0] prod1;
  logic signed [ACC_W-1:0]  prod2;
  logic signed [ACC_W:0]    sum_wide;
  logic signed [ACC_W-1:0]  acc_n;
  logic signed [TOT_W-1:0]  p_term, i_term;
  logic                     sat_n;
  code_t                    code_n;

  always_comb begin
    prod1 = PROD1_W'($signed({1'b0, k1}) * x_q);
    prod2 = ACC_W'($signed({1'b0, k2}) * x_q);
    sum_wide = (ACC_W+1)'(acc) + (ACC_W+1)'(prod2);
    sat_n = 1'b0;
    if (sum_wide > ACC_MAX) begin
      acc_n = ACC_W'(ACC_MAX);
      sat_n = 1'b1;
    end else if (sum_wide < ACC_MIN) begin
      acc_n = ACC_W'(ACC_MIN);
      sat_n = 1'b1;
    end else begin
      acc_n = ACC_W'(sum_wide);
    end
    p_term = TOT_W'(prod1 >>> KP_SHIFT);
    i_term = TOT_W'(acc_n >>> KI_SHIFT);
    code_n = code_t'(CODE_W'(CODE_OFFSET) + CODE_W'(p_term) + CODE_W'(i_term));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      acc     <= '0;
      code    <= code_t'(CODE_OFFSET);
      int_sat <= 1'b0;
    end else if (en) begin
      x_q     <= total;
      acc     <= acc_n;
      code    <= code_n;
      int_sat <= sat_n;
    end
  end

endmodule
