// tdc_tick_gen -- time base of the TDCs.
//
// The FPGA TDC counts the events of a clock whose period is the PFD
// resolution (149.88 ns in the reference configuration).  Here that clock
// is derived from the fast clock by a W-bit phase accumulator: `tick` is a
// one-cycle strobe on each accumulator carry, so the average tick period is
// 2^W / INC fast-clock periods (2^16/6996 * 16 ns = 149.9 ns by default),
// with at most one fast-clock period of jitter.  The accumulator is this
// design's way of providing the separate TDC clock inside one clock domain.
module tdc_tick_gen #(
  parameter int unsigned W   = 16,
  parameter int unsigned INC = 6996
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  logic [W-1:0] acc;
  logic [W:0]   nxt;

  assign nxt = {1'b0, acc} + (W+1)'(INC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= nxt[W-1:0];
      tick <= nxt[W];
    end
  end

endmodule
