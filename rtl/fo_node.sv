// fo_node -- one filter/oscillator (FO) node of the network: the local
// ADPLL minus its PFDs, which it shares with its neighbours.
//
// Data path: the four phase errors e[0..3] (west, north, east, south; for
// the corner node the west input carries the reference PFD) are weighted and
// summed by error_combiner into the total error, filtered by the PI
// loop_filter, and the resulting 10-bit code sets the period of the dco.
// The loop filter advances on the node's own clock edge (`rise`), which here
// doubles as the divided clock: in this prototype the oscillator already
// runs at the comparison frequency.  The node's spi_cell holds its 25
// programming bits (Kw1..Kw4, K1, K2) and forms one link of the
// daisy-chained serial programming line.
//
// Everything except the programming interface runs on the fast clock `clk`.
module fo_node
  import adpll_pkg::*;
#(
  parameter int unsigned NC       = 11,  // DCO counter width
  parameter int unsigned EN_DELAY = 4    // fast cycles from local edge to filter update
) (
  input  logic      clk,
  input  logic      rst_n,
  input  err_t      e [NLINK],     // phase errors, + when the neighbour leads
  input  logic      sck,
  input  logic      upd,
  input  logic      sda_in,
  output logic      sda_out,
  output logic      rise,          // local clock rising edge strobe
  output logic      clk_out,       // local clock (clock of this SCA)
  output code_t     code,          // DCO control word
  output tot_err_t  total,         // combined error
  output logic      int_sat,       // loop-filter integrator saturated
  output node_cfg_t cfg            // coefficients in force
);

  logic [NLINK-1:0][KW_W-1:0] kw;
  logic [EN_DELAY-1:0]        rise_d;
  logic                       lf_en;

  // The filter takes its sample EN_DELAY fast cycles after the local edge,
  // once the PFDs closed by that edge have published their new errors.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rise_d <= '0;
    else        rise_d <= EN_DELAY'({rise_d, rise});
  end
  assign lf_en = rise_d[EN_DELAY-1];

  spi_cell u_spi (
    .rst_n, .sck, .upd, .sda_in, .sda_out, .cfg
  );

  assign kw = {cfg.kw4, cfg.kw3, cfg.kw2, cfg.kw1};

  error_combiner u_comb (
    .e, .kw, .total
  );

  loop_filter u_lf (
    .clk, .rst_n, .en(lf_en), .total, .k1(cfg.k1), .k2(cfg.k2),
    .code, .int_sat
  );

  dco #(.NC(NC)) u_dco (
    .clk, .rst_n, .code, .rise, .clk_out
  );

endmodule
