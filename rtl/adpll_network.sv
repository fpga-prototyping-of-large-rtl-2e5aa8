// adpll_network -- ROWS x COLS network of coupled ADPLLs for distributed
// clock generation (10 x 10 by default).
//
// Every synchronous clock area (SCA) has its own oscillator node (fo_node).
// Instead of distributing one clock, neighbouring nodes compare their clocks
// with a PFD placed on each border between them, and each node steers its
// own oscillator so as to cancel the sum of the phase errors with its
// neighbours.  A further PFD compares the corner node (1,1) with the
// external reference clock, so the whole array locks in frequency and phase
// to the reference using only local links.
//
// PFD sharing and signs: the PFD on a border takes the left (or upper) node
// on its "+" input and the right (or lower) node on its "-" input.  Its
// error e is positive when the left/upper clock leads.  The right/lower node
// uses +e and the left/upper node uses -e, so in both nodes the error is
// positive when the neighbour leads.  Node inputs: e_r1 west (reference for
// node (1,1)), e_r2 north, e_r3 east, e_r4 south; border inputs are zero.
// There are ROWS*(COLS-1) + (ROWS-1)*COLS border PFDs plus the reference
// PFD.
//
// Reconfiguration: all node coefficients come from one daisy-chained serial
// line (sck, sda_in, upd).  Nodes are chained row by row: node (1,1) is
// first after sda_in and node (ROWS,COLS) last before sda_out, so the word of
// node (ROWS,COLS) is shifted in first.  Raising upd makes every node switch
// to its new word at once while the network keeps running; this is how the
// network is started in a unidirectional topology and later switched to the
// bidirectional one.
//
// Clocking: one fast clock `clk` (62.5 MHz reference configuration) runs
// the oscillator counters, PFDs and filters; the local clocks exist as edge
// strobes and as the clock-shaped outputs sca_clk.  ref_clk is sampled by a
// two-flop synchroniser and edge-detected.  The TDC time base is a phase
// accumulator (tdc_tick_gen, step TDC_INC/2^16 of a fast-clock period).
// Node indices in the port arrays start at 0: node (i,j) is [i-1][j-1].
module adpll_network
  import adpll_pkg::*;
#(
  parameter int unsigned ROWS    = 10,
  parameter int unsigned COLS    = 10,
  parameter int unsigned NC      = 11,    // DCO counter width
  parameter int unsigned TDC_INC = 6996   // TDC step = 2^16/TDC_INC fast cycles
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ref_clk,                    // reference clock
  input  logic      sck,                        // programming clock
  input  logic      sda_in,                     // programming data
  input  logic      upd,                        // programming update
  output logic      sda_out,                    // end of the programming chain
  output logic      sca_clk   [ROWS][COLS],     // local clocks
  output code_t     dco_code  [ROWS][COLS],     // DCO control words
  output tot_err_t  total_err [ROWS][COLS],     // combined error per node
  output err_t      ref_err,                    // reference PFD error
  output err_t      h_err     [ROWS][COLS-1],   // horizontal border PFDs
  output err_t      v_err     [ROWS-1][COLS],   // vertical border PFDs
  output node_cfg_t node_cfg [ROWS][COLS],     // coefficients in force (read-back)
  output logic      pfd_sat,                    // some PFD saturated
  output logic      int_sat                     // some integrator saturated
);

  localparam int unsigned NN = ROWS * COLS;

  logic tick;
  logic ref_s1, ref_s2, ref_s3, ref_rise;
  logic rise    [ROWS][COLS];
  err_t e_in    [ROWS][COLS][NLINK];
  logic sda     [NN+1];
  logic ref_sat;
  logic [ROWS*(COLS-1)-1:0] h_sat;
  logic [(ROWS-1)*COLS-1:0] v_sat;
  logic [NN-1:0]            n_sat;

  tdc_tick_gen #(.W(16), .INC(TDC_INC)) u_tick (.clk, .rst_n, .tick);

  // Reference clock: synchronise and detect rising edges.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {ref_s1, ref_s2, ref_s3} <= '0;
    else        {ref_s1, ref_s2, ref_s3} <= {ref_clk, ref_s1, ref_s2};
  end
  assign ref_rise = ref_s2 && !ref_s3;

  pfd u_pfd_ref (
    .clk, .rst_n, .tdc_tick(tick), .ref_rise, .div_rise(rise[0][0]),
    .err(ref_err), .sat(ref_sat)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_hrow
    for (genvar c = 0; c + 1 < COLS; c++) begin : g_hcol
      pfd u_pfd (
        .clk, .rst_n, .tdc_tick(tick),
        .ref_rise(rise[r][c]), .div_rise(rise[r][c+1]),
        .err(h_err[r][c]), .sat(h_sat[r*(COLS-1)+c])
      );
    end
  end

  for (genvar r = 0; r + 1 < ROWS; r++) begin : g_vrow
    for (genvar c = 0; c < COLS; c++) begin : g_vcol
      pfd u_pfd (
        .clk, .rst_n, .tdc_tick(tick),
        .ref_rise(rise[r][c]), .div_rise(rise[r+1][c]),
        .err(v_err[r][c]), .sat(v_sat[r*COLS+c])
      );
    end
  end

  assign sda[0]  = sda_in;
  assign sda_out = sda[NN];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // west / reference
      if (c > 0) begin : g_w
        assign e_in[r][c][0] = h_err[r][c-1];
      end else if (r == 0) begin : g_wref
        assign e_in[r][c][0] = ref_err;
      end else begin : g_wnone
        assign e_in[r][c][0] = '0;
      end
      // north
      if (r > 0) begin : g_n
        assign e_in[r][c][1] = v_err[r-1][c];
      end else begin : g_nnone
        assign e_in[r][c][1] = '0;
      end
      // east
      if (c + 1 < COLS) begin : g_e
        assign e_in[r][c][2] = -h_err[r][c];
      end else begin : g_enone
        assign e_in[r][c][2] = '0;
      end
      // south
      if (r + 1 < ROWS) begin : g_s
        assign e_in[r][c][3] = -v_err[r][c];
      end else begin : g_snone
        assign e_in[r][c][3] = '0;
      end

      fo_node #(.NC(NC)) u_node (
        .clk, .rst_n, .e(e_in[r][c]),
        .sck, .upd, .sda_in(sda[r*COLS+c]), .sda_out(sda[r*COLS+c+1]),
        .rise(rise[r][c]), .clk_out(sca_clk[r][c]), .code(dco_code[r][c]),
        .total(total_err[r][c]), .int_sat(n_sat[r*COLS+c]), .cfg(node_cfg[r][c])
      );
    end
  end

  assign pfd_sat = ref_sat || (|h_sat) || (|v_sat);
  assign int_sat = |n_sat;

endmodule
