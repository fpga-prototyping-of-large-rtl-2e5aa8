// error_combiner -- weighting and summing of the phase errors of one node.
//
// Each of the up to four PFD errors e_r1..e_r4 (5-bit signed) is multiplied
// by its programmable link weight Kw1..Kw4 (0, 1, 2 or 4, coded on two bits),
// giving 7-bit products; two 8-bit partial sums are added into the 9-bit
// "total error" that the loop filter minimises.  The weights set the network
// topology: a zero weight cuts a link, so the same hardware runs a single
// node, a unidirectional chain or comb, or the fully bidirectional grid.
//
// Purely combinational; the loop filter registers the result.  The adder
// tree and widths follow the filter diagram; the two-bit weight code
// (0->0, 1->1, 2->2, 3->4) is this design's choice.
module error_combiner
  import adpll_pkg::*;
(
  input  err_t                      e   [NLINK],  // e_r1..e_r4
  input  logic [NLINK-1:0][KW_W-1:0] kw,          // kw[0] = Kw1 ... kw[3] = Kw4
  output tot_err_t                  total
);

  logic signed [WERR_W-1:0] w [NLINK];
  logic signed [WERR_W:0]   s12, s34;

  always_comb begin
    for (int i = 0; i < NLINK; i++) w[i] = weigh(e[i], kw[i]);
    s12   = (WERR_W+1)'(w[0]) + (WERR_W+1)'(w[1]);
    s34   = (WERR_W+1)'(w[2]) + (WERR_W+1)'(w[3]);
    total = TOT_W'(s12) + TOT_W'(s34);
  end

endmodule
