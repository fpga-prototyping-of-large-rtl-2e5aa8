// spi_cell -- serial programming interface of one node.
//
// Three registers, as in the programming-interface schematic:
//   X10  25-bit serial-in parallel-out shift register clocked by SCK; the
//        bit on sda_in enters bit 0 and moves one place towards bit 24 per
//        SCK rising edge.
//   X11  a flip-flop that passes bit 24 of X10 on to sda_out, the serial
//        input of the next cell in the chain.  It is clocked on the falling
//        edge of SCK (this design's choice): it decouples the cells' clock
//        skew without adding a bit to the chain, so every node takes exactly
//        25 bits and a chain of n cells takes 25*n SCK cycles.
//   X12  25-bit parallel register loaded from X10 on the rising edge of
//        UPD.  Only X12 drives the node, so the node never sees the
//        meaningless values X10 passes through while shifting, and all nodes
//        on the same UPD line switch to their new coefficients together,
//        without stopping the network.
// The first bit sent for a node ends up in bit 24 (the MSB of K2): send a
// node's word MSB first, and the word of the last node in the chain first.
// Reset (asynchronous, active low) clears X10, X11 and X12; a cleared X12
// means all link weights and both gains are zero.  SCK and UPD are the
// interface's own clocks, as in the schematic; the coefficients cross into
// the fast clock domain as quasi-static values that change only at UPD.
module spi_cell
  import adpll_pkg::*;
(
  input  logic      rst_n,
  input  logic      sck,       // serial clock
  input  logic      upd,       // update: load X12 on its rising edge
  input  logic      sda_in,    // serial data from the previous cell
  output logic      sda_out,   // serial data to the next cell
  output node_cfg_t cfg        // coefficients of the local node
);

  logic [CFG_W-1:0] x10;

  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) x10 <= '0;
    else        x10 <= {x10[CFG_W-2:0], sda_in};
  end

  always_ff @(negedge sck or negedge rst_n) begin
    if (!rst_n) sda_out <= 1'b0;
    else        sda_out <= x10[CFG_W-1];
  end

  always_ff @(posedge upd or negedge rst_n) begin
    if (!rst_n) cfg <= '0;
    else        cfg <= node_cfg_t'(x10);
  end

endmodule
