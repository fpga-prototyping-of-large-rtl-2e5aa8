// adpll_pkg -- widths, types and helpers shared by the ADPLL network.
//
// Word widths follow the loop-filter diagram of the design: each PFD
// produces a 5-bit signed error, each link weight Kw is a 2-bit code, the
// weighted total error is 9 bits, the proportional gain K1 is 5 bits, the
// integral gain K2 is 12 bits, the integrator is 21 bits and the DCO control
// word is 10 bits.  The 25-bit programming word of one node is laid out as
// printed in the serial-interface diagram: bits 1:0 Kw4, 3:2 Kw3, 5:4 Kw2,
// 7:6 Kw1, 12:8 K1 (Kp), 24:13 K2 (Ki).  Which bit of a two-bit field is the
// MSB is this design's choice (the higher bit index).
//
// Link numbering (this design's choice): input 1 = west neighbour (or the
// reference clock for node (1,1)), 2 = north, 3 = east, 4 = south.
package adpll_pkg;

  localparam int ERR_W   = 5;   // PFD error code, signed
  localparam int DOUT_W  = 4;   // TDC magnitude, unsigned
  localparam int KW_W    = 2;   // link weight code
  localparam int WERR_W  = 7;   // one weighted error
  localparam int TOT_W   = 9;   // total (combined) error
  localparam int K1_W    = 5;   // proportional gain numerator
  localparam int K2_W    = 12;  // integral gain numerator
  localparam int KP_SHIFT = 5;  // Kp = K1 / 2^5
  localparam int KI_SHIFT = 12; // Ki = K2 / 2^12
  localparam int PROD1_W = 14;  // K1 * total error
  localparam int ACC_W   = 21;  // integral path product / accumulator
  localparam int CODE_W  = 10;  // DCO control word
  localparam int CODE_OFFSET = 512; // start-up code, middle of the range
  localparam int CFG_W   = 25;  // programming bits per node
  localparam int NLINK   = 4;   // filter inputs per node

  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic signed [TOT_W-1:0] tot_err_t;
  typedef logic [CODE_W-1:0]       code_t;

  // One node's programming word, MSB first: K2, K1, Kw1, Kw2, Kw3, Kw4.
  typedef struct packed {
    logic [K2_W-1:0] k2;
    logic [K1_W-1:0] k1;
    logic [KW_W-1:0] kw1;
    logic [KW_W-1:0] kw2;
    logic [KW_W-1:0] kw3;
    logic [KW_W-1:0] kw4;
  } node_cfg_t;

  // Link weight codes: the weight is zero, one, two or four.
  typedef enum logic [KW_W-1:0] {
    KW_OFF = 2'd0,
    KW_X1  = 2'd1,
    KW_X2  = 2'd2,
    KW_X4  = 2'd3
  } kw_code_t;

  // Apply a link weight to one PFD error (a shift, since weights are 0/1/2/4).
  function automatic logic signed [WERR_W-1:0] weigh(input err_t e, input logic [KW_W-1:0] kw);
    logic signed [WERR_W-1:0] ext;
    ext = WERR_W'(e);
    unique case (kw)
      KW_OFF:  weigh = '0;
      KW_X1:   weigh = ext;
      KW_X2:   weigh = ext <<< 1;
      default: weigh = ext <<< 2;
    endcase
  endfunction

endpackage
