// tb_adpll_network_full -- end-to-end test of the coupled ADPLL network at
// its default size (10 x 10 nodes, no parameter overrides).
//
// Runs the two-step start-up: the network is programmed over the serial
// line into the unidirectional comb topology (node (1,1) follows the
// reference, column 1 follows its upper neighbour, every other node its left
// neighbour), left to acquire lock, then reprogrammed on the fly into the
// bidirectional topology (every node uses all its neighbours) and left to
// settle again.  Checks, per phase:
//   * every node produces as many clock edges as the reference over the
//     observation window (+/-1): frequency lock;
//   * the phase error of every active link stays within +/-3 TDC steps
//     during the unidirectional window and +/-3 during the bidirectional
//     window (the design's measurements show up to three steps in the
//     unidirectional phase and two in the bidirectional one; one step more
//     is allowed here for the shorter settling time);
//   * the coefficients read back from the nodes equal the words shifted in.
// Mechanisms counted, each must occur: serial update (twice), PFD
// saturation during frequency acquisition, both error signs, the switch
// from unidirectional to bidirectional operation.
// Clock: 62.5 MHz fast clock; reference period REF_P fast cycles.
`timescale 1ns/1ps
module tb_adpll_network_full;
  import adpll_pkg::*;
  localparam int ROWS  = 10;
  localparam int COLS  = 10;
  localparam int NN    = ROWS * COLS;
  localparam int REF_P = 1500;        // reference period in fast-clock cycles
  localparam int K1    = 31;          // Kp = 31/32
  localparam int K2    = 64;          // Ki = 64/4096
  localparam int SETTLE_U = 2000;      // reference periods, unidirectional
  localparam int SETTLE_B = 300;      // reference periods, bidirectional
  localparam int WINDOW   = 60;       // observation window, reference periods

  logic clk = 0, rst_n = 1, ref_clk = 0, sck = 0, sda_in = 0, upd = 0;
  logic sda_out, pfd_sat, int_sat;
  logic sca_clk [ROWS][COLS];
  code_t dco_code [ROWS][COLS];
  tot_err_t total_err [ROWS][COLS];
  err_t ref_err;
  err_t h_err [ROWS][COLS-1];
  err_t v_err [ROWS-1][COLS];
  node_cfg_t node_cfg [ROWS][COLS];

  int checks = 0, failures = 0;
  int n_upd = 0, n_sat = 0, n_pos = 0, n_neg = 0, n_switch = 0;

  adpll_network dut (.*);

  always #8 clk = ~clk;   // 62.5 MHz

  // reference clock, REF_P fast cycles per period
  initial forever begin
    repeat (REF_P / 2) @(posedge clk);
    ref_clk = 1;
    repeat (REF_P - REF_P / 2) @(posedge clk);
    ref_clk = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- programming ----
  node_cfg_t words [ROWS][COLS];

  function automatic node_cfg_t make_word(input int r, input int c, input bit bidir);
    node_cfg_t w = '0;
    w.k1 = K1[K1_W-1:0];
    w.k2 = K2[K2_W-1:0];
    if (bidir) begin
      if (c > 0 || r == 0) w.kw1 = KW_X1;
      if (r > 0)           w.kw2 = KW_X1;
      if (c + 1 < COLS)    w.kw3 = KW_X1;
      if (r + 1 < ROWS)    w.kw4 = KW_X1;
    end else begin
      if (c > 0 || r == 0) w.kw1 = KW_X1;   // left neighbour, or reference
      else                 w.kw2 = KW_X1;   // column 1: upper neighbour
    end
    return w;
  endfunction

  task automatic program_network(input bit bidir);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        words[r][c] = make_word(r, c, bidir);
    // last node of the chain first, each word MSB first
    for (int n = NN - 1; n >= 0; n--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        sda_in = words[n / COLS][n % COLS][b];
        #20 sck = 1; #20 sck = 0;
      end
    #20 upd = 1; n_upd++;
    #20 upd = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(node_cfg[r][c] == words[r][c],
              $sformatf("node (%0d,%0d) coefficients", r + 1, c + 1));
  endtask

  // ---- monitors ----
  bit   bidir_mode = 0;
  bit   observe = 0;
  int   max_err = 0;
  int   ref_edges = 0;
  int   node_edges [ROWS][COLS];
  logic clk_q [ROWS][COLS];
  logic ref_q = 0;

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  always @(posedge clk) begin
    if (pfd_sat) n_sat++;
    if (ref_err > 0) n_pos++;
    if (ref_err < 0) n_neg++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c + 1 < COLS; c++) begin
        if (h_err[r][c] > 0) n_pos++;
        if (h_err[r][c] < 0) n_neg++;
      end
    if (observe) begin
      if (iabs(int'(ref_err)) > max_err) max_err = iabs(int'(ref_err));
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c + 1 < COLS; c++)
          if (iabs(int'(h_err[r][c])) > max_err) max_err = iabs(int'(h_err[r][c]));
      for (int r = 0; r + 1 < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if ((bidir_mode || c == 0) && iabs(int'(v_err[r][c])) > max_err)
            max_err = iabs(int'(v_err[r][c]));
      if (ref_clk && !ref_q) ref_edges++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (sca_clk[r][c] && !clk_q[r][c]) node_edges[r][c]++;
    end
    ref_q = ref_clk;
    clk_q = sca_clk;
  end

  task automatic run_ref_periods(input int n);
    repeat (n * REF_P) @(posedge clk);
  endtask

  task automatic observe_lock(input string phase, input int limit);
    max_err = 0;
    ref_edges = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) node_edges[r][c] = 0;
    observe = 1;
    run_ref_periods(WINDOW);
    observe = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(iabs(node_edges[r][c] - ref_edges) <= 1,
              $sformatf("%s: node (%0d,%0d) %0d edges, reference %0d", phase, r + 1, c + 1,
                        node_edges[r][c], ref_edges));
    check(max_err <= limit, $sformatf("%s: max link error %0d steps, limit %0d", phase, max_err, limit));
    $display("%s: largest active-link phase error %0d TDC steps over %0d reference periods",
             phase, max_err, WINDOW);
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // step 1: unidirectional comb
    program_network(1'b0);
    run_ref_periods(SETTLE_U);
    observe_lock("unidirectional", 3);
    // step 2: on-the-fly switch to bidirectional
    program_network(1'b1);
    bidir_mode = 1;
    n_switch++;
    run_ref_periods(SETTLE_B);
    observe_lock("bidirectional", 3);
    $display("mechanisms: updates=%0d pfd_saturation_cycles=%0d positive=%0d negative=%0d switches=%0d",
             n_upd, n_sat, n_pos, n_neg, n_switch);
    check(n_upd == 2, "two serial updates");
    check(n_sat > 0, "PFD saturation during acquisition");
    check(n_pos > 0 && n_neg > 0, "both error signs");
    check(n_switch == 1, "unidirectional to bidirectional switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SETTLE_U + SETTLE_B + 2 * WINDOW + 20) * REF_P + 20 * NN * CFG_W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
