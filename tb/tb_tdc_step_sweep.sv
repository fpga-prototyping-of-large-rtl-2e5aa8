// tb_tdc_step_sweep -- the 10 x 10 network run with three PFD resolutions
// side by side: TDC steps of 149.9 ns, 100.0 ns and 50.0 ns (TDC_INC = 6996,
// 10486, 20972).  All three networks get the same reference and the same
// programming stream: comb unidirectional start-up, then bidirectional.
// Over an observation window in bidirectional mode the testbench records,
// per network, the largest PFD code on any link, the largest code on the
// link between nodes (7,4) and (7,5), and how many nodes are not
// frequency-locked to the reference.  A finer TDC sees the same residual
// phase jitter as more steps, and raises the loop gain by the same factor.
// Checks: the coefficients read back in every network, the 149.9 ns network
// is locked with link codes within 3 steps, and the finer TDCs do not show
// smaller link codes.  With Kp = 31/32 and Ki = 64/4096 this design loses
// its quiet lock at 100 ns (codes reach full scale, frequency still held)
// and part of the network loses frequency lock at 50 ns.
`timescale 1ns/1ps
module tb_tdc_step_sweep;
  import adpll_pkg::*;
  localparam int ROWS  = 10;
  localparam int COLS  = 10;
  localparam int NN    = ROWS * COLS;
  localparam int NV    = 3;
  localparam int REF_P = 1500;
  localparam int SETTLE_U = 2000;
  localparam int SETTLE_B = 300;
  localparam int WINDOW   = 60;
  localparam int unsigned INC [NV] = '{6996, 10486, 20972};

  logic clk = 0, rst_n = 1, ref_clk = 0, sck = 0, sda_in = 0, upd = 0;
  int checks = 0, failures = 0;
  bit observe = 0, bidir = 0;
  logic ref_q = 0;
  int ref_edges = 0;
  int max_link [NV];
  int max_74 [NV];
  int unlocked [NV];
  node_cfg_t words [ROWS][COLS];

  always #8 clk = ~clk;

  initial forever begin
    repeat (REF_P / 2) @(posedge clk);
    ref_clk = 1;
    repeat (REF_P - REF_P / 2) @(posedge clk);
    ref_clk = 0;
  end

  initial begin
    #1 rst_n = 0;
  end

  always @(posedge clk) begin
    if (observe && ref_clk && !ref_q) ref_edges++;
    ref_q = ref_clk;
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar k = 0; k < NV; k++) begin : g_net
    logic sda_out, pfd_sat, int_sat;
    logic sca_clk [ROWS][COLS];
    code_t dco_code [ROWS][COLS];
    tot_err_t total_err [ROWS][COLS];
    err_t ref_err;
    err_t h_err [ROWS][COLS-1];
    err_t v_err [ROWS-1][COLS];
    node_cfg_t node_cfg [ROWS][COLS];
    logic clk_q [ROWS][COLS];
    int edges [ROWS][COLS];

    adpll_network #(.TDC_INC(INC[k])) dut (
      .clk, .rst_n, .ref_clk, .sck, .sda_in, .upd, .sda_out,
      .sca_clk, .dco_code, .total_err, .ref_err, .h_err, .v_err, .node_cfg,
      .pfd_sat, .int_sat
    );

    always @(posedge clk) begin
      if (!observe) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) edges[r][c] <= 0;
      end else begin
        if (iabs(int'(ref_err)) > max_link[k]) max_link[k] = iabs(int'(ref_err));
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c + 1 < COLS; c++)
            if (iabs(int'(h_err[r][c])) > max_link[k]) max_link[k] = iabs(int'(h_err[r][c]));
        for (int r = 0; r + 1 < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (iabs(int'(v_err[r][c])) > max_link[k]) max_link[k] = iabs(int'(v_err[r][c]));
        if (iabs(int'(h_err[6][3])) > max_74[k]) max_74[k] = iabs(int'(h_err[6][3]));
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (sca_clk[r][c] && !clk_q[r][c]) edges[r][c] <= edges[r][c] + 1;
      end
      clk_q <= sca_clk;
    end

    task automatic summarize();
      unlocked[k] = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (iabs(edges[r][c] - ref_edges) > 1) unlocked[k]++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (node_cfg[r][c] != words[r][c]) begin
            failures++;
            $display("FAIL: network %0d node (%0d,%0d) coefficients", k, r + 1, c + 1);
          end
      checks++;
    endtask
  end

  task automatic program_network(input bit bi);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        words[r][c] = '0;
        words[r][c].k1 = 5'd31;
        words[r][c].k2 = 12'd64;
        if (bi) begin
          if (c > 0 || r == 0) words[r][c].kw1 = KW_X1;
          if (r > 0)           words[r][c].kw2 = KW_X1;
          if (c + 1 < COLS)    words[r][c].kw3 = KW_X1;
          if (r + 1 < ROWS)    words[r][c].kw4 = KW_X1;
        end else if (c > 0 || r == 0) words[r][c].kw1 = KW_X1;
        else words[r][c].kw2 = KW_X1;
      end
    for (int n = NN - 1; n >= 0; n--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        sda_in = words[n / COLS][n % COLS][b];
        #20 sck = 1; #20 sck = 0;
      end
    #20 upd = 1; #20 upd = 0;
  endtask

  initial begin
    real step_ns;
    for (int k = 0; k < NV; k++) begin max_link[k] = 0; max_74[k] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    program_network(1'b0);
    repeat (SETTLE_U * REF_P) @(posedge clk);
    program_network(1'b1);
    bidir = 1;
    repeat (SETTLE_B * REF_P) @(posedge clk);
    observe = 1;
    repeat (WINDOW * REF_P) @(posedge clk);
    observe = 0;
    g_net[0].summarize();
    g_net[1].summarize();
    g_net[2].summarize();
    for (int k = 0; k < NV; k++) begin
      step_ns = 16.0 * 65536.0 / real'(INC[k]);
      $display("TDC step %5.1f ns: largest link code %0d (%0.0f ns), link (7,4)-(7,5) %0d, %0d nodes out of lock",
               step_ns, max_link[k], step_ns * max_link[k], max_74[k], unlocked[k]);
    end
    // a finer TDC must not show smaller codes: same jitter, more steps, more gain
    check(max_link[1] >= max_link[0] && max_link[2] >= max_link[0],
          "finer TDC steps do not reduce the link codes");
    check(unlocked[0] == 0, "149.9 ns network locked");
    check(max_link[0] <= 3, "149.9 ns network link codes within 3 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SETTLE_U + SETTLE_B + WINDOW + 20) * REF_P + 8 * NN * CFG_W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
