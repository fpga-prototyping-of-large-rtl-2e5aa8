// tb_topology_compare -- the two unidirectional start-up topologies on the
// full 10 x 10 network.
//
// Type 1 (zigzag) chains all nodes in one serpentine line: row 1 left to
// right, down at the end, row 2 right to left, and so on, so the last node
// is 99 borders away from the reference.  Type 2 (comb) lets column 1
// follow the reference downwards and every row follow its first node to the
// right, so a node's distance is its Manhattan distance to node (1,1), 18
// at most.  Each topology is programmed after a reset and run; then, over an
// observation window, the testbench measures the offset of the clock of
// node (10,10) from the reference (in fast-clock cycles) and the largest
// active-link PFD code.  Checks: the comb network is frequency-locked
// everywhere with small link errors, the programmed words read back, and the
// far corner's offset with the comb is not larger than with the zigzag (or
// the zigzag chain did not even hold frequency lock at its far end).
`timescale 1ns/1ps
module tb_topology_compare;
  import adpll_pkg::*;
  localparam int ROWS  = 10;
  localparam int COLS  = 10;
  localparam int NN    = ROWS * COLS;
  localparam int REF_P = 1500;
  localparam int SETTLE = 2000;
  localparam int WINDOW = 60;

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

  adpll_network dut (.*);

  always #8 clk = ~clk;

  initial forever begin
    repeat (REF_P / 2) @(posedge clk);
    ref_clk = 1;
    repeat (REF_P - REF_P / 2) @(posedge clk);
    ref_clk = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // link usage of the current topology, per node: 0 ref/west, 1 north, 2 east
  int used [ROWS][COLS];

  function automatic node_cfg_t make_word(input int r, input int c, input bit zigzag);
    node_cfg_t w = '0;
    w.k1 = 5'd31;
    w.k2 = 12'd64;
    if (!zigzag) begin
      used[r][c] = (c > 0 || r == 0) ? 0 : 1;
    end else if (r % 2 == 0) begin
      used[r][c] = (c > 0 || r == 0) ? 0 : 1;
    end else begin
      used[r][c] = (c < COLS - 1) ? 2 : 1;
    end
    case (used[r][c])
      0: w.kw1 = KW_X1;
      1: w.kw2 = KW_X1;
      default: w.kw3 = KW_X1;
    endcase
    return w;
  endfunction

  task automatic program_network(input bit zigzag);
    node_cfg_t words [ROWS][COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) words[r][c] = make_word(r, c, zigzag);
    for (int n = NN - 1; n >= 0; n--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        sda_in = words[n / COLS][n % COLS][b];
        #20 sck = 1; #20 sck = 0;
      end
    #20 upd = 1; #20 upd = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(node_cfg[r][c] == words[r][c], "coefficients read back");
  endtask

  // monitors
  bit observe = 0;
  int max_link, max_off, ref_edges, lock_fail;
  int last_ref = 0, cyc = 0;
  int edges [ROWS][COLS];
  logic ref_q = 0;
  logic clk_q [ROWS][COLS];

  always @(posedge clk) begin
    int off;
    cyc++;
    if (observe) begin
      if (ref_clk && !ref_q) begin ref_edges++; last_ref = cyc; end
      if (sca_clk[ROWS-1][COLS-1] && !clk_q[ROWS-1][COLS-1]) begin
        off = cyc - last_ref;                   // cycles after the last reference edge
        if (off > REF_P / 2) off = off - REF_P; // express as a signed offset
        if (iabs(off) > max_off) max_off = iabs(off);
      end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          if (sca_clk[r][c] && !clk_q[r][c]) edges[r][c]++;
          case (used[r][c])
            0: if (iabs(int'((c == 0) ? ref_err : h_err[r][c-1])) > max_link)
                 max_link = iabs(int'((c == 0) ? ref_err : h_err[r][c-1]));
            1: if (iabs(int'(v_err[r-1][c])) > max_link) max_link = iabs(int'(v_err[r-1][c]));
            default: if (iabs(int'(h_err[r][c])) > max_link) max_link = iabs(int'(h_err[r][c]));
          endcase
        end
    end
    ref_q = ref_clk;
    clk_q = sca_clk;
  end

  task automatic run_topology(input bit zigzag, output int off, output int link, output int unlocked);
    rst_n = 0;
    #100 rst_n = 1;
    program_network(zigzag);
    repeat (SETTLE * REF_P) @(posedge clk);
    max_link = 0; max_off = 0; ref_edges = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) edges[r][c] = 0;
    last_ref = cyc;
    observe = 1;
    repeat (WINDOW * REF_P) @(posedge clk);
    observe = 0;
    unlocked = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (iabs(edges[r][c] - ref_edges) > 1) unlocked++;
    off = max_off;
    link = max_link;
    $display("%s: node (10,10) offset up to %0d fast cycles (%0d ns), largest link error %0d steps, %0d nodes out of lock",
             zigzag ? "zigzag" : "comb", off, off * 16, link, unlocked);
  endtask

  initial begin
    int off_z, link_z, unl_z, off_c, link_c, unl_c;
    run_topology(1'b1, off_z, link_z, unl_z);
    run_topology(1'b0, off_c, link_c, unl_c);
    check(unl_c == 0, "comb topology: every node frequency-locked");
    check(link_c <= 3, "comb topology: link errors within 3 steps");
    check(unl_z > 0 || off_c <= off_z,
          "comb keeps the far corner at least as close to the reference as the zigzag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (SETTLE + WINDOW + 10) * REF_P + 4 * NN * CFG_W * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
