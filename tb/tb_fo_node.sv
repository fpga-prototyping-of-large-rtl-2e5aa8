// tb_fo_node -- self-checking test of one filter/oscillator node.
// The node is programmed through its serial interface, constant phase
// errors are applied to its four inputs, and at every local clock edge the
// code is compared with an integer model (filter update four fast cycles
// after the edge) of the weighting, the PI filter and
// the +512 offset; the time between edges is checked against the DCO law
// T = (2^11 - code) cycles using the code in force when the period started.
// A second programming word is loaded on the fly, while the node runs.
module tb_fo_node;
  import adpll_pkg::*;
  localparam int NC = 11;
  logic clk = 0, rst_n = 1, sck = 0, upd = 0, sda_in = 0;
  err_t e [NLINK];
  logic sda_out, rise, clk_out, int_sat;
  code_t code;
  tot_err_t total;
  node_cfg_t cfg;
  int checks = 0, failures = 0;

  fo_node #(.NC(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic load_word(input node_cfg_t w);
    #3;   // keep SPI edges away from the fast clock edges
    for (int b = CFG_W - 1; b >= 0; b--) begin
      sda_in = w[b]; #20; sck = 1; #20; sck = 0;
    end
    #20 upd = 1; wcur = w; #20 upd = 0;
  endtask

  function automatic int wt(input logic [1:0] c);
    return (c == 0) ? 0 : (c == 1) ? 1 : (c == 2) ? 2 : 4;
  endfunction

  // Reference model, advanced at every local clock edge.
  node_cfg_t wcur = '0;
  longint m_x = 0, m_acc = 0, m_code = 512;
  int     cyc = 0, last_rise = -1, nrise = 0, nper = 0;
  code_t  code_d, loaded;
  bit     pending = 0;

  function automatic longint model_total();
    return wt(wcur.kw1) * e[0] + wt(wcur.kw2) * e[1] + wt(wcur.kw3) * e[2] + wt(wcur.kw4) * e[3];
  endfunction

  // the filter samples EN_DELAY (4) fast cycles after each local edge
  logic [3:0] rise_hist = '0;

  always @(posedge clk) begin
    longint s;
    cyc++;
    if (rst_n && rise_hist[3]) begin
      s = m_acc + longint'(wcur.k2) * m_x;
      if (s > 1048575) s = 1048575;
      if (s < -1048576) s = -1048576;
      m_code = 512 + ((longint'(wcur.k1) * m_x) >>> 5) + (s >>> 12);
      m_acc  = s;
      m_x    = model_total();
      pending = 1;
    end
    if (rst_n && rise) begin
      nrise++;
      if (last_rise >= 0) begin
        nper++;
        check(cyc - last_rise == (1 << NC) - int'(loaded),
              $sformatf("period %0d expected %0d", cyc - last_rise, (1 << NC) - int'(loaded)));
      end
      last_rise = cyc;
      loaded = code_d;   // reload that started the period now beginning
    end
    code_d = code;
    rise_hist = {rise_hist[2:0], rise};
  end

  always @(negedge clk) if (pending) begin
    pending = 0;
    check(code == code_t'(m_code), $sformatf("code %0d expected %0d", code, m_code));
    check(total == tot_err_t'(model_total()), $sformatf("total error %0d expected %0d at %0t", total, model_total(), $time));
  end

  task automatic run_periods(input int n);
    repeat (n) begin
      do @(negedge clk); while (!rise);
    end
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    node_cfg_t w;
    e = '{err_t'(4), err_t'(-1), err_t'(7), err_t'(1)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_periods(3);
    check(code == 10'd512, "start-up code 512");
    // proportional only: Kw = 1, 2, 0, 4; Kp = 16/32
    w = '0; w.kw1 = 2'd1; w.kw2 = 2'd2; w.kw3 = 2'd0; w.kw4 = 2'd3; w.k1 = 5'd16;
    load_word(w);
    check(cfg == w, "programmed word 1");
    run_periods(8);
    // proportional and integral, all links on, reloaded while running
    w.kw3 = 2'd3; w.k1 = 5'd31; w.k2 = 12'd300;
    load_word(w);
    check(cfg == w, "programmed word 2");
    run_periods(12);
    // negative error drives the code down
    e = '{err_t'(-15), err_t'(-3), err_t'(0), err_t'(-9)};
    run_periods(12);
    check(code < 10'd512, "negative error lowers the code");
    check(nrise > 30 && nper > 30, "periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
