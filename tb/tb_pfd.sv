// tb_pfd -- self-checking test of the complete PFD (BB-PFD, TDC, arithmetic).
// Random edge spacings in both orders with a tick every TP cycles.  The
// expected code is +/- the number of ticks in the cycles where the interval
// is open (from the cycle after the leading strobe up to the lagging
// strobe), limited to 15, positive when ref leads.
module tb_pfd;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, tdc_tick = 0, ref_rise = 0, div_rise = 0;
  err_t err;
  logic sat;
  int checks = 0, failures = 0;
  int cyc = 0;
  localparam int TP = 4;

  pfd dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) tdc_tick = (cyc % TP) == 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    int gap, seen, exp;
    bit ref_first;
    int npos = 0, nneg = 0, nsat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      ref_first = 1'($urandom_range(0, 1));
      gap = $urandom_range(1, 80);
      repeat ($urandom_range(2, 6)) @(negedge clk);
      if (ref_first) ref_rise = 1; else div_rise = 1;
      @(negedge clk); ref_rise = 0; div_rise = 0;
      seen = 0;
      for (int i = 1; i < gap; i++) begin
        @(posedge clk); if (tdc_tick) seen++;
        @(negedge clk);
      end
      if (ref_first) div_rise = 1; else ref_rise = 1;
      @(posedge clk); if (tdc_tick) seen++;
      @(negedge clk); ref_rise = 0; div_rise = 0;
      @(negedge clk);
      exp = seen > 15 ? 15 : seen;
      if (!ref_first) exp = -exp;
      check(err == err_t'(exp), $sformatf("gap %0d ref_first %0b: err %0d expected %0d", gap, ref_first, err, exp));
      check(sat == (seen >= 15), "sat flag");
      if (exp > 0) npos++;
      if (exp < 0) nneg++;
      if (sat) nsat++;
    end
    check(npos > 0 && nneg > 0 && nsat > 0, "both signs and saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
