// tb_bb_pfd -- self-checking test of the bang-bang PFD automaton.
// Drives pairs of edge strobes with known spacing in both orders, coincident
// edges and a repeated leading edge (frequency error), and checks SIGN, the
// number of cycles MODE stays high and the `done` pulse.
module tb_bb_pfd;
  logic clk = 0, rst_n = 1, ref_rise = 0, div_rise = 0;
  logic sign, mode, done;
  int checks = 0, failures = 0;

  bb_pfd dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // First strobe, then `gap` cycles later the second; count MODE cycles.
  task automatic pair(input bit ref_first, input int gap, input int extra_lead);
    int mode_cycles = 0, done_seen = 0;
    @(negedge clk);
    if (ref_first) ref_rise = 1; else div_rise = 1;
    @(negedge clk); ref_rise = 0; div_rise = 0;
    for (int i = 1; i < gap; i++) begin
      if (mode) mode_cycles++;
      if (i == extra_lead) begin
        if (ref_first) ref_rise = 1; else div_rise = 1;
      end
      @(negedge clk); ref_rise = 0; div_rise = 0;
    end
    if (mode) mode_cycles++;
    if (ref_first) div_rise = 1; else ref_rise = 1;
    @(negedge clk); ref_rise = 0; div_rise = 0;
    if (done) done_seen++;
    check(done_seen == 1, "done after closing edge");
    check(!mode, "mode low after closing edge");
    check(sign == ref_first, $sformatf("sign %0b expected %0b", sign, ref_first));
    check(mode_cycles == gap, $sformatf("mode cycles %0d expected %0d", mode_cycles, gap));
    repeat (3) @(negedge clk);
    check(!done, "done is one pulse");
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!mode && !done, "idle after reset");
    pair(1, 7, 0);
    pair(0, 4, 0);
    pair(1, 1, 0);
    pair(0, 12, 5);   // leading input fires again: interval stays open
    pair(1, 20, 9);
    // coincident edges: done without MODE
    @(negedge clk); ref_rise = 1; div_rise = 1;
    @(negedge clk); ref_rise = 0; div_rise = 0;
    check(done && !mode, "coincident edges give zero interval");
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
