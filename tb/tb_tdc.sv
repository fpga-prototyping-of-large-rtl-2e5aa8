// tb_tdc -- self-checking test of the chronometer TDC.
// A tick strobe every TP cycles with a random phase; MODE pulses of random
// length.  The expected Dout is the number of ticks seen while MODE was high,
// counted by the testbench and limited to 15.
module tb_tdc;
  logic clk = 0, rst_n = 1, tdc_tick = 0, mode = 0, done = 0;
  logic [3:0] dout;
  logic sat;
  int checks = 0, failures = 0;
  int cyc = 0, tp = 3, phase = 0;

  tdc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) tdc_tick = ((cyc + phase) % tp) == 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    int len, seen, exp;
    bit saw_sat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      tp = 2 + $urandom_range(0, 4);
      phase = $urandom_range(0, 7);
      len = $urandom_range(1, 70);
      repeat ($urandom_range(1, 5)) @(negedge clk);
      seen = 0;
      mode = 1;
      for (int i = 0; i < len; i++) begin
        @(posedge clk); if (tdc_tick) seen++;
        @(negedge clk);
      end
      mode = 0; done = 1;
      @(negedge clk); done = 0;
      exp = seen > 15 ? 15 : seen;
      check(dout == 4'(exp), $sformatf("len %0d tp %0d: dout %0d expected %0d", len, tp, dout, exp));
      check(sat == (seen >= 15), "saturation flag");
      if (sat) saw_sat = 1;
    end
    // done with no MODE pulse reads zero
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    check(dout == 0, "zero-length interval");
    check(saw_sat, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
