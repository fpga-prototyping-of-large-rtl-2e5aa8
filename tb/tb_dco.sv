// tb_dco -- self-checking test of the counter DCO.
// For a series of codes, measures the distance between `rise` strobes and the
// high time of clk_out, and checks T = (2^Nc - C_in) fast-clock cycles and a
// high time of floor(T/2).  The code is changed in mid-period to check that
// it only takes effect at the next reload.
module tb_dco;
  import adpll_pkg::*;
  localparam int NC = 11;
  logic clk = 0, rst_n = 0;
  code_t code;
  logic rise, clk_out;
  int checks = 0, failures = 0;

  dco #(.NC(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    int t, hi, c;
    code = 10'd512;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      c = (k == 0) ? 512 : (k == 1) ? 1023 : (k == 2) ? 798 : int'($urandom_range(0, 1023));
      // wait for a reload, then set the code: it rules from the next reload
      do @(negedge clk); while (!rise);
      code = code_t'(c);
      do @(negedge clk); while (!rise);
      t = 0; hi = 0;
      do begin
        if (clk_out) hi++;
        t++;
        @(negedge clk);
      end while (!rise);
      check(t == (1 << NC) - c, $sformatf("code %0d period %0d expected %0d", c, t, (1 << NC) - c));
      check(hi == ((1 << NC) - c) / 2, $sformatf("code %0d high %0d expected %0d", c, hi, ((1 << NC) - c) / 2));
    end
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
