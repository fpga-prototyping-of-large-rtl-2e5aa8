// tb_loop_filter -- self-checking test of the PI loop filter.
// Random total errors and gains, with irregular enable strobes.  An integer
// model of H(z) = (K1/32 + (K2/4096)/(1 - z^-1)) z^-2 + 512 (floor shifts,
// integrator held at the 21-bit limits) predicts every code.
module tb_loop_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  tot_err_t total;
  logic [K1_W-1:0] k1;
  logic [K2_W-1:0] k2;
  code_t code;
  logic int_sat;
  int checks = 0, failures = 0;

  loop_filter dut (.*);

  always #5 clk = ~clk;

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    longint m_x = 0, m_acc = 0, s, exp;
    int nsat = 0;
    total = '0; k1 = '0; k2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (code != 10'd512) begin failures++; $display("FAIL: reset code %0d", code); end
    for (int k = 0; k < 3000; k++) begin
      if (k % 500 == 0) begin
        k1 = 5'($urandom_range(0, 31));
        k2 = (k >= 1500) ? 12'($urandom_range(2000, 4095)) : 12'($urandom_range(0, 63));
      end
      // bias the error so that the integrator also reaches its limits
      total = tot_err_t'(int'($urandom_range(0, 160)) - ((k / 250) % 2 ? 100 : 60));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      en = 1;
      @(negedge clk);
      en = 0;
      // model: output uses the previously registered x
      s = m_acc + longint'(k2) * m_x;
      if (s > 1048575) s = 1048575;
      if (s < -1048576) s = -1048576;
      exp = 512 + ((longint'(k1) * m_x) >>> 5) + (s >>> 12);
      m_acc = s;
      m_x = longint'(total);
      checks++;
      if (code != code_t'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d code %0d expected %0d", k, code, exp);
      end
      if (int_sat) nsat++;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: integrator never saturated"); end
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
