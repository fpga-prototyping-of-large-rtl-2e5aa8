// tb_error_combiner -- self-checking test of the weighted error sum.
// Random errors in [-15, 15] and random weight codes; the expected total is
// computed with integer arithmetic from the weights 0, 1, 2, 4.
module tb_error_combiner;
  import adpll_pkg::*;
  err_t e [NLINK];
  logic [NLINK-1:0][KW_W-1:0] kw;
  tot_err_t total;
  int checks = 0, failures = 0;

  error_combiner dut (.*);

  function automatic int wt(input int code);
    case (code)
      0: return 0;
      1: return 1;
      2: return 2;
      default: return 4;
    endcase
  endfunction

  initial begin
    int ev [NLINK];
    int exp;
    for (int k = 0; k < 2000; k++) begin
      exp = 0;
      for (int i = 0; i < NLINK; i++) begin
        ev[i] = (k < 4) ? ((k % 2) ? -15 : 15) : int'($urandom_range(0, 30)) - 15;
        e[i]  = err_t'(ev[i]);
        kw[i] = (k < 4) ? 2'd3 : 2'($urandom_range(0, 3));
        exp  += ev[i] * wt(int'(kw[i]));
      end
      #1;
      checks++;
      if (total != tot_err_t'(exp)) begin
        failures++;
        $display("FAIL: total %0d expected %0d", total, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
