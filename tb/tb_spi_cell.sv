// tb_spi_cell -- self-checking test of the serial programming interface,
// with three cells cascaded as in a programming chain.  Words are shifted in
// last cell first, MSB first; the parallel outputs must keep their old value
// while shifting and take the new words together at the UPD rising edge.
// The chain output after an SCK cycle carries the bit that the next cell would
// take in, 25 bits behind per cell (74 after the last of three cells).
module tb_spi_cell;
  import adpll_pkg::*;
  localparam int N = 3;
  logic rst_n = 1, sck = 0, upd = 0;
  logic sda [N+1];
  node_cfg_t cfg [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_c
    spi_cell u (.rst_n, .sck, .upd, .sda_in(sda[i]), .sda_out(sda[i+1]), .cfg(cfg[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [CFG_W-1:0] words [N];
  logic [CFG_W-1:0] prev  [N];
  bit stream [$];
  int nout = 0;

  task automatic send_bit(input bit b);
    sda[0] = b; #5; sck = 1; #5; sck = 0;
  endtask

  // reset: a real falling edge, so that the asynchronous resets act
  initial begin
    #1 rst_n = 0;
  end

  initial begin
    sda[0] = 0;
    #3 rst_n = 1;
    #10;
    for (int i = 0; i < N; i++) check(cfg[i] == '0, "reset value");
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < N; i++) begin
        prev[i]  = cfg[i];
        words[i] = CFG_W'($urandom);
      end
      for (int i = N - 1; i >= 0; i--)
        for (int b = CFG_W - 1; b >= 0; b--) begin
          send_bit(words[i][b]);
          stream.push_back(words[i][b]);
          for (int j = 0; j < N; j++)
            if (cfg[j] != prev[j]) begin
              failures++; checks++;
              $display("FAIL: cell %0d changed before UPD", j);
            end
        end
      for (int i = 0; i < N; i++) check(cfg[i] == prev[i], "held before UPD");
      #5 upd = 1; #5 upd = 0;
      for (int i = 0; i < N; i++)
        check(cfg[i] == node_cfg_t'(words[i]), $sformatf("cell %0d word %h expected %h", i, cfg[i], words[i]));
      // field placement of the first cell
      check(cfg[0].kw4 == words[0][1:0] && cfg[0].kw1 == words[0][7:6] &&
            cfg[0].k1 == words[0][12:8] && cfg[0].k2 == words[0][24:13], "field positions");
    end
    // chain output: after each SCK cycle, sda_out holds bit (latest - (25*N - 1))
    for (int k = 0; k < 30; k++) begin
      send_bit(1'($urandom));
      stream.push_back(sda[0]);
      #1;
      check(sda[N] == stream[stream.size() - N * CFG_W], "chain output delay");
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
