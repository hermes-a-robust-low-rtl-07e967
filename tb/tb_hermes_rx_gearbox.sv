// tb_hermes_rx_gearbox: self-checking test of the 64b/67b receive gearbox.
// A serial stream of random 67-bit words, started at a random bit offset, is
// cut into 64-bit transceiver words. The testbench slips the gearbox exactly
// `offset` times, then every 67-bit word handed out must equal the next word
// of the stream, at 64 words per 67 cycles.
`timescale 1ns/1ps
module tb_hermes_rx_gearbox;
  logic clk = 0, rst = 1, slip = 0;
  logic [63:0] din = '0;
  logic [66:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  bit stream[$];
  logic [66:0] words[$];

  hermes_rx_gearbox dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int offset, nvalid, ncyc;
    offset = 1 + $urandom % 66;
    for (int k = 0; k < offset; k++) stream.push_back(1'($urandom));
    for (int w = 0; w < 3000; w++) begin
      logic [66:0] x;
      x = {3'($urandom), $urandom, $urandom};
      words.push_back(x);
      for (int i = 0; i < 67; i++) stream.push_back(x[i]);
    end
    repeat (3) @(posedge clk); #1 rst = 0;
    nvalid = 0; ncyc = 0;
    for (int cyc = 0; cyc < 2900; cyc++) begin
      for (int i = 0; i < 64; i++) din[i] = stream.pop_front();
      slip = (cyc < offset);
      @(posedge clk); #1;
      if (cyc >= offset + 2) begin
        ncyc++;
        if (dout_valid) begin
          logic [66:0] e;
          nvalid++;
          checks++;
          e = words.pop_front();
          if (dout != e) begin failures++; $display("FAIL: cycle %0d got %h exp %h", cyc, dout, e); end
        end
      end else if (dout_valid) begin
        void'(words.pop_front());  // words completed during the slip phase
      end
    end
    checks++;
    if (nvalid * 67 < ncyc * 64 - 67 || nvalid * 67 > ncyc * 64 + 67) begin
      failures++; $display("FAIL: rate %0d words in %0d cycles", nvalid, ncyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
