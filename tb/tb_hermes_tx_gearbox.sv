// tb_hermes_tx_gearbox: self-checking test of the 64b/67b transmit gearbox.
// Feeds random 67-bit words whenever `ready` is high, rebuilds the serial bit
// stream from the 64-bit outputs and compares it with the words sent. Also
// checks the rate: exactly 64 words taken in every 67 consecutive cycles.
`timescale 1ns/1ps
module tb_hermes_tx_gearbox;
  logic clk = 0, rst = 1, ready;
  logic [66:0] din;
  logic [63:0] dout;
  int checks = 0, failures = 0;
  bit sent[$];
  int taken = 0;

  hermes_tx_gearbox dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int window[$];
    din = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      din = {3'($urandom), $urandom, $urandom};
      #1;
      window.push_back(int'(ready));
      if (ready) begin
        for (int i = 0; i < 67; i++) sent.push_back(din[i]);
        taken++;
      end
      @(posedge clk); #1;
      // dout now holds the 64 bits produced in the cycle just finished
      for (int i = 0; i < 64; i++) begin
        bit e;
        e = sent.pop_front();
        if (i == 0 || i == 63) checks++;
        if (dout[i] != e) begin failures++; $display("FAIL: cycle %0d bit %0d", cyc, i); break; end
      end
      if (window.size() == 67) begin
        int s; s = 0;
        foreach (window[k]) s += window[k];
        checks++;
        if (s != 64) begin failures++; $display("FAIL: %0d words in 67 cycles", s); end
        void'(window.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
