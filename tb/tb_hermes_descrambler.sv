// tb_hermes_descrambler: self-checking test of the 64-bit 802.3 descrambler.
// A bit-serial reference scrambler produces the line words; after the first
// word (the self-synchronising start-up) the descrambler must return the
// original data exactly, also after a stretch of words with `en` low.
`timescale 1ns/1ps
module tb_hermes_descrambler;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [57:0] tx_st;

  hermes_descrambler dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] ref_scr(input logic [63:0] d, inout logic [57:0] st);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) begin
      o[i] = d[i] ^ st[38] ^ st[57];
      st = {st[56:0], o[i]};
    end
    return o;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tx_st = 58'h123456789ABCDEF;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      en = 1;
      din = ref_scr(d, tx_st);
      #1;
      if (n >= 1) begin
        checks++;
        if (dout !== d) begin failures++; $display("FAIL: word %0d got %h exp %h", n, dout, d); end
      end
      @(posedge clk); #1;
      if (n % 100 == 50) begin  // hold: line words without en must not disturb history
        en = 0; din = {$urandom, $urandom};
        repeat (3) @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
