// tb_hermes_scrambler: self-checking test of the 64-bit 802.3 scrambler.
// A bit-serial reference (one shift-register step per bit, 1 + x^39 + x^58)
// scrambles the same random words; the outputs must match bit for bit,
// including across cycles where `en` is low (history must hold).
`timescale 1ns/1ps
module tb_hermes_scrambler;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [57:0] ref_st;

  hermes_scrambler dut (.*);
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
    repeat (3) @(posedge clk); #1 rst = 0;
    ref_st = '1;
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] e;
      logic [57:0] st_tmp;
      en  = ($urandom % 5) != 0;
      din = (n < 20) ? 64'h0 : {$urandom, $urandom};
      st_tmp = ref_st;
      e = ref_scr(din, st_tmp);
      #1;
      checks++;
      if (dout !== e) begin failures++; $display("FAIL: word %0d got %h exp %h", n, dout, e); end
      if (en) ref_st = st_tmp;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
