// tb_hermes_tx_crc: self-checking test of the transmit CRC / FIFO word former.
// Sends random packets in packet mode (Valid framing) and streaming mode (End
// of Packet bit), recomputes each packet's CRC-16-CCITT with a bit-serial
// reference and checks the packet-end flag, the four 4-bit chunks on the
// packet-end word and the three following words, and Align Marker gating.
`timescale 1ns/1ps
module tb_hermes_tx_crc;
  import hermes_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  mode_e mode = MODE_PACKET;
  logic [63:0] data = '0;
  logic valid = 0, eop = 0, align = 0;
  fifo_word_t w;
  logic we, done;
  logic [15:0] cval;
  int checks = 0, failures = 0;

  hermes_tx_crc dut (.clk, .rst, .en, .mode, .data, .valid, .eop, .align,
                     .fifo_wdata(w), .fifo_we(we), .crc_done(done), .crc_value(cval));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_crc(input logic [15:0] c, input logic [63:0] d);
    for (int i = 63; i >= 0; i--) c = (c << 1) ^ (((c >> 15) ^ 16'(d[i])) & 16'h1) * 16'h1021;
    return c;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [15:0] exp_crc;
  // drive one word, sample outputs before the clock edge
  task automatic word(input logic v, input logic e, input logic a, input logic [63:0] d,
                      input logic exp_trig, input logic [3:0] exp_nib, input logic chk_nib);
    valid = v; eop = e; align = a; data = d; en = 1;
    #1;
    check(we == 1'b1, "write enable");
    check(w.crc_trig == exp_trig, $sformatf("trig exp %0d got %0d", exp_trig, w.crc_trig));
    check(w.data == d && w.valid == v, "data/valid passthrough");
    check(w.align == (mode == MODE_STREAMING && a), "align gating");
    if (chk_nib) check(w.crc_nib == exp_nib, $sformatf("nibble exp %h got %h", exp_nib, w.crc_nib));
    if (exp_trig) check(done && cval == exp_crc, $sformatf("crc exp %h got %h", exp_crc, cval));
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d;
    int len;
    repeat (3) @(posedge clk); #1 rst = 0;
    // ---- packet mode: Idle, packet, Idles carrying the chunks
    mode = MODE_PACKET;
    word(0, 0, 0, 64'h1, 0, 0, 0);
    for (int p = 0; p < 40; p++) begin
      len = 1 + ($urandom % 12);
      exp_crc = 16'hFFFF;
      for (int k = 0; k < len; k++) begin
        d = {$urandom, $urandom};
        exp_crc = ref_crc(exp_crc, d);
        word(1, 0, 1, d, 0, 0, 0);
      end
      word(0, 0, 0, {$urandom, $urandom}, 1, exp_crc[3:0], 1);
      for (int k = 1; k < 4; k++) word(0, 0, 0, 64'h0, 0, exp_crc[4*k +: 4], 1);
    end
    // ---- streaming mode: back-to-back packets, End of Packet on the last word
    mode = MODE_STREAMING;
    for (int p = 0; p < 40; p++) begin
      logic [15:0] prev;
      len = 4 + ($urandom % 10);
      prev = exp_crc;
      exp_crc = 16'hFFFF;
      for (int k = 0; k < len; k++) begin
        d = {$urandom, $urandom};
        exp_crc = ref_crc(exp_crc, d);
        if (k == len - 1) word(1, 1, 0, d, 1, exp_crc[3:0], 1);
        else if (k <= 2 && p > 0) word(1, 0, k == 1, d, 0, prev[4*(k+1) +: 4], 1);
        else word(1, 0, k == 1, d, 0, 0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
