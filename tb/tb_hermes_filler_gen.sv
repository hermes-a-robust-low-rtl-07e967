// tb_hermes_filler_gen: self-checking test of filler word generation and CRC reassembly.
// Pops FIFO words carrying a checksum in four chunks followed by a random number
// of further words, then checks the pending flag, every field of the CRC filler
// (Hamming-coded CWT, distance, CRC, user info, link id), the Padding and Align
// filler layouts, clearing by crc_sent, and the overrun flag.
`timescale 1ns/1ps
module tb_hermes_filler_gen;
  import hermes_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] link_id = 8'h5A;
  logic [23:0] user_info = 24'hC0FFEE;
  logic pop = 0, crc_sent = 0;
  fifo_word_t pop_word = '0;
  cwt_e req_type = CWT_PADDING;
  logic [63:0] filler_word;
  logic crc_pending, crc_overrun;
  int checks = 0, failures = 0;

  hermes_filler_gen dut (.*);
  always #5 clk = ~clk;

  // Hamming(7,4) reference: data at positions 3,5,6,7, parity at 1,2,4
  function automatic logic [6:0] ref_ham(input logic [3:0] d);
    logic [7:1] c;
    int dp[4] = '{3, 5, 6, 7};
    c = '0;
    for (int k = 0; k < 4; k++) c[dp[k]] = d[k];
    for (int j = 0; j < 3; j++)
      for (int pos = 3; pos <= 7; pos++)
        if ((((pos >> j) & 1) != 0) && pos != (1 << j)) c[1 << j] ^= c[pos];
    return c;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_pop(input logic trig, input logic [3:0] nib);
    pop = 1; pop_word = '0; pop_word.crc_trig = trig; pop_word.crc_nib = nib;
    pop_word.data = {$urandom, $urandom}; pop_word.valid = 1'($urandom);
    @(posedge clk); #1 pop = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] crc;
    int extra;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int it = 0; it < 50; it++) begin
      crc = 16'($urandom);
      extra = $urandom % 6;
      do_pop(1, crc[3:0]);
      check(!crc_pending, "not pending after chunk 0");
      do_pop(0, crc[7:4]);
      do_pop(0, crc[11:8]);
      check(!crc_pending, "not pending after chunk 2");
      do_pop(0, crc[15:12]);
      check(crc_pending, "pending after chunk 3");
      for (int k = 0; k < extra; k++) do_pop(0, 4'($urandom));
      req_type = CWT_PADDING; #1;
      check(filler_word == {1'b0, ref_ham(4'h2), 24'h0, user_info, link_id},
            $sformatf("padding word %h", filler_word));
      req_type = CWT_ALIGN; #1;
      check(filler_word == {1'b0, ref_ham(4'h4), 24'h0, user_info, link_id},
            $sformatf("align word %h", filler_word));
      req_type = CWT_CRC; #1;
      check(filler_word == {1'b0, ref_ham(4'h3), 8'(3 + extra), crc, user_info, link_id},
            $sformatf("crc word %h exp crc %h dist %0d", filler_word, crc, 3 + extra));
      crc_sent = 1; @(posedge clk); #1 crc_sent = 0;
      check(!crc_pending, "cleared by crc_sent");
      check(!crc_overrun, "no overrun");
    end
    // a second packet end while a checksum is still pending -> overrun
    do_pop(1, 4'h1); do_pop(0, 4'h2); do_pop(0, 4'h3); do_pop(0, 4'h4);
    do_pop(1, 4'h5); do_pop(0, 4'h6); do_pop(0, 4'h7); do_pop(0, 4'h8);
    check(crc_overrun, "overrun flagged");
    req_type = CWT_CRC; #1;
    check(filler_word[47:32] == 16'h8765, "newest checksum kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
