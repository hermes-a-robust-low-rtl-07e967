// tb_hermes_link_init: self-checking test of word lock and link status.
// Feeds headers of a stream whose word boundary is wrong by a random number of
// bits (modelled as illegal headers until the block has slipped that often),
// then legal headers. Checks the slip count, that lock comes exactly LOCK_CNT
// legal headers after the last slip and link-up UP_CNT words later, that a few
// bad headers are tolerated and counted, and that BAD_MAX bad headers within a
// window drop the lock.
`timescale 1ns/1ps
module tb_hermes_link_init;
  logic clk = 0, rst = 1, word_valid = 0;
  logic [2:0] hdr = '0;
  logic slip, block_lock, link_up;
  logic [15:0] hdr_err_cnt;
  int checks = 0, failures = 0;

  hermes_link_init #(.LOCK_CNT(64), .BAD_MAX(16), .UP_CNT(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int slips = 0;
  always @(posedge clk) if (slip) slips++;

  initial begin
    int offset, good, t_lock, t_up;
    offset = 3 + $urandom % 60;
    repeat (3) @(posedge clk); #1 rst = 0;
    good = 0; t_lock = -1; t_up = -1;
    for (int n = 0; n < 2000; n++) begin
      // 1 word in 12 cycles missing, like the gearbox gaps
      word_valid = (n % 12 != 11);
      if (slips < offset) hdr = ($urandom % 2 != 0) ? 3'b111 : 3'b000;  // wrong boundary
      else hdr = ($urandom % 2 != 0) ? 3'b011 : 3'b100;
      @(posedge clk); #1;
      if (slips >= offset && word_valid) good++;
      if (block_lock && t_lock < 0) t_lock = good;
      if (link_up && t_up < 0) t_up = good;
    end
    check(slips == offset, $sformatf("slips %0d exp %0d", slips, offset));
    check(t_lock >= 64 && t_lock <= 64 + 3, $sformatf("lock after %0d good headers", t_lock));
    check(t_up - t_lock == 64, $sformatf("link up after %0d more words", t_up - t_lock));
    // a few bad headers are tolerated
    word_valid = 1;
    for (int n = 0; n < 64; n++) begin
      hdr = (n % 8 == 0) ? 3'b110 : 3'b011;
      @(posedge clk); #1;
    end
    check(block_lock && link_up, "lock kept with 8 bad headers");
    check(hdr_err_cnt == 16'd8, $sformatf("header errors %0d", hdr_err_cnt));
    // BAD_MAX bad headers in a window drop the lock
    for (int n = 0; n < 20; n++) begin hdr = 3'b101; @(posedge clk); #1; end
    check(!block_lock && !link_up, "lock lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
