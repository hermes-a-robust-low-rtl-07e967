// tb_hermes_decoder: self-checking test of header and CWT decoding.
// The testbench encodes a random sequence of Data and Control words with its
// own toggling-header and Hamming(7,4) encoders, then flips at most one header
// bit and, independently, at most one of the seven CWT code bits. The decoder
// first trains on 16 words (no output, no CWT flips there); the run is repeated
// with the lock dropped in between so that the training starts on Data as well
// as on Control words. After training it must return the original tag and CWT
// for every word, flag each correction, and pass the payload through.
`timescale 1ns/1ps
module tb_hermes_decoder;
  import hermes_pkg::*;
  logic clk = 0, rst = 1, lock = 0, in_valid = 0;
  logic [66:0] in_word = '0;
  logic out_valid, is_ctrl, hdr_corr, cwt_corr, cwt_bad;
  cwt_e cwt;
  logic [63:0] payload;
  int checks = 0, failures = 0;

  hermes_decoder dut (.*);
  always #5 clk = ~clk;

  function automatic logic [6:0] ref_ham(input logic [3:0] d);
    logic p1, p2, p4;
    p1 = d[0] ^ d[1] ^ d[3]; p2 = d[0] ^ d[2] ^ d[3]; p4 = d[1] ^ d[2] ^ d[3];
    return {d[3], d[2], d[1], p4, d[0], p2, p1};
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev_ctrl, prev_a;
    int n_hcorr, n_ccorr;
    n_hcorr = 0; n_ccorr = 0;
    repeat (3) @(posedge clk); #1 rst = 0; lock = 1;
    prev_ctrl = 1; prev_a = 1'($urandom);
    for (int n = 0; n < 6000; n++) begin
      logic ctrl, a, hflip, cflip;
      logic [3:0] t;
      logic [63:0] pl;
      logic [2:0] h;
      if (n % 1000 == 0) begin  // relock: start training again
        lock = 0; @(posedge clk); #1 lock = 1;
      end
      ctrl = (n % 1000 == 0) ? 1'(n / 1000 % 2) : 1'($urandom % 2);
      a = (ctrl == prev_ctrl) ? !prev_a : prev_a;
      prev_ctrl = ctrl; prev_a = a;
      t = 4'(1 + $urandom % 4);
      pl = {$urandom, $urandom};
      if (ctrl) pl[63:56] = {1'b0, ref_ham(t)};
      h = a ? 3'b011 : 3'b100;
      hflip = ($urandom % 4 == 0);
      if (hflip) begin int b; b = $urandom % 3; h[b] = !h[b]; end
      cflip = ctrl && ($urandom % 4 == 0) && (n % 1000 >= 16);
      if (cflip) begin int b; b = 56 + $urandom % 7; pl[b] = !pl[b]; end
      in_word = {pl, h}; in_valid = 1;
      @(posedge clk); #1;
      if (n % 1000 < 16) begin
        check(!out_valid, "no output while training");
        continue;
      end
      check(out_valid, "out_valid");
      check(is_ctrl == ctrl, $sformatf("word %0d tag got %0d exp %0d", n, is_ctrl, ctrl));
      check(payload == pl, "payload");
      check(hdr_corr == hflip, "header correction flag");
      if (ctrl) begin
        check(cwt == cwt_e'(t), $sformatf("word %0d cwt got %0d exp %0d", n, cwt, t));
        check(cwt_corr == cflip, "cwt correction flag");
        check(!cwt_bad, "cwt accepted");
      end
      n_hcorr += hflip; n_ccorr += cflip;
    end
    // an unknown CWT must be flagged
    in_word = {1'b0, ref_ham(4'hB), 56'h0, prev_a ? 3'b011 : 3'b100}; // same polarity: tag flips
    @(posedge clk); #1;
    if (is_ctrl) check(cwt_bad, "unknown cwt flagged");
    check(n_hcorr > 100 && n_ccorr > 100, "corrections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
