// tb_hermes_packet_builder: self-checking test of slot selection and the toggling header.
// A queue stands in for the Tx FIFO and a fixed pattern for the filler word.
// With a random `ready`, every accepted slot is checked against the rules:
// CRC filler ahead of a packet-end word while a checksum is still pending,
// Align Marker filler ahead of a flagged word, Data for valid words, Idle
// (Hamming-coded CWT + 56 user bits) for invalid ones, CRC filler when pending,
// Padding otherwise; the header polarity must toggle unless the Data/Control
// tag changed, and each header must be 3'b011 or 3'b100.
`timescale 1ns/1ps
module tb_hermes_packet_builder;
  import hermes_pkg::*;
  logic clk = 0, rst = 1, ready = 0;
  fifo_word_t fifo_rdata;
  logic fifo_empty, fifo_rd, crc_pending = 0, crc_sent;
  logic [63:0] filler_word;
  cwt_e filler_type;
  logic [66:0] word;
  logic ev_data, ev_idle, ev_pad, ev_crc, ev_align;
  int checks = 0, failures = 0;
  fifo_word_t q[$];
  int n_data = 0, n_idle = 0, n_pad = 0, n_crc = 0, n_align = 0, n_early = 0;

  hermes_packet_builder dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty  = (q.size() == 0);
  assign fifo_rdata  = fifo_empty ? '0 : q[0];
  assign filler_word = {8'hEE, 52'h0, 4'(filler_type)};

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
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic prev_ctrl = 1, prev_a = 0, align_done = 0;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic exp_ctrl, exp_a;
      logic [63:0] exp_pl;
      // random producer
      if ($urandom % 3 == 0 && q.size() < 8) begin
        fifo_word_t w;
        w = '0; w.data = {$urandom, $urandom}; w.valid = $urandom % 4 != 0;
        w.align = ($urandom % 10 == 0);
        w.crc_trig = ($urandom % 6 == 0);
        q.push_back(w);
      end
      if ($urandom % 20 == 0) crc_pending = 1;
      ready = ($urandom % 8) != 0;
      #1;
      if (ready) begin
        if (!fifo_empty && q[0].crc_trig && crc_pending) begin
          exp_ctrl = 1; exp_pl = {8'hEE, 52'h0, 4'h3};
          check(crc_sent && ev_crc && !fifo_rd, "early crc filler"); n_crc++; n_early++;
        end else if (!fifo_empty && q[0].align && !align_done) begin
          exp_ctrl = 1; exp_pl = {8'hEE, 52'h0, 4'h4};
          check(ev_align && !fifo_rd, "align filler first"); n_align++;
          align_done = 1;
        end else if (!fifo_empty) begin
          exp_ctrl = !q[0].valid;
          exp_pl = q[0].valid ? q[0].data : {1'b0, ref_ham(4'h1), q[0].data[55:0]};
          check(fifo_rd, "pop");
          if (q[0].valid) n_data++; else n_idle++;
          align_done = 0;
        end else if (crc_pending) begin
          exp_ctrl = 1; exp_pl = {8'hEE, 52'h0, 4'h3};
          check(crc_sent && ev_crc, "crc filler"); n_crc++;
        end else begin
          exp_ctrl = 1; exp_pl = {8'hEE, 52'h0, 4'h2};
          check(ev_pad, "padding"); n_pad++;
        end
        exp_a = (exp_ctrl == prev_ctrl) ? !prev_a : prev_a;
        check(word[66:3] == exp_pl, $sformatf("payload %h exp %h", word[66:3], exp_pl));
        check(word[2:0] == (exp_a ? 3'b011 : 3'b100), $sformatf("header %b", word[2:0]));
        prev_ctrl = exp_ctrl; prev_a = exp_a;
      end else begin
        check(!fifo_rd && !crc_sent, "idle slot");
      end
      begin
        logic pop_now, crc_now;
        pop_now = fifo_rd; crc_now = crc_sent;
        @(posedge clk); #1;
        if (pop_now) void'(q.pop_front());
        if (crc_now) crc_pending = 0;
      end
    end
    check(n_data > 0 && n_idle > 0 && n_pad > 0 && n_crc > 0 && n_align > 0 && n_early > 0, "all kinds seen");
    $display("data %0d idle %0d pad %0d crc %0d align %0d", n_data, n_idle, n_pad, n_crc, n_align);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
