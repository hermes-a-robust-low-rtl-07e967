// tb_hermes_filler_detect: self-checking test of filler removal.
// Feeds a random mix of Data, Idle, Padding, CRC and Align Marker words (as the
// decoder delivers them) in packet and in streaming mode. Checks that exactly
// the Data and Idle words reach the BRAM write port, in order, with the right
// Valid Bit and payload, that the marker flag sits on each word after an Align
// filler and (packet mode) on each rising edge of Valid, that CRC fillers hand
// over checksum and distance, and that link metadata is captured.
`timescale 1ns/1ps
module tb_hermes_filler_detect;
  import hermes_pkg::*;
  logic clk = 0, rst = 1, link_up = 0, in_valid = 0, is_ctrl = 0;
  mode_e mode = MODE_PACKET;
  cwt_e cwt = CWT_NONE;
  logic [63:0] payload = '0;
  logic wr_en, crc_we, ev_filler, ev_marker, ev_bad;
  bram_word_t wr_word;
  logic [15:0] crc_val;
  logic [7:0] crc_dist, rx_link_id;
  logic [23:0] rx_user_info;
  int checks = 0, failures = 0;
  int n_mark = 0, n_crc = 0;

  hermes_filler_detect dut (.*);
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

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0; link_up = 1;
    for (int m = 0; m < 2; m++) begin
      logic prev_v, pend;
      mode = (m != 0) ? MODE_STREAMING : MODE_PACKET;
      prev_v = 1; pend = 0;
      // start with an Idle so the first packet edge is seen
      for (int n = 0; n < 3000; n++) begin
        int k;
        k = (n == 0) ? 1 : $urandom % 5;   // 0 data 1 idle 2 pad 3 crc 4 align
        payload = {$urandom, $urandom};
        in_valid = 1;
        is_ctrl = (k != 0);
        cwt = (k == 0) ? CWT_NONE : cwt_e'(k);
        @(posedge clk); #1;
        in_valid = 0;
        if (k <= 1) begin
          logic em;
          em = pend || (mode == MODE_PACKET && k == 0 && !prev_v);
          check(wr_en && !crc_we, "word written");
          check(wr_word.valid == (k == 0), "valid bit");
          check(wr_word.data == (k == 0 ? payload : {8'h0, payload[55:0]}), "payload kept");
          check(wr_word.marker == em, $sformatf("marker got %0d exp %0d (mode %0d)", wr_word.marker, em, m));
          n_mark += em;
          prev_v = (k == 0); pend = 0;
        end else begin
          check(!wr_en, "filler removed");
          check(rx_link_id == payload[7:0] && rx_user_info == payload[31:8], "metadata");
          if (k == 3) begin
            check(crc_we && crc_val == payload[47:32] && crc_dist == payload[55:48], "crc handed over");
            n_crc++;
          end else check(!crc_we, "no crc");
          if (k == 4) pend = 1;
        end
      end
    end
    // a Control word with an unknown type is dropped and flagged
    in_valid = 1; is_ctrl = 1; cwt = cwt_e'(4'd9);
    @(posedge clk); #1 in_valid = 0;
    check(!wr_en && ev_bad, "unknown type dropped");
    check(n_mark > 100 && n_crc > 100, "markers and crc exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
