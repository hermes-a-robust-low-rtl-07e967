// tb_hermes_rx_bram: self-checking test of the Rx BRAM and its pointer control.
// The link side (5 ns clock) writes numbered words in 5 of every 6 cycles and
// uses the sixth for a CRC hand-over at a random distance; the algorithm side
// (6 ns clock) reads one word per cycle, the same average rate. Checks: reading
// starts RD_OFFSET words behind, words come out consecutively, each checksum
// appears beside exactly the word it was addressed to, a read-pointer
// correction of `adj` makes the sequence step back by adj-1, and the pointer
// distance never leaves its range. `out_jump` must mark exactly the first
// word read after each correction.
`timescale 1ns/1ps
module tb_hermes_rx_bram;
  import hermes_pkg::*;
  localparam int RD_OFFSET = 16;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic we = 0, crc_we = 0;
  bram_word_t wdata = '0;
  logic [15:0] crc_val = '0;
  logic [7:0] crc_dist = '0;
  logic rd_start = 0, adj_valid = 0;
  logic [7:0] adj = '0;
  logic out_en, out_crc_flag, out_jump, ptr_err;
  bram_word_t out_word;
  logic [15:0] out_crc;
  int checks = 0, failures = 0;
  int wcount = 0;
  logic [15:0] crc_of [int];   // expected checksum per word number

  hermes_rx_bram #(.DEPTH(512), .RD_OFFSET(RD_OFFSET)) dut (.*);
  always #2.5 wclk = ~wclk;
  always #3.0 rclk = ~rclk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // link side writer
  initial begin
    int phase;
    phase = 0;
    repeat (3) @(posedge wclk); wrst <= 0;
    forever begin
      @(posedge wclk);
      we <= 0; crc_we <= 0;
      if (phase != 5) begin
        we <= 1;
        wdata <= '0;
        wdata.data <= 64'(wcount);
        wdata.valid <= 1'b1;
        wcount++;
      end else if (wcount > 40 && ($urandom % 2 == 0)) begin
        int d;
        logic [15:0] v;
        d = $urandom % 8;
        v = 16'($urandom);
        crc_we   <= 1;
        crc_dist <= 8'(d);
        crc_val  <= v;
        crc_of[wcount - 1 - d] = v;
      end
      phase = (phase + 1) % 6;
    end
  end


  initial begin
    longint exp_seq;
    bit first;
    int n_flag, n_adj;
    bit jump_next;
    jump_next = 0;
    first = 1; n_flag = 0; n_adj = 0;
    repeat (3) @(posedge rclk); rrst <= 0;
    repeat (10) @(posedge rclk); rd_start <= 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(posedge rclk); #0.1;
      adj_valid = 0;
      if (out_en) begin
        if (first) begin
          check(int'(out_word.data) <= wcount - RD_OFFSET + 2 && int'(out_word.data) + RD_OFFSET + 8 >= wcount,
                $sformatf("start distance: first %0d written %0d", out_word.data, wcount));
          exp_seq = longint'(out_word.data);
          first = 0;
        end
        check(out_word.data == 64'(exp_seq), $sformatf("seq got %0d exp %0d", out_word.data, exp_seq));
        if (crc_of.exists(int'(exp_seq))) begin
          check(out_crc_flag && out_crc == crc_of[int'(exp_seq)], $sformatf("crc at %0d", exp_seq));
          n_flag++;
        end else begin
          check(!out_crc_flag, $sformatf("no crc flag at %0d", exp_seq));
        end
        check(out_jump == jump_next, $sformatf("jump flag %0d at %0d", out_jump, exp_seq));
        jump_next = 0;
        exp_seq++;
        if (cyc % 1000 == 500) begin
          // pointer correction: next word comes adj-1 words earlier
          adj = 8'(2 + $urandom % 6);
          adj_valid = 1;
          n_adj++;
          @(posedge rclk); #0.1;
          adj_valid = 0;
          check(out_word.data == 64'(exp_seq), "word in the adjust cycle");
          check(!out_jump, "no jump flag in the adjust cycle");
          jump_next = 1;
          exp_seq = exp_seq + 1 - longint'(adj);
        end
      end
    end
    check(!ptr_err, "pointer distance stayed in range");
    check(n_flag > 100 && n_adj > 3, "crc flags and adjustments exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
