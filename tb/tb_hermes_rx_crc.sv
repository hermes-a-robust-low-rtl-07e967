// tb_hermes_rx_crc: self-checking test of the receive CRC check.
// Presents packets as they leave the Rx BRAM, with the transmitted checksum
// beside the packet-end word (first Idle in packet mode, last word in
// streaming mode), computed by a bit-serial reference. One packet in four
// carries a corrupted checksum and, in packet mode, one in ten has none. The
// ok/error pulses and counters must match, and the first, cut packet after
// enabling, and the packet cut by a `resync`, must not be judged.
`timescale 1ns/1ps
module tb_hermes_rx_crc;
  import hermes_pkg::*;
  logic clk = 0, rst = 1, en = 0, resync = 0, valid = 0, crc_flag = 0;
  mode_e mode = MODE_PACKET;
  logic [63:0] data = '0;
  logic [15:0] crc_rx = '0;
  logic crc_ok, crc_err;
  logic [15:0] ok_cnt, err_cnt;
  int checks = 0, failures = 0;
  int exp_ok = 0, exp_err = 0;

  hermes_rx_crc dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] ref_crc(input logic [15:0] c, input logic [63:0] d);
    for (int i = 63; i >= 0; i--) c = (c << 1) ^ (((c >> 15) ^ 16'(d[i])) & 16'h1) * 16'h1021;
    return c;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic v, input logic [63:0] d, input logic f, input logic [15:0] c,
                     input int expect_res);  // 0 none, 1 ok, 2 error
    en = 1; valid = v; data = d; crc_flag = f; crc_rx = c;
    @(posedge clk); #1;
    en = 0; crc_flag = 0;
    check(crc_ok == (expect_res == 1) && crc_err == (expect_res == 2),
          $sformatf("result ok=%0d err=%0d exp %0d", crc_ok, crc_err, expect_res));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] c;
    int len, kind;
    repeat (3) @(posedge clk); #1 rst = 0;
    // packet mode, entering in the middle of a packet
    put(1, 64'h1, 0, 0, 0);
    put(1, 64'h2, 0, 0, 0);
    put(0, 64'h0, 1, 16'h1234, 0);     // cut packet: not judged
    for (int p = 0; p < 60; p++) begin
      len = 1 + $urandom % 8;
      c = 16'hFFFF;
      for (int k = 0; k < len; k++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        c = ref_crc(c, d);
        put(1, d, 0, 0, 0);
      end
      kind = $urandom % 10;
      if (kind < 6)       begin put(0, 0, 1, c, 1);          exp_ok++;  end
      else if (kind < 9)  begin put(0, 0, 1, c ^ 16'h0100, 2); exp_err++; end
      else                begin put(0, 0, 0, 0, 2);          exp_err++; end  // missing
      repeat ($urandom % 3) put(0, 0, 0, 0, 0);
    end
    // a read-pointer correction in the middle of a packet: that packet is not judged
    put(1, 64'h5, 0, 0, 0);
    resync = 1; @(posedge clk); #1 resync = 0;
    put(1, 64'h6, 0, 0, 0);
    put(0, 0, 1, 16'hDEAD, 0);
    // streaming mode: back-to-back, checksum on the last word
    mode = MODE_STREAMING;
    for (int p = 0; p < 60; p++) begin
      len = 1 + $urandom % 8;
      c = 16'hFFFF;
      for (int k = 0; k < len; k++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        c = ref_crc(c, d);
        if (k < len - 1) put(1, d, 0, 0, 0);
        else if ($urandom % 4 != 0) begin put(1, d, 1, c, 1); exp_ok++; end
        else begin put(1, d, 1, ~c, 2); exp_err++; end
      end
    end
    check(ok_cnt == 16'(exp_ok) && err_cnt == 16'(exp_err),
          $sformatf("counters %0d/%0d exp %0d/%0d", ok_cnt, err_cnt, exp_ok, exp_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
