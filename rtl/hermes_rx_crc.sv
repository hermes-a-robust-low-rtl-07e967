// hermes_rx_crc: receive-side CRC check (algorithm clock domain).
//
// Recomputes the 16-bit CRC (CRC-16-CCITT, init 0xFFFF, bit 63 first) over the
// valid words read from the Rx BRAM and compares it with the transmitted
// checksum, which arrives beside the packet-end word (`crc_flag`). The
// packet-end word is the first Idle after the packet in packet mode and the
// last word of the packet in streaming mode; in both cases the value compared
// is the CRC including the word if it is valid. In packet mode a falling edge of
// Valid without a checksum is an error too. Checking starts at the first packet
// boundary after `en` rises, so a packet cut by the start of reading is not
// judged; `resync` (a read-pointer correction that repeats words) restarts
// that rule. `crc_ok` / `crc_err` pulse one cycle after the packet-end word;
// ok_cnt / err_cnt count them (saturating).
//
// From the protocol: an independent receive CRC in the algorithm domain,
// enabled by the Valid Bit. This design's choices: polynomial, the missing-CRC
// rule and the start condition.
module hermes_rx_crc
  import hermes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        resync,
  input  mode_e       mode,
  input  logic        valid,
  input  logic [63:0] data,
  input  logic        crc_flag,
  input  logic [15:0] crc_rx,
  output logic        crc_ok,
  output logic        crc_err,
  output logic [15:0] ok_cnt,
  output logic [15:0] err_cnt
);

  logic [15:0] crc_q, crc_word, crc_fin;
  logic        prev_valid_q, armed_q;
  logic        boundary;

  assign crc_word = crc16_word(crc_q, data);
  assign crc_fin  = valid ? crc_word : crc_q;
  assign boundary = crc_flag || (mode == MODE_PACKET && !valid && prev_valid_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      crc_q        <= CRC_INIT;
      prev_valid_q <= 1'b1;
      armed_q      <= 1'b0;
      crc_ok       <= 1'b0;
      crc_err      <= 1'b0;
      ok_cnt       <= '0;
      err_cnt      <= '0;
    end else begin
      crc_ok  <= 1'b0;
      crc_err <= 1'b0;
      if (resync) begin
        crc_q   <= CRC_INIT;
        armed_q <= 1'b0;
      end else if (en) begin
        prev_valid_q <= valid;
        if (boundary || (mode == MODE_PACKET && !valid)) begin
          crc_q   <= CRC_INIT;
          armed_q <= 1'b1;
        end else if (valid) begin
          crc_q <= crc_word;
        end
        if (boundary && armed_q) begin
          if (crc_flag && crc_fin == crc_rx) begin
            crc_ok <= 1'b1;
            if (ok_cnt != 16'hFFFF) ok_cnt <= ok_cnt + 16'd1;
          end else begin
            crc_err <= 1'b1;
            if (err_cnt != 16'hFFFF) err_cnt <= err_cnt + 16'd1;
          end
        end
      end
    end
  end

endmodule
