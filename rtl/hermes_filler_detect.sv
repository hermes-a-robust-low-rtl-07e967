// hermes_filler_detect: filler removal and marker generation (receive link domain).
//
// Sorts the decoded words. Data and Idle words belong to the algorithm
// bandwidth and are written to the Rx BRAM (Idle words with the Valid Bit
// clear and their bytes 6:0 kept). Filler words are removed:
//   * Padding: only its link metadata is kept;
//   * CRC: the 16-bit checksum and the distance in byte 6 are handed to the
//     BRAM, which stores the checksum beside the packet-end word;
//   * Align Marker: the next stored word is flagged as alignment marker.
// In packet mode the first Data word after an Idle (rising edge of Valid) is
// flagged as the alignment (Data Start) marker as well. Link id and user info
// from the most recent filler are presented as status. Words are accepted only
// while `link_up` is high. Outputs are registered (one cycle latency).
//
// From the protocol: filler removal in the receive link domain, Idles kept,
// the Data Start marker at the rising edge of Valid, Align Marker fillers,
// CRC and metadata in fillers. This design's choices: the distance field and
// marking the word that follows an Align Marker filler.
module hermes_filler_detect
  import hermes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        link_up,
  input  mode_e       mode,
  input  logic        in_valid,
  input  logic        is_ctrl,
  input  cwt_e        cwt,
  input  logic [63:0] payload,
  output logic        wr_en,
  output bram_word_t  wr_word,
  output logic        crc_we,
  output logic [15:0] crc_val,
  output logic [7:0]  crc_dist,
  output logic [7:0]  rx_link_id,
  output logic [23:0] rx_user_info,
  output logic        ev_filler,
  output logic        ev_marker,
  output logic        ev_bad
);

  logic prev_valid_q, align_pend_q;
  logic marker;

  always_comb begin
    marker = align_pend_q;
    if (mode == MODE_PACKET && !is_ctrl && !prev_valid_q) marker = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_valid_q <= 1'b1;
      align_pend_q <= 1'b0;
      wr_en        <= 1'b0;
      wr_word      <= '0;
      crc_we       <= 1'b0;
      crc_val      <= '0;
      crc_dist     <= '0;
      rx_link_id   <= '0;
      rx_user_info <= '0;
      ev_filler    <= 1'b0;
      ev_marker    <= 1'b0;
      ev_bad       <= 1'b0;
    end else begin
      wr_en     <= 1'b0;
      crc_we    <= 1'b0;
      ev_filler <= 1'b0;
      ev_marker <= 1'b0;
      ev_bad    <= 1'b0;
      if (!link_up) begin
        prev_valid_q <= 1'b1;   // no Data Start marker for a packet already running
        align_pend_q <= 1'b0;
      end else if (in_valid) begin
        if (!is_ctrl || cwt == CWT_IDLE) begin
          wr_en          <= 1'b1;
          wr_word        <= '0;
          wr_word.valid  <= !is_ctrl;
          wr_word.data   <= is_ctrl ? {8'd0, payload[55:0]} : payload;
          wr_word.marker <= marker;
          ev_marker      <= marker;
          prev_valid_q   <= !is_ctrl;
          align_pend_q   <= 1'b0;
        end else if (cwt inside {CWT_PADDING, CWT_CRC, CWT_ALIGN}) begin
          ev_filler    <= 1'b1;
          rx_link_id   <= payload[7:0];
          rx_user_info <= payload[31:8];
          if (cwt == CWT_CRC) begin
            crc_we   <= 1'b1;
            crc_val  <= payload[47:32];
            crc_dist <= payload[55:48];
          end
          if (cwt == CWT_ALIGN) align_pend_q <= 1'b1;
        end else begin
          ev_bad <= 1'b1;
        end
      end
    end
  end

endmodule
