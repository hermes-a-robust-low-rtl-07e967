// hermes_tx_crc: transmit-side CRC and FIFO word former (algorithm clock domain).
//
// Every algorithm clock with `en` high, the user word (64-bit data plus the
// Valid Bit) is turned into one 72-bit Tx FIFO word. A 16-bit CRC runs over the
// valid words of the current packet. The packet end is found as the protocol
// defines it for each mode: in packet mode the falling edge of Valid (so the
// first Idle after the packet is the packet-end word), in streaming mode the
// word that carries the End of Packet bit. The finished checksum crosses the
// clock domain in four 4-bit chunks: chunk 0 (CRC[3:0]) on the packet-end word,
// flagged with `crc_trig`, and chunks 1..3 on the three following words. The
// Align Marker bit is passed on in streaming mode only; in packet mode the
// receiver makes its own marker from the rising edge of Valid.
//
// Timing: fifo_wdata is combinational from the inputs; the CRC state updates
// on the clock edge where the word is written. crc_done/crc_value pulse with
// the packet-end word.
//
// From the protocol: 16-bit CRC computed in the algorithm domain, enabled by
// Valid; four 4-bit chunks over four of the 72 FIFO bits; the two mode rules.
// This design's choices: CRC-16-CCITT, init 0xFFFF, chunk order, FIFO bit
// positions, and streaming packets of at least four words.
module hermes_tx_crc
  import hermes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,        // a word is presented and written this cycle
  input  mode_e       mode,
  input  logic [63:0] data,
  input  logic        valid,
  input  logic        eop,       // End of Packet bit (streaming mode)
  input  logic        align,     // Align Marker bit (streaming mode)
  output fifo_word_t  fifo_wdata,
  output logic        fifo_we,
  output logic        crc_done,  // packet-end word this cycle
  output logic [15:0] crc_value  // checksum of the packet that ends
);

  logic [15:0] crc_q, crc_hold_q;
  logic        prev_valid_q;
  logic [1:0]  chunk_q;          // index of the next chunk to send, 0 = none
  logic        trig;
  logic [15:0] crc_word, crc_fin;

  assign crc_word = crc16_word(crc_q, data);
  assign crc_fin  = valid ? crc_word : crc_q;
  assign trig     = (mode == MODE_PACKET) ? (!valid && prev_valid_q) : (valid && eop);

  always_comb begin
    fifo_wdata          = '0;
    fifo_wdata.data     = data;
    fifo_wdata.valid    = valid;
    fifo_wdata.align    = (mode == MODE_STREAMING) && align;
    fifo_wdata.crc_trig = trig;
    if (trig)
      fifo_wdata.crc_nib = crc_fin[3:0];
    else if (chunk_q != 2'd0)
      fifo_wdata.crc_nib = crc_hold_q[4*chunk_q +: 4];
  end

  assign fifo_we   = en;
  assign crc_done  = en && trig;
  assign crc_value = crc_fin;

  always_ff @(posedge clk) begin
    if (rst) begin
      crc_q        <= CRC_INIT;
      crc_hold_q   <= '0;
      prev_valid_q <= 1'b0;
      chunk_q      <= 2'd0;
    end else if (en) begin
      prev_valid_q <= valid;
      if (trig) begin
        crc_q      <= CRC_INIT;
        crc_hold_q <= crc_fin;
        chunk_q    <= 2'd1;
      end else begin
        if (valid) crc_q <= crc_word;
        if (chunk_q != 2'd0) chunk_q <= chunk_q + 2'd1;  // 3 wraps to 0
      end
    end
  end

endmodule
