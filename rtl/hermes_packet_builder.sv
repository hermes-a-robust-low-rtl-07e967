// hermes_packet_builder: per-slot word selection and toggling header (transmit link domain).
//
// In every cycle in which the gearbox takes a word (`ready`), the builder emits
// exactly one 67-bit word {payload, header}:
//   * the FIFO head flagged with the Align Marker bit and not yet announced ->
//     an Align Marker filler (the head stays in the FIFO for the next slot);
//   * otherwise a FIFO head -> popped, sent as a Data word if its Valid Bit is
//     set, else as an Idle control word (CWT Idle in byte 7, bytes 6:0 from the
//     user word);
//   * FIFO empty -> a CRC filler if a checksum is pending, else Padding;
//   * a checksum still pending when the next packet-end word reaches the FIFO
//     head -> the CRC filler is sent first, so a checksum is never overwritten
//     (this borrows a slot; the FIFO absorbs it as long as packets are long
//     enough for the filler bandwidth to carry one checksum each).
// The header follows the Toggling Header rule: the polarity flips on every word
// and is repeated instead when the tag changes between Data and Control.
// Polarity A is 3'b011, B is 3'b100.
//
// Timing: combinational from `ready`, the FIFO head and the filler word; the
// header state advances on the clock edge of each accepted slot. `ev_*` are
// one-cycle event strobes for status and test.
//
// From the protocol: Data/Idle/filler selection, fillers when the FIFO is
// empty, the toggling header rule. This design's choices: header bit patterns,
// reset state (previous word Control, polarity B), where the Align Marker
// filler is placed and the early CRC filler.
module hermes_packet_builder
  import hermes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ready,
  input  fifo_word_t  fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  input  logic        crc_pending,
  input  logic [63:0] filler_word,
  output cwt_e        filler_type,
  output logic        crc_sent,
  output logic [66:0] word,        // {payload[63:0], header[2:0]}, payload unscrambled
  output logic        ev_data,
  output logic        ev_idle,
  output logic        ev_pad,
  output logic        ev_crc,
  output logic        ev_align
);

  logic align_sent_q, prev_ctrl_q, prev_pol_q;
  logic is_ctrl, pol;
  logic [63:0] payload;
  logic send_crc_early, send_align, send_fifo;

  assign send_crc_early = !fifo_empty && fifo_rdata.crc_trig && crc_pending;
  assign send_align     = !fifo_empty && fifo_rdata.align && !align_sent_q && !send_crc_early;
  assign send_fifo      = !fifo_empty && !send_align && !send_crc_early;

  always_comb begin
    filler_type = crc_pending ? CWT_CRC : CWT_PADDING;
    if (send_align) filler_type = CWT_ALIGN;
    if (send_fifo) begin
      is_ctrl = !fifo_rdata.valid;
      payload = fifo_rdata.valid ? fifo_rdata.data
                                 : {1'b0, ham74_enc(CWT_IDLE), fifo_rdata.data[55:0]};
    end else begin
      is_ctrl = 1'b1;
      payload = filler_word;
    end
    pol  = (is_ctrl == prev_ctrl_q) ? !prev_pol_q : prev_pol_q;
    word = {payload, pol ? HDR_A : HDR_B};
  end

  assign fifo_rd  = ready && send_fifo;
  assign crc_sent = ready && crc_pending && (fifo_empty || send_crc_early);
  assign ev_data  = ready && send_fifo && fifo_rdata.valid;
  assign ev_idle  = ready && send_fifo && !fifo_rdata.valid;
  assign ev_align = ready && send_align;
  assign ev_crc   = crc_sent;
  assign ev_pad   = ready && fifo_empty && !crc_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      align_sent_q <= 1'b0;
      prev_ctrl_q  <= 1'b1;
      prev_pol_q   <= 1'b0;
    end else if (ready) begin
      prev_ctrl_q <= is_ctrl;
      prev_pol_q  <= pol;
      if (send_align)     align_sent_q <= 1'b1;
      else if (send_fifo) align_sent_q <= 1'b0;
    end
  end

endmodule
