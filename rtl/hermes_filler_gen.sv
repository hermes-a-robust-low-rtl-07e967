// hermes_filler_gen: filler word generator and CRC reassembly (transmit link domain).
//
// Filler words fill the link bandwidth that the algorithm does not use. Three
// kinds exist: Padding, CRC and Align Marker fillers. All share one layout:
// byte 7 carries the Hamming(7,4)-coded Control Word Type, bytes 5:4 the CRC,
// bytes 3:1 user information and byte 0 the link id.
//
// The transmit CRC reaches the link domain in four 4-bit chunks on four
// consecutive FIFO words, the first flagged with crc_trig. This block collects
// them as words are popped; when the fourth chunk arrives the checksum becomes
// pending (`crc_pending`) until the packet builder spends a filler slot on it
// (`crc_sent`). It also counts how many FIFO words were popped after the
// packet-end word; that distance goes into byte 6 of the CRC filler so the
// receiver can attach the checksum to the right word. A new packet end that
// arrives while an older checksum is still pending replaces it and sets
// `crc_overrun`.
//
// Interface: `pop` with `pop_word` for every FIFO word consumed; `req_type`
// selects the filler that `filler_word` shows (combinational).
//
// From the protocol: the three filler kinds, the Table 2 field layout, CRC in
// four chunks. This design's choices: the CWT code points and the use of the
// reserved byte 6 for the distance.
module hermes_filler_gen
  import hermes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  link_id,
  input  logic [23:0] user_info,
  input  logic        pop,
  input  fifo_word_t  pop_word,
  input  cwt_e        req_type,
  input  logic        crc_sent,     // a CRC filler goes out this cycle
  output logic [63:0] filler_word,
  output logic        crc_pending,
  output logic        crc_overrun
);

  logic        coll_q;
  logic [1:0]  idx_q;
  logic [11:0] asm_q;
  logic [7:0]  dist_q;
  logic        pend_q;
  logic [15:0] pend_crc_q;
  logic [7:0]  pend_dist_q;

  assign crc_pending = pend_q;

  always_comb begin
    filler_word        = '0;
    filler_word[62:56] = ham74_enc(req_type);
    filler_word[31:8]  = user_info;
    filler_word[7:0]   = link_id;
    if (req_type == CWT_CRC) begin
      filler_word[55:48] = pend_dist_q;
      filler_word[47:32] = pend_crc_q;
    end
  end

  function automatic logic [7:0] sat_inc(input logic [7:0] v);
    return (v == 8'hFF) ? v : v + 8'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      coll_q      <= 1'b0;
      idx_q       <= 2'd0;
      asm_q       <= '0;
      dist_q      <= '0;
      pend_q      <= 1'b0;
      pend_crc_q  <= '0;
      pend_dist_q <= '0;
      crc_overrun <= 1'b0;
    end else begin
      if (crc_sent) pend_q <= 1'b0;
      if (pop) begin
        if (pend_q && !crc_sent) pend_dist_q <= sat_inc(pend_dist_q);
        if (pop_word.crc_trig) begin
          coll_q     <= 1'b1;
          idx_q      <= 2'd1;
          asm_q[3:0] <= pop_word.crc_nib;
          dist_q     <= 8'd0;
          if (coll_q) crc_overrun <= 1'b1;
        end else if (coll_q) begin
          dist_q <= sat_inc(dist_q);
          if (idx_q == 2'd3) begin
            coll_q      <= 1'b0;
            idx_q       <= 2'd0;
            if (pend_q && !crc_sent) crc_overrun <= 1'b1;
            pend_q      <= 1'b1;
            pend_crc_q  <= {pop_word.crc_nib, asm_q};
            pend_dist_q <= sat_inc(dist_q);
          end else begin
            asm_q[4*idx_q +: 4] <= pop_word.crc_nib;
            idx_q <= idx_q + 2'd1;
          end
        end
      end
    end
  end

endmodule
