// hermes_decoder: header and Control Word Type decoding (receive link domain).
//
// Takes the 67-bit word {payload (already descrambled), header}. The header
// polarity is decided by a majority of bit 0, bit 1 and the inverted bit 2,
// so any single flipped header bit is corrected. The Data/Control tag is then
// recovered from the polarity sequence: a polarity that toggled means the same
// tag as the previous word, a repeated polarity means the tag changed. For
// Control words the CWT in byte 7 is Hamming(7,4)-decoded, correcting a single
// bit error.
//
// The polarity sequence gives only relative tags, so after `lock` rises the
// decoder first trains on TRAIN words (they are not passed on): it tracks each
// word's tag relative to the first one and counts, for both choices of the
// first word's tag, how many words that would be Control do not carry an
// exact, known CWT codeword. Data words carry random bytes and almost never
// pass, Control words always do, so the choice with fewer misses wins (on a tie,
// the first word is taken as Control: then no word of the window was Data).
//
// Outputs are registered (one cycle after `in_valid`). hdr_corr / cwt_corr flag
// a corrected bit; cwt_bad flags a Control word whose corrected CWT is not a
// known type.
//
// From the protocol: toggling header, third header bit as secondary check,
// Hamming(7,4) on the CWT. This design's choices: the exact majority rule and
// the training procedure that fixes the absolute tag.
module hermes_decoder
  import hermes_pkg::*;
#(
  parameter int unsigned TRAIN = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lock,
  input  logic        in_valid,
  input  logic [66:0] in_word,
  output logic        out_valid,
  output logic        is_ctrl,
  output cwt_e        cwt,
  output logic [63:0] payload,
  output logic        hdr_corr,
  output logic        cwt_corr,
  output logic        cwt_bad
);

  logic first_q, train_q, prev_ctrl_q, prev_pol_q;
  logic [7:0] tcnt_q, miss0_q, miss1_q;
  logic pol, ctrl, corr, cw_exact;
  logic [3:0] cwt_raw;

  assign pol     = hdr_polarity(in_word[2:0]);
  // during training prev_ctrl_q holds the tag relative to the first word (1 = same)
  assign ctrl    = first_q ? 1'b1 : ((pol == prev_pol_q) ? !prev_ctrl_q : prev_ctrl_q);
  assign {corr, cwt_raw} = ham74_dec(in_word[65:59]);
  assign cw_exact = !in_word[66] && !corr &&
                    (cwt_raw inside {CWT_IDLE, CWT_PADDING, CWT_CRC, CWT_ALIGN});

  always_ff @(posedge clk) begin
    if (rst || !lock) begin
      first_q     <= 1'b1;
      train_q     <= 1'b1;
      tcnt_q      <= '0;
      miss0_q     <= '0;
      miss1_q     <= '0;
      prev_ctrl_q <= 1'b1;
      prev_pol_q  <= 1'b0;
      out_valid   <= 1'b0;
      is_ctrl     <= 1'b0;
      cwt         <= CWT_NONE;
      payload     <= '0;
      hdr_corr    <= 1'b0;
      cwt_corr    <= 1'b0;
      cwt_bad     <= 1'b0;
    end else if (train_q) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        first_q    <= 1'b0;
        prev_pol_q <= pol;
        // hypothesis 0: first word Control -> words with ctrl=1 are Control
        if (ctrl  && !cw_exact) miss0_q <= miss0_q + 8'd1;
        if (!ctrl && !cw_exact) miss1_q <= miss1_q + 8'd1;
        if (tcnt_q == 8'(TRAIN - 1)) begin
          train_q     <= 1'b0;
          prev_ctrl_q <= (miss1_q + 8'(!ctrl && !cw_exact) < miss0_q + 8'(ctrl && !cw_exact))
                         ? !ctrl : ctrl;
        end else begin
          prev_ctrl_q <= ctrl;
          tcnt_q      <= tcnt_q + 8'd1;
        end
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev_ctrl_q <= ctrl;
        prev_pol_q  <= pol;
        is_ctrl     <= ctrl;
        payload     <= in_word[66:3];
        hdr_corr    <= !hdr_exact(in_word[2:0]);
        cwt_corr    <= ctrl && corr;
        cwt         <= ctrl ? cwt_e'(cwt_raw) : CWT_NONE;
        cwt_bad     <= ctrl && !(cwt_raw inside {CWT_IDLE, CWT_PADDING, CWT_CRC, CWT_ALIGN});
      end
    end
  end

endmodule
