// hermes_rx_gearbox: 64b/67b receive gearbox with bit slip (receive link domain).
//
// Collects the 64-bit words from the transceiver (bit 0 first) and hands out
// 67-bit coded words whenever enough bits have gathered: 64 words in every 67
// cycles. A `slip` pulse discards one received bit, shifting the word
// boundary by one; the word-lock logic slips until the headers look right.
// `dout`/`dout_valid` are registered: one cycle latency.
//
// This block has no counterpart drawn in the protocol's block diagram; it is
// the receive half of the 64b/67b encoding and its design is this design's own.
module hermes_rx_gearbox (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] din,
  input  logic        slip,
  output logic [66:0] dout,
  output logic        dout_valid
);

  logic [130:0] buf_q, comb;
  logic [7:0]   cnt_q, cnt_n;   // valid bits in buf_q, 0..66 between cycles

  always_comb begin
    comb  = buf_q | ({67'd0, din} << cnt_q);
    cnt_n = cnt_q + 8'd64;
    if (slip) begin
      comb  = comb >> 1;
      cnt_n = cnt_n - 8'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q      <= '0;
      cnt_q      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else if (cnt_n >= 8'd67) begin
      dout       <= comb[66:0];
      dout_valid <= 1'b1;
      buf_q      <= comb >> 67;
      cnt_q      <= cnt_n - 8'd67;
    end else begin
      dout_valid <= 1'b0;
      buf_q      <= comb;
      cnt_q      <= cnt_n;
    end
  end

endmodule
