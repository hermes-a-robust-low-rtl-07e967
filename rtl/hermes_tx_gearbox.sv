// hermes_tx_gearbox: 64b/67b transmit gearbox (transmit link domain).
//
// Packs the 67-bit coded words {payload, header} into the 64-bit parallel
// interface of the transceiver, least significant bit first. A residue of up
// to 66 bits is kept. When fewer than 64 bits are left over, the gearbox takes
// a new word (`ready` high, residue grows by 3); otherwise it sends 64 bits
// from the residue alone. It therefore takes 64 words in every 67 cycles,
// which is the 3/64 = 4.69 % overhead of the 67-bit code, and `ready` paces
// the packet builder. `dout` is registered: one cycle latency.
//
// From the protocol: the 64b/67b gearbox and its place next to the packet
// builder. This design's choices: the 64-bit transceiver width and the
// residue scheme.
module hermes_tx_gearbox (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,
  input  logic [66:0] din,
  output logic [63:0] dout
);

  logic [66:0]  res_q;     // residue, valid bits at the bottom
  logic [6:0]   cnt_q;     // number of valid residue bits, 0..66
  logic [130:0] comb;

  assign ready = (cnt_q < 7'd64);

  always_comb begin
    comb = {64'd0, res_q};
    if (ready) comb = comb | ({64'd0, din} << cnt_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      res_q <= '0;
      cnt_q <= '0;
      dout  <= '0;
    end else begin
      dout  <= comb[63:0];
      res_q <= comb[130:64];
      cnt_q <= ready ? cnt_q + 7'd3 : cnt_q - 7'd64;
    end
  end

endmodule
