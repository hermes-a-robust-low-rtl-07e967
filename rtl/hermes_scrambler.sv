// hermes_scrambler: IEEE 802.3 self-synchronous scrambler, 64 bits per cycle.
//
// Polynomial 1 + x^39 + x^58, as used by 10 Gb/s Ethernet. Bit 0 of `din` is
// the first bit in time. Each scrambled bit is the data bit XOR the scrambled
// bits sent 39 and 58 bit times earlier; the 58-bit history advances only in
// cycles with `en` high. The output is combinational from `din` and the
// registered history. The header is not scrambled (it is balanced by toggling).
//
// From the protocol: the 802.3 scrambling method on every 64-bit word. This
// design's choices: bit order and leaving the header out.
module hermes_scrambler (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [63:0] din,
  output logic [63:0] dout
);

  logic [57:0] st_q, st_n;

  always_comb begin
    st_n = st_q;
    for (int i = 0; i < 64; i++) begin
      dout[i] = din[i] ^ st_n[38] ^ st_n[57];
      st_n    = {st_n[56:0], dout[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     st_q <= '1;
    else if (en) st_q <= st_n;
  end

endmodule
