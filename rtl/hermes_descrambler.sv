// hermes_descrambler: IEEE 802.3 self-synchronous descrambler, 64 bits per cycle.
//
// Inverse of hermes_scrambler (1 + x^39 + x^58): each output bit is the received
// bit XOR the received bits 39 and 58 bit times earlier. Being self-synchronous
// it needs no alignment with the transmitter; after a word slip only the first
// 58 bits are wrong. The history advances in cycles with `en` high; the output
// is combinational.
module hermes_descrambler (
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
      st_n    = {st_n[56:0], din[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     st_q <= '0;
    else if (en) st_q <= st_n;
  end

endmodule
