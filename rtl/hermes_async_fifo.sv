// hermes_async_fifo: the Tx FIFO between the algorithm and link clock domains.
//
// A dual-clock FIFO with Gray-coded pointers. Each pointer is one bit wider than
// the address so full and empty can be told apart; each side sees the other's
// pointer through a two-flop synchronizer, so `empty` and `full` are
// conservative (they clear two to three cycles late). Read data is the head
// word, valid while `empty` is low; `rd_en` pops it. Writes into a full FIFO are
// dropped and reported on `overflow` (the protocol keeps the algorithm clock
// slower than the link word rate, so this should not happen).
//
// From the protocol: a FIFO, 72 bits wide, between algorithm block and
// transceiver. This design's choices: depth 16 and the Gray-pointer scheme.
module hermes_async_fifo #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] wgray_s1, wgray_s2, rgray_s1, rgray_s2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign full   = (wgray_q == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wbin_n = wbin_q + (AW+1)'(1);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_s1 <= rgray_q;
      rgray_s2 <= rgray_s1;
      if (we && !full) begin
        wbin_q  <= wbin_n;
        wgray_q <= bin2gray(wbin_n);
      end
      if (we && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin_q[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  assign empty  = (rgray_q == wgray_s2);
  assign rbin_n = rbin_q + (AW+1)'(1);
  assign rdata  = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray_q;
      wgray_s2 <= wgray_s1;
      if (rd_en && !empty) begin
        rbin_q  <= rbin_n;
        rgray_q <= bin2gray(rbin_n);
      end
    end
  end

endmodule
