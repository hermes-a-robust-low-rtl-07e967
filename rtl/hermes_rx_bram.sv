// hermes_rx_bram: Rx BRAM with pointer control (link domain write, algorithm domain read).
//
// A dual-port memory of DEPTH 72-bit words. The write side, in the receive
// link clock, stores every Data and Idle word at the write pointer. A side
// table of DEPTH x 17 bits holds the received checksum: a CRC filler arrives
// `crc_dist` words after its packet-end word, so its value is stored at
// address wr_ptr - 1 - crc_dist with a flag; every normal write clears the
// flag of its own address.
//
// The read side, in the algorithm clock, starts once `rd_start` is high and at
// least RD_OFFSET words have been written: the read pointer is set RD_OFFSET
// words behind the (synchronized, Gray-coded) write pointer and then advances
// one word per algorithm clock, the same average rate at which words arrive,
// so the distance stays constant apart from filler jitter. `adj_valid` moves
// the read pointer back by `adj` words: the channel-bonding correction. Read
// data is registered (one cycle, like a block RAM) and comes with `out_en`;
// `out_jump` marks the first word read from the corrected pointer (two cycles
// after `adj_valid`), so checks downstream know the sequence stepped back.
// `ptr_err` is set if the synchronized distance leaves 1..DEPTH-2 words.
// When `rd_start` falls (link lost or receiver reset) reading stops; it starts
// afresh, with a new read pointer, once the link is up and refilled again.
// `ptr_err` covers the time since reading last started: a reset of the write side
// can set it in the cycles before `rd_start` falls, and a restart clears it.
//
// From the protocol: a dual-port BRAM in the receive path, filled in the link
// domain and read in the algorithm domain, with a read pointer that the
// alignment moves. This design's choices: depth, start distance, the side table
// for the checksum.
module hermes_rx_bram
  import hermes_pkg::*;
#(
  parameter int unsigned DEPTH     = 512,  // power of two
  parameter int unsigned RD_OFFSET = 32
) (
  // write side (receive link clock)
  input  logic        wclk,
  input  logic        wrst,
  input  logic        we,
  input  bram_word_t  wdata,
  input  logic        crc_we,
  input  logic [15:0] crc_val,
  input  logic [7:0]  crc_dist,
  // read side (algorithm clock)
  input  logic        rclk,
  input  logic        rrst,
  input  logic        rd_start,
  input  logic        adj_valid,
  input  logic [7:0]  adj,
  output logic        out_en,
  output bram_word_t  out_word,
  output logic        out_crc_flag,
  output logic [15:0] out_crc,
  output logic        out_jump,     // first word read after a non-zero correction
  output logic        ptr_err
);

  localparam int unsigned AW = $clog2(DEPTH);

  bram_word_t  mem  [DEPTH];
  logic [16:0] side [DEPTH];

  // ---------------- write side ----------------
  logic [AW:0] wptr_q, wgray_q;
  logic        filled_q;
  logic [AW:0] wptr_n;
  logic [AW-1:0] side_addr;
  logic [16:0]   side_data;

  assign wptr_n    = wptr_q + (AW+1)'(1);
  assign side_addr = crc_we ? (wptr_q[AW-1:0] - AW'(1) - AW'(crc_dist)) : wptr_q[AW-1:0];
  assign side_data = crc_we ? {1'b1, crc_val} : 17'd0;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr_q   <= '0;
      wgray_q  <= '0;
      filled_q <= 1'b0;
    end else if (we) begin
      wptr_q  <= wptr_n;
      wgray_q <= wptr_n ^ (wptr_n >> 1);
      if (wptr_n >= (AW+1)'(RD_OFFSET)) filled_q <= 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (we) mem[wptr_q[AW-1:0]] <= wdata;
    if (we || crc_we) side[side_addr] <= side_data;
  end

  // ---------------- read side ----------------
  logic [AW:0] wg_s1, wg_s2, wbin_s;
  logic        filled_s;
  logic        active_q;
  logic        jump_q;
  logic [AW:0] rptr_q;
  logic [AW:0] occ;

  hermes_sync_bit u_sync_filled (.clk(rclk), .rst(rrst), .d(filled_q), .q(filled_s));

  always_comb begin
    wbin_s = '0;
    for (int i = AW; i >= 0; i--) begin
      wbin_s[i] = (i == AW) ? wg_s2[i] : (wbin_s[i+1] ^ wg_s2[i]);
    end
  end

  assign occ = wbin_s - rptr_q;

  always_ff @(posedge rclk) begin
    if (rrst) begin
      wg_s1        <= '0;
      wg_s2        <= '0;
      active_q     <= 1'b0;
      rptr_q       <= '0;
      out_en       <= 1'b0;
      out_word     <= '0;
      out_crc_flag <= 1'b0;
      out_crc      <= '0;
      out_jump     <= 1'b0;
      jump_q       <= 1'b0;
      ptr_err      <= 1'b0;
    end else begin
      wg_s1 <= wgray_q;
      wg_s2 <= wg_s1;
      out_en   <= active_q;
      out_jump <= 1'b0;
      jump_q   <= 1'b0;
      if (!active_q) begin
        if (rd_start && filled_s) begin
          active_q <= 1'b1;
          ptr_err  <= 1'b0;
          rptr_q   <= wbin_s - (AW+1)'(RD_OFFSET);
        end
      end else if (!rd_start) begin
        active_q <= 1'b0;             // link lost: stop, restart when it is back
        out_en   <= 1'b0;
      end else begin
        out_word     <= mem[rptr_q[AW-1:0]];
        out_crc_flag <= side[rptr_q[AW-1:0]][16];
        out_crc      <= side[rptr_q[AW-1:0]][15:0];
        out_jump     <= jump_q;
        jump_q       <= adj_valid && (adj != 8'd0);
        if (adj_valid) rptr_q <= rptr_q + (AW+1)'(1) - (AW+1)'(adj);
        else           rptr_q <= rptr_q + (AW+1)'(1);
        if (occ == '0 || occ > (AW+1)'(DEPTH - 2)) ptr_err <= 1'b1;
      end
    end
  end

endmodule
