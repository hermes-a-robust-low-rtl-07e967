// hermes_pkg: types, constants and pure functions shared by the Hermes link.
//
// Hermes carries 64-bit Data and Control words over a 64b/67b line code: every
// word gets a 3-bit "toggling" header whose polarity flips from word to word and
// stays the same when the word tag changes between Data and Control. Control
// words carry a 4-bit Control Word Type (CWT) in byte 7, protected by a
// Hamming(7,4) code. The header majority rule, the Hamming code and the use of
// a 16-bit CRC follow the protocol description; the CWT code points, the CRC
// polynomial (CRC-16-CCITT) and the 72-bit FIFO word layout are this design's
// own choices.
package hermes_pkg;

  localparam int unsigned WORD_W   = 64;  // payload width
  localparam int unsigned HDR_W    = 3;   // toggling header
  localparam int unsigned FIFO_W   = 72;  // Tx FIFO / Rx BRAM word width

  // Transmission modes
  typedef enum logic {
    MODE_PACKET    = 1'b0,
    MODE_STREAMING = 1'b1
  } mode_e;

  // Control Word Types (4-bit, sent Hamming(7,4)-coded in byte 7)
  typedef enum logic [3:0] {
    CWT_NONE    = 4'h0,
    CWT_IDLE    = 4'h1,
    CWT_PADDING = 4'h2,
    CWT_CRC     = 4'h3,
    CWT_ALIGN   = 4'h4
  } cwt_e;

  // Header patterns: polarity A has two ones, polarity B two zeros. Bit 2 is
  // the complement of bits 1:0 and serves as the tie-breaking secondary check.
  localparam logic [2:0] HDR_A = 3'b011;
  localparam logic [2:0] HDR_B = 3'b100;

  // Word as it crosses the Tx FIFO (algorithm -> link domain)
  typedef struct packed {
    logic        rsvd;       // [71]
    logic [3:0]  crc_nib;    // [70:67] one 4-bit CRC chunk
    logic        crc_trig;   // [66] packet-end word, carries chunk 0
    logic        align;      // [65] Align Marker bit (streaming mode)
    logic        valid;      // [64] Valid Bit
    logic [63:0] data;       // [63:0]
  } fifo_word_t;

  // Word as stored in the Rx BRAM (link -> algorithm domain)
  typedef struct packed {
    logic [5:0]  rsvd;
    logic        marker;     // alignment marker
    logic        valid;      // Data (1) or Idle (0)
    logic [63:0] data;
  } bram_word_t;

  // Hamming(7,4): codeword bit order {d3,d2,d1,p2,d0,p1,p0}
  // (positions 7..1 of the classic code, position 1 = bit 0).
  function automatic logic [6:0] ham74_enc(input logic [3:0] d);
    logic p0, p1, p2;
    p0 = d[0] ^ d[1] ^ d[3];
    p1 = d[0] ^ d[2] ^ d[3];
    p2 = d[1] ^ d[2] ^ d[3];
    return {d[3], d[2], d[1], p2, d[0], p1, p0};
  endfunction

  // Returns {corrected, data}: the corrected 4 data bits, and bit 4 set when
  // one code bit was flipped back.
  function automatic logic [4:0] ham74_dec(input logic [6:0] c);
    logic [2:0] s;
    logic [6:0] f;
    s[0] = c[0] ^ c[2] ^ c[4] ^ c[6];
    s[1] = c[1] ^ c[2] ^ c[5] ^ c[6];
    s[2] = c[3] ^ c[4] ^ c[5] ^ c[6];
    f = c;
    if (s != 3'd0) f[s - 3'd1] = ~c[s - 3'd1];
    return {(s != 3'd0), f[6], f[5], f[4], f[2]};
  endfunction

  // CRC-16-CCITT (x^16+x^12+x^5+1) over one 64-bit word, bit 63 first.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [63:0] d);
    logic [15:0] c;
    logic        fb;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // Header decision: majority of bit0, bit1 and the inverted bit2.
  // Returns 1 for polarity A, 0 for polarity B.
  function automatic logic hdr_polarity(input logic [2:0] h);
    return (h[0] & h[1]) | (h[0] & ~h[2]) | (h[1] & ~h[2]);
  endfunction

  function automatic logic hdr_exact(input logic [2:0] h);
    return (h == HDR_A) || (h == HDR_B);
  endfunction

endpackage
