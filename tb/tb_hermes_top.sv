// tb_hermes_top: end-to-end test of the four-channel Hermes endpoint at its
// default parameters, with the clocks of a 25.78125 Gb/s link: algorithm clock
// 360 MHz, transceiver parallel clock 402.83 MHz (64 bits per cycle).
//
// Each channel's transmitter is looped back to its receiver through a model of
// the fibre: a delay of a few 64-bit words plus a bit offset, so every
// receiver has to find the 67-bit word boundary and the channels arrive with
// different skews. The receive clocks run at the transmit frequency with
// different phases.
//
// Every user word carries its cycle number n, the channel number and a hash,
// so the receive side can check each delivered word on its own: content,
// Valid Bit and that n advances by one per algorithm clock. Phases (by n):
//   packet mode   : packets of 4..51 words every 64 cycles; channel bonding
//                   is run on the Data Start markers; every checksum must pass;
//   mode switch   : Idles, then streaming mode;
//   streaming mode: 16-word back-to-back packets with End of Packet, an Align
//                   Marker every 256 words; bonding run again; single header
//                   bit flips injected on all channels (must all be corrected
//                   and counted); finally payload bit flips on channel 0 (its
//                   CRC check must report errors).
// Each mechanism is counted and must have happened at least once. The filler
// share of the transmit slots is checked against 1 - 360/(402.83*64/67).
`timescale 1ps/1ps
module tb_hermes_top;
  import hermes_pkg::*;
  localparam int NCH = 4;
  localparam int ALGO_HALF = 1389;   // 360 MHz
  localparam int LINK_HALF = 1241;   // 402.9 MHz
  localparam int N_PKT_END   = 2500; // Idles from here
  localparam int N_STREAM    = 2564; // streaming mode from here
  localparam int N_ALIGN1    = 1200;
  localparam int N_ALIGN2    = 3400;
  localparam int N_HFLIP0    = 4000, N_HFLIP1 = 5000;
  localparam int N_PFLIP0    = 5600, N_PFLIP1 = 5900;
  localparam int N_END       = 6400;

  logic algo_clk = 0, algo_rst = 1, tx_link_clk = 0, tx_link_rst = 1;
  logic [NCH-1:0] rx_link_clk = '0, rx_link_rst = '1;
  mode_e mode = MODE_PACKET;
  logic [23:0] user_info = 24'hABCDEF;
  logic [NCH-1:0][7:0] link_id;
  logic tx_en = 0;
  logic [NCH-1:0][63:0] tx_data = '0;
  logic [NCH-1:0] tx_valid = '0, tx_eop = '0, tx_align = '0;
  logic [NCH-1:0][63:0] tx_mgt_data, rx_mgt_data;
  logic [NCH-1:0] rx_en, rx_valid, rx_marker;
  logic [NCH-1:0][63:0] rx_data;
  logic align_start = 0, aligned, align_err;
  logic [NCH-1:0] block_lock, link_up, tx_fifo_overflow, crc_overrun, bram_ptr_err;
  logic [NCH-1:0][15:0] hdr_err_cnt, crc_ok_cnt, crc_err_cnt;
  logic [NCH-1:0][7:0] rx_link_id;

  int checks = 0, failures = 0;

  hermes_top dut (.*);

  for (genvar i = 0; i < NCH; i++) assign link_id[i] = 8'(8'h10 + i);

  always #(ALGO_HALF) algo_clk = ~algo_clk;
  always #(LINK_HALF) tx_link_clk = ~tx_link_clk;
  for (genvar i = 0; i < NCH; i++) begin : g_rxclk
    initial begin
      #(300 + 400 * i);
      forever #(LINK_HALF) rx_link_clk[i] = ~rx_link_clk[i];
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ stimulus model
  function automatic logic [31:0] hash(input int ch, input int n);
    logic [31:0] h;
    h = 32'(n) * 32'h9E3779B1 ^ 32'(ch) * 32'h85EBCA6B;
    return h ^ (h >> 15);
  endfunction
  function automatic mode_e mode_of(input int n);
    return (n >= N_STREAM) ? MODE_STREAMING : MODE_PACKET;
  endfunction
  function automatic logic valid_of(input int n);
    if (n >= N_STREAM) return 1'b1;
    if (n >= N_PKT_END) return 1'b0;
    return (n % 64) < (4 + (n / 64) % 48);
  endfunction
  function automatic logic [63:0] data_of(input int ch, input int n);
    logic [31:0] h;
    h = hash(ch, n);
    return {valid_of(n) ? h[31:24] : 8'h00, 4'(ch), 28'(n), h[23:0]};
  endfunction

  int n = 0;   // algorithm cycle number of the word being written
  always @(posedge algo_clk) begin
    if (!algo_rst) begin
      tx_en <= 1'b1;
      mode  <= mode_of(n);
      for (int i = 0; i < NCH; i++) begin
        tx_data[i]  <= data_of(i, n);
        tx_valid[i] <= valid_of(n);
        tx_eop[i]   <= (n >= N_STREAM) && (n % 16 == 15);
        tx_align[i] <= (n >= N_STREAM) && (n % 256 == 0);
      end
      align_start <= (n == N_ALIGN1) || (n == N_ALIGN2);
      n <= n + 1;
    end
  end
  // the word n reaches the DUT one cycle after it is computed
  int n_dut;
  assign n_dut = n - 1;

  // ------------------------------------------------------------ fibre model
  int word_delay[NCH] = '{0, 3, 7, 11};
  int bit_off[NCH]    = '{0, 17, 40, 63};
  int hflips[NCH], pflips[NCH];
  longint tx_words = 0;    // 64-bit words since transmit reset
  logic [NCH-1:0][63:0] tx_line;     // after error injection
  logic [NCH-1:0][63:0] flip_mask_q; // flips for the word on tx_mgt_data now

  // Error injection. At each transmit edge the gearbox puts out 64-bit word
  // number tx_words (bits 64*tx_words ..); the 67-bit words start at the bit
  // numbers that are multiples of 67, their header in the first three bits.
  always @(posedge tx_link_clk) begin
    if (!tx_link_rst) begin
      tx_words <= tx_words + 1;
      for (int i = 0; i < NCH; i++) begin
        logic [63:0] m;
        longint g0, j, b;
        int unsigned hb;
        m = '0;
        g0 = tx_words * 64;
        j = (g0 + 66) / 67;                 // first 67-bit word starting in or after it
        if (n_dut >= N_HFLIP0 && n_dut < N_HFLIP1 && tx_words % 37 == 5) begin
          hb = $urandom % 3;
          b = 67 * j + longint'(hb) - g0;   // one header bit
          if (b < 64) begin m[6'(b)] = 1'b1; hflips[i]++; end
        end
        if (i == 0 && n_dut >= N_PFLIP0 && n_dut < N_PFLIP1 && tx_words % 53 == 7) begin
          b = 67 * j + 3 + 10 - g0;         // payload bit 10
          if (b < 64) begin m[6'(b)] = 1'b1; pflips[i]++; end
        end
        flip_mask_q[i] <= m;
      end
    end else begin
      flip_mask_q <= '0;
    end
  end

  assign tx_line = tx_mgt_data ^ flip_mask_q;

  for (genvar i = 0; i < NCH; i++) begin : g_fibre
    logic [63:0] pipe [16];
    logic [63:0] prev_w;
    logic [127:0] two;
    always @(posedge rx_link_clk[i]) begin
      pipe[0] <= tx_line[i];
      for (int k = 1; k < 16; k++) pipe[k] <= pipe[k-1];
      prev_w <= pipe[word_delay[i]];
    end
    assign two = {pipe[word_delay[i]], prev_w};
    assign rx_mgt_data[i] = two[64 + bit_off[i] - 64 +: 64];
  end

  // ------------------------------------------------------------ event counters
  int ev_data, ev_idle, ev_pad, ev_crc, ev_alignf, ev_marker, ev_slip, ev_nonzero_adj,
      ev_adjust, ev_hcorr, slots;
  always @(posedge tx_link_clk) begin
    if (!tx_link_rst) begin
      ev_data   += dut.g_ch[1].ev_data;
      ev_idle   += dut.g_ch[1].ev_idle;
      ev_pad    += dut.g_ch[1].ev_pad;
      ev_crc    += dut.g_ch[1].ev_crc;
      ev_alignf += dut.g_ch[1].ev_align;
      if (n_dut >= N_STREAM + 100 && n_dut < N_END - 100) slots++;
    end
  end
  int st_fill, st_slots;
  always @(posedge tx_link_clk) begin
    if (n_dut >= N_STREAM + 100 && n_dut < N_HFLIP0 && dut.g_ch[2].gb_ready) begin
      st_slots++;
      st_fill += !dut.g_ch[2].fifo_rd;
    end
  end
  always @(posedge rx_link_clk[3]) begin
    ev_slip   += dut.g_ch[3].slip;
    ev_marker += dut.g_ch[3].ev_marker;
    ev_hcorr  += dut.g_ch[3].hdr_corr && dut.g_ch[3].dec_valid;
  end
  always @(posedge algo_clk) begin
    if (!algo_rst && dut.adj_valid) begin
      ev_adjust++;
      for (int i = 0; i < NCH; i++) if (dut.adj[i] != 0) ev_nonzero_adj++;
    end
  end

  // ------------------------------------------------------------ receive checks
  int last_n[NCH];
  bit have_last[NCH];
  int adj_recent;
  int n_words[NCH], n_aligned_cycles, pkt_ok_at_switch[NCH];
  bit ch_checked[NCH];

  always @(posedge algo_clk) begin
    adj_recent <= dut.adj_valid ? 3 : (adj_recent > 0 ? adj_recent - 1 : 0);
    for (int i = 0; i < NCH; i++) begin
      ch_checked[i] = !(i == 0 && n_dut >= N_PFLIP0 - 200);
      if (rx_en[i] && ch_checked[i]) begin
        int rn;
        rn = int'(rx_data[i][51:24]);
        n_words[i]++;
        check(rx_data[i][55:52] == 4'(i), $sformatf("ch%0d channel field %h", i, rx_data[i][55:52]));
        check(rx_valid[i] == valid_of(rn), $sformatf("ch%0d n=%0d valid %0d", i, rn, rx_valid[i]));
        check(rx_data[i] == data_of(i, rn), $sformatf("ch%0d n=%0d data %h exp %h", i, rn, rx_data[i], data_of(i, rn)));
        if (have_last[i] && adj_recent == 0)
          check(rn == last_n[i] + 1, $sformatf("ch%0d n=%0d after %0d", i, rn, last_n[i]));
        last_n[i] = rn;
        have_last[i] = 1;
      end
    end
    if (aligned && !dut.adj_valid && adj_recent == 0 && &rx_en) begin
      int ref_ch;
      ref_ch = ch_checked[0] ? 0 : 1;
      n_aligned_cycles++;
      for (int i = ref_ch + 1; i < NCH; i++)
        check(rx_data[i][51:24] == rx_data[ref_ch][51:24],
              $sformatf("channels not aligned: ch%0d n=%0d, ch%0d n=%0d", i, rx_data[i][51:24],
                        ref_ch, rx_data[ref_ch][51:24]));
    end
    if (n_dut == N_STREAM) for (int i = 0; i < NCH; i++) pkt_ok_at_switch[i] = int'(crc_ok_cnt[i]);
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #(2 * ALGO_HALF * (N_END + 4000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    repeat (5) @(posedge algo_clk);
    algo_rst <= 0;
    tx_link_rst <= 0;
    rx_link_rst <= '0;
    wait (n_dut == N_ALIGN1 - 10);
    check(&link_up, "all links up before bonding");
    check(&rx_en, "all receivers reading before bonding");
    wait (n_dut == N_END);
    repeat (200) @(posedge algo_clk);
    for (int i = 0; i < NCH; i++) begin
      check(rx_link_id[i] == link_id[i], $sformatf("ch%0d link id %h", i, rx_link_id[i]));
      check(!tx_fifo_overflow[i] && !bram_ptr_err[i] && !crc_overrun[i], $sformatf("ch%0d status flags", i));
      check(block_lock[i] && link_up[i], $sformatf("ch%0d still locked", i));
      check(n_words[i] > 1000 || i == 0, $sformatf("ch%0d words %0d", i, n_words[i]));
      check(pkt_ok_at_switch[i] > 30, $sformatf("ch%0d packet-mode CRC ok %0d", i, pkt_ok_at_switch[i]));
      check(int'(crc_ok_cnt[i]) - pkt_ok_at_switch[i] > 100, $sformatf("ch%0d streaming CRC ok %0d", i, int'(crc_ok_cnt[i]) - pkt_ok_at_switch[i]));
      if (i != 0) check(crc_err_cnt[i] == 0, $sformatf("ch%0d CRC errors %0d", i, crc_err_cnt[i]));
      check(hdr_err_cnt[i] == 16'(hflips[i]), $sformatf("ch%0d header errors %0d flips %0d", i, hdr_err_cnt[i], hflips[i]));
    end
    check(crc_err_cnt[0] > 0, $sformatf("payload flips (%0d) detected by CRC: %0d", pflips[0], crc_err_cnt[0]));
    check(aligned && !align_err, "bonding succeeded");
    // mechanism coverage
    check(ev_data > 0,        $sformatf("data words %0d", ev_data));
    check(ev_idle > 0,        $sformatf("idle words %0d", ev_idle));
    check(ev_pad > 0,         $sformatf("padding fillers %0d", ev_pad));
    check(ev_crc > 0,         $sformatf("crc fillers %0d", ev_crc));
    check(ev_alignf > 0,      $sformatf("align marker fillers %0d", ev_alignf));
    check(ev_marker > 0,      $sformatf("receive markers %0d", ev_marker));
    check(ev_slip > 0,        $sformatf("word-lock slips %0d", ev_slip));
    check(ev_adjust == 2,     $sformatf("bonding corrections %0d", ev_adjust));
    check(ev_nonzero_adj > 0, $sformatf("non-zero read pointer corrections %0d", ev_nonzero_adj));
    check(ev_hcorr > 0,       $sformatf("header corrections %0d", ev_hcorr));
    check(n_aligned_cycles > 1000, $sformatf("aligned cycles %0d", n_aligned_cycles));
    // filler share in streaming mode: 1 - 360 / (402.83 * 64 / 67) = 6.45 %
    check(st_fill * 1000 > st_slots * 55 && st_fill * 1000 < st_slots * 75,
          $sformatf("filler share %0d of %0d slots", st_fill, st_slots));
    $display("events: data %0d idle %0d pad %0d crc %0d alignf %0d marker %0d slip %0d adj %0d/%0d hcorr %0d hflips %0d pflips %0d fill %0d/%0d",
             ev_data, ev_idle, ev_pad, ev_crc, ev_alignf, ev_marker, ev_slip, ev_adjust, ev_nonzero_adj,
             ev_hcorr, hflips[3], pflips[0], st_fill, st_slots);
    $display("crc ok %0d %0d %0d %0d err %0d %0d %0d %0d", crc_ok_cnt[0], crc_ok_cnt[1], crc_ok_cnt[2], crc_ok_cnt[3],
             crc_err_cnt[0], crc_err_cnt[1], crc_err_cnt[2], crc_err_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
