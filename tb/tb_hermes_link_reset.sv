// tb_hermes_link_reset: link robustness under repeated receiver resets.
//
// The four-channel endpoint runs at its default parameters with the clocks of
// a 25.78125 Gb/s link (algorithm 360 MHz, transceiver 402.83 MHz). Every
// transmitter is looped back to its receiver through a fibre model (a delay of
// whole 64-bit words plus a bit offset). While traffic runs, receivers are
// reset one or two at a time, five times in all, in packet mode and in
// streaming mode. Each reset also re-configures that channel's fibre with a new
// random delay and bit offset, so the receiver must find a new word boundary
// and comes back with a different latency.
//
// After each reset the testbench waits until every channel delivers words
// again and then starts channel bonding. It checks:
//   * every delivered word is a word the transmitter sent (content, channel,
//     Valid Bit), and words follow one another except across a restart or a
//     bonding correction;
//   * all channels deliver the same transmit cycle whenever they are bonded;
//   * `aligned` falls when a channel drops out and every bonding succeeds;
//   * each channel relocks once per reset, and no checksum ever fails;
//   * no overflow, checksum overrun or pointer error at the end.
// Resets, relocks, bondings and non-zero corrections are counted and must all
// have happened.
`timescale 1ps/1ps
module tb_hermes_link_reset;
  import hermes_pkg::*;
  localparam int NCH = 4;
  localparam int ALGO_HALF = 1389;   // 360 MHz
  localparam int LINK_HALF = 1241;   // 402.9 MHz
  localparam int N_PKT_END = 3000;   // Idles from here
  localparam int N_STREAM  = 3064;   // streaming mode from here
  localparam int N_END     = 6800;
  localparam int NRST      = 5;
  localparam int RST_AT[NRST]             = '{1500, 2300, 3900, 4800, 5700};
  localparam logic [NCH-1:0] RST_CH[NRST] = '{4'b0100, 4'b1010, 4'b0001, 4'b1000, 4'b0101};

  logic algo_clk = 0, algo_rst = 1, tx_link_clk = 0, tx_link_rst = 1;
  logic [NCH-1:0] rx_link_clk = '0, rx_link_rst;
  mode_e mode = MODE_PACKET;
  logic [23:0] user_info = 24'h5A5A01;
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

  for (genvar i = 0; i < NCH; i++) assign link_id[i] = 8'(8'h20 + i);

  always #(ALGO_HALF) algo_clk = ~algo_clk;
  always #(LINK_HALF) tx_link_clk = ~tx_link_clk;
  for (genvar i = 0; i < NCH; i++) begin : g_rxclk
    initial begin
      #(200 + 550 * i);
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
    return h ^ (h >> 13);
  endfunction
  function automatic logic valid_of(input int n);
    if (n >= N_STREAM) return 1'b1;
    if (n >= N_PKT_END) return 1'b0;
    return (n % 64) < (8 + (n / 64) % 40);
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
      mode  <= (n >= N_STREAM) ? MODE_STREAMING : MODE_PACKET;
      for (int i = 0; i < NCH; i++) begin
        tx_data[i]  <= data_of(i, n);
        tx_valid[i] <= valid_of(n);
        tx_eop[i]   <= (n >= N_STREAM) && (n % 20 == 19);
        tx_align[i] <= (n >= N_STREAM) && (n % 200 == 0);
      end
      n <= n + 1;
    end
  end
  int n_dut;
  assign n_dut = n - 1;

  // ------------------------------------------------------------ fibre and resets
  int word_delay[NCH] = '{2, 9, 0, 5};
  int bit_off[NCH]    = '{5, 33, 60, 0};
  int n_resets[NCH], n_relocks[NCH];

  for (genvar i = 0; i < NCH; i++) begin : g_fibre
    logic [63:0] pipe [16];
    logic [63:0] prev_w;
    logic [127:0] two;
    logic rst_q = 1'b1;
    logic up_q;
    always @(posedge rx_link_clk[i]) begin
      pipe[0] <= tx_mgt_data[i];
      for (int k = 1; k < 16; k++) pipe[k] <= pipe[k-1];
      prev_w <= pipe[word_delay[i]];
      up_q   <= link_up[i];
      if (link_up[i] && !up_q) n_relocks[i]++;
    end
    assign two = {pipe[word_delay[i]], prev_w};
    assign rx_mgt_data[i] = two[bit_off[i] +: 64];
    assign rx_link_rst[i] = rst_q;

    // reset and re-configure this receiver at its scheduled cycles
    initial begin
      repeat (5) @(posedge rx_link_clk[i]);
      rst_q = 1'b0;
      for (int k = 0; k < NRST; k++) begin
        wait (n_dut >= RST_AT[k]);
        if (RST_CH[k][i]) begin
          @(posedge rx_link_clk[i]);
          rst_q = 1'b1;
          n_resets[i]++;
          word_delay[i] = int'($urandom % 12);
          bit_off[i]    = int'($urandom % 64);
          repeat (8) @(posedge rx_link_clk[i]);
          rst_q = 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ bonding control
  logic all_rx_q = 1'b0;
  int   align_due = -1000;
  int   n_starts, n_aligned_rise, n_nonzero_adj, n_drops;
  logic aligned_q = 1'b0, align_err_q = 1'b0;
  always @(posedge algo_clk) begin
    all_rx_q  <= &rx_en;
    aligned_q <= aligned;
    align_err_q <= align_err;
    align_start <= 1'b0;
    if (!algo_rst) begin
      if (&rx_en && !all_rx_q) align_due <= n_dut + 20;
      if (n_dut == align_due) begin
        align_start <= 1'b1;
        n_starts++;
      end
      if (aligned && !aligned_q) n_aligned_rise++;
      if (!aligned && aligned_q) begin
        n_drops++;
        check(!(&rx_en) || align_start, "aligned fell without a channel dropping out");
      end
      if (dut.adj_valid) for (int i = 0; i < NCH; i++) if (dut.adj[i] != 0) n_nonzero_adj++;
      if (align_err && !align_err_q) check(1'b0, $sformatf("bonding failed at n=%0d", n_dut));
    end
  end

  // ------------------------------------------------------------ receive checks
  int last_n[NCH];
  bit have_last[NCH];
  int adj_recent;
  int n_words[NCH], n_aligned_cycles;

  always @(posedge algo_clk) begin
    adj_recent <= dut.adj_valid ? 3 : (adj_recent > 0 ? adj_recent - 1 : 0);
    for (int i = 0; i < NCH; i++) begin
      if (rx_en[i]) begin
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
      end else begin
        have_last[i] = 0;
      end
    end
    if (aligned && !dut.adj_valid && adj_recent == 0 && &rx_en) begin
      n_aligned_cycles++;
      for (int i = 1; i < NCH; i++)
        check(rx_data[i][51:24] == rx_data[0][51:24],
              $sformatf("channels not aligned: ch%0d n=%0d, ch0 n=%0d", i, rx_data[i][51:24], rx_data[0][51:24]));
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #(2 * ALGO_HALF * (N_END + 3000));
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
    wait (n_dut == N_END);
    repeat (50) @(posedge algo_clk);
    for (int i = 0; i < NCH; i++) begin
      check(n_relocks[i] == 1 + n_resets[i], $sformatf("ch%0d relocks %0d resets %0d", i, n_relocks[i], n_resets[i]));
      check(n_resets[i] > 0, $sformatf("ch%0d never reset", i));
      check(rx_link_id[i] == link_id[i], $sformatf("ch%0d link id %h", i, rx_link_id[i]));
      check(!tx_fifo_overflow[i] && !bram_ptr_err[i] && !crc_overrun[i], $sformatf("ch%0d status flags", i));
      check(block_lock[i] && link_up[i] && rx_en[i], $sformatf("ch%0d up at the end", i));
      check(crc_ok_cnt[i] > 100, $sformatf("ch%0d CRC ok %0d", i, crc_ok_cnt[i]));
      check(crc_err_cnt[i] == 0, $sformatf("ch%0d CRC errors %0d", i, crc_err_cnt[i]));
      check(hdr_err_cnt[i] == 0, $sformatf("ch%0d header errors %0d", i, hdr_err_cnt[i]));
    end
    check(n_starts == 1 + NRST, $sformatf("bonding starts %0d", n_starts));
    check(n_aligned_rise == n_starts, $sformatf("bondings %0d of %0d", n_aligned_rise, n_starts));
    check(n_drops >= NRST, $sformatf("aligned drops %0d", n_drops));
    check(n_nonzero_adj > 0, $sformatf("non-zero corrections %0d", n_nonzero_adj));
    check(aligned, "bonded at the end");
    check(n_aligned_cycles > 3000, $sformatf("bonded cycles %0d", n_aligned_cycles));
    $display("resets %0d %0d %0d %0d relocks %0d %0d %0d %0d bondings %0d drops %0d nonzero adj %0d bonded cycles %0d",
             n_resets[0], n_resets[1], n_resets[2], n_resets[3], n_relocks[0], n_relocks[1], n_relocks[2],
             n_relocks[3], n_aligned_rise, n_drops, n_nonzero_adj, n_aligned_cycles);
    $display("crc ok %0d %0d %0d %0d", crc_ok_cnt[0], crc_ok_cnt[1], crc_ok_cnt[2], crc_ok_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
