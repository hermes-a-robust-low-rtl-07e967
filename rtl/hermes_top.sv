// hermes_top: NCH-channel Hermes link endpoint.
//
// Each channel has a transmit and a receive data path between the
// LHC-synchronous algorithm clock and the transceiver (MGT) clocks:
//
//   transmit: tx_* user word -> Tx CRC -> Tx FIFO (algo -> link clock) ->
//             packet builder (+ filler generator) -> scrambler ->
//             64b/67b gearbox -> tx_mgt_data
//   receive:  rx_mgt_data -> 64b/67b gearbox (word lock: link init) ->
//             descrambler -> decoder -> filler detection ->
//             Rx BRAM (link -> algo clock) -> rx_* and Rx CRC
//
// A channel-bonding block watches the alignment markers of all receive
// channels and moves each Rx BRAM read pointer so that all channels deliver
// the marker on the same algorithm clock. The transceivers themselves are not
// part of this RTL: their 64-bit parallel words are the tx_mgt_data /
// rx_mgt_data ports.
//
// Clocks: algo_clk (all user ports, must be slower than the link word rate,
// i.e. below 64/67 of tx_link_clk), tx_link_clk (all transmitters),
// rx_link_clk[i] (receiver i, recovered clock). Each reset is synchronous to
// its clock. Users write one word per algo_clk while tx_en is high (Valid low
// = Idle); rx_en[i] marks each word delivered by receiver i.
//
// The structure follows the protocol's block diagram; NCH = 4 is this design's
// choice.
module hermes_top
  import hermes_pkg::*;
#(
  parameter int unsigned NCH       = 4,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned BRAM_DEPTH = 512,
  parameter int unsigned RD_OFFSET  = 32
) (
  input  logic                 algo_clk,
  input  logic                 algo_rst,
  input  logic                 tx_link_clk,
  input  logic                 tx_link_rst,
  input  logic [NCH-1:0]       rx_link_clk,
  input  logic [NCH-1:0]       rx_link_rst,
  input  mode_e                mode,
  input  logic [23:0]          user_info,
  input  logic [NCH-1:0][7:0]  link_id,
  // transmit user side (algo_clk)
  input  logic                 tx_en,
  input  logic [NCH-1:0][63:0] tx_data,
  input  logic [NCH-1:0]       tx_valid,
  input  logic [NCH-1:0]       tx_eop,
  input  logic [NCH-1:0]       tx_align,
  // transceiver parallel interfaces
  output logic [NCH-1:0][63:0] tx_mgt_data,
  input  logic [NCH-1:0][63:0] rx_mgt_data,
  // receive user side (algo_clk)
  output logic [NCH-1:0]       rx_en,
  output logic [NCH-1:0][63:0] rx_data,
  output logic [NCH-1:0]       rx_valid,
  output logic [NCH-1:0]       rx_marker,
  // channel bonding (algo_clk)
  input  logic                 align_start,
  output logic                 aligned,
  output logic                 align_err,
  // status
  output logic [NCH-1:0]       block_lock,   // rx_link_clk[i]
  output logic [NCH-1:0]       link_up,      // rx_link_clk[i]
  output logic [NCH-1:0][15:0] hdr_err_cnt,  // rx_link_clk[i]
  output logic [NCH-1:0][7:0]  rx_link_id,   // rx_link_clk[i], from fillers
  output logic [NCH-1:0][15:0] crc_ok_cnt,   // algo_clk
  output logic [NCH-1:0][15:0] crc_err_cnt,  // algo_clk
  output logic [NCH-1:0]       tx_fifo_overflow,
  output logic [NCH-1:0]       crc_overrun,
  output logic [NCH-1:0]       bram_ptr_err
);

  logic                adj_valid;
  logic [NCH-1:0][7:0] adj;
  logic                align_busy;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    // ------------------------------------------------ transmit, algo domain
    fifo_word_t  fifo_wdata, fifo_rdata;
    logic        fifo_we, fifo_full, fifo_empty, fifo_rd;
    logic        tx_crc_done;
    logic [15:0] tx_crc_value;

    hermes_tx_crc u_tx_crc (
      .clk(algo_clk), .rst(algo_rst), .en(tx_en), .mode(mode),
      .data(tx_data[i]), .valid(tx_valid[i]), .eop(tx_eop[i]), .align(tx_align[i]),
      .fifo_wdata(fifo_wdata), .fifo_we(fifo_we),
      .crc_done(tx_crc_done), .crc_value(tx_crc_value));

    hermes_async_fifo #(.WIDTH(FIFO_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
      .wclk(algo_clk), .wrst(algo_rst), .we(fifo_we), .wdata(fifo_wdata),
      .full(fifo_full), .overflow(tx_fifo_overflow[i]),
      .rclk(tx_link_clk), .rrst(tx_link_rst), .rd_en(fifo_rd),
      .rdata(fifo_rdata), .empty(fifo_empty));

    // ------------------------------------------------ transmit, link domain
    logic        gb_ready, crc_pending, crc_sent;
    cwt_e        filler_type;
    logic [63:0] filler_word, scr_out;
    logic [66:0] pb_word;
    logic        ev_data, ev_idle, ev_pad, ev_crc, ev_align;

    hermes_filler_gen u_filler (
      .clk(tx_link_clk), .rst(tx_link_rst), .link_id(link_id[i]), .user_info(user_info),
      .pop(fifo_rd), .pop_word(fifo_rdata), .req_type(filler_type), .crc_sent(crc_sent),
      .filler_word(filler_word), .crc_pending(crc_pending), .crc_overrun(crc_overrun[i]));

    hermes_packet_builder u_pb (
      .clk(tx_link_clk), .rst(tx_link_rst), .ready(gb_ready),
      .fifo_rdata(fifo_rdata), .fifo_empty(fifo_empty), .fifo_rd(fifo_rd),
      .crc_pending(crc_pending), .filler_word(filler_word), .filler_type(filler_type),
      .crc_sent(crc_sent), .word(pb_word),
      .ev_data(ev_data), .ev_idle(ev_idle), .ev_pad(ev_pad), .ev_crc(ev_crc), .ev_align(ev_align));

    hermes_scrambler u_scr (
      .clk(tx_link_clk), .rst(tx_link_rst), .en(gb_ready),
      .din(pb_word[66:3]), .dout(scr_out));

    hermes_tx_gearbox u_tx_gb (
      .clk(tx_link_clk), .rst(tx_link_rst), .ready(gb_ready),
      .din({scr_out, pb_word[2:0]}), .dout(tx_mgt_data[i]));

    // ------------------------------------------------ receive, link domain
    logic [66:0] rg_word;
    logic        rg_valid, slip;
    logic [63:0] descr_out;
    logic        dec_valid, dec_ctrl, hdr_corr, cwt_corr, cwt_bad;
    cwt_e        dec_cwt;
    logic [63:0] dec_payload;
    logic        fd_we, fd_crc_we, ev_filler, ev_marker, ev_bad;
    bram_word_t  fd_word;
    logic [15:0] fd_crc;
    logic [7:0]  fd_dist;
    logic [23:0] rx_user_info;

    hermes_rx_gearbox u_rx_gb (
      .clk(rx_link_clk[i]), .rst(rx_link_rst[i]), .din(rx_mgt_data[i]), .slip(slip),
      .dout(rg_word), .dout_valid(rg_valid));

    hermes_link_init u_init (
      .clk(rx_link_clk[i]), .rst(rx_link_rst[i]), .word_valid(rg_valid), .hdr(rg_word[2:0]),
      .slip(slip), .block_lock(block_lock[i]), .link_up(link_up[i]),
      .hdr_err_cnt(hdr_err_cnt[i]));

    hermes_descrambler u_descr (
      .clk(rx_link_clk[i]), .rst(rx_link_rst[i]), .en(rg_valid),
      .din(rg_word[66:3]), .dout(descr_out));

    hermes_decoder u_dec (
      .clk(rx_link_clk[i]), .rst(rx_link_rst[i]), .lock(block_lock[i]),
      .in_valid(rg_valid), .in_word({descr_out, rg_word[2:0]}),
      .out_valid(dec_valid), .is_ctrl(dec_ctrl), .cwt(dec_cwt), .payload(dec_payload),
      .hdr_corr(hdr_corr), .cwt_corr(cwt_corr), .cwt_bad(cwt_bad));

    hermes_filler_detect u_fd (
      .clk(rx_link_clk[i]), .rst(rx_link_rst[i]), .link_up(link_up[i]), .mode(mode),
      .in_valid(dec_valid), .is_ctrl(dec_ctrl), .cwt(dec_cwt), .payload(dec_payload),
      .wr_en(fd_we), .wr_word(fd_word), .crc_we(fd_crc_we), .crc_val(fd_crc), .crc_dist(fd_dist),
      .rx_link_id(rx_link_id[i]), .rx_user_info(rx_user_info),
      .ev_filler(ev_filler), .ev_marker(ev_marker), .ev_bad(ev_bad));

    // ------------------------------------------------ receive, algo domain
    logic        link_up_s;
    bram_word_t  rd_word;
    logic        rd_crc_flag, rd_jump, crc_ok, crc_err;
    logic [15:0] rd_crc;

    hermes_sync_bit u_sync_up (.clk(algo_clk), .rst(algo_rst), .d(link_up[i]), .q(link_up_s));

    hermes_rx_bram #(.DEPTH(BRAM_DEPTH), .RD_OFFSET(RD_OFFSET)) u_bram (
      .wclk(rx_link_clk[i]), .wrst(rx_link_rst[i]), .we(fd_we), .wdata(fd_word),
      .crc_we(fd_crc_we), .crc_val(fd_crc), .crc_dist(fd_dist),
      .rclk(algo_clk), .rrst(algo_rst), .rd_start(link_up_s),
      .adj_valid(adj_valid), .adj(adj[i]),
      .out_en(rx_en[i]), .out_word(rd_word), .out_crc_flag(rd_crc_flag), .out_crc(rd_crc),
      .out_jump(rd_jump),
      .ptr_err(bram_ptr_err[i]));

    assign rx_data[i]   = rd_word.data;
    assign rx_valid[i]  = rd_word.valid;
    assign rx_marker[i] = rx_en[i] && rd_word.marker;

    hermes_rx_crc u_rx_crc (
      .clk(algo_clk), .rst(algo_rst), .en(rx_en[i]), .resync(rd_jump || !rx_en[i]), .mode(mode),
      .valid(rd_word.valid), .data(rd_word.data),
      .crc_flag(rd_crc_flag), .crc_rx(rd_crc),
      .crc_ok(crc_ok), .crc_err(crc_err),
      .ok_cnt(crc_ok_cnt[i]), .err_cnt(crc_err_cnt[i]));
  end

  hermes_link_align #(.NCH(NCH)) u_align (
    .clk(algo_clk), .rst(algo_rst), .start(align_start), .marker(rx_marker),
    .chan_ok(rx_en),
    .adj_valid(adj_valid), .adj(adj), .aligned(aligned), .align_err(align_err),
    .busy(align_busy));

endmodule
