// hermes_link_init: word lock and link status (receive link domain).
//
// Finds the 67-bit word boundary in the received bit stream. While unlocked,
// every received header is checked for one of the two legal patterns (3'b011,
// 3'b100); an illegal one makes the receive gearbox slip one bit, and after a
// short wait the count starts again. LOCK_CNT legal headers in a row give
// `block_lock`. Once locked, a window of LOCK_CNT words with BAD_MAX or more
// illegal headers drops the lock (single-bit header errors are corrected
// downstream, so lock tolerates them). `link_up` follows UP_CNT further words
// after lock and is the signal that lets the receive path store words.
// `hdr_err_cnt` counts illegal headers seen while locked (saturating).
//
// The protocol names a "Link Initialization and Status" block only; this lock
// procedure is modelled on 64b/66b block lock and is this design's choice.
module hermes_link_init #(
  parameter int unsigned LOCK_CNT = 64,
  parameter int unsigned BAD_MAX  = 16,
  parameter int unsigned UP_CNT   = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        word_valid,
  input  logic [2:0]  hdr,
  output logic        slip,
  output logic        block_lock,
  output logic        link_up,
  output logic [15:0] hdr_err_cnt
);

  logic [7:0] good_q, win_q, bad_q, up_q;
  logic [1:0] wait_q;
  logic       legal;

  assign legal = (hdr == 3'b011) || (hdr == 3'b100);

  always_ff @(posedge clk) begin
    if (rst) begin
      good_q      <= '0;
      win_q       <= '0;
      bad_q       <= '0;
      up_q        <= '0;
      wait_q      <= '0;
      slip        <= 1'b0;
      block_lock  <= 1'b0;
      link_up     <= 1'b0;
      hdr_err_cnt <= '0;
    end else begin
      slip <= 1'b0;
      if (word_valid) begin
        if (!block_lock) begin
          if (wait_q != 2'd0) begin
            wait_q <= wait_q - 2'd1;
          end else if (legal) begin
            if (good_q == 8'(LOCK_CNT - 1)) begin
              block_lock <= 1'b1;
              good_q     <= '0;
              win_q      <= '0;
              bad_q      <= '0;
              up_q       <= '0;
            end else begin
              good_q <= good_q + 8'd1;
            end
          end else begin
            slip   <= 1'b1;
            good_q <= '0;
            wait_q <= 2'd2;
          end
        end else begin
          if (!legal && hdr_err_cnt != 16'hFFFF) hdr_err_cnt <= hdr_err_cnt + 16'd1;
          if (!link_up) begin
            if (up_q == 8'(UP_CNT - 1)) link_up <= 1'b1;
            else up_q <= up_q + 8'd1;
          end
          if (!legal && bad_q == 8'(BAD_MAX - 1)) begin
            block_lock <= 1'b0;
            link_up    <= 1'b0;
            good_q     <= '0;
          end else if (win_q == 8'(LOCK_CNT - 1)) begin
            win_q <= '0;
            bad_q <= '0;
          end else begin
            win_q <= win_q + 8'd1;
            if (!legal) bad_q <= bad_q + 8'd1;
          end
        end
      end
    end
  end

endmodule
