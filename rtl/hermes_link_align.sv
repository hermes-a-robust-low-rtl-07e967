// hermes_link_align: channel bonding across NCH receive channels (algorithm clock domain).
//
// All transmitters send an alignment marker on the same clock cycle, but the
// markers leave the receivers' BRAMs in different cycles because the links have
// different delays. After `start` the block first waits until no channel has
// shown a marker for MAX_SKEW+1 cycles, so that it begins between two marker
// groups and all captured markers belong to the same transmit cycle (markers
// must therefore be more than 2*MAX_SKEW+1 cycles apart). Then each channel's
// counter starts when that channel's own marker appears and counts algorithm
// clocks until the last channel's marker appears. That count is then
// subtracted from the channel's BRAM read pointer (`adj_valid` pulse with
// `adj`), which delays every channel to the one with the largest latency.
// `aligned` stays high after a successful correction and falls as soon as a
// channel stops delivering words (`chan_ok` low, e.g. after a loss of lock);
// a new `start` is then needed. If the markers spread over more than MAX_SKEW
// cycles the attempt is abandoned with `align_err`. `marker` must be qualified
// by the read-enable of each channel.
//
// From the protocol: the counting rule and the subtraction from each read
// pointer. This design's choices: MAX_SKEW, the quiet-gap rule and the
// start/abandon handshake.
module hermes_link_align #(
  parameter int unsigned NCH      = 4,
  parameter int unsigned MAX_SKEW = 31
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [NCH-1:0]      marker,
  input  logic [NCH-1:0]      chan_ok,   // channel i is delivering words
  output logic                adj_valid,
  output logic [NCH-1:0][7:0] adj,
  output logic                aligned,
  output logic                align_err,
  output logic                busy
);

  typedef enum logic [1:0] {S_IDLE, S_QUIET, S_WAIT} state_e;
  state_e state_q;

  logic [NCH-1:0]      seen_q, seen_n;
  logic [NCH-1:0][7:0] cnt_q, cnt_n;
  logic [7:0]          span_q;

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      seen_n[i] = seen_q[i] || marker[i];
      cnt_n[i]  = seen_q[i] ? cnt_q[i] + 8'd1 : 8'd0;
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= S_IDLE;
      seen_q    <= '0;
      cnt_q     <= '0;
      span_q    <= '0;
      adj_valid <= 1'b0;
      adj       <= '0;
      aligned   <= 1'b0;
      align_err <= 1'b0;
    end else begin
      adj_valid <= 1'b0;
      if (!(&chan_ok)) aligned <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          state_q   <= S_QUIET;
          seen_q    <= '0;
          cnt_q     <= '0;
          span_q    <= '0;
          aligned   <= 1'b0;
          align_err <= 1'b0;
        end
        S_QUIET: begin
          if (marker != '0)                   span_q <= '0;
          else if (span_q == 8'(MAX_SKEW)) begin
            span_q  <= '0;
            state_q <= S_WAIT;
          end else                            span_q <= span_q + 8'd1;
        end
        S_WAIT: begin
          seen_q <= seen_n;
          cnt_q  <= cnt_n;
          if (seen_q != '0) span_q <= span_q + 8'd1;
          if (&seen_n) begin
            adj_valid <= 1'b1;
            adj       <= cnt_n;
            aligned   <= 1'b1;
            state_q   <= S_IDLE;
          end else if (span_q >= 8'(MAX_SKEW)) begin
            align_err <= 1'b1;
            state_q   <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
