// window_ctrl -- sequencer of one time-interval-averaging measurement, in the
// START (sampling) clock domain.
//
// A measurement averages N samples taken once per START period T_S. After go,
// the controller holds clr for CLEAR_CYCLES periods (long enough for the clear
// to cross into the ring-oscillator domain and zero the counters), then keeps
// the observation window open for exactly N START periods, then waits
// SETTLE_CYCLES periods so that the re-timed enables have drained and the
// RO-domain counters are static, then starts the post-processing (the ratio
// divider) and finally raises done until the next go.
//
// Interface (all synchronous to clk = START, rst_n asynchronous):
//   go          one-cycle request, sampled in IDLE and DONE
//   n_samples   N, latched at go (0 is treated as 1)
//   clr         registered, high during the clear phase
//   arm         combinational, high for the START edges that open a sample
//               (the next-state value of window)
//   window      registered, high for exactly N periods (N*T_S)
//   post_start  one-cycle pulse when the counters are stable
//   post_done   post-processing finished
//   busy, done  status; done stays high until the next go
// The window length of N*T_S follows the source; the clear/settle phases and
// the handshake are this implementation's choices.
`timescale 1fs/1fs
module window_ctrl #(
  parameter int unsigned NSAMP_W       = tdc_pkg::NSAMP_W,
  parameter int unsigned CLEAR_CYCLES  = 16,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic [NSAMP_W-1:0] n_samples,
  output logic               clr,
  output logic               arm,
  output logic               window,
  output logic               post_start,
  input  logic               post_done,
  output logic               busy,
  output logic               done
);
  import tdc_pkg::*;

  meas_state_e        state, state_nxt;
  logic [NSAMP_W-1:0] cnt, cnt_nxt, n_lat;

  always_comb begin
    state_nxt  = state;
    cnt_nxt    = cnt + 1'b1;
    post_start = 1'b0;
    unique case (state)
      ST_IDLE, ST_DONE: begin
        cnt_nxt = '0;
        if (go) state_nxt = ST_CLEAR;
      end
      ST_CLEAR:
        if (cnt == NSAMP_W'(CLEAR_CYCLES - 1)) begin
          state_nxt = ST_WINDOW;
          cnt_nxt   = '0;
        end
      ST_WINDOW:
        if (cnt == n_lat - 1'b1) begin
          state_nxt = ST_SETTLE;
          cnt_nxt   = '0;
        end
      ST_SETTLE:
        if (cnt == NSAMP_W'(SETTLE_CYCLES - 1)) begin
          state_nxt  = ST_DIVIDE;
          cnt_nxt    = '0;
          post_start = 1'b1;
        end
      ST_DIVIDE: begin
        cnt_nxt = '0;
        if (post_done) state_nxt = ST_DONE;
      end
      default: state_nxt = ST_IDLE;
    endcase
  end

  assign arm = (state_nxt == ST_WINDOW);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state  <= ST_IDLE;
      cnt    <= '0;
      n_lat  <= NSAMP_W'(1);
      clr    <= 1'b0;
      window <= 1'b0;
    end else begin
      state  <= state_nxt;
      cnt    <= cnt_nxt;
      clr    <= (state_nxt == ST_CLEAR);
      window <= (state_nxt == ST_WINDOW);
      if ((state == ST_IDLE || state == ST_DONE) && go)
        n_lat <= (n_samples == '0) ? NSAMP_W'(1) : n_samples;
    end

  assign busy = (state != ST_IDLE) && (state != ST_DONE);
  assign done = (state == ST_DONE);

  // A window must never be open while the counters are being cleared.
  assert property (@(posedge clk) disable iff (!rst_n) !(clr && window));

endmodule
