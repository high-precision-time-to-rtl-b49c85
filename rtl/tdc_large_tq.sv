// tdc_large_tq -- time-interval-averaging TDC whose quantization step is
// LONGER than the sampling period (T_Q > T_S); the converter chosen for
// implementation.
//
// Idea: the delay T_d between START and STOP is turned into a pulse of width
// T_d once every T_S. A measurement counter clocked by a slow ring oscillator
// (period T_Q, about pi*T_S) counts only while the pulse is high; a reference
// counter clocked by the same oscillator counts during the whole window of N
// periods. Because T_Q/T_S is irrational the oscillator edges fall at
// ever-different places in the sampling period, so after N samples
//   C_meas ~ N*T_d/T_Q,  C_ref = N*T_S/T_Q,  T_d,avg = (C_meas/C_ref)*T_S
// and the result does not depend on T_Q itself (robust to PVT drift). The
// counters accumulate implicitly, so no adder/accumulator is needed.
//
// Structure: window_ctrl (START domain) sequences clear / window / settle /
// divide; interval_pulse makes the T_d pulses for the armed periods;
// enable_sync re-times the pulse, the window and the clear into the RO domain
// through flip-flops clocked by the oscillator; two 31-bit tia_counter
// instances give C_meas and C_ref; ratio_divider (START domain) forms the
// ratio once the counters are static.
//
// Interface: start/stop are the two edges to compare (stop lags start by
// 0 < T_d < T_S); ro_clk is the oscillator tap; go/n_samples start a
// measurement of N samples (START domain); c_meas, c_ref and ratio (Q1.32,
// fraction of T_S) are valid while done is high.
// Timing: done rises CLEAR_CYCLES + N + SETTLE_CYCLES + FRAC + 2 START
// periods after the START edge that samples go. SETTLE_CYCLES must cover SYNC_STAGES + 1 oscillator periods
// (16 periods of 4 ns against 3 x 12.57 ns by default), so that the counters
// are not changing when the START-domain divider reads them.
// Counter width, the RO-clocked synchronising flops and the ratio follow the
// source; the controller, the divider and the handshake are this design's.
`timescale 1fs/1fs
module tdc_large_tq #(
  parameter int unsigned COUNT_W       = tdc_pkg::COUNT_W,
  parameter int unsigned NSAMP_W       = tdc_pkg::NSAMP_W,
  parameter int unsigned FRAC          = 32,
  parameter int unsigned SYNC_STAGES   = 2,
  parameter int unsigned CLEAR_CYCLES  = 16,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic               start,
  input  logic               stop,
  input  logic               ro_clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic [NSAMP_W-1:0] n_samples,
  output logic [COUNT_W-1:0] c_meas,
  output logic [COUNT_W-1:0] c_ref,
  output logic [FRAC:0]      ratio,
  output logic               busy,
  output logic               done
);

  logic clr, arm, window, pulse, post_start, post_done, div_busy;
  logic clr_ro, meas_en_ro, ref_en_ro;

  window_ctrl #(
    .NSAMP_W(NSAMP_W), .CLEAR_CYCLES(CLEAR_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_ctrl (
    .clk(start), .rst_n, .go, .n_samples, .clr, .arm, .window,
    .post_start, .post_done, .busy, .done
  );

  interval_pulse u_pulse (.start, .stop, .rst_n, .arm, .pulse);

  enable_sync #(.STAGES(SYNC_STAGES)) u_sync_meas (.clk(ro_clk), .rst_n, .d(pulse),  .q(meas_en_ro));
  enable_sync #(.STAGES(SYNC_STAGES)) u_sync_ref  (.clk(ro_clk), .rst_n, .d(window), .q(ref_en_ro));
  enable_sync #(.STAGES(SYNC_STAGES)) u_sync_clr  (.clk(ro_clk), .rst_n, .d(clr),    .q(clr_ro));

  tia_counter #(.WIDTH(COUNT_W)) u_meas_cnt (
    .clk(ro_clk), .rst_n, .clr(clr_ro), .en(meas_en_ro), .count(c_meas)
  );
  tia_counter #(.WIDTH(COUNT_W)) u_ref_cnt (
    .clk(ro_clk), .rst_n, .clr(clr_ro), .en(ref_en_ro), .count(c_ref)
  );

  ratio_divider #(.WIDTH(COUNT_W), .FRAC(FRAC)) u_div (
    .clk(start), .rst_n, .start(post_start), .dividend(c_meas), .divisor(c_ref),
    .busy(div_busy), .done(post_done), .ratio
  );

endmodule
