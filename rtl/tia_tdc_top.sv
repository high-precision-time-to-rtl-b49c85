// tia_tdc_top -- the two time-interval-averaging TDCs side by side, both
// measuring the same START/STOP pair (START = rising edges of the local
// oscillator, STOP = the phase-modulated output whose delay is wanted).
//
// * Large-T_Q converter (the one intended for silicon): a slow single-tap
//   ring oscillator (T_Q = pi*T_S) clocks a measurement and a reference
//   counter; the estimate is ratio = C_meas/C_ref, a fraction of T_S.
// * Small-T_Q converter: a fast multi-phase ring oscillator (T_Q = one
//   inverter delay, T_S/(45*pi)) is sampled by START and STOP; C_total is the
//   sum of N samples in units of T_Q.
//
// The two ring oscillators are behavioural models (timing only), so this top
// is for simulation; tdc_large_tq and tdc_small_tq are the synthesizable
// parts. Each converter has its own go / n_samples / busy / done (START
// domain). ro_en runs the slow oscillator. Feeding a TDC with the LO edge as
// START and the modulator output as STOP follows the published transmitter
// arrangement; running both converters side by side on one pair is this
// design's choice, so that they can be compared on the same signal.
`timescale 1fs/1fs
module tia_tdc_top #(
  parameter real             LQ_PERIOD_FS = 12566370.614359172,
  parameter int unsigned     SQ_N_OSC     = 15,
  parameter int unsigned     SQ_TQ_FS     = 28294,
  parameter int unsigned     NSAMP_W      = tdc_pkg::NSAMP_W,
  parameter int unsigned     COUNT_W      = tdc_pkg::COUNT_W,
  parameter int unsigned     FRAC         = 32,
  parameter int unsigned     SQ_ACC_W     = 48
) (
  input  logic                       start,
  input  logic                       stop,
  input  logic                       rst_n,
  input  logic                       ro_en,
  // large-T_Q converter
  input  logic                       lq_go,
  input  logic [NSAMP_W-1:0]         lq_n_samples,
  output logic [COUNT_W-1:0]         lq_c_meas,
  output logic [COUNT_W-1:0]         lq_c_ref,
  output logic [FRAC:0]              lq_ratio,
  output logic                       lq_busy,
  output logic                       lq_done,
  // small-T_Q converter
  input  logic                       sq_go,
  input  logic [NSAMP_W-1:0]         sq_n_samples,
  output logic signed [SQ_ACC_W-1:0] sq_c_total,
  output logic                       sq_busy,
  output logic                       sq_done
);

  logic                ro_slow;
  logic [SQ_N_OSC-1:0] ro_taps;

  ring_osc_single_tap #(.PERIOD_FS(LQ_PERIOD_FS)) u_ro_slow (.en(ro_en), .ro_out(ro_slow));

  tdc_large_tq #(.COUNT_W(COUNT_W), .NSAMP_W(NSAMP_W), .FRAC(FRAC)) u_lq (
    .start, .stop, .ro_clk(ro_slow), .rst_n, .go(lq_go), .n_samples(lq_n_samples),
    .c_meas(lq_c_meas), .c_ref(lq_c_ref), .ratio(lq_ratio), .busy(lq_busy), .done(lq_done)
  );

  ring_osc_multiphase #(.N_OSC(SQ_N_OSC), .TQ_FS(SQ_TQ_FS)) u_ro_fast (.taps(ro_taps));

  tdc_small_tq #(.N_OSC(SQ_N_OSC), .ACC_W(SQ_ACC_W), .NSAMP_W(NSAMP_W)) u_sq (
    .start, .stop, .ro_taps, .rst_n, .go(sq_go), .n_samples(sq_n_samples),
    .c_total(sq_c_total), .busy(sq_busy), .done(sq_done)
  );

endmodule
