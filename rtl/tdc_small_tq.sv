// tdc_small_tq -- time-interval-averaging TDC whose quantization step is one
// inverter delay, much SHORTER than the sampling period (T_Q << T_S).
//
// Each START and each STOP rising edge photographs the ring oscillator: its
// inverter outputs (fine phase, F_START / F_STOP) and a counter of whole RO
// periods (C_START / C_STOP). The two photographs give one sample
//   C_d = 2*N_OSC*(C_STOP - C_START) + (F_STOP - F_START)
// in units of T_Q; N samples, one per START period, are summed into C_total,
// and T_d,avg = C_total/N * T_Q. Since T_S/T_Q = 45*pi is irrational, the
// quantization error differs from sample to sample and averages out.
//
// Structure: RO cycle counter (tia_counter, free running, clocked by tap 0),
// four edge_capture registers, two ro_state_encoder instances (one per
// snapshot), sample_combiner, tia_accumulator, and window_ctrl sequencing
// clear (one period) / window (N periods) / done.
//
// Interface: start/stop as for the large-T_Q TDC (0 < T_d < T_S); ro_taps from
// the multi-phase oscillator; go/n_samples in the START domain; c_total valid
// while done is high. Timing: done rises N + 3 START periods after the
// START edge that samples go.
// The architecture follows the source; N_OSC, the counter and accumulator
// widths, the encoder circuit and the control are this design's choices.
`timescale 1fs/1fs
module tdc_small_tq #(
  parameter int unsigned N_OSC   = 15,
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned ACC_W   = 48,
  parameter int unsigned NSAMP_W = tdc_pkg::NSAMP_W,
  localparam int unsigned PH_W   = $clog2(2 * N_OSC),
  localparam int unsigned CD_W   = CNT_W + PH_W + 2
) (
  input  logic                    start,
  input  logic                    stop,
  input  logic [N_OSC-1:0]        ro_taps,
  input  logic                    rst_n,
  input  logic                    go,
  input  logic [NSAMP_W-1:0]      n_samples,
  output logic signed [ACC_W-1:0] c_total,
  output logic                    busy,
  output logic                    done
);

  logic [CNT_W-1:0]       ro_count, c_start, c_stop;
  logic [N_OSC-1:0]       s_start, s_stop;
  logic [PH_W-1:0]        f_start, f_stop;
  logic signed [CD_W-1:0] c_d;
  logic                   clr, arm, window, post_start;

  tia_counter #(.WIDTH(CNT_W)) u_ro_cnt (
    .clk(ro_taps[0]), .rst_n, .clr(1'b0), .en(1'b1), .count(ro_count)
  );

  edge_capture #(.WIDTH(N_OSC)) u_f_start (.clk(start), .rst_n, .d(ro_taps),  .q(s_start));
  edge_capture #(.WIDTH(N_OSC)) u_f_stop  (.clk(stop),  .rst_n, .d(ro_taps),  .q(s_stop));
  edge_capture #(.WIDTH(CNT_W)) u_c_start (.clk(start), .rst_n, .d(ro_count), .q(c_start));
  edge_capture #(.WIDTH(CNT_W)) u_c_stop  (.clk(stop),  .rst_n, .d(ro_count), .q(c_stop));

  ro_state_encoder #(.N_OSC(N_OSC)) u_enc_start (.state(s_start), .phase(f_start));
  ro_state_encoder #(.N_OSC(N_OSC)) u_enc_stop  (.state(s_stop),  .phase(f_stop));

  sample_combiner #(.N_OSC(N_OSC), .CNT_W(CNT_W)) u_comb (
    .c_start, .c_stop, .f_start, .f_stop, .c_d
  );

  window_ctrl #(.NSAMP_W(NSAMP_W), .CLEAR_CYCLES(1), .SETTLE_CYCLES(1)) u_ctrl (
    .clk(start), .rst_n, .go, .n_samples, .clr, .arm, .window,
    .post_start, .post_done(1'b1), .busy, .done
  );

  tia_accumulator #(.CD_W(CD_W), .ACC_W(ACC_W)) u_acc (
    .clk(start), .rst_n, .clr, .en(window), .c_d, .c_total
  );

endmodule
