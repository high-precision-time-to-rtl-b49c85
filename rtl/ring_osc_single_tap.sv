// ring_osc_single_tap -- BEHAVIOURAL MODEL (not synthesizable) of the long
// ring oscillator of the large-T_Q TDC.
//
// In silicon this is a free-running ring of many inverters; only one tap is
// used, and its period is the quantization step T_Q. The converter relies on
// T_Q / T_S being irrational: with T_S = 4 ns the chosen step is
// T_Q = pi * T_S = 12.566 ns, which is the default period here (in fs).
// The inverter count is not modelled, only the tap waveform.
//
// Oscillator jitter can be added as accumulating Gaussian-like noise on each
// half period (sum of 12 uniform variates, std. dev. JITTER_FS); it is off by
// default. The model keeps the ideal edge times in real arithmetic and
// rounds each edge to the nearest femtosecond, so the average period is the
// irrational pi*T_S and not a rational approximation of it (edge times carry
// at most 0.5 fs of rounding error). While en is low the output stays low;
// the ring restarts with a rising edge half a period after en rises.
//
// Ports: en (input, run), ro_out (output, tap waveform, 50 % duty cycle).
`timescale 1fs/1fs
module ring_osc_single_tap #(
  parameter real         PERIOD_FS = 12566370.614359172,  // pi * 4 ns
  parameter int unsigned JITTER_FS = 0                    // std. dev. per half period
) (
  input  logic en,
  output logic ro_out
);

  // Gaussian approximation from 12 uniform variates in [-0.5, 0.5).
  function automatic real gauss_fs(int unsigned sigma);
    longint acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += longint'($urandom_range(0, 65535)) - 32768;
    return (real'(acc) * real'(sigma)) / 65536.0;
  endfunction

  real    t_edge = 0.0;  // ideal (unrounded) time of the next edge, in fs
  longint wait_fs;

  initial ro_out = 1'b0;

  always begin
    if (!en) begin
      ro_out = 1'b0;
      @(posedge en);
      t_edge = real'($time);
    end
    t_edge += PERIOD_FS / 2.0;
    if (JITTER_FS != 0) t_edge += gauss_fs(JITTER_FS);
    wait_fs = longint'(t_edge) - longint'($time);   // rounds to the nearest fs
    if (wait_fs < 1) wait_fs = 1;
    #(wait_fs);
    if (en) ro_out = ~ro_out;
  end

endmodule
