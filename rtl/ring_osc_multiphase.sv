// ring_osc_multiphase -- BEHAVIOURAL MODEL (not synthesizable) of the short
// ring oscillator of the small-T_Q TDC, with every inverter output visible.
//
// A ring of N_OSC inverters (N_OSC odd) has 2*N_OSC distinct states per
// period; one inverter delay T_Q separates successive states, so the period is
// 2*N_OSC*T_Q. The default T_Q = T_S/(45*pi) = 28.294 ps follows the source;
// N_OSC = 15 is this model's choice. The model steps through the states: from
// the settled state tap[i] = i odd, each step flips the next inverter output
// in ring order (tap 0 first). Optional accumulating jitter (std. dev.
// JITTER_FS per inverter delay) is off by default; transition times are kept
// as ideal times and rounded to 1 fs.
//
// Ports: taps (N_OSC inverter outputs). Tap 0 rises once per period; it is
// the clock of the RO cycle counter.
`timescale 1fs/1fs
module ring_osc_multiphase #(
  parameter int unsigned N_OSC     = 15,
  parameter int unsigned TQ_FS     = 28294,
  parameter int unsigned JITTER_FS = 0
) (
  output logic [N_OSC-1:0] taps
);

  // ones at the odd inverter outputs
  localparam logic [N_OSC-1:0] ALT = N_OSC'({((N_OSC + 1) / 2){2'b10}});

  function automatic longint gauss_fs(int unsigned sigma);
    longint acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += longint'($urandom_range(0, 65535)) - 32768;
    return (acc * longint'(sigma)) / 65536;
  endfunction

  logic [N_OSC-1:0] norm;     // taps with every odd output inverted
  int unsigned      step;
  real              t_edge = 0.0;  // ideal time of the next transition, in fs
  longint           wait_fs;

  initial begin
    norm   = '0;
    taps   = ALT;
    step   = 0;
  end

  always begin
    t_edge += real'(TQ_FS);
    if (JITTER_FS != 0) t_edge += real'(gauss_fs(JITTER_FS));
    wait_fs = longint'(t_edge) - longint'($time);
    if (wait_fs < 1) wait_fs = 1;
    #(wait_fs);
    // steps 0..N-1 set norm[step], steps N..2N-1 clear norm[step-N]
    if (step < N_OSC) norm[step] = 1'b1;
    else              norm[step - N_OSC] = 1'b0;
    step = (step == 2 * N_OSC - 1) ? 0 : step + 1;
    taps = norm ^ ALT;
  end

endmodule
