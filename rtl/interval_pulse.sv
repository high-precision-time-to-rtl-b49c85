// interval_pulse -- the "Logic" block of the large-T_Q TDC: it turns each
// START/STOP edge pair into an enable pulse whose width is the delay T_d.
//
// Two toggle flip-flops make the pulse without any gated clock or reset
// path: s_tog is clocked by START and toggles when the sample is armed;
// p_tog is clocked by STOP and copies s_tog. Their XOR is high from an armed
// START rising edge to the following STOP rising edge, i.e. for T_d. The pulse
// is asynchronous to the ring oscillator and is re-timed downstream.
//
// Interface: arm is sampled at each START rising edge (it belongs to the START
// domain) and decides whether that sample period contributes a pulse, so that
// exactly N pulses fall inside an N-period observation window. rst_n is an
// asynchronous active-low reset.
// Timing: pulse rises at START + clock-to-q and falls at STOP + clock-to-q.
// Requires 0 < T_d < T_S (STOP must follow its START within one period).
// The pulse-generating circuit is this implementation's choice: the source
// only states that the pulse is extracted from the START and STOP edges.
`timescale 1fs/1fs
module interval_pulse (
  input  logic start,   // START (LO rising edges, period T_S)
  input  logic stop,    // STOP (phase-modulated output, START delayed by T_d)
  input  logic rst_n,
  input  logic arm,     // START domain: make a pulse in this period
  output logic pulse    // high for T_d in every armed period
);

  logic s_tog, p_tog;

  always_ff @(posedge start or negedge rst_n)
    if (!rst_n) s_tog <= 1'b0;
    else        s_tog <= s_tog ^ arm;

  always_ff @(posedge stop or negedge rst_n)
    if (!rst_n) p_tog <= 1'b0;
    else        p_tog <= s_tog;

  assign pulse = s_tog ^ p_tog;

endmodule
