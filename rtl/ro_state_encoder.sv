// ro_state_encoder -- converts a sampled ring-oscillator state into its phase
// number 0 .. 2*N_OSC-1 (units of one inverter delay T_Q).
//
// Inverting every odd inverter output turns the ring state into a pattern of
// ones growing from tap 0 upwards and then shrinking from tap 0 upwards. The
// phase is derived from the NUMBER of ones plus the value of tap 0, not from
// the position of a single transition, so an isolated bubble (a wrongly
// resolved flip-flop) moves the result by at most one step instead of
// corrupting it. Phase 0 is the state just after tap 0 rises, which is the
// edge that clocks the RO cycle counter, so phase and counter wrap together.
// The source asks for bubble-error mitigation in the encoder but gives no
// circuit; the ones-counting encoder is this implementation's choice.
//
// Interface: purely combinational, state (sampled taps) in, phase out.
`timescale 1fs/1fs
module ro_state_encoder #(
  parameter int unsigned N_OSC = 15,
  localparam int unsigned PH_W = $clog2(2 * N_OSC)
) (
  input  logic [N_OSC-1:0] state,
  output logic [PH_W-1:0]  phase
);

  logic [N_OSC-1:0] norm;
  logic [PH_W-1:0]  ones;
  logic [PH_W-1:0]  pos;   // 0 = settled state before tap 0 rises

  always_comb begin
    for (int i = 0; i < N_OSC; i++) norm[i] = state[i] ^ i[0];
    ones = '0;
    for (int i = 0; i < N_OSC; i++) ones = ones + PH_W'(norm[i]);
    if (norm[0])           pos = ones;
    else if (ones == '0)   pos = '0;
    else                   pos = PH_W'(2 * N_OSC) - ones;
    phase = (pos == '0) ? PH_W'(2 * N_OSC - 1) : pos - 1'b1;
  end

endmodule
