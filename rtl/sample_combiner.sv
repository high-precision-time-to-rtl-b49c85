// sample_combiner -- forms one delay sample C_d of the small-T_Q TDC, in
// units of one inverter delay T_Q:
//   C_C = C_STOP - C_START         (whole RO periods, modulo 2^CNT_W)
//   C_F = F_STOP - F_START         (fine phase difference, may be negative)
//   C_d = 2*N_OSC*C_C + C_F
// since one RO period contains 2*N_OSC inverter delays. The equation follows
// the source; the widths are this implementation's choice: the coarse
// difference is taken modulo 2^CNT_W, so delays up to 2^CNT_W RO periods are
// unambiguous.
//
// Interface: purely combinational; c_d is two's complement.
`timescale 1fs/1fs
module sample_combiner #(
  parameter int unsigned N_OSC = 15,
  parameter int unsigned CNT_W = 8,
  localparam int unsigned PH_W = $clog2(2 * N_OSC),
  localparam int unsigned CD_W = CNT_W + PH_W + 2
) (
  input  logic [CNT_W-1:0]       c_start,
  input  logic [CNT_W-1:0]       c_stop,
  input  logic [PH_W-1:0]        f_start,
  input  logic [PH_W-1:0]        f_stop,
  output logic signed [CD_W-1:0] c_d
);

  logic [CNT_W-1:0]       c_c;
  logic signed [CD_W-1:0] c_f;

  always_comb begin
    c_c = c_stop - c_start;
    c_f = signed'(CD_W'(f_stop)) - signed'(CD_W'(f_start));
    c_d = signed'(CD_W'(c_c) * CD_W'(2 * N_OSC)) + c_f;
  end

endmodule
