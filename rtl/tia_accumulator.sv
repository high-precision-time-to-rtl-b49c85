// tia_accumulator -- sums N successive delay samples C_d into C_total for
// the small-T_Q TDC (time interval averaging); the average delay is then
// T_d,avg = C_total / N * T_Q.
//
// Clocked by START. A sample taken at START edge k is complete once STOP k
// has been captured, and is added at START edge k+1, so the add is enabled by
// the window flag of the previous period: exactly N adds per window. The
// accumulator width (ACC_W) is this implementation's choice.
//
// Interface: clr (synchronous) zeroes the sum; en adds c_d at this edge.
`timescale 1fs/1fs
module tia_accumulator #(
  parameter int unsigned CD_W  = 15,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [CD_W-1:0]  c_d,
  output logic signed [ACC_W-1:0] c_total
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   c_total <= '0;
    else if (clr) c_total <= '0;
    else if (en)  c_total <= c_total + ACC_W'(c_d);

endmodule
