// edge_capture -- register that records a snapshot on the rising edge of a
// timing signal (START or STOP).
//
// In the small-T_Q TDC four of these hold the RO phases (F_START, F_STOP) and
// the RO cycle counter (C_START, C_STOP) at the two edges; the difference of
// the STOP and START snapshots is one delay sample. The input is asynchronous
// to the capturing edge; no metastability hardening is modelled.
//
// Interface: clk = START or STOP, d = snapshot source, q = held snapshot,
// rst_n asynchronous reset. Timing: q updates one clk-to-q after each edge.
`timescale 1fs/1fs
module edge_capture #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;

endmodule
