// enable_sync -- chain of flip-flops clocked by the ring oscillator that
// re-times an asynchronous enable before it reaches a counter.
//
// The enable pulse of the TDC is generated from START/STOP and so has no
// timing relation to the ring-oscillator clock; passing it through flops
// clocked by the RO reduces the chance that a metastable value reaches the
// counter. The number of stages (2 by default) is this implementation's choice.
//
// Interface: d (asynchronous in), q (RO domain out), rst_n asynchronous reset.
// Timing: q follows d with a latency of STAGES rising edges of clk.
`timescale 1fs/1fs
module enable_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] ff;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ff <= '0;
    else        ff <= {ff[STAGES-2:0], d};

  assign q = ff[STAGES-1];

endmodule
