// tia_counter -- binary counter clocked by a ring oscillator.
//
// Used three times: as the measurement counter (enabled by the re-timed T_d
// pulse, result C_meas) and the reference counter (enabled for the whole
// N*T_S window, result C_ref) of the large-T_Q TDC, and as the free-running
// RO cycle counter of the small-T_Q TDC. Counting in the RO domain means the
// accumulation over N samples comes for free: no separate accumulator.
//
// Interface: clr (synchronous, RO domain) zeroes the count and takes priority
// over en; en adds one per rising edge of clk. The count wraps modulo
// 2^WIDTH; with the default 31 bits and T_Q = 12.57 ns the reference counter
// covers about 27 s before it wraps. rst_n is an asynchronous reset.
// Timing: count is registered; it shows an enabled edge one clk-to-q later.
`timescale 1fs/1fs
module tia_counter #(
  parameter int unsigned WIDTH = tdc_pkg::COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;

endmodule
