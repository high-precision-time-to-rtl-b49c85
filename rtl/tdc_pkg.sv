// tdc_pkg: types and default sizes shared by the two time-interval-averaging
// (TIA) time-to-digital converters.
//
// The 31-bit counter width and the N = 2^28 sample count are the sizes of the
// converter that was built in silicon; the sample-count register width and the
// controller states are choices of this implementation.
`timescale 1fs/1fs
package tdc_pkg;

  // Width of the measurement and reference counters of the large-T_Q TDC.
  localparam int unsigned COUNT_W = 31;

  // Width of the run-time sample count N (N = 2^28 needs 29 bits; 31 bits
  // keeps the reference counter, which grows by about N/pi, from overflowing).
  localparam int unsigned NSAMP_W = 31;

  // Sequencing of one measurement, in the START (sampling) clock domain.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // waiting for go
    ST_CLEAR  = 3'd1,  // counters / accumulator being cleared
    ST_WINDOW = 3'd2,  // observation window of N sample periods open
    ST_SETTLE = 3'd3,  // letting enables drain through the RO-domain flops
    ST_DIVIDE = 3'd4,  // post-processing (ratio) running
    ST_DONE   = 3'd5   // result valid and held
  } meas_state_e;

endpackage
