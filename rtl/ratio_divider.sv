// ratio_divider -- fixed-point divider that forms the delay estimate
// T_d,avg / T_S = C_meas / C_ref of the large-T_Q TDC.
//
// The ratio lies in [0, 1]: 0 is no delay, 1 a delay of a whole sampling
// period T_S. The result is independent of the absolute ring-oscillator
// period, so the estimate is referred to T_S only. A restoring divider makes
// one quotient bit per clock cycle, most significant first.
//
// Interface: start (one cycle) latches dividend = C_meas and divisor = C_ref,
// which must stay the value they had at start only for that cycle. After
// FRAC+1 cycles done pulses for one cycle and ratio holds the quotient in
// unsigned Q1.FRAC format until the next start. If dividend >= divisor the
// result saturates to exactly 1.0; a zero divisor gives 0. busy is high
// while dividing. Doing the division on chip, its radix and the 32 fraction
// bits (about 1 fs of a 4 ns period) are this implementation's choices.
`timescale 1fs/1fs
module ratio_divider #(
  parameter int unsigned WIDTH = tdc_pkg::COUNT_W,
  parameter int unsigned FRAC  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic            busy,
  output logic            done,
  output logic [FRAC:0]   ratio
);

  localparam int unsigned CNT_W = $clog2(FRAC + 2);

  logic [WIDTH:0]   rem;
  logic [WIDTH-1:0] dsr;
  logic [CNT_W-1:0] left;
  logic [FRAC:0]    q;
  logic             ge;

  assign ge = (rem >= {1'b0, dsr});

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rem   <= '0;
      dsr   <= '0;
      left  <= '0;
      q     <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      ratio <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (divisor == '0) begin
          ratio <= '0;
          done  <= 1'b1;
          busy  <= 1'b0;
        end else if (dividend >= divisor) begin
          ratio <= (FRAC+1)'(1) << FRAC;
          done  <= 1'b1;
          busy  <= 1'b0;
        end else begin
          rem  <= {1'b0, dividend};
          dsr  <= divisor;
          left <= CNT_W'(FRAC + 1);
          q    <= '0;
          busy <= 1'b1;
        end
      end else if (busy) begin
        rem  <= (ge ? (rem - {1'b0, dsr}) : rem) << 1;
        q    <= {q[FRAC-1:0], ge};
        left <= left - 1'b1;
        if (left == CNT_W'(1)) begin
          ratio <= {q[FRAC-1:0], ge};
          done  <= 1'b1;
          busy  <= 1'b0;
        end
      end
    end

endmodule
