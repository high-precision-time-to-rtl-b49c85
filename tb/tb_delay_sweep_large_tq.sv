// tb_delay_sweep_large_tq -- delay-step resolution of the large-T_Q TDC, the
// workload of the "estimated vs. actual delay" sweep: the converter measures
// a base delay T_t and T_t plus small steps, each over N samples, and the
// estimates must follow the steps.
//
// The original sweep uses N = 2^28 samples (1.07 s of signal) per point and
// 1 fs steps; that is beyond a practical event-driven simulation, so this
// test uses N = 2^LOG2N = 2^24 samples per point and steps of one and two
// phase-modulator LSBs (244 fs). One count of C_meas is worth T_Q/N (0.75 fs
// at 2^24). Because 113*T_Q is within 3e-5*T_S of 355*T_S (the 355/113
// approximation of pi), the oscillator edges sweep the sampling period in
// near-repeating groups of 113, and C_meas can be off by up to about half a
// group; the tolerance is therefore TOL_COUNTS = 64 counts (48 fs here).
// Checks: absolute estimate, each step difference, monotonic estimates.
`timescale 1fs/1fs
module tb_delay_sweep_large_tq;
  localparam int     LOG2N      = 24;
  localparam longint TS         = 64'd4000000, TQ = 64'd12566371;
  localparam longint TOL_COUNTS = 64;
  localparam longint TT         = 64'd1000000;   // base delay T_t = 1 ns
  localparam int     NPTS       = 3;
  localparam longint STEP [NPTS] = '{64'd0, 64'd244, 64'd488};

  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, ro_en = 1'b0, ro_clk, go = 1'b0;
  logic [30:0] c_meas, c_ref;
  logic [32:0] ratio;
  logic busy, done;
  longint td_fs = TT;
  longint est [NPTS];
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  ring_osc_single_tap u_ro (.en(ro_en), .ro_out(ro_clk));
  tdc_large_tq dut (.start, .stop, .ro_clk, .rst_n, .go, .n_samples(31'(64'd1 << LOG2N)),
                    .c_meas, .c_ref, .ratio, .busy, .done);

  initial forever begin
    longint d;
    d = td_fs;
    start = 1'b1;
    #(d) stop = 1'b1;
    #(TS/2 - d) start = 1'b0;
    #(d) stop = 1'b0;
    #(TS/2 - d);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint tol;
    tol = (TOL_COUNTS * TQ) >> LOG2N;
    #(5 * TS + 77);
    rst_n = 1'b1; ro_en = 1'b1;
    for (int k = 0; k < NPTS; k++) begin
      td_fs = TT + STEP[k];
      repeat (3) @(posedge start);
      @(negedge start) go = 1'b1;
      @(posedge start); #1 go = 1'b0;
      wait (done);
      // ratio is Q1.32 of T_S; keep 1/1024 fs by scaling before the shift
      est[k] = (longint'(ratio) * (TS / 64'd1000) * 64'd1024) >>> 32;  // in fs/1024*1000
      est[k] = (est[k] * 64'd1000) / 64'd1024;
      $display("T_t+%0d fs: c_meas=%0d c_ref=%0d estimate=%0d fs", STEP[k], c_meas, c_ref, est[k]);
      chk(est[k] >= td_fs - tol && est[k] <= td_fs + tol,
          $sformatf("estimate %0d fs for %0d fs (tol %0d)", est[k], td_fs, tol));
      if (k > 0) chk(est[k] > est[k-1], "estimates increase with the delay");
      if (k > 0)
        chk((est[k] - est[0]) >= STEP[k] - 2 * tol && (est[k] - est[0]) <= STEP[k] + 2 * tol,
            $sformatf("step %0d fs seen as %0d fs", STEP[k], est[k] - est[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((longint'(NPTS) * ((64'd1 << LOG2N) + 200) + 100) * TS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
