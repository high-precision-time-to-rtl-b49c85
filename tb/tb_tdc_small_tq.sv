// tb_tdc_small_tq -- the small-T_Q TDC with its multi-phase ring model
// (15 inverters, T_Q = 28294 fs). The expected C_total is worked out from the
// edge times alone: the ring has made floor(t/T_Q) steps at time t, so one
// sample is floor(t_stop/T_Q) - floor(t_start/T_Q), summed over the N START
// edges of the window. START edges sit at odd femtoseconds and T_Q is even,
// so no edge coincides with a ring transition. Also checks the N+3 latency
// and that the estimate C_total/N*T_Q is near the true delay.
`timescale 1fs/1fs
module tb_tdc_small_tq;
  localparam longint TS = 64'd4000000, TQ = 64'd28294;
  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [14:0] taps;
  logic [30:0] n_samples = '0;
  logic signed [47:0] c_total;
  logic busy, done;
  longint td_fs = 64'd87600;
  longint t_start_edge [$];
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  ring_osc_multiphase u_ro (.taps);
  tdc_small_tq dut (.start, .stop, .ro_taps(taps), .rst_n, .go, .n_samples,
                    .c_total, .busy, .done);

  initial begin
    #(64'd1001);
    forever begin
      longint d;
      d = td_fs;
      start = 1'b1;
      #(d) stop = 1'b1;
      #(TS/2 - d) start = 1'b0;
      #(d) stop = 1'b0;
      #(TS/2 - d);
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input longint td, input int n);
    longint expct, est, tol;
    int edges;
    td_fs = td; n_samples = 31'(n);
    repeat (3) @(posedge start);
    @(negedge start) go = 1'b1;
    @(posedge start); #1 go = 1'b0;
    expct = 0; edges = 0;
    // window holds START edges 1..N after the one that sampled go
    while (!done && edges < n + 50) begin
      @(posedge start);
      edges++;
      if (edges >= 1 && edges <= n)
        expct += (($time + td) / TQ) - ($time / TQ);
      #1;
    end
    chk(edges == n + 3, $sformatf("latency %0d", edges));
    chk(longint'(c_total) == expct, $sformatf("c_total %0d expected %0d", c_total, expct));
    est = longint'(c_total) * TQ / n;
    tol = 30 * TQ / n + 1;
    chk(est >= td - tol && est <= td + tol, $sformatf("estimate %0d fs for %0d", est, td));
    $display("td=%0d N=%0d c_total=%0d est=%0d fs", td, n, c_total, est);
  endtask

  initial begin
    #(5 * TS);
    rst_n = 1'b1;
    measure(64'd87600, 2048);
    measure(64'd1032000, 2048);
    measure(64'd1999998, 512);
    measure(64'd2, 512);
    measure(64'd244000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd8000 * TS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
