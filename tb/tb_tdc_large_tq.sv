// tb_tdc_large_tq -- the large-T_Q TDC with its slow ring oscillator model
// (T_Q = pi*T_S), short measurements (N = 4096) at several delays:
//  * C_ref ~ N*T_S/T_Q (+-2), C_meas ~ N*T_d/T_Q (+-8 counts),
//  * ratio = floor(C_meas*2^32/C_ref), and ratio*T_S ~ T_d within 8*T_Q/N,
//  * estimates increase with the delay (monotonic over a sweep),
//  * done latency = CLEAR + N + SETTLE + FRAC + 2 START periods,
//  * the run-time N: a second N of 1024 gives proportionally smaller counts.
`timescale 1fs/1fs
module tb_tdc_large_tq;
  localparam longint TS = 64'd4000000, TQ = 64'd12566371;
  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, ro_en = 1'b0, ro_clk, go = 1'b0;
  logic [30:0] n_samples = 31'd4096, c_meas, c_ref;
  logic [32:0] ratio;
  logic busy, done;
  longint td_fs = 64'd87600;
  longint last_est = -1;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  ring_osc_single_tap u_ro (.en(ro_en), .ro_out(ro_clk));
  tdc_large_tq dut (.start, .stop, .ro_clk, .rst_n, .go, .n_samples,
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

  task automatic measure(input longint td, input int n);
    longint exp_ref, exp_meas, est, tol;
    longint unsigned q;
    int edges;
    td_fs = td; n_samples = 31'(n);
    repeat (3) @(posedge start);
    @(negedge start) go = 1'b1;
    @(posedge start); #1 go = 1'b0;
    edges = 0;
    while (!done && edges < n + 200) begin @(posedge start); #1; edges++; end
    chk(edges == n + 16 + 16 + 32 + 2, $sformatf("latency %0d", edges));
    exp_ref  = (longint'(n) * TS) / TQ;
    exp_meas = (longint'(n) * td) / TQ;
    chk(longint'(c_ref) >= exp_ref - 2 && longint'(c_ref) <= exp_ref + 2,
        $sformatf("c_ref %0d expected ~%0d", c_ref, exp_ref));
    chk(longint'(c_meas) >= exp_meas - 8 && longint'(c_meas) <= exp_meas + 8,
        $sformatf("c_meas %0d expected ~%0d", c_meas, exp_meas));
    q = (longint'(c_meas) << 32) / longint'(c_ref);
    chk(longint'(ratio) == q, "ratio");
    est = (longint'(ratio) * TS) >>> 32;
    tol = 8 * TQ / n;
    chk(est >= td - tol && est <= td + tol,
        $sformatf("estimate %0d fs for %0d fs (tol %0d)", est, td, tol));
    $display("td=%0d N=%0d c_meas=%0d c_ref=%0d est=%0d fs", td, n, c_meas, c_ref, est);
  endtask

  initial begin
    #(5 * TS + 77);
    rst_n = 1'b1; ro_en = 1'b1;
    for (int k = 0; k < 6; k++) begin
      measure(64'd100000 + k * 64'd370000, 4096);
      if (last_est >= 0) chk((longint'(ratio) * TS >>> 32) > last_est, "monotonic");
      last_est = (longint'(ratio) * TS) >>> 32;
    end
    measure(64'd1032000, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd40000 * TS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
