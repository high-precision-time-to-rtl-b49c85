// tb_jitter_convergence -- both converters under jitter, at growing sample
// counts (the convergence sweeps of error against N).
//
// START carries Gaussian sampling jitter (std. dev. SAMPL_JIT_FS, STOP keeps
// the nominal delay after each jittered START, so the sampled interval varies
// from sample to sample); both ring oscillators carry accumulating Gaussian
// jitter (OSC_JIT_FS per half period of the slow ring, per inverter delay of
// the fast ring). For N = 2^6, 2^10, 2^14 and 2^18 each converter measures
// T_d = 87.6 ps and the error must stay inside a bound made of
//  * the deterministic part: 8 counts (large-T_Q; the oscillator jitter
//    breaks up the near-repeating edge groups of the jitter-free case) or
//    30 counts (small-T_Q) of T_Q/N, and
//  * six standard deviations of the random part: sqrt(C_ref*T_d/T_S) counts
//    for the large-T_Q converter, (sigma_sampl + T_Q/sqrt(12))/sqrt(N) for the
//    small-T_Q converter.
// The errors are printed so the convergence can be read off.
`timescale 1fs/1fs
module tb_jitter_convergence;
  localparam longint TS = 64'd4000000, TQL = 64'd12566371, TQS = 64'd28294;
  localparam int unsigned SAMPL_JIT_FS = 5000;   // 5 ps
  localparam int unsigned OSC_JIT_FS   = 500;    // 0.5 ps
  localparam longint TD = 64'd87600;

  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, ro_en = 1'b0, ro_clk;
  logic go = 1'b0;
  logic [30:0] n_samples = '0, c_meas, c_ref;
  logic [32:0] ratio;
  logic [14:0] taps;
  logic signed [47:0] c_total;
  logic l_busy, l_done, s_busy, s_done;
  int checks = 0, failures = 0;

  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  ring_osc_single_tap #(.JITTER_FS(OSC_JIT_FS)) u_ro_l (.en(ro_en), .ro_out(ro_clk));
  ring_osc_multiphase #(.JITTER_FS(OSC_JIT_FS)) u_ro_s (.taps);
  tdc_large_tq u_l (.start, .stop, .ro_clk, .rst_n, .go, .n_samples,
                    .c_meas, .c_ref, .ratio, .busy(l_busy), .done(l_done));
  tdc_small_tq u_s (.start, .stop, .ro_taps(taps), .rst_n, .go, .n_samples,
                    .c_total, .busy(s_busy), .done(s_done));

  function automatic longint gauss(int unsigned sigma);
    longint acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += longint'($urandom_range(0, 65535)) - 32768;
    return (acc * longint'(sigma)) / 65536;
  endfunction

  // START with sampling jitter j in [-3 sigma, 3 sigma] around the nominal grid
  initial begin
    #(64'd1001);
    forever begin
      longint j;
      j = gauss(SAMPL_JIT_FS);
      if (j > 3 * SAMPL_JIT_FS) j = 3 * SAMPL_JIT_FS;
      if (j < -3 * SAMPL_JIT_FS) j = -3 * SAMPL_JIT_FS;
      #(TS/4 + j) start = 1'b1;
      #(TD) stop = 1'b1;
      #(TS/2 - TD) start = 1'b0;
      #(TD) stop = 1'b0;
      #(TS/4 - TD - j);
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint isqrt(longint v);
    longint r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  initial begin
    #(5 * TS);
    rst_n = 1'b1; ro_en = 1'b1;
    for (int lg = 6; lg <= 18; lg += 4) begin
      longint n, est_l, est_s, err_l, err_s, bnd_l, bnd_s, cref;
      n = 64'd1 << lg;
      n_samples = 31'(n);
      repeat (3) @(posedge start);
      @(negedge start) go = 1'b1;
      @(posedge start); #1 go = 1'b0;
      wait (l_done && s_done);
      est_l = (longint'(ratio) * TS) >>> 32;
      est_s = longint'(c_total) * TQS / n;
      err_l = est_l - TD; if (err_l < 0) err_l = -err_l;
      err_s = est_s - TD; if (err_s < 0) err_s = -err_s;
      cref  = n * TS / TQL;
      bnd_l = (8 + 6 * (isqrt(cref * TD / TS) + 1)) * TQL / n;
      bnd_s = 30 * TQS / n + 6 * (longint'(SAMPL_JIT_FS) + TQS * 29 / 100) / isqrt(n);
      $display("N=2^%0d  large-T_Q error %0d fs (bound %0d)  small-T_Q error %0d fs (bound %0d)",
               lg, err_l, bnd_l, err_s, bnd_s);
      chk(err_l <= bnd_l, $sformatf("large-T_Q error %0d fs at N=2^%0d", err_l, lg));
      chk(err_s <= bnd_s, $sformatf("small-T_Q error %0d fs at N=2^%0d", err_s, lg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400000 * TS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
