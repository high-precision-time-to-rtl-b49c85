// tb_tia_tdc_top -- end-to-end test of both TIA TDCs at their default
// parameters.
//
// A START/STOP source (a phase modulator modelled as START delayed by td_fs)
// runs at T_S = 4 ns. For several delays both converters measure the same
// signal pair at the same time over N samples; the checks are
//  * large-T_Q: C_ref against N*T_S/T_Q, ratio against C_meas/C_ref worked
//    out here in 64-bit arithmetic, and ratio*T_S against the true delay
//    within a few T_Q/N;
//  * small-T_Q: C_total/N*T_Q against the true delay within a few T_Q/N;
//  * the measurement latency in START periods from go to done.
// It also counts the mechanisms the converters rely on (pulses counted,
// clearing between measurements, coarse-counter carries and wraps, negative
// fine differences) and fails if one never occurred.
`timescale 1fs/1fs
module tb_tia_tdc_top;
  localparam longint TS_FS   = 64'd4000000;      // T_S = 4 ns
  localparam longint TQL_FS  = 64'd12566371;     // large T_Q = pi*T_S
  localparam longint TQS_FS  = 64'd28294;        // small T_Q = T_S/(45*pi)
  localparam int     NS      = 8192;             // samples per measurement
  localparam int     LAT     = NS + 16 + 16 + 32 + 2;

  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, ro_en = 1'b0;
  logic lq_go = 1'b0, sq_go = 1'b0;
  logic [30:0] lq_c_meas, lq_c_ref;
  logic [32:0] lq_ratio;
  logic lq_busy, lq_done, sq_busy, sq_done;
  logic signed [47:0] sq_c_total;
  longint td_fs = 64'd87600;

  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;
  int n_meas_pulses = 0, n_clear_ok = 0, n_carry = 0, n_wrap = 0, n_negf = 0, n_lat_ok = 0;

  tia_tdc_top dut (
    .start, .stop, .rst_n, .ro_en,
    .lq_go, .lq_n_samples(31'(NS)), .lq_c_meas, .lq_c_ref, .lq_ratio,
    .lq_busy, .lq_done,
    .sq_go, .sq_n_samples(31'(NS)), .sq_c_total, .sq_busy, .sq_done
  );

  // START / STOP source, STOP lags START by td_fs (< T_S/2)
  initial begin
    forever begin
      longint d;
      d = td_fs;
      start = 1'b1;
      #(d) stop = 1'b1;
      #(TS_FS/2 - d) start = 1'b0;
      #(d) stop = 1'b0;
      #(TS_FS/2 - d);
    end
  end

  // mechanism counters (small-T_Q datapath, sampled when a sample is added)
  always @(posedge start) if (dut.u_sq.window) begin
    if (dut.u_sq.u_comb.c_c != 0)                    n_carry++;
    if (dut.u_sq.c_stop < dut.u_sq.c_start)          n_wrap++;
    if (dut.u_sq.f_stop < dut.u_sq.f_start)          n_negf++;
  end
  always @(posedge dut.u_lq.u_meas_cnt.clk) if (dut.u_lq.u_meas_cnt.en) n_meas_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input longint td);
    longint t0, t_lat, exp_ref, est_l, est_s, tol_l, tol_s;
    longint unsigned q;
    int edges;
    bit clr_ok;
    td_fs = td;
    repeat (4) @(posedge start);
    @(negedge start);
    lq_go = 1'b1; sq_go = 1'b1;
    @(posedge start);            // go sampled here
    #1 lq_go = 1'b0; sq_go = 1'b0;
    edges = 0;
    while (!(lq_done && sq_done)) begin
      @(posedge start); #1; edges++;
      // each measurement must start from cleared counters / accumulator
      if (edges == 1) begin
        check(sq_c_total == 0, "small-TQ accumulator cleared");
        clr_ok = (sq_c_total == 0);
      end
      if (edges == 16) begin
        check(lq_c_meas == 0 && lq_c_ref == 0, "large-TQ counters cleared before window");
        if (clr_ok && lq_c_meas == 0 && lq_c_ref == 0) n_clear_ok++;
      end
      if (edges > LAT + 100) break;
    end
    // lq_done is the later of the two; check its latency exactly
    check(edges == LAT, $sformatf("latency %0d START periods, expected %0d", edges, LAT));
    if (edges == LAT) n_lat_ok++;
    // reference count: N*T_S/T_Q (+-2 for the window edges)
    exp_ref = (longint'(NS) * TS_FS) / TQL_FS;
    check(longint'(lq_c_ref) >= exp_ref - 2 && longint'(lq_c_ref) <= exp_ref + 2,
          $sformatf("c_ref %0d expected ~%0d", lq_c_ref, exp_ref));
    // ratio: floor(c_meas * 2^32 / c_ref)
    q = (longint'(lq_c_meas) << 32) / longint'(lq_c_ref);
    check(longint'(lq_ratio) == q, $sformatf("ratio %0h expected %0h", lq_ratio, q));
    // delay estimates
    est_l = (longint'(lq_ratio) * TS_FS) >>> 32;
    tol_l = 8 * TQL_FS / NS;
    check(est_l >= td - tol_l && est_l <= td + tol_l,
          $sformatf("large-TQ estimate %0d fs, true %0d fs (tol %0d)", est_l, td, tol_l));
    est_s = (longint'(sq_c_total) * TQS_FS) / NS;
    tol_s = 30 * TQS_FS / NS + 1;
    check(est_s >= td - tol_s && est_s <= td + tol_s,
          $sformatf("small-TQ estimate %0d fs, true %0d fs (tol %0d)", est_s, td, tol_s));
    $display("td=%0d fs  large-TQ: c_meas=%0d c_ref=%0d est=%0d fs  small-TQ: c_total=%0d est=%0d fs",
             td, lq_c_meas, lq_c_ref, est_l, sq_c_total, est_s);
  endtask

  initial begin
    #(10 * TS_FS + 123);
    rst_n = 1'b1;
    ro_en = 1'b1;
    measure(64'd87600);      // test delay of the simulations (87.6 ps)
    measure(64'd1032000);    // largest delay to digitize (1.032 ns)
    measure(64'd244000);     // one phase-modulator step (244 fs) ...
    measure(64'd500000);
    check(n_meas_pulses > 0, "measurement counter never enabled");
    check(n_clear_ok == 4,   "counters not cleared between measurements");
    check(n_carry > 0,       "coarse counter never contributed");
    check(n_wrap > 0,        "coarse counter never wrapped inside a sample");
    check(n_negf > 0,        "fine difference never negative");
    check(n_lat_ok == 4,     "latency");
    $display("mechanisms: meas_edges=%0d clears=%0d carries=%0d wraps=%0d neg_fine=%0d",
             n_meas_pulses, n_clear_ok, n_carry, n_wrap, n_negf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(64'd4 * (NS + 200) * TS_FS + 64'd50 * TS_FS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
