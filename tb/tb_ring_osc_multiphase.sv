// tb_ring_osc_multiphase -- every T_Q (28294 fs) exactly one inverter output
// changes, and it changes to the inverse of its input (the previous tap in the
// ring, tap 14 for tap 0); tap 0 rises once per 2*15*T_Q.
`timescale 1fs/1fs
module tb_ring_osc_multiphase;
  localparam int     N  = 15;
  localparam longint TQ = 64'd28294;
  logic [N-1:0] taps, prev;
  int checks = 0, failures = 0;

  ring_osc_multiphase dut (.taps);

  initial begin
    longint t_last, t_rise0;
    int n_rise0;
    #1;
    prev = taps; t_last = 0; n_rise0 = 0; t_rise0 = -1;
    for (int i = 0; i < 400; i++) begin
      logic [N-1:0] diff;
      int idx, cnt;
      @(taps);
      diff = taps ^ prev;
      cnt = 0; idx = 0;
      for (int b = 0; b < N; b++) if (diff[b]) begin cnt++; idx = b; end
      checks++;
      if (cnt != 1 || $time - t_last != TQ) begin
        failures++; $display("FAIL: %0d taps changed after %0d fs", cnt, $time - t_last);
      end
      checks++;
      if (taps[idx] != ~prev[(idx + N - 1) % N]) begin
        failures++; $display("FAIL: tap %0d is not the inverse of its input", idx);
      end
      if (idx == 0 && taps[0]) begin
        if (t_rise0 >= 0) begin
          checks++;
          if ($time - t_rise0 != 2 * N * TQ) begin failures++; $display("FAIL: period %0d", $time - t_rise0); end
        end
        t_rise0 = $time; n_rise0++;
      end
      prev = taps; t_last = $time;
    end
    checks++; if (n_rise0 < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * TQ);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
