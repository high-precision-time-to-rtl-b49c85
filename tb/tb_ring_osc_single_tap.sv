// tb_ring_osc_single_tap -- checks each rising-edge period (pi * 4 ns =
// 12566370.6 fs, so 12566370 or 12566371 fs after rounding), the average
// over 50 periods to 1 fs, the duty cycle, and that the output stays low
// while the oscillator is disabled.
`timescale 1fs/1fs
module tb_ring_osc_single_tap;
  localparam longint P = 64'd12566371;
  localparam real    PR = 12566370.614359172;
  logic en = 1'b0, ro_out;
  int checks = 0, failures = 0;

  ring_osc_single_tap dut (.en, .ro_out);

  initial begin
    longint t_rise, t_prev, t_fall, t_first;
    #(5 * P);
    checks++; if (ro_out != 1'b0) begin failures++; $display("FAIL: runs while disabled"); end
    en = 1'b1;
    @(posedge ro_out); t_prev = $time; t_first = t_prev;
    for (int i = 0; i < 50; i++) begin
      @(negedge ro_out); t_fall = $time;
      @(posedge ro_out); t_rise = $time;
      checks++;
      if (t_rise - t_prev != P && t_rise - t_prev != P - 1) begin
        failures++; $display("FAIL: period %0d fs", t_rise - t_prev);
      end
      checks++;
      if (t_fall - t_prev < P / 2 - 1 || t_fall - t_prev > P / 2 + 1) begin
        failures++; $display("FAIL: high time %0d fs", t_fall - t_prev);
      end
      t_prev = t_rise;
    end
    checks++;
    if ((real'(t_prev - t_first) / 50.0 - PR) > 0.05 || (PR - real'(t_prev - t_first) / 50.0) > 0.05) begin
      failures++; $display("FAIL: average period %0d/50 fs", t_prev - t_first);
    end
    en = 1'b0;
    #(3 * P);
    checks++; if (ro_out != 1'b0) begin failures++; $display("FAIL: runs after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
