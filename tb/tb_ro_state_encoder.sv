// tb_ro_state_encoder -- builds every state of a 15-inverter ring (step k
// flips inverter k mod 15, starting from tap[i] = i odd) and checks the phase
// (k - 1) mod 30; then flips one tap other than tap 0 (a bubble) and checks
// that the phase moves by at most one step.
`timescale 1fs/1fs
module tb_ro_state_encoder;
  localparam int N = 15;
  logic [N-1:0] state;
  logic [4:0]   phase;
  int checks = 0, failures = 0;

  ro_state_encoder dut (.state, .phase);

  function automatic logic [N-1:0] ring_state(int k);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = (i % 2 == 1);
    for (int j = 0; j < k; j++) s[j % N] = ~s[j % N];
    return s;
  endfunction

  initial begin
    for (int k = 0; k < 2 * N; k++) begin
      int exp_ph, d;
      exp_ph = (k + 2 * N - 1) % (2 * N);
      state = ring_state(k);
      #10;
      checks++;
      if (int'(phase) != exp_ph) begin
        failures++;
        $display("FAIL: step %0d state %b phase %0d expected %0d", k, state, phase, exp_ph);
      end
      for (int b = 1; b < N; b++) begin
        state = ring_state(k) ^ (N'(1) << b);
        #10;
        d = (int'(phase) - exp_ph + 2 * N) % (2 * N);
        checks++;
        if (!(d == 0 || d == 1 || d == 2 * N - 1)) begin
          failures++;
          $display("FAIL: step %0d bubble at %0d phase %0d expected %0d+-1", k, b, phase, exp_ph);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
