// tb_sample_combiner -- random counter and phase snapshots against
// C_d = 30*((C_STOP - C_START) mod 256) + F_STOP - F_START (N_OSC = 15).
`timescale 1fs/1fs
module tb_sample_combiner;
  logic [7:0] c_start, c_stop;
  logic [4:0] f_start, f_stop;
  logic signed [14:0] c_d;
  int checks = 0, failures = 0, negs = 0, wraps = 0;

  sample_combiner dut (.c_start, .c_stop, .f_start, .f_stop, .c_d);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int exp_cd;
      c_start = 8'($urandom);
      c_stop  = (i % 2) ? 8'($urandom) : 8'(c_start + 8'($urandom_range(0, 3)));
      f_start = 5'($urandom_range(0, 29));
      f_stop  = 5'($urandom_range(0, 29));
      #10;
      exp_cd = 30 * ((int'(c_stop) - int'(c_start) + 256) % 256) + int'(f_stop) - int'(f_start);
      if (c_stop < c_start) wraps++;
      if (f_stop < f_start) negs++;
      checks++;
      if (int'(c_d) != exp_cd) begin
        failures++;
        $display("FAIL: %0d %0d %0d %0d -> %0d expected %0d", c_start, c_stop, f_start, f_stop, c_d, exp_cd);
      end
    end
    checks++; if (wraps == 0 || negs == 0) failures++;
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
