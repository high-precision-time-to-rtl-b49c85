// tb_interval_pulse -- START/STOP at T_S = 4 ns with several delays and a
// random arm per period. The pulse must be high only in armed periods,
// rise with START and fall with STOP (width = T_d).
`timescale 1fs/1fs
module tb_interval_pulse;
  localparam longint TS = 64'd4000000;
  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0, arm = 1'b0, pulse;
  longint td = 64'd87600;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0, armed = 0, unarmed = 0;

  interval_pulse dut (.start, .stop, .rst_n, .arm, .pulse);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(3 * TS);
    rst_n = 1'b1;
    #(TS / 4);
    for (int i = 0; i < 300; i++) begin
      bit a;
      if (i == 100) td = 64'd1032000;
      if (i == 200) td = 64'd3900000;
      a = 1'($urandom_range(0, 1));
      arm = a;
      #1000 start = 1'b1;                     // START rising edge
      #1 arm = 1'b0;
      #(td / 2);
      chk(pulse == a, $sformatf("period %0d mid-pulse %b armed %b", i, pulse, a));
      if (a) armed++; else unarmed++;
      #(td - td / 2 - 1) stop = 1'b1;         // STOP rising edge, td after START
      #1;
      chk(pulse == 1'b0, $sformatf("period %0d pulse not ended by STOP", i));
      #(TS - 1000 - td - 1);
      start = 1'b0; stop = 1'b0;
      chk(pulse == 1'b0, "pulse between periods");
    end
    chk(armed > 0 && unarmed > 0, "both armed and unarmed periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TS * 400);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
