// tb_tia_accumulator -- random signed samples with random enable and clear
// against a 64-bit reference sum.
`timescale 1fs/1fs
module tb_tia_accumulator;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic signed [14:0] c_d = '0;
  logic signed [47:0] c_total;
  longint model = 0;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0, negs = 0;

  tia_accumulator dut (.clk, .rst_n, .clr, .en, .c_d, .c_total);

  always #5000 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 199) == 0);
      en  = ($urandom_range(0, 9) < 8);
      c_d = 15'($urandom_range(0, 400)) - 15'sd100;
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (en) begin model += longint'(c_d); if (c_d < 0) negs++; end
      checks++;
      if (longint'(c_total) != model) begin
        failures++;
        $display("FAIL: cycle %0d total=%0d model=%0d", i, c_total, model);
      end
    end
    checks++; if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 4000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
