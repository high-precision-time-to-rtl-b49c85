// tb_tia_counter -- random enable/clear against a reference count, at the
// default 31-bit width and at 4 bits to see the counter wrap.
`timescale 1fs/1fs
module tb_tia_counter;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [30:0] count;
  logic [3:0]  count4;
  longint unsigned model = 0;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0, wraps = 0;

  tia_counter dut (.clk, .rst_n, .clr, .en, .count);
  tia_counter #(.WIDTH(4)) dut4 (.clk, .rst_n, .clr, .en, .count(count4));

  always #5000 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (count != 0 || count4 != 0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) < 3);
      en  = ($urandom_range(0, 99) < 70);
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (en) begin
        model++;
        if (model[3:0] == 4'd0) wraps++;
      end
      checks++;
      if (count != 31'(model) || count4 != 4'(model)) begin
        failures++;
        $display("FAIL: cycle %0d count=%0d count4=%0d model=%0d", i, count, count4, model);
      end
    end
    checks++; if (wraps == 0) begin failures++; $display("FAIL: no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
