// tb_enable_sync -- random input changed away from the clock edge; the output
// must repeat it exactly STAGES (2) rising edges later.
`timescale 1fs/1fs
module tb_enable_sync;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  logic [7:0] hist = '0;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  enable_sync dut (.clk, .rst_n, .d, .q);

  always #5000 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (q != 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      hist = {hist[6:0], d};
      if (i >= 2) begin
        checks++;
        if (q != hist[1]) begin
          failures++;
          $display("FAIL: cycle %0d q=%b expected %b", i, q, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
