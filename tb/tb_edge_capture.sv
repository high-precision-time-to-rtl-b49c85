// tb_edge_capture -- the register must hold what was at its input at the last
// rising edge, whatever the input does between edges.
`timescale 1fs/1fs
module tb_edge_capture;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [14:0] d = '0, q, exp_q = '0;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  edge_capture #(.WIDTH(15)) dut (.clk, .rst_n, .d, .q);

  initial begin
    #100;
    checks++; if (q != 0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = 15'($urandom);
      #($urandom_range(10, 500));
      clk = 1'b1; exp_q = d;
      #1 d = 15'($urandom);
      #($urandom_range(10, 500)) clk = 1'b0;
      d = 15'($urandom);
      #($urandom_range(10, 500));
      checks++;
      if (q != exp_q) begin failures++; $display("FAIL: q=%h expected %h", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
