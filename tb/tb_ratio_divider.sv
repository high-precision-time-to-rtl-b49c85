// tb_ratio_divider -- random C_meas < C_ref pairs against floor(a*2^32/b)
// worked out in 64-bit arithmetic, the latency (done FRAC+1 = 33 clock edges
// after the edge that takes start, seen here at the 34th falling edge),
// saturation to 1.0 and a zero divisor (done on the next edge).
`timescale 1fs/1fs
module tb_ratio_divider;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [30:0] dividend = '0, divisor = '0;
  logic [32:0] ratio;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  ratio_divider dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .ratio);

  always #5000 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic divide(input logic [30:0] a, input logic [30:0] b, input longint unsigned expq, input int explat);
    int lat;
    @(negedge clk);
    dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0; dividend = '1; divisor = '1;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    chk(longint'(ratio) == expq, $sformatf("%0d/%0d -> %h expected %h", a, b, ratio, expq));
    chk(lat == explat, $sformatf("latency %0d expected %0d", lat, explat));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      logic [30:0] a, b;
      b = 31'($urandom_range(1, 32'h7fffffff));
      if (i < 10) b = 31'($urandom_range(1, 5000));
      a = 31'($urandom_range(0, 32'(b) - 1));
      divide(a, b, (longint'(a) << 32) / longint'(b), 34);
    end
    divide(31'd1, 31'd2, 64'h0_8000_0000, 34);
    divide(31'h3fffffff, 31'h7ffffffe, 64'h0_8000_0000, 34);
    divide(31'd2607, 31'd2607, 64'h1_0000_0000, 1);
    divide(31'd9, 31'd4, 64'h1_0000_0000, 1);
    divide(31'd5, 31'd0, 64'd0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
