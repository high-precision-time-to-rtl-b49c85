// tb_window_ctrl -- runs several measurements with different N and checks the
// sequence cycle by cycle: clr for CLEAR_CYCLES, window for exactly N
// periods with arm one edge ahead of it, post_start after SETTLE_CYCLES,
// done after post_done, and the N = 0 -> 1 rule.
`timescale 1fs/1fs
module tb_window_ctrl;
  localparam int CLR = 3, SET = 4;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, post_done = 1'b0;
  logic [30:0] n_samples = '0;
  logic clr, arm, window, post_start, busy, done;
  // give the asynchronous reset a real falling edge
  initial begin #1 rst_n = 1'b1; #1 rst_n = 1'b0; end

  int checks = 0, failures = 0;

  window_ctrl #(.CLEAR_CYCLES(CLR), .SETTLE_CYCLES(SET)) dut (
    .clk, .rst_n, .go, .n_samples, .clr, .arm, .window, .post_start,
    .post_done, .busy, .done
  );

  always #5000 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n, input int post_lat);
    int n_eff, c_clr, c_win, c_arm, t_post, t_done, cyc;
    bit prev_arm;
    n_eff = (n == 0) ? 1 : n;
    @(negedge clk);
    n_samples = 31'(n); go = 1'b1;
    @(negedge clk);
    go = 1'b0; n_samples = 31'(12345);   // must have been latched
    c_clr = 0; c_win = 0; c_arm = 0; t_post = -1; t_done = -1; cyc = 0;
    prev_arm = 1'b0;
    // now one edge after go; count the levels each cycle
    while (t_done < 0 && cyc < 200) begin
      if (clr) c_clr++;
      if (window) c_win++;
      if (arm) c_arm++;
      chk(!(clr && window), "clr and window together");
      chk(window == prev_arm, "window follows arm by one edge");
      prev_arm = arm;
      if (post_start) begin
        t_post = cyc;
        fork begin repeat (post_lat) @(posedge clk); #1 post_done = 1'b1; @(posedge clk); #1 post_done = 1'b0; end join_none
      end
      if (done) t_done = cyc;
      chk(busy == !done, "busy");
      @(negedge clk); cyc++;
    end
    chk(c_clr == CLR, $sformatf("clr cycles %0d", c_clr));
    chk(c_win == n_eff, $sformatf("window cycles %0d expected %0d", c_win, n_eff));
    chk(c_arm == n_eff, $sformatf("arm cycles %0d expected %0d", c_arm, n_eff));
    chk(t_post == CLR + n_eff + SET - 1, $sformatf("post_start at %0d", t_post));
    chk(t_done == t_post + post_lat + 1, $sformatf("done at %0d", t_done));
    repeat (3) @(negedge clk);
    chk(done, "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(!busy && !done && !window && !clr, "reset state");
    rst_n = 1'b1;
    run(5, 1);
    run(1, 3);
    run(0, 2);
    run(37, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
