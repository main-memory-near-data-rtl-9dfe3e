// tb_stochastic_issue: self-checking test of the stochastic write-issue
// coin.
//
// For issue probabilities 1/2, 1/4 and 1/16 (the design evaluates 1/4 and
// 1/16) it flips the coin 16000 times and checks that the fraction of heads
// is within 15 % of 2^-k. It also checks that the coin does not change
// while it is not flipped, that probability 1 (k = 0) always gives heads,
// and that the LFSR sequence does not repeat within 1000 flips. Clock 10 ns,
// watchdog 5 ms.
module tb_stochastic_issue;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] prob_log2 = 4'd2;
  logic flip = 0, heads;

  always #5 clk = ~clk;

  stochastic_issue dut (.clk, .rst_n, .prob_log2, .flip, .heads);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int n_heads, n;
    logic h0;
    logic [15:0] first;
    bit rep;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 1; k <= 4; k++) begin
      if (k == 3) continue;
      @(negedge clk);
      prob_log2 = 4'(k);
      n_heads = 0; n = 16000;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        flip = 1;
        if (heads) n_heads++;
      end
      @(negedge clk) flip = 0;
      $display("p=1/%0d heads=%0d of %0d", 1 << k, n_heads, n);
      check(n_heads * (1 << k) > n * 85 / 100 && n_heads * (1 << k) < n * 115 / 100,
            $sformatf("heads rate for 1/%0d", 1 << k));
    end
    // no flip: state holds
    @(negedge clk);
    h0 = heads;
    first = dut.lfsr;
    repeat (20) @(negedge clk);
    check(heads == h0 && dut.lfsr == first, "coin holds without flip");
    prob_log2 = 4'd0;
    #1;
    check(heads, "probability 1 always heads");
    // period longer than 1000
    rep = 0;
    flip = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (dut.lfsr == first) rep = 1;
    end
    flip = 0;
    check(!rep, "sequence does not repeat early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
