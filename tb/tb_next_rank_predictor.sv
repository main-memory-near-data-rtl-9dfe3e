// tb_next_rank_predictor: self-checking test of the next-rank write-inhibit
// pins.
//
// Drives random oldest-request information for 5000 cycles and compares the
// pins with a reference model: one cycle after the oldest pending CPU
// request is a read to rank r (and prediction is enabled), only pin r is
// high; writes, an empty queue or a disabled predictor give no pin. The
// one-cycle latency is this design's registered pin. Also counts cycles with
// an inhibit on each rank (each must occur). Clock 10 ns, watchdog 1 ms.
module tb_next_rank_predictor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enable = 0, oldest_valid = 0, oldest_is_read = 0;
  logic [0:0] oldest_rank = '0;
  logic [1:0] wr_inhibit, expect_q;
  int inh_cnt [2];

  always #5 clk = ~clk;

  next_rank_predictor #(.NUM_RANKS(2)) dut (.clk, .rst_n, .enable, .oldest_valid,
                                           .oldest_is_read, .oldest_rank, .wr_inhibit);

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    inh_cnt[0] = 0; inh_cnt[1] = 0;
    expect_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (wr_inhibit !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pins=%b expected %b", i, wr_inhibit, expect_q);
      end
      if (wr_inhibit[0]) inh_cnt[0]++;
      if (wr_inhibit[1]) inh_cnt[1]++;
      enable         = ($urandom % 8) != 0;
      oldest_valid   = ($urandom % 4) != 0;
      oldest_is_read = ($urandom % 3) != 0;
      oldest_rank    = 1'($urandom);
      expect_q = (enable && oldest_valid && oldest_is_read) ? (2'b01 << oldest_rank) : 2'b00;
    end
    checks++;
    if (inh_cnt[0] == 0 || inh_cnt[1] == 0) begin
      failures++;
      $display("FAIL an inhibit pin never rose");
    end
    $display("inhibit cycles rank0=%0d rank1=%0d", inh_cnt[0], inh_cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
