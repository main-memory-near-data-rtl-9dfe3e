// tb_pim_packet_regs: self-checking test of the packet registers.
//
// Writes 200 random packets as four 8-byte words (in random order, with
// random gaps; word 3 last) and checks that `launch` pulses exactly one cycle
// after word 3 is written, never otherwise, and that the decoded packet
// fields (op, length, x/y/z operands, alpha, beta) equal the words sent. A
// word-3 write while the PIM is busy must not launch and must raise
// `overrun`; the next good launch clears it. Clock 10 ns, watchdog 1 ms.
module tb_pim_packet_regs;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, pim_busy = 0, launch, overrun;
  logic [1:0] wr_idx = '0;
  logic [63:0] wr_data = '0;
  pim_packet_t pkt;

  pim_packet_regs dut (.clk, .rst_n, .wr_valid, .wr_idx, .wr_data, .pim_busy, .launch, .pkt, .overrun);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input int idx, input logic [63:0] d);
    @(negedge clk);
    wr_valid = 1; wr_idx = 2'(idx); wr_data = d;
    @(negedge clk);
    wr_valid = 0;
  endtask

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [63:0] w [4];
    int order [3];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 4; k++) w[k] = {$urandom, $urandom};
      order = '{0, 1, 2};
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        wr(order[k], w[order[k]]);
        check(!launch, "no launch before word 3");
        repeat ($urandom % 3) @(negedge clk);
      end
      pim_busy = (i % 10 == 5);
      wr(3, w[3]);
      // wr returns at the negedge after the write edge: launch visible now
      if (pim_busy) begin
        check(!launch && overrun, "busy: no launch, overrun set");
      end else begin
        check(launch, "launch one cycle after word 3");
        check(!overrun, "overrun cleared");
        check(pkt.op == pim_op_e'(w[1][3:0]) && pkt.nbeats == w[1][31:8] &&
              pkt.x == w[1][51:32] && pkt.y == w[2][19:0] && pkt.z == w[2][51:32] &&
              pkt.alpha == w[3][31:0] && pkt.beta == w[3][63:32], "packet fields");
      end
      pim_busy = 0;
      @(negedge clk);
      check(!launch, "launch is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
