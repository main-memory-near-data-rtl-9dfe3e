// tb_pim_rank_unit: end-to-end test of the logic die of one rank.
//
// A behavioural DRAM (dram_model) and a random host memory controller
// (host_mc_model, CPU traffic to banks 0..13) share the rank with the PIM,
// whose operands sit in the reserved banks 14 and 15. Every PIM operation
// (COPY, SCAL, AXPY, XPY, AXPBY, XMY, DOT, NRM2) runs on 300-beat vectors
// (two full 128-beat batches and a partial one) of small integers, so every
// result is exact in fp32 and is compared bit for bit with the reference.
// Each operation runs once without host traffic, checking that consecutive
// PIM reads of a batch are tCCD_L = 6 cycles apart, and then with host
// traffic under each throttling mode (none, next-rank prediction,
// stochastic 1/4). The DRAM model must see no timing violation. Host and PIM
// commands are counted; the test fails if host commands never interleave
// with a running operation or a write is never throttled. Packets are sent
// as four 8-byte writes in cycles with no host command. Clock 10 ns, watchdog
// 20 ms.
module tb_pim_rank_unit;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_en = 0;
  logic        host_cmd_valid;
  logic [0:0]  host_cmd_rank;
  dram_cmd_t   host_cmd;
  logic        oldest_valid, oldest_is_read;
  logic [0:0]  oldest_rank;
  logic        pkt_wr_valid = 0;
  logic [1:0]  pkt_wr_idx = '0;
  logic [63:0] pkt_wr_data = '0;
  logic        wr_inhibit;
  thr_mode_e   thr_mode = THR_NONE;
  logic [3:0]  prob_log2 = 4'd2;
  dram_cmd_t   die_cmd;
  dram_cmd_t   die_cmds [1];
  logic        die_cmd_is_pim, die_rvalid;
  logic [63:0] die_wdata, die_rdata;
  logic        busy, done, wr_phase, throttled, result_valid, overrun;
  logic [31:0] result;

  assign die_cmds[0] = die_cmd;

  host_mc_model #(.NUM_RANKS(1), .RATE(80)) u_host (
    .clk, .rst_n, .enable(host_en), .die_cmd(die_cmds), .host_cmd_valid, .host_cmd_rank,
    .host_cmd, .oldest_valid, .oldest_is_read, .oldest_rank
  );
  next_rank_predictor #(.NUM_RANKS(1)) u_nrp (
    .clk, .rst_n, .enable(thr_mode == THR_NRP), .oldest_valid, .oldest_is_read, .oldest_rank,
    .wr_inhibit
  );
  pim_rank_unit dut (
    .clk, .rst_n, .host_cmd_valid, .host_cmd, .pkt_wr_valid, .pkt_wr_idx, .pkt_wr_data,
    .wr_inhibit, .thr_mode, .prob_log2, .die_cmd, .die_cmd_is_pim, .die_wdata,
    .die_rvalid, .die_rdata, .busy, .done, .wr_phase, .throttled, .result, .result_valid, .overrun
  );
  dram_model u_dram (.clk, .rst_n, .cmd(die_cmd), .cmd_is_pim(die_cmd_is_pim), .wdata(die_wdata),
                     .rvalid(die_rvalid), .rdata(die_rdata));

  // ---- counters ----
  int n_host_busy = 0, n_pim_cmds = 0, n_thr = 0, n_inh = 0, n_gap_bad = 0, n_gap = 0;
  longint cyc = 0, last_rd = -1;
  logic gap_check = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy && host_cmd_valid) n_host_busy++;
    if (die_cmd_is_pim) n_pim_cmds++;
    if (throttled) n_thr++;
    if (wr_phase && wr_inhibit) n_inh++;
    if (die_cmd_is_pim && die_cmd.cmd == CMD_RD) begin
      if (gap_check && last_rd >= 0 && die_cmd.col != 0) begin
        n_gap++;
        if (cyc - last_rd != 6) n_gap_bad++;
      end
      last_rd = cyc;
    end
  end

  function automatic logic [31:0] i2f(int v);
    int unsigned m;
    int e;
    if (v == 0) return 32'd0;
    m = (v < 0) ? -v : v;
    e = 0;
    for (int i = 0; i < 32; i++) if (m[i]) e = i;
    m = m << (23 - e);
    return {v < 0, 8'(127 + e), m[22:0]};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  localparam int N = 300;
  int xv [2*N];
  int yv [2*N];
  localparam logic [3:0] XB = 4'd14, YB = 4'd15, ZB = 4'd14;
  localparam int XR = 100, YR = 200, ZR = 300;

  task automatic load_vectors();
    for (int i = 0; i < 2*N; i++) begin
      xv[i] = int'($urandom % 33) - 16;
      yv[i] = int'($urandom % 33) - 16;
    end
    for (int k = 0; k < N; k++) begin
      u_dram.poke(XB, ROW_W'(XR + k / 128), COL_W'(k % 128), {i2f(xv[2*k+1]), i2f(xv[2*k])});
      u_dram.poke(YB, ROW_W'(YR + k / 128), COL_W'(k % 128), {i2f(yv[2*k+1]), i2f(yv[2*k])});
    end
  endtask

  task automatic send_word(input logic [1:0] idx, input logic [63:0] d);
    @(negedge clk);
    while (host_cmd_valid) @(negedge clk);
    pkt_wr_valid = 1; pkt_wr_idx = idx; pkt_wr_data = d;
    @(negedge clk);
    pkt_wr_valid = 0;
  endtask

  task automatic run_op(input pim_op_e op, input string tag);
    pim_packet_t p;
    logic [63:0] w [4];
    int dst_b, dst_r, expect_sum, got;
    logic bad;
    p = '0;
    p.op = op; p.nbeats = 24'(N);
    p.x = '{bank: XB, row: ROW_W'(XR)};
    p.y = '{bank: YB, row: ROW_W'(YR)};
    p.z = '{bank: ZB, row: ROW_W'(ZR)};
    p.alpha = 32'h4000_0000;   // 2.0
    p.beta  = 32'h4040_0000;   // 3.0
    load_vectors();
    {w[3], w[2], w[1], w[0]} = p;
    for (int i = 0; i < 4; i++) send_word(2'(i), w[i]);
    while (!done) @(negedge clk);
    // expected values
    bad = 0;
    expect_sum = 0;
    for (int e = 0; e < 2*N; e++) begin
      int ev;
      logic [63:0] beat;
      case (op)
        OP_COPY:  begin ev = xv[e];                 dst_b = YB; dst_r = YR; end
        OP_SCAL:  begin ev = 2 * xv[e];             dst_b = XB; dst_r = XR; end
        OP_AXPY:  begin ev = 2 * xv[e] + yv[e];     dst_b = YB; dst_r = YR; end
        OP_XPY:   begin ev = 2 * yv[e] + xv[e];     dst_b = YB; dst_r = YR; end
        OP_AXPBY: begin ev = 2 * xv[e] + 3 * yv[e]; dst_b = ZB; dst_r = ZR; end
        OP_XMY:   begin ev = xv[e] * yv[e];         dst_b = ZB; dst_r = ZR; end
        OP_DOT:   begin ev = 0; expect_sum += xv[e] * yv[e]; dst_b = 0; dst_r = 0; end
        default:  begin ev = 0; expect_sum += xv[e] * xv[e]; dst_b = 0; dst_r = 0; end
      endcase
      if (op != OP_DOT && op != OP_NRM2) begin
        beat = u_dram.peek(4'(dst_b), ROW_W'(dst_r + (e / 2) / 128), COL_W'((e / 2) % 128));
        got = 0;
        if ((e % 2 == 0 ? beat[31:0] : beat[63:32]) != i2f(ev)) begin
          if (!bad) $display("  %s element %0d: got %h expected %h", tag, e,
                             e % 2 == 0 ? beat[31:0] : beat[63:32], i2f(ev));
          bad = 1;
        end
      end
    end
    if (op == OP_DOT || op == OP_NRM2) begin
      check(result_valid && result == i2f(expect_sum),
            $sformatf("%s result %h expected %h", tag, result, i2f(expect_sum)));
    end else check(!bad, $sformatf("%s destination vector", tag));
    check(!overrun, $sformatf("%s no packet overrun", tag));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    pim_op_e ops [8];
    ops = '{OP_COPY, OP_SCAL, OP_AXPY, OP_XPY, OP_AXPBY, OP_XMY, OP_DOT, OP_NRM2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // quiet channel: exact read cadence
    gap_check = 1;
    foreach (ops[i]) run_op(ops[i], $sformatf("%s quiet", ops[i].name()));
    gap_check = 0;
    check(n_gap > 1000 && n_gap_bad == 0,
          $sformatf("PIM reads of a batch tCCD_L apart (%0d of %0d wrong)", n_gap_bad, n_gap));
    // with host traffic, every throttling mode
    host_en = 1;
    for (int m = 0; m < 3; m++) begin
      thr_mode = thr_mode_e'(m);
      foreach (ops[i]) run_op(ops[i], $sformatf("%s mode %0d", ops[i].name(), m));
    end
    host_en = 0;
    check(u_dram.violations == 0, $sformatf("DRAM timing violations: %0d", u_dram.violations));
    check(n_host_busy > 0, "host commands interleaved with PIM operations");
    check(n_thr > 0, "PIM writes throttled");
    check(n_inh > 0, "write inhibit during write phase");
    $display("host cmds while PIM busy=%0d  PIM cmds=%0d  throttled cycles=%0d  host rd/wr=%0d/%0d  PIM rd/wr=%0d/%0d",
             n_host_busy, n_pim_cmds, n_thr, u_dram.n_host_rd, u_dram.n_host_wr,
             u_dram.n_pim_rd, u_dram.n_pim_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
