// tb_pim_host_ctrl: test of the host-side PIM controller against real rank
// units.
//
// Two pim_rank_unit instances with dram_model dies sit on one channel with
// the controller and a random host memory controller model. Each cycle the
// test compares, per rank, the replica's command with the PIM command that
// reached the dies (they must be equal whenever no host command is on that
// rank), and the replica's busy / write-phase / throttled / done flags with
// the PIM's. It checks that the controller's legality answer equals the host
// model's own state-table answer, that packet words go out only in cycles
// without host commands and rank by rank (all four words of rank 0, then
// rank 1), that done_pulse comes exactly one cycle after the last PIM
// finishes, and that both ranks compute the right DOT result. Runs 12
// requests, DOT and AXPY alternately, across all throttling modes. Clock 10 ns, watchdog 20 ms.
module tb_pim_host_ctrl;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NR = 2;
  logic        host_en = 0;
  logic        req_valid = 0, req_ready, done_pulse;
  pim_packet_t req_pkt = '0;
  logic        host_cmd_valid, host_cmd_legal;
  logic [0:0]  host_cmd_rank, oldest_rank, pkt_wr_rank;
  dram_cmd_t   host_cmd;
  logic        oldest_valid, oldest_is_read;
  thr_mode_e   thr_mode = THR_NONE;
  logic [3:0]  prob_log2 = 4'd2;
  logic        pkt_wr_valid;
  logic [1:0]  pkt_wr_idx;
  logic [63:0] pkt_wr_data;
  logic [NR-1:0] wr_inhibit, rep_busy, rep_wr_phase, rep_throttled, rep_done;
  dram_cmd_t   rep_cmd [NR];
  dram_cmd_t   die_cmd [NR];
  logic [NR-1:0] die_is_pim, die_rvalid, busy, done, wr_phase, throttled, result_valid, overrun;
  logic [63:0] die_wdata [NR];
  logic [63:0] die_rdata [NR];
  logic [31:0] result [NR];

  host_mc_model #(.NUM_RANKS(NR), .RATE(90)) u_host (
    .clk, .rst_n, .enable(host_en), .die_cmd, .host_cmd_valid, .host_cmd_rank, .host_cmd,
    .oldest_valid, .oldest_is_read, .oldest_rank
  );
  pim_host_ctrl dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_pkt, .done_pulse, .host_cmd_valid,
    .host_cmd_rank, .host_cmd, .host_cmd_legal, .oldest_valid, .oldest_is_read, .oldest_rank,
    .thr_mode, .prob_log2, .pkt_wr_valid, .pkt_wr_rank, .pkt_wr_idx, .pkt_wr_data, .wr_inhibit,
    .rep_cmd, .rep_busy, .rep_wr_phase, .rep_throttled, .rep_done
  );
  for (genvar r = 0; r < NR; r++) begin : g_r
    logic hv;
    assign hv = host_cmd_valid && host_cmd_rank == 1'(r);
    pim_rank_unit #(.COIN_SEED(16'hACE1 + 16'(r))) u_rank (
      .clk, .rst_n, .host_cmd_valid(hv), .host_cmd,
      .pkt_wr_valid(pkt_wr_valid && pkt_wr_rank == 1'(r)), .pkt_wr_idx, .pkt_wr_data,
      .wr_inhibit(wr_inhibit[r]), .thr_mode, .prob_log2, .die_cmd(die_cmd[r]),
      .die_cmd_is_pim(die_is_pim[r]), .die_wdata(die_wdata[r]), .die_rvalid(die_rvalid[r]),
      .die_rdata(die_rdata[r]), .busy(busy[r]), .done(done[r]), .wr_phase(wr_phase[r]),
      .throttled(throttled[r]), .result(result[r]), .result_valid(result_valid[r]),
      .overrun(overrun[r])
    );
    dram_model u_dram (.clk, .rst_n, .cmd(die_cmd[r]), .cmd_is_pim(die_is_pim[r]),
                       .wdata(die_wdata[r]), .rvalid(die_rvalid[r]), .rdata(die_rdata[r]));
  end

  int n_cmp = 0, n_bad = 0, n_legal_bad = 0, n_pkt_bad = 0, n_done_bad = 0, n_hcmd_busy = 0;
  int n_thr = 0, n_done = 0;
  longint cyc = 0, t_fall = 0;
  logic [NR-1:0] busy_q;
  logic [2:0] expect_word;
  logic [0:0] expect_rank;
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      logic hv;
      hv = host_cmd_valid && host_cmd_rank == 1'(r);
      n_cmp++;
      if ((die_is_pim[r] ? die_cmd[r].cmd : CMD_NOP) != (hv ? CMD_NOP : rep_cmd[r].cmd) ||
          (die_is_pim[r] && die_cmd[r] != rep_cmd[r]) || busy[r] != rep_busy[r] ||
          wr_phase[r] != rep_wr_phase[r] || throttled[r] != rep_throttled[r] ||
          done[r] != rep_done[r]) begin
        n_bad++;
        if (n_bad < 5) $display("replica mismatch rank %0d at %0t", r, $time);
      end
      if (busy[r] && hv) n_hcmd_busy++;
      if (throttled[r]) n_thr++;
    end
    if (host_cmd_valid != host_cmd_legal && u_host.have) n_legal_bad++;
    if (pkt_wr_valid) begin
      if (host_cmd_valid || pkt_wr_idx != expect_word[1:0] || pkt_wr_rank != expect_rank) n_pkt_bad++;
      if (pkt_wr_idx == 2'd3) begin expect_word <= '0; expect_rank <= expect_rank + 1'b1; end
      else expect_word <= expect_word + 3'd1;
    end
    cyc++;
    busy_q <= busy;
    if (busy_q != '0 && busy == '0) t_fall = cyc;
    if (done_pulse) begin
      n_done++;
      if (cyc - t_fall != 1) n_done_bad++;
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
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int sum [NR];
    expect_word = '0; expect_rank = '0; busy_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host_en = 1;
    for (int it = 0; it < 12; it++) begin
      int nb;
      thr_mode = thr_mode_e'(it % 3);
      nb = 60 + int'($urandom % 200);
      for (int r = 0; r < NR; r++) begin
        sum[r] = 0;
        for (int k = 0; k < nb; k++) begin
          int a0, a1, b0, b1;
          a0 = int'($urandom % 17) - 8; a1 = int'($urandom % 17) - 8;
          b0 = int'($urandom % 17) - 8; b1 = int'($urandom % 17) - 8;
          sum[r] += a0 * b0 + a1 * b1;
          if (r == 0) begin
            g_r[0].u_dram.poke(4'd14, ROW_W'(10 + k / 128), COL_W'(k % 128), {i2f(a1), i2f(a0)});
            g_r[0].u_dram.poke(4'd15, ROW_W'(20 + k / 128), COL_W'(k % 128), {i2f(b1), i2f(b0)});
          end else begin
            g_r[1].u_dram.poke(4'd14, ROW_W'(10 + k / 128), COL_W'(k % 128), {i2f(a1), i2f(a0)});
            g_r[1].u_dram.poke(4'd15, ROW_W'(20 + k / 128), COL_W'(k % 128), {i2f(b1), i2f(b0)});
          end
        end
      end
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_pkt = '0;
      req_pkt.op = (it % 2 == 0) ? OP_DOT : OP_AXPY;
      req_pkt.alpha = 32'h3F80_0000; req_pkt.nbeats = 24'(nb);
      req_pkt.x = '{bank: 4'd14, row: 16'd10};
      req_pkt.y = '{bank: 4'd15, row: 16'd20};
      req_valid = 1;
      @(negedge clk);
      req_valid = 0;
      while (!done_pulse) @(negedge clk);
      if (it % 2 == 0) for (int r = 0; r < NR; r++)
        check(result[r] == i2f(sum[r]), $sformatf("request %0d rank %0d DOT %h expected %h",
                                                  it, r, result[r], i2f(sum[r])));
    end
    repeat (2) @(negedge clk);
    check(n_bad == 0, $sformatf("replica equals PIM (%0d mismatches in %0d compares)", n_bad, n_cmp));
    check(n_legal_bad == 0, $sformatf("legality answer (%0d wrong)", n_legal_bad));
    check(n_pkt_bad == 0, $sformatf("packet word order and free slots (%0d wrong)", n_pkt_bad));
    check(n_done == 12 && n_done_bad == 0,
          $sformatf("done pulse one cycle after the last PIM ends (%0d of %0d wrong)", n_done_bad, n_done));
    check(n_hcmd_busy > 0, "host commands during PIM operations");
    check(n_thr > 0, "throttled PIM writes");
    check(g_r[0].u_dram.violations == 0 && g_r[1].u_dram.violations == 0, "DRAM timing");
    $display("compares=%0d host-during-PIM=%0d throttled=%0d", n_cmp, n_hcmd_busy, n_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
