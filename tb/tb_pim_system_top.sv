// tb_pim_system_top: end-to-end test of the whole channel at default sizes.
//
// The top runs with no parameter overrides (two ranks, 128-beat batches,
// two reserved banks, an 8-lane StepStone unit with 8 KiB of scratchpad).
// Stand-ins: dram_model dies per rank, host_mc_model for the host memory
// controller (random CPU traffic to the 14 unreserved banks of both ranks)
// and a block memory for the StepStone unit.
//
// Sequence: (1) a sweep of physical addresses through the host mapping
// checks that shared data lands in the reserved banks and nothing else does;
// (2) six acceleration requests (DOT, AXPY, COPY on 1024-beat vectors per
// rank, 8 KiB) under each throttling mode, with CPU traffic running, each
// result checked exactly (small-integer data); (3) a StepStone sub-GEMM on a
// 64 x 256 matrix for one PIM ID and block group, checked against a
// reference; (4) the replication/reduction engine copies 8 blocks to
// four units and sums the partial blocks of three units. Throughout, the replicas must never disagree with the PIMs and
// the dies must see no timing violation. Each mechanism is counted and
// must occur: host command while a PIM runs, a PIM access held for a host
// command, PIM row-conflict precharge, write held by next-rank prediction,
// write held by the stochastic coin, packet writes on free bus slots, a
// host command refused by the legality check, a bank-partition swap,
// address-generator corrections, block replication and reduction. Clock 10 ns, watchdog 40 ms.
module tb_pim_system_top;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NR = 2;
  logic        host_en = 0;
  logic        req_valid = 0, req_ready, req_done;
  pim_packet_t req_pkt = '0;
  logic [31:0] rank_result [NR];
  logic [NR-1:0] rank_result_valid, rank_busy, rank_wr_phase, rank_throttled, rank_done,
                 rank_overrun, rep_busy, wr_inhibit, die_cmd_is_pim, die_rvalid;
  logic        rep_mismatch;
  logic        host_cmd_valid, host_cmd_legal, oldest_valid, oldest_is_read;
  logic [0:0]  host_cmd_rank, oldest_rank;
  dram_cmd_t   host_cmd;
  thr_mode_e   thr_mode = THR_NONE;
  logic [3:0]  prob_log2 = 4'd2;
  logic [34:0] pa = '0;
  logic        map_ch, map_rank, map_shared, map_swapped;
  logic [3:0]  map_bank;
  logic [15:0] map_row;
  logic [6:0]  map_col;
  logic [5:0]  map_offset;
  dram_cmd_t   die_cmd [NR];
  logic [63:0] die_wdata [NR];
  logic [63:0] die_rdata [NR];
  logic        ss_csr_we = 0, ss_spm_we = 0, ss_mem_req_valid, ss_mem_req_ready = 0,
               ss_mem_rsp_valid = 0, ss_busy, ss_done;
  logic [3:0]  ss_csr_addr = '0;
  logic [31:0] ss_csr_wdata = '0, ss_csr_rdata, ss_mem_req_addr;
  logic [7:0]  ss_spm_addr = '0;
  logic [255:0] ss_spm_wdata = '0, ss_spm_rdata;
  logic [511:0] ss_mem_rsp_data = '0;

  pim_system_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_pkt, .req_done, .rank_result, .rank_result_valid,
    .rank_busy, .rank_wr_phase, .rank_throttled, .rank_done, .rank_overrun, .rep_busy,
    .rep_mismatch, .host_cmd_valid, .host_cmd_rank, .host_cmd, .host_cmd_legal, .oldest_valid,
    .oldest_is_read, .oldest_rank, .thr_mode, .prob_log2, .wr_inhibit, .pa, .map_ch, .map_rank,
    .map_bank, .map_row, .map_col, .map_shared, .map_swapped, .map_offset, .die_cmd,
    .die_cmd_is_pim, .die_wdata, .die_rvalid, .die_rdata, .ss_csr_we, .ss_csr_addr, .ss_csr_wdata,
    .ss_csr_rdata, .ss_spm_we, .ss_spm_addr, .ss_spm_wdata, .ss_spm_rdata, .ss_mem_req_valid,
    .ss_mem_req_ready, .ss_mem_req_addr, .ss_mem_rsp_valid, .ss_mem_rsp_data, .ss_busy, .ss_done,
    .dma_csr_we, .dma_csr_addr, .dma_csr_wdata, .dma_csr_rdata, .dma_mem_req_valid,
    .dma_mem_req_ready, .dma_mem_req_we, .dma_mem_req_addr, .dma_mem_req_wdata,
    .dma_mem_rsp_valid, .dma_mem_rsp_data, .dma_busy, .dma_done
  );

  // ---------------- replication/reduction engine memory ----------------
  logic         dma_csr_we = 0, dma_mem_req_ready = 0, dma_mem_rsp_valid = 0;
  logic [4:0]   dma_csr_addr = '0;
  logic [31:0]  dma_csr_wdata = '0, dma_csr_rdata, dma_mem_req_addr;
  logic         dma_mem_req_valid, dma_mem_req_we, dma_busy, dma_done;
  logic [511:0] dma_mem_req_wdata, dma_mem_rsp_data = '0;
  logic [511:0] dmem [logic [31:0]];
  int           dma_lat = -1;
  logic [31:0]  dma_pend = '0;
  function automatic logic [511:0] drd(logic [31:0] a);
    return dmem.exists(a) ? dmem[a] : '0;
  endfunction
  always @(posedge clk) if (rst_n) begin
    dma_mem_rsp_valid <= 1'b0;
    if (dma_mem_req_valid && dma_mem_req_ready) begin
      if (dma_mem_req_we) dmem[dma_mem_req_addr] = dma_mem_req_wdata;
      else begin dma_pend <= dma_mem_req_addr; dma_lat <= int'($urandom % 6); end
    end else if (dma_lat > 0) dma_lat <= dma_lat - 1;
    else if (dma_lat == 0) begin
      dma_mem_rsp_data  <= drd(dma_pend);
      dma_mem_rsp_valid <= 1'b1;
      dma_lat <= -1;
    end
  end
  always @(negedge clk) dma_mem_req_ready = ($urandom % 2) == 0;

  // The host controller model proposes a command; it is sent only if the
  // top's legality check agrees, which the model's own tables must match.
  logic      m_valid;
  dram_cmd_t m_cmd;
  host_mc_model #(.NUM_RANKS(NR), .RATE(90)) u_host (
    .clk, .rst_n, .enable(host_en), .die_cmd, .host_cmd_valid(m_valid), .host_cmd_rank,
    .host_cmd(m_cmd), .oldest_valid, .oldest_is_read, .oldest_rank
  );
  assign host_cmd       = m_cmd;
  assign host_cmd_valid = m_valid && host_cmd_legal;

  for (genvar r = 0; r < NR; r++) begin : g_die
    dram_model u_dram (.clk, .rst_n, .cmd(die_cmd[r]), .cmd_is_pim(die_cmd_is_pim[r]),
                       .wdata(die_wdata[r]), .rvalid(die_rvalid[r]), .rdata(die_rdata[r]));
  end

  // ---------------- mechanism counters ----------------
  int c_host_during_pim = 0, c_pim_yield = 0, c_pim_pre = 0, c_nrp_hold = 0, c_stoch_hold = 0;
  int c_pkt_words = 0, c_refused = 0, c_legal_mismatch = 0, c_swaps = 0, c_agen_steps = 0;
  int c_dma_copies = 0, c_dma_sums = 0;
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      logic hv;
      hv = host_cmd_valid && host_cmd_rank == 1'(r);
      if (hv && rank_busy[r]) c_host_during_pim++;
      if (die_cmd_is_pim[r] && die_cmd[r].cmd == CMD_PRE) c_pim_pre++;
      if (rank_throttled[r] && thr_mode == THR_NRP) c_nrp_hold++;
      if (rank_throttled[r] && thr_mode == THR_STOCH) c_stoch_hold++;
    end
    if (host_cmd_valid && (host_cmd_rank == 1'b0 ? dut.g_rank[0].u_rank.req_valid
                                                 : dut.g_rank[1].u_rank.req_valid)) c_pim_yield++;
    if (dut.pkt_wr_valid) c_pkt_words++;
    if (u_host.have && !host_cmd_legal) c_refused++;
    if (u_host.have && host_cmd_legal != m_valid) c_legal_mismatch++;
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

  initial begin
    #40ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- vector operations ----------------
  localparam int NB = 1024;
  int xv [NR][2*NB];
  int yv [NR][2*NB];

  task automatic poke_die(input int r, input logic [3:0] b, input int row, input int col,
                          input logic [63:0] d);
    if (r == 0) g_die[0].u_dram.poke(b, 16'(row), 7'(col), d);
    else        g_die[1].u_dram.poke(b, 16'(row), 7'(col), d);
  endtask
  function automatic logic [63:0] peek_die(input int r, input logic [3:0] b, input int row,
                                           input int col);
    if (r == 0) return g_die[0].u_dram.peek(b, 16'(row), 7'(col));
    return g_die[1].u_dram.peek(b, 16'(row), 7'(col));
  endfunction

  task automatic vector_op(input pim_op_e op);
    int sum [NR];
    int bad;
    for (int r = 0; r < NR; r++) begin
      sum[r] = 0;
      for (int e = 0; e < 2*NB; e++) begin
        xv[r][e] = int'($urandom % 17) - 8;
        yv[r][e] = int'($urandom % 17) - 8;
        sum[r] += xv[r][e] * yv[r][e];
      end
      for (int k = 0; k < NB; k++) begin
        poke_die(r, 4'd14, 64 + k / 128, k % 128, {i2f(xv[r][2*k+1]), i2f(xv[r][2*k])});
        poke_die(r, 4'd15, 96 + k / 128, k % 128, {i2f(yv[r][2*k+1]), i2f(yv[r][2*k])});
      end
    end
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_pkt = '0;
    req_pkt.op = op; req_pkt.nbeats = 24'(NB);
    req_pkt.x = '{bank: 4'd14, row: 16'd64};
    req_pkt.y = '{bank: 4'd15, row: 16'd96};
    req_pkt.alpha = i2f(-2);
    req_valid = 1;
    @(negedge clk);
    req_valid = 0;
    while (!req_done) @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      if (op == OP_DOT)
        check(rank_result[r] == i2f(sum[r]), $sformatf("rank %0d DOT %h expected %h", r,
                                                       rank_result[r], i2f(sum[r])));
      else begin
        bad = 0;
        for (int e = 0; e < 2*NB; e++) begin
          logic [63:0] beat;
          int ev;
          beat = peek_die(r, 4'd15, 96 + (e / 2) / 128, (e / 2) % 128);
          ev = (op == OP_COPY) ? xv[r][e] : -2 * xv[r][e] + yv[r][e];
          if ((e % 2 == 0 ? beat[31:0] : beat[63:32]) != i2f(ev)) bad++;
        end
        check(bad == 0, $sformatf("rank %0d %s: %0d wrong elements", r, op.name(), bad));
      end
      check(!rank_overrun[r], "no packet overrun");
    end
  endtask

  // ---------------- StepStone memory ----------------
  localparam logic [31:0] SS_BASE = 32'h0030_0000;
  function automatic int aval(logic [31:0] a);
    logic [31:0] h;
    h = (a >> 2) * 32'h9E37_79B1;
    return int'(h[31:28]) % 9 - 4;
  endfunction
  int ss_lat = -1;
  logic [31:0] ss_pend = '0;
  always @(posedge clk) if (rst_n) begin
    ss_mem_rsp_valid <= 1'b0;
    if (ss_mem_req_valid && ss_mem_req_ready) begin
      ss_pend <= ss_mem_req_addr;
      ss_lat  <= 2 + int'($urandom % 8);
    end else if (ss_lat > 0) ss_lat <= ss_lat - 1;
    else if (ss_lat == 0) begin
      logic [511:0] d;
      for (int e = 0; e < 16; e++) d[32*e +: 32] = i2f(aval(ss_pend + 32'(4 * e)));
      ss_mem_rsp_data  <= d;
      ss_mem_rsp_valid <= 1'b1;
      ss_lat <= -1;
    end
  end
  always @(negedge clk) ss_mem_req_ready = ($urandom % 2) == 0;

  task automatic ss_csr(input int a, input logic [31:0] d);
    @(negedge clk);
    ss_csr_we = 1; ss_csr_addr = 4'(a); ss_csr_wdata = d;
    @(negedge clk);
    ss_csr_we = 0;
  endtask

  function automatic logic ss_mine(logic [31:0] a, int id, int gid);
    logic [31:0] idm [4];
    idm = '{32'((1 << 7) | (1 << 14)), 32'((1 << 15) | (1 << 20)), 32'((1 << 18) | (1 << 23)),
            32'((1 << 8) | (1 << 9) | (1 << 12) | (1 << 13) | (1 << 18) | (1 << 19))};
    for (int j = 0; j < 4; j++) begin
      if ((^(a & idm[j])) != id[j]) return 1'b0;
      if ((idm[j] & ~32'h3FF) != 0 && (idm[j] & 32'h3C0) != 0 && (^(a & idm[j] & ~32'h3FF)) != gid[j])
        return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic stepstone_gemm(input int id, input int gid);
    int bv [128][8];
    int cv [64][8];
    int bad;
    for (int r = 0; r < 128; r++) begin
      @(negedge clk);
      for (int l = 0; l < 8; l++) begin
        bv[r][l] = int'($urandom % 9) - 4;
        ss_spm_wdata[32*l +: 32] = i2f(bv[r][l]);
      end
      ss_spm_we = 1; ss_spm_addr = 8'(r);
    end
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      for (int l = 0; l < 8; l++) begin
        cv[r][l] = int'($urandom % 9) - 4;
        ss_spm_wdata[32*l +: 32] = i2f(cv[r][l]);
      end
      ss_spm_we = 1; ss_spm_addr = 8'(128 + r);
    end
    @(negedge clk) ss_spm_we = 0;
    ss_csr(0, SS_BASE); ss_csr(1, 8); ss_csr(2, 0); ss_csr(3, 64); ss_csr(4, 0); ss_csr(5, 128);
    ss_csr(6, id); ss_csr(7, gid); ss_csr(8, 8); ss_csr(9, 128);
    ss_csr(10, 1);
    while (!ss_done) @(negedge clk);
    for (int m = 0; m < 64; m++)
      for (int kb = 0; kb < 128; kb += 16) begin
        logic [31:0] a;
        a = SS_BASE + 32'((m * 256 + kb) * 4);
        if (ss_mine(a, id, gid))
          for (int j = 0; j < 16; j++)
            for (int l = 0; l < 8; l++) cv[m][l] += aval(a + 32'(4 * j)) * bv[kb + j][l];
      end
    bad = 0;
    for (int r = 0; r < 64; r++) begin
      ss_spm_addr = 8'(128 + r);
      #1;
      for (int l = 0; l < 8; l++) if (ss_spm_rdata[32*l +: 32] != i2f(cv[r][l])) bad++;
    end
    check(bad == 0, $sformatf("StepStone GEMM: %0d wrong C elements", bad));
    ss_csr_addr = 4'd12;
    #1;
    c_agen_steps += int'(ss_csr_rdata);
  endtask

  task automatic dma_csr(input int a, input logic [31:0] d);
    @(negedge clk);
    dma_csr_we = 1; dma_csr_addr = 5'(a); dma_csr_wdata = d;
    @(negedge clk);
    dma_csr_we = 0;
  endtask

  // Replicate 8 activation blocks to units 0, 1, 8 and 9, then reduce the
  // partial results of units 0, 5 and 12 into one block range.
  task automatic dma_flow();
    localparam logic [31:0] SRC = 32'h0040_0000, DST = 32'h0050_0000;
    logic [511:0] b;
    int bad, sum;
    for (int u = 0; u < 16; u++) dma_csr(16 + u, 32'h0100_0000 + 32'(u) * 32'h0001_0000);
    for (int i = 0; i < 8; i++) begin
      for (int e = 0; e < 16; e++) b[32*e +: 32] = i2f(int'($urandom % 9) - 4);
      dmem[SRC + 32'(64 * i)] = b;
    end
    dma_csr(0, 0); dma_csr(1, SRC); dma_csr(3, 8); dma_csr(4, 32'h0303); dma_csr(5, 1);
    while (!dma_done) @(negedge clk);
    bad = 0;
    for (int u = 0; u < 16; u++)
      for (int i = 0; i < 8; i++) begin
        logic [511:0] got;
        got = drd(32'h0100_0000 + 32'(u) * 32'h0001_0000 + 32'(64 * i));
        if (u == 0 || u == 1 || u == 8 || u == 9) begin
          if (got != drd(SRC + 32'(64 * i))) bad++; else c_dma_copies++;
        end else if (got != '0) bad++;
      end
    check(bad == 0, $sformatf("replication: %0d wrong blocks", bad));
    // partial C: element e of block i of unit u is (u + 3i + e) mod 7 - 3
    for (int u = 0; u < 16; u++)
      for (int i = 0; i < 4; i++) begin
        for (int e = 0; e < 16; e++) b[32*e +: 32] = i2f((u + 3 * i + e) % 7 - 3);
        dmem[32'h0100_0000 + 32'(u) * 32'h0001_0000 + 32'(64 * i)] = b;
      end
    dma_csr(0, 1); dma_csr(2, DST); dma_csr(3, 4); dma_csr(4, 32'h1021); dma_csr(5, 1);
    while (!dma_done) @(negedge clk);
    bad = 0;
    for (int i = 0; i < 4; i++) begin
      b = drd(DST + 32'(64 * i));
      for (int e = 0; e < 16; e++) begin
        sum = (3 * i + e) % 7 - 3 + (5 + 3 * i + e) % 7 - 3 + (12 + 3 * i + e) % 7 - 3;
        if (b[32*e +: 32] != i2f(sum)) bad++; else c_dma_sums++;
      end
    end
    check(bad == 0, $sformatf("reduction: %0d wrong elements", bad));
  endtask

  initial begin
    int bad_place;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // (1) host address mapping with bank partitioning
    bad_place = 0;
    for (int i = 0; i < 20000; i++) begin
      pa = {$urandom, $urandom} & 35'h7_FFFF_FFFF;
      #1;
      if ((map_bank >= 4'd14) != map_shared) bad_place++;
      if (map_swapped) c_swaps++;
    end
    check(bad_place == 0, $sformatf("reserved banks hold exactly the shared region (%0d wrong)", bad_place));
    // (2) vector operations under CPU traffic
    host_en = 1;
    for (int it = 0; it < 6; it++) begin
      thr_mode = thr_mode_e'(it % 3);
      vector_op(it < 3 ? OP_AXPY : (it == 3 ? OP_DOT : OP_COPY));
    end
    // (3) StepStone GEMM beside it
    stepstone_gemm(5, 9);
    // (4) replication and reduction of activations and partial results
    dma_flow();
    host_en = 0;
    repeat (50) @(negedge clk);
    check(!rep_mismatch, "replicas never disagree with the PIMs");
    check(c_legal_mismatch == 0, "legality answer equals the host's own state");
    check(g_die[0].u_dram.violations == 0 && g_die[1].u_dram.violations == 0, "DRAM timing");
    check(c_host_during_pim > 0, "mechanism: host command while a PIM runs");
    check(c_pim_yield > 0, "mechanism: PIM access held for a host command");
    check(c_pim_pre > 0, "mechanism: PIM row-conflict precharge");
    check(c_nrp_hold > 0, "mechanism: write held by next-rank prediction");
    check(c_stoch_hold > 0, "mechanism: write held by stochastic issue");
    check(c_pkt_words == 6 * 4 * NR, $sformatf("mechanism: packet words on free slots (%0d)", c_pkt_words));
    check(c_refused > 0, "mechanism: host command refused by the legality check");
    check(c_swaps > 0, "mechanism: bank-partition swap");
    check(c_agen_steps > 0, "mechanism: address-generator corrections");
    check(c_dma_copies == 32, "mechanism: block replication to four units");
    check(c_dma_sums == 64, "mechanism: reduction of three partial results");
    $display("host-during-PIM=%0d PIM-yield=%0d PIM-PRE=%0d NRP-hold=%0d stoch-hold=%0d pkt-words=%0d refused=%0d swaps=%0d agen-steps=%0d",
             c_host_during_pim, c_pim_yield, c_pim_pre, c_nrp_hold, c_stoch_hold, c_pkt_words,
             c_refused, c_swaps, c_agen_steps);
    $display("host rd/wr rank0=%0d/%0d rank1=%0d/%0d  PIM rd/wr rank0=%0d/%0d",
             g_die[0].u_dram.n_host_rd, g_die[0].u_dram.n_host_wr, g_die[1].u_dram.n_host_rd,
             g_die[1].u_dram.n_host_wr, g_die[0].u_dram.n_pim_rd, g_die[0].u_dram.n_pim_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
