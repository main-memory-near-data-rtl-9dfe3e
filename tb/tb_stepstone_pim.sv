// tb_stepstone_pim: end-to-end test of one StepStone PIM unit.
//
// A 64 x 256 fp32 weight matrix A (1 KiB rows) lies at 0x0030_0000; its
// elements are small integers derived from their addresses, served by a
// memory model with random request back-pressure and random 1..12-cycle
// response latency. For every one of the 16 PIM IDs and 4 block groups (the
// two PIM-ID bits whose parity mixes row and column address bits) the test
// fills B (128 x 8, partition k0 = 0..k1 = 128) and C (64 x 8, at scratchpad
// row 128) with small integers, runs the kernel, drains C and compares it
// with a reference that walks every 16-element block of the partition and
// includes those whose address maps to that PIM ID and group. Because all
// values are small integers the results are exact. It also checks that the
// unit requests only blocks of its own PIM ID and group and each once, that
// over all 64 runs every block of the partition is processed exactly once
// (the localization of A covers the matrix), that the block counter matches,
// that a block takes 19 cycles from response to write-back (load C, 16
// FMAs, store C) and that the generator's correction steps are reported.
// Clock 10 ns, watchdog 50 ms.
module tb_stepstone_pim;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int SIMD = 8, M = 64, KLOG = 8, K = 256, K1 = 128, CB = 128, N = 8;
  localparam logic [31:0] BASE = 32'h0030_0000;

  logic csr_we = 0, spm_we = 0, mem_req_valid, mem_req_ready = 0, mem_rsp_valid = 0, busy, done;
  logic [3:0] csr_addr = '0;
  logic [31:0] csr_wdata = '0, csr_rdata, mem_req_addr;
  logic [7:0] spm_addr = '0;
  logic [255:0] spm_wdata = '0, spm_rdata;
  logic [511:0] mem_rsp_data = '0;

  stepstone_pim dut (.clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .spm_we, .spm_addr,
                     .spm_wdata, .spm_rdata, .mem_req_valid, .mem_req_ready, .mem_req_addr,
                     .mem_rsp_valid, .mem_rsp_data, .busy, .done);

  localparam logic [31:0] ID [4] = '{
    32'((1 << 7) | (1 << 14)), 32'((1 << 15) | (1 << 20)), 32'((1 << 18) | (1 << 23)),
    32'((1 << 8) | (1 << 9) | (1 << 12) | (1 << 13) | (1 << 18) | (1 << 19))};

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

  function automatic int aval(logic [31:0] a);
    logic [31:0] h;
    h = (a >> 2) * 32'h9E37_79B1;
    return int'(h[31:28]) % 9 - 4;
  endfunction

  function automatic logic mine(logic [31:0] a, int id, int gid);
    for (int j = 0; j < 4; j++) begin
      if ((^(a & ID[j])) != id[j]) return 1'b0;
      if ((ID[j] & ~32'h3FF) != 0 && (ID[j] & 32'h3C0) != 0 && (^(a & ID[j] & ~32'h3FF)) != gid[j])
        return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---- memory model ----
  logic [31:0] pend_addr;
  int pend_lat = -1;
  int n_req = 0, n_bad_req = 0, n_dup = 0, cur_id = 0, cur_gid = 0;
  bit requested [logic [31:0]];
  int covered [logic [31:0]];
  longint cyc = 0, t_rsp = 0;
  int n_blk_bad = 0, n_blk = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    mem_rsp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      n_req++;
      if (!mine(mem_req_addr, cur_id, cur_gid) || mem_req_addr[5:0] != 0) n_bad_req++;
      if (requested.exists(mem_req_addr)) n_dup++;
      requested[mem_req_addr] = 1'b1;
      if (covered.exists(mem_req_addr)) covered[mem_req_addr]++;
      else covered[mem_req_addr] = 1;
      pend_addr <= mem_req_addr;
      pend_lat  <= 1 + int'($urandom % 12);
    end else if (pend_lat > 0) pend_lat <= pend_lat - 1;
    else if (pend_lat == 0) begin
      logic [511:0] d;
      for (int e = 0; e < 16; e++) d[32*e +: 32] = i2f(aval(pend_addr + 32'(4 * e)));
      mem_rsp_data  <= d;
      mem_rsp_valid <= 1'b1;
      pend_lat      <= -1;
    end
    if (mem_rsp_valid) t_rsp = cyc;
    if (dut.ks == dut.K_STOREC) begin
      n_blk++;
      if (cyc - t_rsp != 18) n_blk_bad++;
    end
  end
  always @(negedge clk) mem_req_ready = ($urandom % 3) != 0;

  task automatic csr(input int a, input logic [31:0] d);
    @(negedge clk);
    csr_we = 1; csr_addr = 4'(a); csr_wdata = d;
    @(negedge clk);
    csr_we = 0;
  endtask

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int bv [K1][N];
  int cv [M][N];

  initial begin
    int nblocks_exp, bad, missing, steps;
    repeat (3) @(posedge clk);
    rst_n = 1;
    steps = 0;
    for (int id = 0; id < 16; id++) begin
      for (int gid = 0; gid < 4; gid++) begin
        int g4;
        // group bits are used for ID bits 0 (BG0) and 3 (channel)
        g4 = (gid & 1) | ((gid >> 1) << 3);
        cur_id = id; cur_gid = g4;
        requested.delete();
        for (int r = 0; r < K1; r++) begin
          @(negedge clk);
          for (int l = 0; l < N; l++) begin
            bv[r][l] = int'($urandom % 9) - 4;
            spm_wdata[32*l +: 32] = i2f(bv[r][l]);
          end
          spm_we = 1; spm_addr = 8'(r);
        end
        for (int r = 0; r < M; r++) begin
          @(negedge clk);
          for (int l = 0; l < N; l++) begin
            cv[r][l] = int'($urandom % 9) - 4;
            spm_wdata[32*l +: 32] = i2f(cv[r][l]);
          end
          spm_we = 1; spm_addr = 8'(CB + r);
        end
        @(negedge clk) spm_we = 0;
        csr(0, BASE); csr(1, KLOG); csr(2, 0); csr(3, M); csr(4, 0); csr(5, K1);
        csr(6, id); csr(7, g4); csr(8, N); csr(9, CB);
        csr(10, 1);
        while (!done) @(negedge clk);
        // reference
        nblocks_exp = 0;
        for (int m = 0; m < M; m++)
          for (int kb = 0; kb < K1; kb += 16) begin
            logic [31:0] a;
            a = BASE + 32'((m * K + kb) * 4);
            if (mine(a, id, g4)) begin
              nblocks_exp++;
              for (int j = 0; j < 16; j++)
                for (int l = 0; l < N; l++) cv[m][l] += aval(a + 32'(4 * j)) * bv[kb + j][l];
            end
          end
        bad = 0;
        for (int r = 0; r < M; r++) begin
          spm_addr = 8'(CB + r);
          #1;
          for (int l = 0; l < N; l++) if (spm_rdata[32*l +: 32] != i2f(cv[r][l])) bad++;
        end
        check(bad == 0, $sformatf("id %0d group %0d: %0d wrong C elements", id, g4, bad));
        csr_addr = 4'd11;
        #1;
        check(csr_rdata[23:0] == 24'(nblocks_exp) && requested.size() == nblocks_exp,
              $sformatf("id %0d group %0d: %0d blocks, expected %0d", id, g4, csr_rdata[23:0], nblocks_exp));
        csr_addr = 4'd12;
        #1;
        steps += int'(csr_rdata);
      end
    end
    missing = 0;
    for (int m = 0; m < M; m++)
      for (int kb = 0; kb < K1; kb += 16) begin
        logic [31:0] a;
        a = BASE + 32'((m * K + kb) * 4);
        if (!covered.exists(a) || covered[a] != 1) missing++;
      end
    check(missing == 0, $sformatf("every block processed once over all PIMs (%0d not)", missing));
    check(n_bad_req == 0 && n_dup == 0, $sformatf("requests in own PIM/group (%0d bad, %0d dup)", n_bad_req, n_dup));
    check(n_blk > 0 && n_blk_bad == 0, $sformatf("19-cycle block compute (%0d of %0d wrong)", n_blk_bad, n_blk));
    check(steps > 0, "correction steps reported");
    $display("requests=%0d blocks=%0d agen steps=%0d", n_req, n_blk, steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
