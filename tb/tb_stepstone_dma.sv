// tb_stepstone_dma: self-checking test of the replication/reduction engine.
//
// A sparse block memory (associative array of 64-byte blocks) answers the
// engine's port with a random ready and a fixed or random read latency.
// Replicate calls copy a random source range to a random set of the 16 unit
// regions. The test checks that every selected unit holds exact copies and
// that unselected units and the blocks just past the range are untouched.
// Reduce calls sum small-integer partial blocks of the selected units, so
// the expected fp32 sums are exact and computed independently as integers.
// With ready held high and a fixed latency LAT, the test also checks the
// cycle count from start to the done pulse:
//   replicate  n * (2 + LAT + 16 + |mask|) + 1
//   reduce     n * (18 + |mask| * (1 + LAT)) + 1
// where a read response arrives LAT cycles after the request is accepted.
// The test also counts the reads and checks that each source block is read
// only once per replicate call. Clock 10 ns, watchdog 2 ms.
module tb_stepstone_dma;
  localparam int NP = 16, LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        csr_we = 0;
  logic [4:0]  csr_addr = '0;
  logic [31:0] csr_wdata = '0, csr_rdata;
  logic        mem_req_valid, mem_req_ready = 0, mem_req_we, mem_rsp_valid = 0, busy, done;
  logic [31:0] mem_req_addr;
  logic [511:0] mem_req_wdata, mem_rsp_data = '0;

  stepstone_dma dut (.clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .mem_req_valid,
    .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_rsp_valid, .mem_rsp_data,
    .busy, .done);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

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

  // ---------------- block memory ----------------
  logic [511:0] mem [logic [31:0]];
  bit  rand_mode = 0;
  int  lat = -1, n_reads = 0, n_writes = 0;
  logic [31:0] pend;
  function automatic logic [511:0] rd(logic [31:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin mem[mem_req_addr] = mem_req_wdata; n_writes++; end
      else begin pend <= mem_req_addr; lat <= rand_mode ? int'($urandom % 6) : LAT - 2; n_reads++; end
    end else if (lat > 0) lat <= lat - 1;
    else if (lat == 0) begin
      mem_rsp_data  <= rd(pend);
      mem_rsp_valid <= 1'b1;
      lat <= -1;
    end
  end
  always @(negedge clk) mem_req_ready = rand_mode ? ($urandom % 3 != 0) : 1'b1;

  task automatic csr(input int a, input logic [31:0] v);
    @(negedge clk);
    csr_we = 1; csr_addr = 5'(a); csr_wdata = v;
    @(negedge clk);
    csr_we = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // run one call; returns cycles from the start cycle to the done pulse
  task automatic run(input int mode, input logic [31:0] src, input logic [31:0] dst,
                     input int n, input logic [15:0] mask, output int cycles);
    int t0;
    csr(0, 32'(mode)); csr(1, src); csr(2, dst); csr(3, 32'(n)); csr(4, 32'(mask));
    @(negedge clk);
    csr_we = 1; csr_addr = 5'd5; csr_wdata = 32'd1; t0 = cyc;
    @(negedge clk);
    csr_we = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    check(!busy, "idle after done");
  endtask

  function automatic logic [31:0] ubase(int d);
    return 32'h0100_0000 + 32'(d) * 32'h0004_0000;
  endfunction

  function automatic int popc(logic [15:0] m);
    int c = 0;
    for (int i = 0; i < 16; i++) c += int'(m[i]);
    return c;
  endfunction

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, n, r0, w0, p;
    logic [15:0] mask;
    logic [31:0] src, dst;
    logic [511:0] blk, exp_blk;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < NP; d++) begin
      csr(16 + d, ubase(d));
      csr_addr = 5'(16 + d); #1;
      check(csr_rdata == ubase(d), "unit base read back");
    end

    for (int it = 0; it < 24; it++) begin
      rand_mode = (it % 2) == 1;
      // ---------------- replicate ----------------
      n    = 1 + int'($urandom % 6);
      mask = 16'($urandom);
      if (it == 0) mask = 16'h0303;                       // units 0, 1, 8, 9
      src  = 32'h0010_0000 + 32'($urandom % 64) * 32'd64;
      for (int i = 0; i < n; i++) begin
        for (int e = 0; e < 16; e++) blk[32*e +: 32] = $urandom;
        mem[src + 32'(64 * i)] = blk;
      end
      for (int d = 0; d < NP; d++)
        for (int i = 0; i <= n; i++) mem[ubase(d) + 32'(64 * i)] = {16{32'hDEAD_0000 | 32'(d)}};
      r0 = n_reads; w0 = n_writes;
      run(0, src, 32'd0, n, mask, cycles);
      p = popc(mask);
      check(n_reads - r0 == n, "replicate reads each source block once");
      check(n_writes - w0 == n * p, "replicate writes one copy per selected unit");
      if (!rand_mode)
        check(cycles == n * (2 + LAT + NP + p) + 1,
              $sformatf("replicate cycles %0d expected %0d", cycles, n * (2 + LAT + NP + p) + 1));
      for (int d = 0; d < NP; d++) begin
        for (int i = 0; i < n; i++)
          check(rd(ubase(d) + 32'(64 * i)) == (mask[d] ? rd(src + 32'(64 * i)) : {16{32'hDEAD_0000 | 32'(d)}}),
                $sformatf("replicate unit %0d block %0d", d, i));
        check(rd(ubase(d) + 32'(64 * n)) == {16{32'hDEAD_0000 | 32'(d)}}, "block past the range untouched");
      end

      // ---------------- reduce ----------------
      n    = 1 + int'($urandom % 4);
      mask = 16'($urandom);
      if (it == 2) mask = 16'h8000;                       // only the last unit
      if (it == 4) mask = 16'h0000;                       // no unit: the sum is zero
      dst  = 32'h0020_0000 + 32'($urandom % 64) * 32'd64;
      for (int d = 0; d < NP; d++)
        for (int i = 0; i < n; i++) begin
          for (int e = 0; e < 16; e++) blk[32*e +: 32] = i2f(int'($urandom % 2001) - 1000);
          mem[ubase(d) + 32'(64 * i)] = blk;
        end
      r0 = n_reads;
      run(1, 32'd0, dst, n, mask, cycles);
      p = popc(mask);
      check(n_reads - r0 == n * p, "reduce reads each selected partial once");
      if (!rand_mode)
        check(cycles == n * (NP + 2 + p * (1 + LAT)) + 1,
              $sformatf("reduce cycles %0d expected %0d", cycles, n * (NP + 2 + p * (1 + LAT)) + 1));
      for (int i = 0; i < n; i++) begin
        for (int e = 0; e < 16; e++) begin
          int s;
          s = 0;
          for (int d = 0; d < NP; d++)
            if (mask[d]) begin
              logic [511:0] b;
              logic [31:0] f;
              int v;
              b = rd(ubase(d) + 32'(64 * i));
              f = b[32*e +: 32];
              // small integers: undo i2f exactly
              if (f[30:0] == 0) v = 0;
              else v = int'({1'b1, f[22:0]} >> (150 - int'(f[30:23])));
              s += f[31] ? -v : v;
            end
          exp_blk[32*e +: 32] = i2f(s);
        end
        check(rd(dst + 32'(64 * i)) == exp_blk, $sformatf("reduce block %0d mask %h", i, mask));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
