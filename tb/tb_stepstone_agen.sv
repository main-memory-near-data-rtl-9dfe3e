// tb_stepstone_agen: self-checking test of the StepStone address generator.
//
// Uses the four PIM-ID parities of the XOR mapping (BG0 a7^a14, BG1
// a15^a20, rank a18^a23, channel a8^a9^a12^a13^a18^a19) and their row parts
// for a 1 KiB-row matrix as group constraints, with random targets, random
// active sets, random start and limit addresses. For each of 3000 searches it
// compares the result with a brute-force scan of every 64-byte block from the
// rounded-up start to the limit: the generator must return the first
// matching block, or report exhaustion when none exists. It checks the
// search timing (start in cycle t gives found in cycle t+steps+2: one cycle
// to load the start address, one per correction, one for the final check)
// and that corrections skip blocks (total steps well below the distance
// covered in blocks). Clock 10 ns,
// watchdog 50 ms.
module tb_stepstone_agen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 8;
  logic start = 0;
  logic [31:0] start_addr = '0, limit_addr = '0, addr;
  logic [31:0] mask [NC];
  logic [NC-1:0] target = '0, active = '0;
  logic busy, found, exhausted;
  logic [7:0] steps;

  stepstone_agen #(.NC(NC)) dut (.clk, .rst_n, .start, .start_addr, .limit_addr, .mask, .target,
                                 .active, .busy, .found, .exhausted, .addr, .steps);

  localparam logic [31:0] ID [4] = '{
    32'((1 << 7) | (1 << 14)), 32'((1 << 15) | (1 << 20)), 32'((1 << 18) | (1 << 23)),
    32'((1 << 8) | (1 << 9) | (1 << 12) | (1 << 13) | (1 << 18) | (1 << 19))};
  localparam logic [31:0] ROWM = ~32'h3FF;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic ok(logic [31:0] a);
    for (int j = 0; j < NC; j++)
      if (active[j] && ((^(a & mask[j])) != target[j])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint tot_steps, tot_dist;
    for (int j = 0; j < 4; j++) begin
      mask[j] = ID[j];
      mask[4 + j] = ID[j] & ROWM;
    end
    tot_steps = 0; tot_dist = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      logic [31:0] a, exp_a;
      logic exp_found;
      int cyc;
      start_addr = $urandom & 32'h00FF_FFFF;
      limit_addr = start_addr + ($urandom % 65536);
      target = 8'($urandom);
      active = 8'h0F | (8'($urandom) & 8'h90);
      // brute force
      exp_found = 0; exp_a = '0;
      for (a = (start_addr + 63) & ~32'd63; a < limit_addr; a += 64)
        if (ok(a)) begin exp_found = 1; exp_a = a; break; end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (busy && cyc < 300) begin @(negedge clk); cyc++; end
      check(found == exp_found && exhausted == !exp_found,
            $sformatf("search %0d found=%b expected %b", it, found, exp_found));
      if (exp_found) begin
        check(addr == exp_a, $sformatf("search %0d addr %h expected %h", it, addr, exp_a));
        check(cyc == int'(steps) + 2, $sformatf("search %0d took %0d cycles, steps %0d", it, cyc, steps));
        tot_steps += steps;
        tot_dist += (exp_a - ((start_addr + 63) & ~32'd63)) / 64;
      end
    end
    check(tot_steps * 4 < tot_dist, $sformatf("corrections skip blocks: %0d steps for %0d blocks",
                                              tot_steps, tot_dist));
    $display("steps=%0d distance=%0d blocks", tot_steps, tot_dist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
