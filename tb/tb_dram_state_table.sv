// tb_dram_state_table: self-checking test of the rank state table.
//
// Issues one command, then probes every following cycle with
// pim_pkg::dram_cmd_legal until a dependent command becomes legal, and
// compares the distance with the DDR4-2400 value: tRCD 16, tRAS 39, tRC 55,
// tRP 16, tRTP 9, write recovery tCWL+tBL+tWR 34, tCCD_L 6, tCCD_S 4,
// write-to-read tCWL+tBL+tWTR_L 25 / tCWL+tBL+tWTR_S 19, read-to-write
// tCL+tBL+2-tCWL 10, tRRD_L 6, tRRD_S 4. It also checks open/closed and
// row-hit rules (RD to a closed bank or another row is illegal, ACT to an
// open bank is illegal). A command driven in cycle t is sampled at the
// clock edge ending cycle t; a distance of n means legal in cycle t+n.
// Clock 10 ns, watchdog 1 ms.
module tb_dram_state_table;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  dram_cmd_t cmd = '{cmd: CMD_NOP, bank: '0, row: '0, col: '0};
  bank_state_vec_t bank_st;
  bg_state_vec_t   bg_st;

  always #5 clk = ~clk;

  dram_state_table dut (.clk, .rst_n, .cmd, .bank_st, .bg_st);

  function automatic dram_cmd_t mk(dram_cmd_e c, int bank, int row);
    return '{cmd: c, bank: BANK_W'(bank), row: ROW_W'(row), col: '0};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input dram_cmd_t c);
    @(negedge clk) cmd = c;
    @(negedge clk) cmd = mk(CMD_NOP, 0, 0);
  endtask

  // issue c, then measure cycles until probe becomes legal
  task automatic gap(input dram_cmd_t c, input dram_cmd_t probe, input int expect_n,
                      input string what);
    int n;
    @(negedge clk) cmd = c;
    @(negedge clk) cmd = mk(CMD_NOP, 0, 0);
    n = 1;
    while (!dram_cmd_legal(bank_st, bg_st, probe) && n < 200) begin
      @(negedge clk);
      n++;
    end
    check(n == expect_n, $sformatf("%s: %0d cycles, expected %0d", what, n, expect_n));
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!dram_cmd_legal(bank_st, bg_st, mk(CMD_RD, 0, 5)), "RD to closed bank illegal");
    check(dram_cmd_legal(bank_st, bg_st, mk(CMD_ACT, 0, 5)), "ACT legal after reset");
    gap(mk(CMD_ACT, 0, 5), mk(CMD_RD, 0, 5), 16, "tRCD");
    check(!dram_cmd_legal(bank_st, bg_st, mk(CMD_RD, 0, 6)), "RD to other row illegal");
    check(!dram_cmd_legal(bank_st, bg_st, mk(CMD_ACT, 0, 6)), "ACT to open bank illegal");
    idle(80);
    issue(mk(CMD_PRE, 0, 0));
    idle(80);
    gap(mk(CMD_ACT, 0, 5), mk(CMD_PRE, 0, 0), 39, "tRAS");
    @(negedge clk) cmd = mk(CMD_PRE, 0, 0);
    @(negedge clk) cmd = mk(CMD_NOP, 0, 0);
    begin
      int n;
      n = 1;
      while (!dram_cmd_legal(bank_st, bg_st, mk(CMD_ACT, 0, 7)) && n < 200) begin
        @(negedge clk); n++;
      end
      check(n == 16, $sformatf("PRE at tRAS then ACT: %0d, expected tRC-tRAS=16", n));
    end
    idle(80);
    // tRC alone: ACT, PRE as late as needed, ACT probe measured from ACT
    issue(mk(CMD_PRE, 0, 0));
    idle(80);
    gap(mk(CMD_PRE, 1, 0), mk(CMD_ACT, 1, 3), 16, "PRE to a closed bank still counts tRP");
    gap(mk(CMD_ACT, 2, 3), mk(CMD_ACT, 3, 3), 6, "tRRD_L");
    gap(mk(CMD_ACT, 4, 3), mk(CMD_ACT, 9, 3), 4, "tRRD_S");
    idle(80);
    // column timing, banks 2 (BG0) and 4 (BG1) are open
    gap(mk(CMD_RD, 2, 3), mk(CMD_RD, 2, 3), 6, "tCCD_L");
    idle(40);
    gap(mk(CMD_RD, 2, 3), mk(CMD_RD, 4, 3), 4, "tCCD_S");
    idle(40);
    gap(mk(CMD_RD, 2, 3), mk(CMD_WR, 4, 3), 10, "read to write");
    idle(40);
    gap(mk(CMD_WR, 2, 3), mk(CMD_RD, 2, 3), 25, "write to read, same group");
    idle(60);
    gap(mk(CMD_WR, 2, 3), mk(CMD_RD, 4, 3), 19, "write to read, other group");
    idle(60);
    gap(mk(CMD_RD, 2, 3), mk(CMD_PRE, 2, 0), 9, "tRTP");
    idle(60);
    gap(mk(CMD_WR, 4, 3), mk(CMD_PRE, 4, 0), 34, "write recovery");
    gap(mk(CMD_PRE, 4, 0), mk(CMD_ACT, 4, 8), 16, "tRP");
    gap(mk(CMD_ACT, 5, 8), mk(CMD_ACT, 5, 8), 200, "ACT needs a PRE first");
    issue(mk(CMD_PRE, 5, 0));
    idle(80);
    gap(mk(CMD_ACT, 6, 1), mk(CMD_PRE, 6, 1), 39, "tRAS again");
    issue(mk(CMD_PRE, 6, 0));
    idle(80);
    // tRC measured as ACT -> ACT with PRE issued as early as possible
    begin
      int n;
      @(negedge clk) cmd = mk(CMD_ACT, 7, 1);
      @(negedge clk) cmd = mk(CMD_NOP, 0, 0);
      n = 1;
      while (!dram_cmd_legal(bank_st, bg_st, mk(CMD_PRE, 7, 0))) begin @(negedge clk); n++; end
      cmd = mk(CMD_PRE, 7, 0);
      @(negedge clk) cmd = mk(CMD_NOP, 0, 0);
      n++;
      while (!dram_cmd_legal(bank_st, bg_st, mk(CMD_ACT, 7, 2)) && n < 200) begin @(negedge clk); n++; end
      check(n == 55, $sformatf("tRC: %0d, expected 55", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
