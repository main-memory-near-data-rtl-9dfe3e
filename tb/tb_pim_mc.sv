// tb_pim_mc: self-checking test of the PIM-side memory controller.
//
// The controller is combinational. For 20000 random cases it builds a rank
// state (random open rows and wait counters) and a random request, throttle
// mode, inhibit pin and coin, and compares every output with a reference
// written from the rules: the next command is ACT for a closed bank, PRE for
// a row conflict, else RD/WR; it is issued only if the request is valid, no
// host command uses the rank this cycle (CPU priority) and it is legal; a
// write is held back under next-rank prediction when the inhibit pin is up
// and under stochastic issue when the coin shows tails, and a coin is used
// only for a legal write in stochastic mode. Each outcome (host yield, row
// conflict PRE, ACT, read, write, NRP hold, stochastic hold) must occur.
// Checked 1 ns after each input. Watchdog 1 ms.
module tb_pim_mc;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic req_valid = 0, req_write = 0, host_busy = 0, wr_inhibit = 0, coin_heads = 0;
  logic [BANK_W-1:0] req_bank = '0;
  logic [ROW_W-1:0] req_row = '0;
  logic [COL_W-1:0] req_col = '0;
  bank_state_vec_t bank_st = '0;
  bg_state_vec_t bg_st = '0;
  thr_mode_e thr_mode = THR_NONE;
  logic coin_flip, acc_done, throttled;
  dram_cmd_t pim_cmd;

  pim_mc dut (.req_valid, .req_write, .req_bank, .req_row, .req_col, .bank_st, .bg_st,
              .host_busy, .thr_mode, .wr_inhibit, .coin_heads, .coin_flip, .pim_cmd,
              .acc_done, .throttled);

  int n_yield = 0, n_pre = 0, n_act = 0, n_rd = 0, n_wr = 0, n_nrp = 0, n_sto = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      dram_cmd_e nc;
      logic lg, hold, e_issue;
      dram_cmd_t cand;
      for (int b = 0; b < NBANKS; b++) begin
        bank_st[b].open     = $urandom % 2;
        bank_st[b].row      = 16'($urandom % 3);
        bank_st[b].act_wait = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
        bank_st[b].col_wait = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
        bank_st[b].pre_wait = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
      end
      for (int g = 0; g < 4; g++) begin
        bg_st[g].rd_wait  = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
        bg_st[g].wr_wait  = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
        bg_st[g].act_wait = ($urandom % 3 == 0) ? 8'($urandom % 20) : 8'd0;
      end
      req_valid  = ($urandom % 8) != 0;
      req_write  = $urandom % 2;
      req_bank   = 4'($urandom);
      req_row    = 16'($urandom % 3);
      req_col    = 7'($urandom);
      host_busy  = ($urandom % 5) == 0;
      wr_inhibit = $urandom % 2;
      coin_heads = $urandom % 2;
      thr_mode   = thr_mode_e'($urandom % 3);
      #1;
      // reference
      if (!bank_st[req_bank].open) nc = CMD_ACT;
      else if (bank_st[req_bank].row != req_row) nc = CMD_PRE;
      else nc = req_write ? CMD_WR : CMD_RD;
      cand = '{cmd: nc, bank: req_bank, row: req_row, col: req_col};
      case (nc)
        CMD_ACT: lg = bank_st[req_bank].act_wait == 0 && bg_st[req_bank[3:2]].act_wait == 0;
        CMD_PRE: lg = bank_st[req_bank].pre_wait == 0;
        CMD_RD:  lg = bank_st[req_bank].col_wait == 0 && bg_st[req_bank[3:2]].rd_wait == 0;
        default: lg = bank_st[req_bank].col_wait == 0 && bg_st[req_bank[3:2]].wr_wait == 0;
      endcase
      lg = lg && req_valid && !host_busy;
      hold = (nc == CMD_WR) && ((thr_mode == THR_NRP && wr_inhibit) ||
                                (thr_mode == THR_STOCH && !coin_heads));
      e_issue = lg && !hold;
      check(e_issue ? (pim_cmd == cand) : (pim_cmd.cmd == CMD_NOP), $sformatf("command, case %0d", i));
      check(acc_done == (e_issue && (nc == CMD_RD || nc == CMD_WR)), "acc_done");
      check(throttled == (lg && hold), "throttled");
      check(coin_flip == (lg && nc == CMD_WR && thr_mode == THR_STOCH), "coin flip");
      if (req_valid && host_busy) n_yield++;
      if (e_issue && nc == CMD_PRE) n_pre++;
      if (e_issue && nc == CMD_ACT) n_act++;
      if (e_issue && nc == CMD_RD) n_rd++;
      if (e_issue && nc == CMD_WR) n_wr++;
      if (lg && hold && thr_mode == THR_NRP) n_nrp++;
      if (lg && hold && thr_mode == THR_STOCH) n_sto++;
    end
    check(n_yield > 0 && n_pre > 0 && n_act > 0 && n_rd > 0 && n_wr > 0 && n_nrp > 0 && n_sto > 0,
          "every outcome seen");
    $display("yield=%0d pre=%0d act=%0d rd=%0d wr=%0d nrp_hold=%0d stoch_hold=%0d",
             n_yield, n_pre, n_act, n_rd, n_wr, n_nrp, n_sto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
