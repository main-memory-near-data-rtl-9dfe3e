// pim_mc: PIM-side memory controller on the logic die of one rank.
//
// It turns the access FSM's request (read or write of one 8-byte column at
// bank/row/col) into DRAM commands: ACT if the bank is closed, PRE if another
// row is open, then RD or WR. Host requests always win: in a cycle in which
// the host issues a command to this rank, the PIM issues nothing, and
// otherwise it issues opportunistically whenever the rank state table says
// the command is legal, so even short idle periods of the rank are used.
// PIM writes (only writes) can be throttled in two ways: next-rank
// prediction (the host's inhibit pin for this rank holds writes back) or
// stochastic issue (a write that could issue first flips a weighted coin).
// The decision uses only the state table, the host command of the cycle,
// the inhibit pin and the coin, all of which the host-side replica also has,
// so the replica computes the same command stream.
//
// Timing: combinational; pim_cmd and acc_done belong to the current cycle
// and the caller feeds pim_cmd (or the host command) to the state table.
module pim_mc
  import pim_pkg::*;
(
  input  logic             req_valid,
  input  logic             req_write,
  input  logic [BANK_W-1:0] req_bank,
  input  logic [ROW_W-1:0] req_row,
  input  logic [COL_W-1:0] req_col,
  input  bank_state_vec_t  bank_st,
  input  bg_state_vec_t    bg_st,
  input  logic             host_busy,     // host command to this rank this cycle
  input  thr_mode_e        thr_mode,
  input  logic             wr_inhibit,    // next-rank prediction pin
  input  logic             coin_heads,    // stochastic issue coin
  output logic             coin_flip,
  output dram_cmd_t        pim_cmd,
  output logic             acc_done,      // the column command of the request issues now
  output logic             throttled      // a legal write was held back this cycle
);
  dram_cmd_t cand;
  logic      legal, is_wr, hold;

  always_comb begin
    cand      = '{cmd: dram_next_cmd(bank_st, req_bank, req_row, req_write),
                  bank: req_bank, row: req_row, col: req_col};
    legal     = req_valid && !host_busy && dram_cmd_legal(bank_st, bg_st, cand);
    is_wr     = (cand.cmd == CMD_WR);
    coin_flip = legal && is_wr && (thr_mode == THR_STOCH);
    hold      = is_wr && (((thr_mode == THR_NRP) && wr_inhibit) ||
                          ((thr_mode == THR_STOCH) && !coin_heads));
    throttled = legal && hold;
    pim_cmd   = (legal && !hold) ? cand : '{cmd: CMD_NOP, bank: '0, row: '0, col: '0};
    acc_done  = (pim_cmd.cmd == CMD_RD) || (pim_cmd.cmd == CMD_WR);
  end
endmodule
