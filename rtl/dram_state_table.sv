// dram_state_table: bank and timing state of one DRAM rank.
//
// Two memory controllers drive the same rank in this design: the host's and
// the PIM's on the logic die. Each side keeps one of these tables and feeds
// it every command issued to the rank, whichever side issued it, so both see
// the same open rows and the same timing windows without exchanging any
// state. Per bank it holds open/closed, the open row and three down-counters
// (cycles until ACT, until a column command, until PRE is allowed); per bank
// group it holds the read, write and activate windows, which carry tCCD_S/L,
// the read/write turnarounds (tWTR_S/L and tCL+tBL+2-tCWL) and tRRD_S/L.
// Legality of a candidate command is checked with pim_pkg::dram_cmd_legal
// on the exported state. tFAW and the rank-to-rank switch time tRTRS are not
// tracked (this design's simplification: one rank per table).
//
// Timing: the command presented in cycle t updates the state at the clock
// edge that ends cycle t; a constraint of n cycles makes the dependent
// command legal again in cycle t+n.
//
// The column field of the incoming command never changes bank timing, so it
// is not read (lint lists those bits as unused).
module dram_state_table
  import pim_pkg::*;
#(
  parameter dram_timing_t T = DDR4_2400
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dram_cmd_t       cmd,       // command issued to this rank this cycle (CMD_NOP if none)
  output bank_state_vec_t bank_st,
  output bg_state_vec_t   bg_st
);
  localparam int unsigned NBG = 1 << BG_W;

  // n-1 saturating at 0: a value of n written now allows the command n cycles later
  function automatic logic [7:0] win(logic [7:0] cur, logic [7:0] n);
    logic [7:0] v;
    v = (n == 0) ? 8'd0 : n - 8'd1;
    return (cur > v) ? cur : v;
  endfunction

  function automatic logic [7:0] dec(logic [7:0] cur);
    return (cur == 0) ? 8'd0 : cur - 8'd1;
  endfunction

  logic [BG_W-1:0] cbg;
  logic [7:0]      rd_to_wr, wr_to_rd_s, wr_to_rd_l, wr_to_pre;

  assign cbg        = cmd.bank[BANK_W-1 -: BG_W];
  assign rd_to_wr   = T.tCL + T.tBL + 8'd2 - T.tCWL;
  assign wr_to_rd_s = T.tCWL + T.tBL + T.tWTRS;
  assign wr_to_rd_l = T.tCWL + T.tBL + T.tWTRL;
  assign wr_to_pre  = T.tCWL + T.tBL + T.tWR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_st <= '0;
      bg_st   <= '0;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        bank_st[b].act_wait <= dec(bank_st[b].act_wait);
        bank_st[b].col_wait <= dec(bank_st[b].col_wait);
        bank_st[b].pre_wait <= dec(bank_st[b].pre_wait);
      end
      for (int g = 0; g < NBG; g++) begin
        bg_st[g].rd_wait  <= dec(bg_st[g].rd_wait);
        bg_st[g].wr_wait  <= dec(bg_st[g].wr_wait);
        bg_st[g].act_wait <= dec(bg_st[g].act_wait);
      end
      case (cmd.cmd)
        CMD_ACT: begin
          bank_st[cmd.bank].open     <= 1'b1;
          bank_st[cmd.bank].row      <= cmd.row;
          bank_st[cmd.bank].col_wait <= win(dec(bank_st[cmd.bank].col_wait), T.tRCD);
          bank_st[cmd.bank].pre_wait <= win(dec(bank_st[cmd.bank].pre_wait), T.tRAS);
          bank_st[cmd.bank].act_wait <= win(dec(bank_st[cmd.bank].act_wait), T.tRC);
          for (int g = 0; g < NBG; g++)
            bg_st[g].act_wait <= win(dec(bg_st[g].act_wait),
                                     (g == int'(cbg)) ? T.tRRDL : T.tRRDS);
        end
        CMD_PRE: begin
          bank_st[cmd.bank].open     <= 1'b0;
          bank_st[cmd.bank].act_wait <= win(dec(bank_st[cmd.bank].act_wait), T.tRP);
        end
        CMD_RD: begin
          bank_st[cmd.bank].pre_wait <= win(dec(bank_st[cmd.bank].pre_wait), T.tRTP);
          for (int g = 0; g < NBG; g++) begin
            bg_st[g].rd_wait <= win(dec(bg_st[g].rd_wait), (g == int'(cbg)) ? T.tCCDL : T.tCCDS);
            bg_st[g].wr_wait <= win(dec(bg_st[g].wr_wait), rd_to_wr);
          end
        end
        CMD_WR: begin
          bank_st[cmd.bank].pre_wait <= win(dec(bank_st[cmd.bank].pre_wait), wr_to_pre);
          for (int g = 0; g < NBG; g++) begin
            bg_st[g].rd_wait <= win(dec(bg_st[g].rd_wait),
                                    (g == int'(cbg)) ? wr_to_rd_l : wr_to_rd_s);
            bg_st[g].wr_wait <= win(dec(bg_st[g].wr_wait), (g == int'(cbg)) ? T.tCCDL : T.tCCDS);
          end
        end
        default: ;
      endcase
    end
  end
endmodule
