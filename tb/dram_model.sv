// dram_model: behavioural stand-in for the DRAM dies of one rank (testbench
// only).
//
// Stores 64-bit beats (one 8-byte chip burst) in a sparse array indexed by
// {bank, row, column}. A PIM read returns its beat LAT cycles after the RD
// command (tCL + tBL = 20 for DDR4-2400) on rvalid/rdata; a PIM write stores
// the write data presented with the WR command. Host reads and writes move
// no data here (the host data path is outside the design). Beats never
// written read as a pattern derived from the address.
//
// It checks every command on the bus against its own, independent copy of
// the main DDR4 rules: no ACT to an open bank, column commands only to the
// open row, tRCD, tRP, tRAS, tRC, tCCD_S/L between column commands, and
// counts breaches in `violations`. It also counts ACT/PRE/RD/WR by source.
// poke/peek give the testbench direct access to the stored data.
module dram_model
  import pim_pkg::*;
#(
  parameter int unsigned LAT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dram_cmd_t   cmd,
  input  logic        cmd_is_pim,
  input  logic [63:0] wdata,
  output logic        rvalid,
  output logic [63:0] rdata
);
  logic [63:0] mem [logic [BANK_W+ROW_W+COL_W-1:0]];
  logic [LAT-1:0] vpipe;
  logic [63:0]    dpipe [LAT];

  int violations = 0;
  int n_act = 0, n_pre = 0, n_pim_rd = 0, n_pim_wr = 0, n_host_rd = 0, n_host_wr = 0;
  longint cyc = 0;
  longint t_act [NBANKS];
  longint t_pre [NBANKS];
  longint t_col_any = -100;
  longint t_col_bg [4];
  logic   open_b [NBANKS];
  logic [ROW_W-1:0] row_b [NBANKS];

  initial begin
    for (int b = 0; b < NBANKS; b++) begin
      t_act[b] = -1000; t_pre[b] = -1000; open_b[b] = 1'b0; row_b[b] = '0;
    end
    for (int g = 0; g < 4; g++) t_col_bg[g] = -100;
  end

  function automatic logic [63:0] pattern(logic [BANK_W+ROW_W+COL_W-1:0] a);
    return {32'(a) * 32'h9E37_79B9, 32'(a) ^ 32'h5A5A_0000};
  endfunction

  function automatic logic [63:0] peek(logic [BANK_W-1:0] b, logic [ROW_W-1:0] r, logic [COL_W-1:0] c);
    if (mem.exists({b, r, c})) return mem[{b, r, c}];
    return pattern({b, r, c});
  endfunction

  task automatic poke(input logic [BANK_W-1:0] b, input logic [ROW_W-1:0] r,
                      input logic [COL_W-1:0] c, input logic [63:0] d);
    mem[{b, r, c}] = d;
  endtask

  task automatic viol(input string what);
    violations++;
    if (violations < 10) $display("DRAM VIOLATION at cycle %0d: %s (bank %0d)", cyc, what, cmd.bank);
  endtask

  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      for (int i = 0; i < LAT; i++) dpipe[i] <= '0;
    end else begin
      vpipe <= {vpipe[LAT-2:0], cmd_is_pim && cmd.cmd == CMD_RD};
      dpipe[0] <= peek(cmd.bank, cmd.row, cmd.col);
      for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
    end
  end

  // protocol checker and write storage
  always @(posedge clk) begin
    if (rst_n) begin
      automatic int b = int'(cmd.bank);
      automatic int g = int'(cmd.bank[BANK_W-1 -: 2]);
      cyc++;
      case (cmd.cmd)
        CMD_ACT: begin
          n_act++;
          if (open_b[b]) viol("ACT to open bank");
          if (cyc - t_pre[b] < 16) viol("tRP");
          if (cyc - t_act[b] < 55) viol("tRC");
          open_b[b] = 1'b1; row_b[b] = cmd.row; t_act[b] = cyc;
        end
        CMD_PRE: begin
          n_pre++;
          if (open_b[b] && cyc - t_act[b] < 39) viol("tRAS");
          open_b[b] = 1'b0; t_pre[b] = cyc;
        end
        CMD_RD, CMD_WR: begin
          if (!open_b[b] || row_b[b] != cmd.row) viol("column command to a closed row");
          if (cyc - t_act[b] < 16) viol("tRCD");
          if (cyc - t_col_any < 4) viol("tCCD_S");
          if (cyc - t_col_bg[g] < 6) viol("tCCD_L");
          t_col_any = cyc; t_col_bg[g] = cyc;
          if (cmd.cmd == CMD_WR) begin
            if (cmd_is_pim) begin n_pim_wr++; mem[{cmd.bank, cmd.row, cmd.col}] = wdata; end
            else n_host_wr++;
          end else begin
            if (cmd_is_pim) n_pim_rd++; else n_host_rd++;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
