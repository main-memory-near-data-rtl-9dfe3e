// pim_rank_unit: the logic die under the DRAM dies of one rank.
//
// It joins the launch registers, the operation's access FSM, the PIM memory
// controller, the rank state table, the stochastic-issue coin and the vector
// PE. Host commands to the rank pass through it to the DRAM dies; in a cycle
// with no host command the PIM controller may issue its own command. Every
// command that reaches the dies, host or PIM, updates the state table, so the
// PIM side tracks the host's bank and timing state by observation. Read data
// for PIM reads returns from the dies on die_rvalid/die_rdata and feeds the
// PE; write data for PIM writes is taken from the PE buffer at the column of
// the write. The block structure (controller, FSM, PE, buffer on one logic
// die) follows the design; the interface signals are this design's.
//
// Timing: host_cmd in cycle t is on die_cmd in cycle t (no added latency);
// a launch packet's last word in cycle t makes the first PIM command
// possible in cycle t+2.
module pim_rank_unit
  import pim_pkg::*;
#(
  parameter dram_timing_t T          = DDR4_2400,
  parameter int unsigned  BATCH      = 128,
  parameter logic [15:0]  COIN_SEED  = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  // host side of the channel
  input  logic        host_cmd_valid,     // host command addressed to this rank
  input  dram_cmd_t   host_cmd,
  input  logic        pkt_wr_valid,
  input  logic [1:0]  pkt_wr_idx,
  input  logic [63:0] pkt_wr_data,
  input  logic        wr_inhibit,         // next-rank prediction pin
  input  thr_mode_e   thr_mode,
  input  logic [3:0]  prob_log2,
  // DRAM dies
  output dram_cmd_t   die_cmd,
  output logic        die_cmd_is_pim,
  output logic [63:0] die_wdata,
  input  logic        die_rvalid,         // read data of a PIM read
  input  logic [63:0] die_rdata,
  // status
  output logic        busy,
  output logic        done,
  output logic        wr_phase,
  output logic        throttled,
  output logic [31:0] result,
  output logic        result_valid,
  output logic        overrun
);
  localparam int unsigned DRAIN_WAIT = int'(T.tCL) + int'(T.tBL) + 4;

  logic            launch;
  pim_packet_t     pkt;
  logic            req_valid, req_write, acc_done, coin_flip, heads;
  logic [BANK_W-1:0] req_bank;
  logic [ROW_W-1:0] req_row;
  logic [COL_W-1:0] req_col;
  bank_state_vec_t bank_st;
  bg_state_vec_t   bg_st;
  dram_cmd_t       pim_cmd;

  pim_packet_regs u_regs (
    .clk, .rst_n, .wr_valid(pkt_wr_valid), .wr_idx(pkt_wr_idx), .wr_data(pkt_wr_data),
    .pim_busy(busy), .launch, .pkt, .overrun
  );

  pim_access_fsm #(.BATCH(BATCH), .DRAIN_WAIT(DRAIN_WAIT)) u_fsm (
    .clk, .rst_n, .launch, .pkt, .acc_done, .req_valid, .req_write, .req_bank,
    .req_row, .req_col, .wr_phase, .busy, .done
  );

  stochastic_issue #(.SEED(COIN_SEED)) u_coin (
    .clk, .rst_n, .prob_log2, .flip(coin_flip), .heads
  );

  pim_mc u_mc (
    .req_valid, .req_write, .req_bank, .req_row, .req_col, .bank_st, .bg_st,
    .host_busy(host_cmd_valid), .thr_mode, .wr_inhibit, .coin_heads(heads),
    .coin_flip, .pim_cmd, .acc_done, .throttled
  );

  assign die_cmd        = host_cmd_valid ? host_cmd : pim_cmd;
  assign die_cmd_is_pim = !host_cmd_valid && (pim_cmd.cmd != CMD_NOP);

  dram_state_table #(.T(T)) u_state (.clk, .rst_n, .cmd(die_cmd), .bank_st, .bg_st);

  pim_pe #(.BATCH(BATCH)) u_pe (
    .clk, .rst_n, .launch, .pkt, .rvalid(die_rvalid), .rdata(die_rdata),
    .wr_idx(req_col[$clog2(BATCH)-1:0]), .wdata(die_wdata), .result, .result_valid
  );

  // a host command and a PIM command never reach the dies in the same cycle
  always_comb assert (!(host_cmd_valid && pim_cmd.cmd != CMD_NOP));
endmodule
