// pim_system_top: one memory channel of a PIM-enabled main memory.
//
// Concurrent host/PIM access (left part): the host memory controller keeps
// driving every rank with ordinary DDR commands while a PIM on the logic die
// of each rank runs coarse-grain vector operations on the same DRAM. The
// host-side PIM controller (pim_host_ctrl) launches operations with 32-byte
// packets, keeps a replica of each PIM's access FSM so that it knows every
// PIM command without being told, answers the host controller's "is this
// command legal now" query against the combined state, and drives the
// next-rank-prediction pins that stall PIM writes to the rank the oldest
// host read is waiting for. Each pim_rank_unit yields the rank to any host
// command and otherwise issues its own commands. The host's physical-to-DRAM
// mapping (xor_addr_map followed by bank_partition_remap) is provided as a
// combinational port so that the host controller and the PIM runtime use the
// same mapping, with the top banks of every rank reserved for shared data.
//
// GEMM PIM (right part): a StepStone PIM unit with its own register,
// scratchpad and memory ports stands beside the channel; it runs one
// sub-GEMM over the cache blocks of a weight matrix that the XOR mapping
// places in its PIM and block group. The replication/reduction engine
// (stepstone_dma) of the PIM controller copies activation blocks into the
// private regions of up to 16 PIM units and sums their partial results;
// it has its own register and block-memory ports.
//
// The host cores, the host memory controller's scheduler and the DRAM dies
// are outside this block: their signals are ports. rep_mismatch is a sticky
// flag that rises if any replica ever disagrees with its PIM. All timing is
// in DRAM clock cycles.
module pim_system_top
  import pim_pkg::*;
#(
  parameter int unsigned  NUM_RANKS = 2,
  parameter int unsigned  PA_W      = 35,
  parameter int unsigned  BATCH     = 128,
  parameter int unsigned  NRES      = 2,
  parameter int unsigned  SS_SIMD   = 8,
  parameter int unsigned  SS_SPM    = 8192,
  localparam int unsigned RK_W      = (NUM_RANKS > 1) ? $clog2(NUM_RANKS) : 1,
  localparam int unsigned SS_SA_W   = $clog2(SS_SPM / (4 * SS_SIMD))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // acceleration requests
  input  logic                 req_valid,
  output logic                 req_ready,
  input  pim_packet_t          req_pkt,
  output logic                 req_done,
  output logic [31:0]          rank_result [NUM_RANKS],
  output logic [NUM_RANKS-1:0] rank_result_valid,
  output logic [NUM_RANKS-1:0] rank_busy,
  output logic [NUM_RANKS-1:0] rank_wr_phase,
  output logic [NUM_RANKS-1:0] rank_throttled,
  output logic [NUM_RANKS-1:0] rank_done,
  output logic [NUM_RANKS-1:0] rank_overrun,
  output logic [NUM_RANKS-1:0] rep_busy,
  output logic                 rep_mismatch,
  // host memory controller
  input  logic                 host_cmd_valid,
  input  logic [RK_W-1:0]      host_cmd_rank,
  input  dram_cmd_t            host_cmd,
  output logic                 host_cmd_legal,
  input  logic                 oldest_valid,
  input  logic                 oldest_is_read,
  input  logic [RK_W-1:0]      oldest_rank,
  input  thr_mode_e            thr_mode,
  input  logic [3:0]           prob_log2,
  output logic [NUM_RANKS-1:0] wr_inhibit,
  // host address mapping
  input  logic [PA_W-1:0]      pa,
  output logic                 map_ch,
  output logic                 map_rank,
  output logic [BANK_W-1:0]    map_bank,
  output logic [ROW_W-1:0]     map_row,
  output logic [COL_W-1:0]     map_col,
  output logic                 map_shared,
  output logic                 map_swapped,
  output logic [5:0]           map_offset,
  // DRAM dies, per rank
  output dram_cmd_t            die_cmd        [NUM_RANKS],
  output logic [NUM_RANKS-1:0] die_cmd_is_pim,
  output logic [63:0]          die_wdata      [NUM_RANKS],
  input  logic [NUM_RANKS-1:0] die_rvalid,
  input  logic [63:0]          die_rdata      [NUM_RANKS],
  // StepStone PIM unit
  input  logic                 ss_csr_we,
  input  logic [3:0]           ss_csr_addr,
  input  logic [31:0]          ss_csr_wdata,
  output logic [31:0]          ss_csr_rdata,
  input  logic                 ss_spm_we,
  input  logic [SS_SA_W-1:0]   ss_spm_addr,
  input  logic [32*SS_SIMD-1:0] ss_spm_wdata,
  output logic [32*SS_SIMD-1:0] ss_spm_rdata,
  output logic                 ss_mem_req_valid,
  input  logic                 ss_mem_req_ready,
  output logic [31:0]          ss_mem_req_addr,
  input  logic                 ss_mem_rsp_valid,
  input  logic [511:0]         ss_mem_rsp_data,
  output logic                 ss_busy,
  output logic                 ss_done,
  // StepStone replication/reduction engine in the PIM controller
  input  logic                 dma_csr_we,
  input  logic [4:0]           dma_csr_addr,
  input  logic [31:0]          dma_csr_wdata,
  output logic [31:0]          dma_csr_rdata,
  output logic                 dma_mem_req_valid,
  input  logic                 dma_mem_req_ready,
  output logic                 dma_mem_req_we,
  output logic [31:0]          dma_mem_req_addr,
  output logic [511:0]         dma_mem_req_wdata,
  input  logic                 dma_mem_rsp_valid,
  input  logic [511:0]         dma_mem_rsp_data,
  output logic                 dma_busy,
  output logic                 dma_done
);
  // ---------------- host address path ----------------
  logic [BANK_W-1:0] bank0;
  logic [ROW_W-1:0]  row0;

  xor_addr_map #(.PA_W(PA_W)) u_map (
    .pa, .ch(map_ch), .rank(map_rank), .bank(bank0), .row(row0), .col(map_col), .offset(map_offset)
  );
  bank_partition_remap #(.NRES(NRES)) u_remap (
    .bank_in(bank0), .row_in(row0), .bank_out(map_bank), .row_out(map_row),
    .swapped(map_swapped), .shared_region(map_shared)
  );

  // ---------------- host-side PIM controller ----------------
  logic            pkt_wr_valid;
  logic [RK_W-1:0] pkt_wr_rank;
  logic [1:0]      pkt_wr_idx;
  logic [63:0]     pkt_wr_data;
  dram_cmd_t       rep_cmd [NUM_RANKS];
  logic [NUM_RANKS-1:0] rep_wr_phase, rep_throttled, rep_done;

  pim_host_ctrl #(.NUM_RANKS(NUM_RANKS), .BATCH(BATCH)) u_host (
    .clk, .rst_n, .req_valid, .req_ready, .req_pkt, .done_pulse(req_done),
    .host_cmd_valid, .host_cmd_rank, .host_cmd, .host_cmd_legal,
    .oldest_valid, .oldest_is_read, .oldest_rank, .thr_mode, .prob_log2,
    .pkt_wr_valid, .pkt_wr_rank, .pkt_wr_idx, .pkt_wr_data, .wr_inhibit,
    .rep_cmd, .rep_busy, .rep_wr_phase, .rep_throttled, .rep_done
  );

  // ---------------- one logic die per rank ----------------
  localparam dram_cmd_t NOP_CMD = '{cmd: CMD_NOP, bank: '0, row: '0, col: '0};
  logic [NUM_RANKS-1:0] mism;

  for (genvar r = 0; r < NUM_RANKS; r++) begin : g_rank
    logic hv;
    assign hv = host_cmd_valid && (host_cmd_rank == RK_W'(r));
    pim_rank_unit #(.BATCH(BATCH), .COIN_SEED(16'hACE1 + 16'(r))) u_rank (
      .clk, .rst_n, .host_cmd_valid(hv), .host_cmd,
      .pkt_wr_valid(pkt_wr_valid && pkt_wr_rank == RK_W'(r)), .pkt_wr_idx, .pkt_wr_data,
      .wr_inhibit(wr_inhibit[r]), .thr_mode, .prob_log2,
      .die_cmd(die_cmd[r]), .die_cmd_is_pim(die_cmd_is_pim[r]), .die_wdata(die_wdata[r]),
      .die_rvalid(die_rvalid[r]), .die_rdata(die_rdata[r]),
      .busy(rank_busy[r]), .done(rank_done[r]), .wr_phase(rank_wr_phase[r]),
      .throttled(rank_throttled[r]), .result(rank_result[r]),
      .result_valid(rank_result_valid[r]), .overrun(rank_overrun[r])
    );
    // the replica must issue exactly what the PIM issues
    dram_cmd_t die_pim, rep_exp;
    assign die_pim = die_cmd_is_pim[r] ? die_cmd[r] : NOP_CMD;
    assign rep_exp = hv ? NOP_CMD : rep_cmd[r];
    assign mism[r] = (die_pim != rep_exp) || (rep_busy[r] != rank_busy[r]) ||
                     (rep_wr_phase[r] != rank_wr_phase[r]) ||
                     (rep_throttled[r] != rank_throttled[r]) || (rep_done[r] != rank_done[r]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         rep_mismatch <= 1'b0;
    else if (|mism)     rep_mismatch <= 1'b1;

  // ---------------- StepStone GEMM PIM ----------------
  stepstone_pim #(.SIMD(SS_SIMD), .SPM_BYTES(SS_SPM)) u_ss (
    .clk, .rst_n, .csr_we(ss_csr_we), .csr_addr(ss_csr_addr), .csr_wdata(ss_csr_wdata),
    .csr_rdata(ss_csr_rdata), .spm_we(ss_spm_we), .spm_addr(ss_spm_addr),
    .spm_wdata(ss_spm_wdata), .spm_rdata(ss_spm_rdata), .mem_req_valid(ss_mem_req_valid),
    .mem_req_ready(ss_mem_req_ready), .mem_req_addr(ss_mem_req_addr),
    .mem_rsp_valid(ss_mem_rsp_valid), .mem_rsp_data(ss_mem_rsp_data), .busy(ss_busy),
    .done(ss_done)
  );

  stepstone_dma #(.ADDR_W(32), .NPIM(16)) u_dma (
    .clk, .rst_n, .csr_we(dma_csr_we), .csr_addr(dma_csr_addr), .csr_wdata(dma_csr_wdata),
    .csr_rdata(dma_csr_rdata), .mem_req_valid(dma_mem_req_valid),
    .mem_req_ready(dma_mem_req_ready), .mem_req_we(dma_mem_req_we),
    .mem_req_addr(dma_mem_req_addr), .mem_req_wdata(dma_mem_req_wdata),
    .mem_rsp_valid(dma_mem_rsp_valid), .mem_rsp_data(dma_mem_rsp_data), .busy(dma_busy),
    .done(dma_done)
  );
endmodule
