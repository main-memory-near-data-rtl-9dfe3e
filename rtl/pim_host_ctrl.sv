// pim_host_ctrl: host-side PIM controller of one memory channel.
//
// It accepts an acceleration request (one launch packet), sends the packet
// to the PIM of every rank in turn, round-robin, as four 8-byte writes per
// rank, and signals completion when every rank has finished. Packet writes
// use the channel command bus only in cycles the host memory controller
// leaves free. For every rank it keeps a replica of that PIM's access FSM,
// memory controller, state table and issue coin. The replica is launched in
// the same cycle as the real PIM and sees the same host commands, inhibit
// pin and coin flips, so it reproduces the PIM's command stream without any
// signal from the PIMs. The host memory controller asks it whether a
// command it wants to send is legal against the combined host and PIM
// state (host_cmd_legal). The controller also holds the next-rank predictor
// whose per-rank pins stall PIM writes. What the controller does follows the
// design; the request interface, the per-request rank order and the legality
// query port are this design's.
//
// Timing: req_ready is high while idle; word k of rank r's packet is sent in
// the k-th free bus cycle after that rank's turn starts; done_pulse is high
// for one cycle after the last PIM finishes.
module pim_host_ctrl
  import pim_pkg::*;
#(
  parameter int unsigned  NUM_RANKS = 2,
  parameter dram_timing_t T         = DDR4_2400,
  parameter int unsigned  BATCH     = 128,
  parameter logic [15:0]  COIN_SEED = 16'hACE1,
  localparam int unsigned RK_W      = (NUM_RANKS > 1) ? $clog2(NUM_RANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // acceleration requests from software
  input  logic                 req_valid,
  output logic                 req_ready,
  input  pim_packet_t          req_pkt,
  output logic                 done_pulse,
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
  // channel side
  output logic                 pkt_wr_valid,
  output logic [RK_W-1:0]      pkt_wr_rank,
  output logic [1:0]           pkt_wr_idx,
  output logic [63:0]          pkt_wr_data,
  output logic [NUM_RANKS-1:0] wr_inhibit,
  // replicated state, per rank
  output dram_cmd_t            rep_cmd  [NUM_RANKS],
  output logic [NUM_RANKS-1:0] rep_busy,
  output logic [NUM_RANKS-1:0] rep_wr_phase,
  output logic [NUM_RANKS-1:0] rep_throttled,
  output logic [NUM_RANKS-1:0] rep_done
);
  localparam int unsigned DRAIN_WAIT = int'(T.tCL) + int'(T.tBL) + 4;

  typedef enum logic [1:0] { H_IDLE, H_SEND, H_WAIT } hstate_e;
  hstate_e     hst;
  pim_packet_t pkt_q;
  logic [RK_W-1:0] cur_rank;
  logic [1:0]  word;
  logic [NUM_RANKS-1:0] rep_launch;
  logic [NUM_RANKS-1:0] launched;
  logic [255:0] pkt_bits;

  assign pkt_bits    = pkt_q;
  assign req_ready   = (hst == H_IDLE);
  assign pkt_wr_valid = (hst == H_SEND) && !host_cmd_valid && !rep_busy[cur_rank];
  assign pkt_wr_rank = cur_rank;
  assign pkt_wr_idx  = word;
  assign pkt_wr_data = pkt_bits[64*word +: 64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst <= H_IDLE; pkt_q <= '0; cur_rank <= '0; word <= '0;
      rep_launch <= '0; launched <= '0; done_pulse <= 1'b0;
    end else begin
      rep_launch <= '0;
      done_pulse <= 1'b0;
      case (hst)
        H_IDLE: if (req_valid) begin
          pkt_q <= req_pkt; word <= '0; launched <= '0; hst <= H_SEND;
        end
        H_SEND: if (pkt_wr_valid) begin
          word <= word + 2'd1;
          if (word == 2'd3) begin
            rep_launch[cur_rank] <= 1'b1;
            launched[cur_rank]   <= 1'b1;
            cur_rank <= (cur_rank == RK_W'(NUM_RANKS - 1)) ? '0 : cur_rank + RK_W'(1);
            if ((launched | (NUM_RANKS'(1) << cur_rank)) == {NUM_RANKS{1'b1}})
              hst <= H_WAIT;
          end
        end
        H_WAIT: if (rep_busy == '0 && rep_launch == '0) begin
          done_pulse <= 1'b1;
          hst        <= H_IDLE;
        end
        default: hst <= H_IDLE;
      endcase
    end
  end

  next_rank_predictor #(.NUM_RANKS(NUM_RANKS)) u_nrp (
    .clk, .rst_n, .enable(thr_mode == THR_NRP), .oldest_valid, .oldest_is_read,
    .oldest_rank, .wr_inhibit
  );

  bank_state_vec_t rep_bank_st [NUM_RANKS];
  bg_state_vec_t   rep_bg_st   [NUM_RANKS];
  logic [NUM_RANKS-1:0] host_legal_r;

  for (genvar r = 0; r < NUM_RANKS; r++) begin : g_rep
    logic            hv, req_valid_r, req_write_r, acc_done_r, flip_r, heads_r;
    logic [BANK_W-1:0] bank_r;
    logic [ROW_W-1:0] row_r;
    logic [COL_W-1:0] col_r;
    dram_cmd_t       pcmd_r, die_r;

    assign hv = host_cmd_valid && (host_cmd_rank == RK_W'(r));

    pim_access_fsm #(.BATCH(BATCH), .DRAIN_WAIT(DRAIN_WAIT)) u_fsm (
      .clk, .rst_n, .launch(rep_launch[r]), .pkt(pkt_q), .acc_done(acc_done_r),
      .req_valid(req_valid_r), .req_write(req_write_r), .req_bank(bank_r), .req_row(row_r),
      .req_col(col_r), .wr_phase(rep_wr_phase[r]), .busy(rep_busy[r]), .done(rep_done[r])
    );
    stochastic_issue #(.SEED(COIN_SEED + 16'(r))) u_coin (
      .clk, .rst_n, .prob_log2, .flip(flip_r), .heads(heads_r)
    );
    pim_mc u_mc (
      .req_valid(req_valid_r), .req_write(req_write_r), .req_bank(bank_r), .req_row(row_r),
      .req_col(col_r), .bank_st(rep_bank_st[r]), .bg_st(rep_bg_st[r]), .host_busy(hv),
      .thr_mode, .wr_inhibit(wr_inhibit[r]), .coin_heads(heads_r), .coin_flip(flip_r),
      .pim_cmd(pcmd_r), .acc_done(acc_done_r), .throttled(rep_throttled[r])
    );
    assign die_r      = hv ? host_cmd : pcmd_r;
    assign rep_cmd[r] = pcmd_r;
    dram_state_table #(.T(T)) u_state (
      .clk, .rst_n, .cmd(die_r), .bank_st(rep_bank_st[r]), .bg_st(rep_bg_st[r])
    );
    assign host_legal_r[r] = dram_cmd_legal(rep_bank_st[r], rep_bg_st[r], host_cmd);
  end

  assign host_cmd_legal = host_legal_r[host_cmd_rank];
endmodule
