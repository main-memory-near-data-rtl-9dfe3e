// host_mc_model: stand-in for the host memory controller of one channel
// (testbench only).
//
// Generates random CPU traffic: each cycle, with probability RATE/256, a new
// request (rank, bank 0..NBANKS-NRES-1, one of four rows, read or write) joins
// an 8-entry queue. The oldest request is served first-come-first-served: the
// command it needs next (ACT, PRE or the column command) is driven on
// host_cmd and made valid only when it is legal against the model's own
// copy of each rank's state table, which follows every command seen on the
// dies. The oldest request's rank and type go out on the oldest_* pins for
// next-rank prediction. Counters give commands issued and cycles in which the
// oldest request was blocked.
module host_mc_model
  import pim_pkg::*;
#(
  parameter int unsigned NUM_RANKS = 2,
  parameter int unsigned NRES      = 2,
  parameter int unsigned RATE      = 64,
  localparam int unsigned RK_W     = (NUM_RANKS > 1) ? $clog2(NUM_RANKS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  dram_cmd_t       die_cmd [NUM_RANKS],
  output logic            host_cmd_valid,
  output logic [RK_W-1:0] host_cmd_rank,
  output dram_cmd_t       host_cmd,
  output logic            oldest_valid,
  output logic            oldest_is_read,
  output logic [RK_W-1:0] oldest_rank
);
  typedef struct packed {
    logic [RK_W-1:0]   rank;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic              is_read;
  } hreq_t;

  hreq_t q [$];
  bank_state_vec_t bs [NUM_RANKS];
  bg_state_vec_t   gs [NUM_RANKS];
  int n_cmds = 0, n_blocked = 0, n_done = 0;

  for (genvar r = 0; r < NUM_RANKS; r++) begin : g_tab
    dram_state_table u_tab (.clk, .rst_n, .cmd(die_cmd[r]), .bank_st(bs[r]), .bg_st(gs[r]));
  end

  hreq_t head;
  logic  have;
  always_comb begin
    have = (q.size() != 0);
    head = have ? q[0] : '0;
    host_cmd_rank  = head.rank;
    host_cmd       = '{cmd: dram_next_cmd(bs[head.rank], head.bank, head.row, !head.is_read),
                       bank: head.bank, row: head.row, col: head.col};
    host_cmd_valid = have && dram_cmd_legal(bs[head.rank], gs[head.rank], host_cmd);
    oldest_valid   = have;
    oldest_is_read = head.is_read;
    oldest_rank    = head.rank;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (host_cmd_valid) begin
        n_cmds++;
        if (host_cmd.cmd == CMD_RD || host_cmd.cmd == CMD_WR) begin
          void'(q.pop_front());
          n_done++;
        end
      end else if (have) n_blocked++;
      if (enable && q.size() < 8 && ($urandom % 256) < RATE) begin
        hreq_t n;
        n.rank    = RK_W'($urandom % NUM_RANKS);
        n.bank    = BANK_W'($urandom % (NBANKS - NRES));
        n.row     = ROW_W'($urandom % 4);
        n.col     = COL_W'($urandom);
        n.is_read = ($urandom % 3) != 0;
        q.push_back(n);
      end
    end
  end
endmodule
