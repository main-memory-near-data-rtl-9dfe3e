// next_rank_predictor: decides which rank's PIM must hold back its writes.
//
// A PIM write that lands just before a CPU read to the same rank costs the
// read the long write-to-read turnaround. The predictor follows the rule of
// the design: when the oldest outstanding request in the CPU memory
// controller's transaction queue is a read, the PIM of that read's rank is
// told to stall its writes; every other rank may keep writing. The inhibit
// travels to the PIMs over one dedicated pin per rank, so the output is
// registered (one cycle) and the same registered value drives the PIM-side
// controller and the host-side replica. Reads by the PIMs are never inhibited.
// The one-cycle pin delay and the enable input are this design's choices.
module next_rank_predictor #(
  parameter int unsigned NUM_RANKS = 2,
  localparam int unsigned RK_W = (NUM_RANKS > 1) ? $clog2(NUM_RANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,          // next-rank prediction selected
  input  logic                 oldest_valid,    // CPU transaction queue not empty
  input  logic                 oldest_is_read,  // oldest request is a read
  input  logic [RK_W-1:0]      oldest_rank,     // its target rank
  output logic [NUM_RANKS-1:0] wr_inhibit       // per-rank pin: stall PIM writes
);
  logic [NUM_RANKS-1:0] inhibit_d;

  always_comb begin
    inhibit_d = '0;
    if (enable && oldest_valid && oldest_is_read)
      for (int r = 0; r < NUM_RANKS; r++)
        if (oldest_rank == RK_W'(r)) inhibit_d[r] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wr_inhibit <= '0;
    else        wr_inhibit <= inhibit_d;
endmodule
