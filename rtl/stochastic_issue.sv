// stochastic_issue: weighted coin for throttling PIM writes.
//
// Before a PIM write is sent to an idle rank the PIM flips a coin and only
// issues the write on heads; the probability of heads, 2^-prob_log2, trades
// CPU performance against PIM progress (1/4 and 1/16 are the settings the
// design was evaluated with). The coin is a 16-bit Fibonacci LFSR
// (x^16 + x^14 + x^13 + x^11 + 1) that advances only when `flip` is high;
// heads means its low prob_log2 bits are all zero. Because the sequence
// depends only on the seed and on when coins are flipped, a replica of this
// block on the host side, fed the same flips, produces the same outcomes.
// prob_log2 = 0 always gives heads. LFSR type and seeding are this design's
// choices. `heads` is combinational from the current state; the state
// advances at the clock edge of a cycle with `flip` high.
module stochastic_issue #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] prob_log2,   // issue probability 2^-prob_log2 (0..15)
  input  logic       flip,        // a coin is used this cycle
  output logic       heads
);
  logic [15:0] lfsr;
  logic [15:0] mask;

  assign mask  = (16'd1 << prob_log2) - 16'd1;
  assign heads = ((lfsr & mask) == 16'd0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    lfsr <= (SEED == 16'd0) ? 16'h0001 : SEED;
    else if (flip) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
endmodule
