// stepstone_agen: StepStone "increment-correct-and-check" address generator.
//
// Under an XOR address mapping the cache blocks of a matrix that belong to
// one PIM unit and one block group are scattered over the physical address
// space. Each PIM-ID bit and group bit is the parity of a set of address bits
// (constraint j: parity(addr & mask[j]) must equal target[j]). Starting from
// start_addr this unit finds the smallest cache-block address >= start_addr
// that meets every active constraint, without walking block by block.
//
// One check-and-correct step per cycle: if some active constraints fail, let
// p be the lowest address bit that affects any failing constraint. No
// address that keeps the current bits above p-1 can fix those constraints,
// so the candidate jumps to the next multiple of 2^p (bits below p cleared,
// carry into bit p). Each step only skips addresses that cannot match, so
// the first candidate that passes is the nearest one. Because the carry goes
// straight into the affecting bit, a single step can pass several
// ID-affecting bits. The design's two extra rules for cutting the iteration
// count are not built as separate logic. The
// search stops with `exhausted` when the candidate reaches limit_addr. The
// function follows the design; the one-step-per-cycle search order is this
// design's own formulation of it.
//
// Timing: `start` in cycle t; `found`/`exhausted` rise after 1 + (number of
// correction steps) cycles and hold until the next start.
module stepstone_agen #(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned NC       = 8,     // constraints (PIM-ID bits + group bits)
  parameter int unsigned CB_LOG2  = 6      // 64-byte cache blocks
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [ADDR_W-1:0] limit_addr,    // exclusive upper bound
  input  logic [ADDR_W-1:0] mask   [NC],
  input  logic [NC-1:0]     target,
  input  logic [NC-1:0]     active,
  output logic              busy,
  output logic              found,
  output logic              exhausted,
  output logic [ADDR_W-1:0] addr,
  output logic [7:0]        steps           // correction steps of the last search
);
  logic [ADDR_W:0]   cand;                  // one extra bit catches overflow
  logic [NC-1:0]     fail;
  logic [ADDR_W-1:0] fail_bits;
  int unsigned       p;

  always_comb begin
    fail_bits = '0;
    for (int j = 0; j < NC; j++) begin
      fail[j] = active[j] && ((^(cand[ADDR_W-1:0] & mask[j])) != target[j]);
      if (fail[j]) fail_bits = fail_bits | mask[j];
    end
    p = CB_LOG2;
    for (int i = ADDR_W - 1; i >= int'(CB_LOG2); i--) if (fail_bits[i]) p = i;
  end

  assign addr = cand[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand <= '0; busy <= 1'b0; found <= 1'b0; exhausted <= 1'b0; steps <= '0;
    end else if (start) begin
      // round the start up to a cache-block boundary
      cand      <= ({1'b0, start_addr} + (ADDR_W+1)'((1 << CB_LOG2) - 1)) &
                   ~(ADDR_W+1)'((1 << CB_LOG2) - 1);
      busy      <= 1'b1;
      found     <= 1'b0;
      exhausted <= 1'b0;
      steps     <= '0;
    end else if (busy) begin
      if (cand >= {1'b0, limit_addr}) begin
        busy <= 1'b0; exhausted <= 1'b1;
      end else if (fail == '0) begin
        busy <= 1'b0; found <= 1'b1;
      end else begin
        cand  <= ((cand >> p) + (ADDR_W+1)'(1)) << p;
        steps <= steps + 8'd1;
      end
    end
  end
endmodule
