// bank_partition_remap: splits every rank into CPU-only and shared banks.
//
// The OS keeps CPU-only data in the bottom of the physical address space, so
// the most significant address bits (the top BANK_W row bits) of a CPU-only
// address never take the values of the reserved bank IDs, and the shared
// region that the CPU and the PIMs work on together is the top of the space.
// After the ordinary XOR mapping, a CPU-only address whose bank ID falls on
// a reserved (top-most) bank has its row MSBs and its bank ID swapped: it
// lands in a CPU bank, in a row that the plain mapping never reaches for that
// bank, so nothing aliases. This works with huge pages and with any mapping
// that leaves the address MSBs to the row alone. The design states the rule
// for CPU-only addresses; this block also swaps a shared-region address when
// its initial bank is *not* reserved, which sends all shared data into the
// reserved banks and keeps the whole remapping one-to-one (the swap
// condition is symmetric, so the remap is its own inverse). The number of
// reserved banks is NRES (2 of 16 by default). Combinational.
module bank_partition_remap
  import pim_pkg::*;
#(
  parameter int unsigned NRES = 2
) (
  input  logic [BANK_W-1:0] bank_in,
  input  logic [ROW_W-1:0]  row_in,
  output logic [BANK_W-1:0] bank_out,
  output logic [ROW_W-1:0]  row_out,
  output logic              swapped,
  output logic              shared_region   // address belongs to the shared (PIM) region
);
  localparam logic [BANK_W-1:0] FIRST_RES = BANK_W'(NBANKS - NRES);

  logic [BANK_W-1:0] msb;
  logic              bank_res;

  assign msb           = row_in[ROW_W-1 -: BANK_W];
  assign bank_res      = (bank_in >= FIRST_RES);
  assign shared_region = (msb >= FIRST_RES);
  assign swapped       = bank_res ^ shared_region;

  always_comb begin
    bank_out = bank_in;
    row_out  = row_in;
    if (swapped) begin
      bank_out                     = msb;
      row_out[ROW_W-1 -: BANK_W]   = bank_in;
    end
  end
endmodule
