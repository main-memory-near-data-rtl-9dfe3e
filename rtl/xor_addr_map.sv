// xor_addr_map: physical-to-DRAM address mapping of the host memory controller.
//
// Modern host controllers spread consecutive cache blocks over channels, bank
// groups, banks and ranks by XOR-ing low physical address bits with bits of
// the physical frame number. This block implements a Skylake-style mapping
// with the field order (LSB first) 64-byte block offset, column, bank group
// bit 0, channel, column, bank group bit 1, bank, rank, row. Each channel,
// rank, bank-group and bank bit is the parity of the physical address bits
// selected by its mask; the 7 column bits and 16 row bits are taken directly.
// Defaults: BG0 = a7^a14 and a channel bit formed from a8, a9, a12, a13 and
// higher bits follow the mapping the design was described with; the higher
// XOR partners (a18..a23) and the exact column/row bit positions are this
// design's assumption. The PIMs compute their addresses with the same
// function. Combinational, no clock.
module xor_addr_map
  import pim_pkg::*;
#(
  parameter int unsigned PA_W = 35,
  parameter logic [PA_W-1:0] CH_MASK  = PA_W'((1 << 8) | (1 << 9) | (1 << 12) | (1 << 13) | (1 << 18) | (1 << 19)),
  parameter logic [PA_W-1:0] RK_MASK  = PA_W'((1 << 18) | (1 << 23)),
  parameter logic [PA_W-1:0] BG0_MASK = PA_W'((1 << 7)  | (1 << 14)),
  parameter logic [PA_W-1:0] BG1_MASK = PA_W'((1 << 15) | (1 << 20)),
  parameter logic [PA_W-1:0] BK0_MASK = PA_W'((1 << 16) | (1 << 21)),
  parameter logic [PA_W-1:0] BK1_MASK = PA_W'((1 << 17) | (1 << 22)),
  parameter int unsigned ROW_LSB = 19
) (
  input  logic [PA_W-1:0]   pa,
  output logic              ch,
  output logic              rank,
  output logic [BANK_W-1:0] bank,     // {bg1, bg0, bk1, bk0}
  output logic [ROW_W-1:0]  row,
  output logic [COL_W-1:0]  col,      // 64-byte column block within the row
  output logic [5:0]        offset
);
  assign offset = pa[5:0];
  assign col    = {pa[14:9], pa[6]};
  assign row    = pa[ROW_LSB +: ROW_W];
  assign ch     = ^(pa & CH_MASK);
  assign rank   = ^(pa & RK_MASK);
  assign bank   = {^(pa & BG1_MASK), ^(pa & BG0_MASK), ^(pa & BK1_MASK), ^(pa & BK0_MASK)};
endmodule
