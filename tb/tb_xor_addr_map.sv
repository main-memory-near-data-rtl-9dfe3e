// tb_xor_addr_map: self-checking test of the XOR physical-address mapping.
//
// For 20000 random 35-bit physical addresses it recomputes every field from
// the bit list of the mapping, independently of the DUT's masks, and
// compares: channel = a8^a9^a12^a13^a18^a19, rank = a18^a23, BG0 = a7^a14,
// BG1 = a15^a20, BK0 = a16^a21, BK1 = a17^a22, row = a[34:19], column block
// = {a[14:9], a6}, offset = a[5:0]. It also checks that the 64 cache blocks
// of an aligned 4 KiB page are spread over both channels and all four bank
// groups, and that the mapping is one-to-one over a full 2^21-address window
// of block addresses (no two blocks share channel, rank, bank, row and
// column). Combinational; checked 1 ns after each input. Watchdog 10 ms.
module tb_xor_addr_map;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic [34:0] pa = '0;
  logic ch, rank;
  logic [BANK_W-1:0] bank;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [5:0] offset;

  xor_addr_map dut (.pa, .ch, .rank, .bank, .row, .col, .offset);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s pa=%h", what, pa);
    end
  endtask

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [3:0] bgs_seen;
    logic [1:0] ch_seen;
    bit seen [logic [31:0]];
    logic [31:0] key;
    int dups;
    for (int i = 0; i < 20000; i++) begin
      pa = {$urandom, $urandom} & 35'h7_FFFF_FFFF;
      #1;
      check(ch   == (pa[8] ^ pa[9] ^ pa[12] ^ pa[13] ^ pa[18] ^ pa[19]), "channel");
      check(rank == (pa[18] ^ pa[23]), "rank");
      check(bank == {pa[15] ^ pa[20], pa[7] ^ pa[14], pa[17] ^ pa[22], pa[16] ^ pa[21]}, "bank");
      check(row == pa[34:19], "row");
      check(col == {pa[14:9], pa[6]}, "column");
      check(offset == pa[5:0], "offset");
    end
    // spread of one 4 KiB page
    pa = 35'h1_2345_6000 & ~35'hFFF;
    bgs_seen = '0; ch_seen = '0;
    for (int k = 0; k < 64; k++) begin
      pa[11:6] = 6'(k);
      #1;
      bgs_seen[bank[2]] = 1'b1;
      ch_seen[ch] = 1'b1;
    end
    check(bgs_seen[0] && bgs_seen[1], "page spread over BG0 values");
    check(ch_seen == 2'b11, "page spread over channels");
    // one-to-one over 2^21 consecutive cache blocks
    dups = 0;
    for (int k = 0; k < (1 << 21); k++) begin
      pa = 35'(k) << 6;
      #1;
      key = {5'd0, row[10:0], col, bank, rank, ch};
      if (seen.exists(key)) dups++;
      seen[key] = 1'b1;
    end
    check(dups == 0, "one-to-one mapping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
