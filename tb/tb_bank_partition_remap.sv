// tb_bank_partition_remap: self-checking test of the bank-partitioning
// remap.
//
// Exhaustively over all 16 banks x 65536 rows it checks that the remap is a
// bijection (no two inputs give the same bank/row), that an address is
// placed in one of the two reserved banks (14, 15) exactly when its row MSBs
// mark it as shared data, that an unswapped address is unchanged, that a
// swapped address exchanges the row MSBs with the bank ID, and that the remap
// is its own inverse. It also counts how many CPU-private addresses the
// remap moved out of the reserved banks (must be > 0: the mechanism
// happens). Combinational; checked 1 ns after each input. Watchdog 10 ms.
module tb_bank_partition_remap;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic [BANK_W-1:0] bank_in = '0, bank_out, b2;
  logic [ROW_W-1:0]  row_in = '0, row_out, r2;
  logic swapped, shared_region, s2, sh2;
  int moved = 0;

  task automatic count_moved();
    moved++;
  endtask

  bank_partition_remap dut  (.bank_in, .row_in, .bank_out, .row_out, .swapped, .shared_region);
  bank_partition_remap dut2 (.bank_in(bank_out), .row_in(row_out), .bank_out(b2), .row_out(r2),
                             .swapped(s2), .shared_region(sh2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s bank=%0d row=%h", what, bank_in, row_in);
    end
  endtask

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit used [logic [19:0]];
    for (int b = 0; b < 16; b++) begin
      for (int r = 0; r < 65536; r++) begin
        bank_in = 4'(b); row_in = 16'(r);
        #1;
        check(!used.exists({bank_out, row_out}), "bijective");
        used[{bank_out, row_out}] = 1'b1;
        check((bank_out >= 4'd14) == (row_in[15:12] >= 4'd14), "shared data in reserved banks only");
        check(swapped ? (bank_out == row_in[15:12] && row_out == {bank_in, row_in[11:0]})
                      : (bank_out == bank_in && row_out == row_in), "swap rule");
        check(b2 == bank_in && r2 == row_in, "self-inverse");
        if (swapped && bank_in >= 4'd14) count_moved();
      end
    end
    check(moved > 0, "private data moved out of reserved banks");
    $display("private addresses moved out of reserved banks: %0d", moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
