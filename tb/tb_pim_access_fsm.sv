// tb_pim_access_fsm: self-checking test of the PIM access sequencer.
//
// Launches a mix of operations (one- and two-operand, reductions, partial
// last batch, zero length) and grants each request at random (acc_done with
// probability 1/2). Every granted access is compared with a reference list
// built from the packet: per batch b, x beats 0..n-1 in row x.row+b, then y
// beats for two-operand operations, then writes to the destination operand
// unless the operation reduces. It checks the cycle counts of the design's
// drain wait: the first write request comes DRAIN_WAIT+2 cycles after the
// last read of its batch is granted, and `done` pulses DRAIN_WAIT+2 cycles
// after the last granted access of a reduction. Clock 10 ns, watchdog 5 ms.
module tb_pim_access_fsm;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DW = 24;
  logic launch = 0, acc_done = 0;
  pim_packet_t pkt = '0;
  logic req_valid, req_write, wr_phase, busy, done;
  logic [BANK_W-1:0] req_bank;
  logic [ROW_W-1:0] req_row;
  logic [COL_W-1:0] req_col;

  pim_access_fsm #(.DRAIN_WAIT(DW)) dut (.clk, .rst_n, .launch, .pkt, .acc_done, .req_valid,
                                         .req_write, .req_bank, .req_row, .req_col, .wr_phase,
                                         .busy, .done);

  typedef struct packed { logic w; logic [3:0] b; logic [15:0] r; logic [6:0] c; } acc_t;
  acc_t exp_q [$];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run(input pim_op_e op, input int n);
    pim_ucode_t u;
    pim_opnd_t d;
    int nb, done_b, n_acc, wait_n, bad_wait;
    longint t_last, cyc;
    logic prev_write;
    u = pim_ucode(op);
    pkt = '0;
    pkt.op = op; pkt.nbeats = 24'(n);
    pkt.x = '{bank: 4'($urandom), row: 16'($urandom % 1000)};
    pkt.y = '{bank: 4'($urandom), row: 16'($urandom % 1000)};
    pkt.z = '{bank: 4'($urandom), row: 16'($urandom % 1000)};
    d = (u.dst == DST_X) ? pkt.x : (u.dst == DST_Z) ? pkt.z : pkt.y;
    exp_q.delete();
    done_b = 0;
    for (int b = 0; done_b < n; b++) begin
      nb = (n - done_b > 128) ? 128 : n - done_b;
      for (int k = 0; k < nb; k++) exp_q.push_back('{1'b0, pkt.x.bank, 16'(pkt.x.row + b), 7'(k)});
      if (u.need_y)
        for (int k = 0; k < nb; k++) exp_q.push_back('{1'b0, pkt.y.bank, 16'(pkt.y.row + b), 7'(k)});
      if (!u.reduce)
        for (int k = 0; k < nb; k++) exp_q.push_back('{1'b1, d.bank, 16'(d.row + b), 7'(k)});
      done_b += nb;
    end
    @(negedge clk) launch = 1;
    @(negedge clk) launch = 0;
    n_acc = 0; cyc = 0; t_last = 0; prev_write = 0; bad_wait = 0;
    while (!done) begin
      cyc++;
      acc_done = req_valid && ($urandom % 2 == 0);
      if (req_valid && req_write && !prev_write && cyc - t_last != DW + 2) bad_wait++;
      if (req_valid) prev_write = req_write;
      if (acc_done) begin
        acc_t a;
        a = '{req_write, req_bank, req_row, req_col};
        check(exp_q.size() > 0 && a == exp_q[0],
              $sformatf("%s access %0d: got w%0d b%0d r%0d c%0d", op.name(), n_acc, a.w, a.b, a.r, a.c));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_acc++;
        t_last = cyc;
      end
      @(negedge clk);
      acc_done = 0;
    end
    cyc++;
    check(exp_q.size() == 0, $sformatf("%s all accesses issued (%0d left)", op.name(), exp_q.size()));
    check(bad_wait == 0, $sformatf("%s drain wait before write phase", op.name()));
    if (u.reduce || n == 0)
      check(n == 0 || cyc - t_last == DW + 2,
            $sformatf("%s done %0d cycles after last access, expected %0d", op.name(), cyc - t_last, DW + 2));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(OP_COPY, 300);
    run(OP_AXPY, 256);
    run(OP_DOT, 200);
    run(OP_NRM2, 129);
    run(OP_AXPBY, 77);
    run(OP_SCAL, 128);
    run(OP_XMY, 1);
    run(OP_DOT, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
