// tb_pim_pe: self-checking test of the vector processing element.
//
// Feeds the PE the beat stream the access FSM would produce (per batch: x
// beats, then y beats for two-operand operations, each beat 4..7 cycles
// after the previous, the DRAM column cadence) and, after the batch, reads
// the buffer back through wr_idx as the write phase would. Operands are
// small integers, so fp32 results are exact and compared bit for bit:
// COPY, SCAL, AXPY, XPY, AXPBY (two dependent FMAs), XMY on 200-beat vectors
// (one full and one partial batch), DOT and NRM2 on 300 beats through
// `result`. It checks the PE latency, counted from the cycle a beat is
// presented: a one-step result is readable from the buffer 2 cycles later, a
// two-step result 3 cycles later, a reduction result is valid 3 cycles after
// the last beat. Clock 10 ns,
// watchdog 5 ms.
module tb_pim_pe;
  import pim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic launch = 0, rvalid = 0, result_valid;
  pim_packet_t pkt = '0;
  logic [63:0] rdata = '0, wdata;
  logic [6:0] wr_idx = '0;
  logic [31:0] result;

  pim_pe dut (.clk, .rst_n, .launch, .pkt, .rvalid, .rdata, .wr_idx, .wdata, .result, .result_valid);

  function automatic logic [31:0] i2f(int v);
    int unsigned m;
    int e;
    if (v == 0) return 32'd0;
    m = (v < 0) ? -v : v;
    e = 0;
    for (int i = 0; i < 32; i++) if (m[i]) e = i;
    m = m << (23 - e);
    return {v < 0, 8'(127 + e), m[22:0]};
  endfunction

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

  // result of the one-beat latency probe: x = (4, -3), y = (7, 5)
  function automatic logic [63:0] one_beat_result(pim_op_e op);
    if (!pim_ucode(op).need_y) return (op == OP_SCAL) ? {i2f(-6), i2f(8)} : {i2f(-3), i2f(4)};
    case (op)
      OP_AXPY:  return {i2f(-1), i2f(15)};
      OP_XPY:   return {i2f(7), i2f(18)};
      OP_AXPBY: return {i2f(9), i2f(29)};
      default:  return {i2f(-15), i2f(28)};
    endcase
  endfunction

  task automatic beat(input logic [63:0] d);
    @(negedge clk);
    rvalid = 1; rdata = d;
    @(negedge clk);
    rvalid = 0;
    repeat (2 + $urandom % 4) @(negedge clk);
  endtask

  task automatic run(input pim_op_e op, input int n);
    int xv [], yv [], ev [];
    int sum, base, nb, bad, lat;
    pim_ucode_t u;
    u = pim_ucode(op);
    xv = new[2*n]; yv = new[2*n]; ev = new[2*n];
    sum = 0;
    for (int e = 0; e < 2*n; e++) begin
      xv[e] = int'($urandom % 41) - 20;
      yv[e] = int'($urandom % 41) - 20;
      case (op)
        OP_COPY:  ev[e] = xv[e];
        OP_SCAL:  ev[e] = 2 * xv[e];
        OP_AXPY:  ev[e] = 2 * xv[e] + yv[e];
        OP_XPY:   ev[e] = 2 * yv[e] + xv[e];
        OP_AXPBY: ev[e] = 2 * xv[e] + 3 * yv[e];
        OP_XMY:   ev[e] = xv[e] * yv[e];
        OP_DOT:   begin ev[e] = 0; sum += xv[e] * yv[e]; end
        default:  begin ev[e] = 0; sum += xv[e] * xv[e]; end
      endcase
    end
    pkt = '0;
    pkt.op = op; pkt.nbeats = 24'(n); pkt.alpha = i2f(2); pkt.beta = i2f(3);
    @(negedge clk) launch = 1;
    @(negedge clk) launch = 0;
    bad = 0;
    for (base = 0; base < n; base += 128) begin
      nb = (n - base > 128) ? 128 : n - base;
      for (int k = 0; k < nb; k++) beat({i2f(xv[2*(base+k)+1]), i2f(xv[2*(base+k)])});
      if (u.need_y)
        for (int k = 0; k < nb; k++) beat({i2f(yv[2*(base+k)+1]), i2f(yv[2*(base+k)])});
      if (!u.reduce) begin
        for (int k = 0; k < nb; k++) begin
          wr_idx = 7'(k);
          #1;
          if (wdata != {i2f(ev[2*(base+k)+1]), i2f(ev[2*(base+k)])}) bad++;
        end
      end
    end
    if (u.reduce) check(result_valid && result == i2f(sum),
                        $sformatf("%s result %h expected %h", op.name(), result, i2f(sum)));
    else check(bad == 0, $sformatf("%s: %0d wrong beats", op.name(), bad));
    // latency of one beat: launch a 1-beat op and watch the buffer / result
    pkt.nbeats = 24'd1;
    @(negedge clk) launch = 1;
    @(negedge clk) launch = 0;
    if (u.need_y) beat({i2f(-3), i2f(4)});
    @(negedge clk);
    rvalid = 1; rdata = u.need_y ? {i2f(5), i2f(7)} : {i2f(-3), i2f(4)};
    wr_idx = 7'd0;
    lat = 0;
    @(negedge clk);
    rvalid = 0;
    lat = 1;
    while (lat < 8 && (u.reduce ? !result_valid : wdata != one_beat_result(op))) begin
      @(negedge clk);
      lat++;
    end
    check(lat == (u.reduce ? 3 : u.two_step ? 3 : 2),
          $sformatf("%s latency %0d cycles", op.name(), lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(OP_COPY, 200);
    run(OP_SCAL, 200);
    run(OP_AXPY, 200);
    run(OP_XPY, 200);
    run(OP_AXPBY, 200);
    run(OP_XMY, 200);
    run(OP_DOT, 300);
    run(OP_NRM2, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
