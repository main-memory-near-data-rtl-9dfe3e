// tb_fp32_fma: self-checking test of the single-precision FMA.
//
// Directed cases (exact products and sums, cancellation to zero, infinities,
// NaN, zero operands, flush of subnormal results) and 20000 random cases with
// exponents kept in the normal range. The random reference is computed in
// double precision from the decoded operands (the product of two fp32
// significands is exact in a double); the DUT must lie within one fp32 ulp
// of it, and at least 99 % of cases must match the correctly rounded value
// bit for bit. The unit is combinational: each case is applied, then
// checked 1 ns later. A watchdog ends the run after 1 ms.
module tb_fp32_fma;
  int checks = 0, failures = 0;
  logic [31:0] a = '0, b = '0, c = '0, r;

  fp32_fma dut (.a, .b, .c, .r);

  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  // correctly rounded fp32 of a real value (normal range only)
  function automatic logic [31:0] r2f(real v);
    logic s;
    int   e;
    real  m, frac;
    longint unsigned q;
    if (v == 0.0) return 32'd0;
    s = (v < 0.0);
    m = s ? -v : v;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    frac = (m - 1.0) * 8388608.0;
    q = longint'($floor(frac));
    if (frac - real'(q) > 0.5 || (frac - real'(q) == 0.5 && q[0])) q++;
    if (q == 64'd8388608) begin q = 0; e++; end
    if (e + 127 <= 0)   return {s, 31'd0};
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), q[22:0]};
  endfunction

  task automatic expect_bits(input logic [31:0] ta, tb_, tc, exp_r, input string what);
    a = ta; b = tb_; c = tc;
    #1;
    checks++;
    if (r !== exp_r) begin
      failures++;
      $display("FAIL %s: %h*%h+%h = %h, expected %h", what, ta, tb_, tc, r, exp_r);
    end
  endtask

  function automatic logic [31:0] rnd_normal();
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(100 + ($urandom % 55));
    return v;
  endfunction

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int exact;
    int nrand;
    real ref_v, dut_v, ulp;
    logic [31:0] ref_b;
    int ce;
    exact = 0;
    nrand = 20000;
    expect_bits(32'h3F800000, 32'h3F800000, 32'h00000000, 32'h3F800000, "1*1+0");
    expect_bits(32'h40000000, 32'h40400000, 32'h3F800000, 32'h40E00000, "2*3+1");
    expect_bits(32'h40000000, 32'h40400000, 32'hC0C00000, 32'h00000000, "2*3-6");
    expect_bits(32'h3FC00000, 32'h3FC00000, 32'hBF800000, 32'h3FA00000, "1.5*1.5-1");
    expect_bits(32'h00000000, 32'h40400000, 32'h3F800000, 32'h3F800000, "0*3+1");
    expect_bits(32'h7F800000, 32'h40000000, 32'h3F800000, 32'h7F800000, "inf*2+1");
    expect_bits(32'h7F800000, 32'h00000000, 32'h3F800000, 32'h7FC00000, "inf*0");
    expect_bits(32'h7F800000, 32'h3F800000, 32'hFF800000, 32'h7FC00000, "inf-inf");
    expect_bits(32'h7FC00001, 32'h3F800000, 32'h00000000, 32'h7FC00000, "nan");
    expect_bits(32'h00800000, 32'h3F000000, 32'h00000000, 32'h00000000, "flush subnormal");
    expect_bits(32'h7F000000, 32'h40000000, 32'h00000000, 32'h7F800000, "overflow");
    // 1 + 2^-24 ties to even -> 1.0 ; (1+2^-23)*(1+2^-23) rounds up
    expect_bits(32'h3F800000, 32'h3F800000, 32'h33800000, 32'h3F800000, "tie to even");
    expect_bits(32'h3F800001, 32'h3F800001, 32'h00000000, 32'h3F800002, "sticky round");

    for (int i = 0; i < nrand; i++) begin
      a = rnd_normal(); b = rnd_normal(); c = rnd_normal();
      if (i % 4 == 0) begin
        // addend close to minus the product: exercises cancellation
        ce = int'(a[30:23]) + int'(b[30:23]) - 127;
        c[31] = ~(a[31] ^ b[31]);
        c[30:23] = ce[7:0];
      end
      #1;
      ref_v = f2r(a) * f2r(b) + f2r(c);
      ref_b = r2f(ref_v);
      dut_v = f2r(r);
      ce    = int'(ref_b[30:23]) - 150;
      ulp   = (ref_b[30:23] == 0) ? 1.0e-38 : 2.0 ** ce;
      checks++;
      if (r == ref_b) exact++;
      else if ((dut_v - ref_v > ulp) || (ref_v - dut_v > ulp)) begin
        failures++;
        if (failures < 10) $display("FAIL rand %h*%h+%h = %h ref %h", a, b, c, r, ref_b);
      end
    end
    checks++;
    if (exact * 100 < nrand * 99) begin
      failures++;
      $display("FAIL only %0d of %0d random cases exact", exact, nrand);
    end
    $display("random cases exact: %0d of %0d", exact, nrand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
