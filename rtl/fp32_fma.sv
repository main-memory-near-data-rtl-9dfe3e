// fp32_fma: single-precision fused multiply-add, r = a * b + c.
//
// The PE and the SIMD unit build their arithmetic from this unit ("FPFMA").
// It is purely combinational: the exact 48-bit product and the addend are
// aligned in an 80-bit frame (26 guard bits below the product's LSB, the
// shifted-out part collapsed into a sticky bit), added or subtracted,
// normalised with a leading-one search and rounded once, to nearest-even.
// Subnormal inputs and results are flushed to zero; any NaN, inf*0 or
// inf-inf gives the quiet NaN 0x7FC00000. That the PE uses fused
// multiply-adds follows the design; the subnormal and NaN handling is this
// design's own simplification. Latency 0 cycles; a user registers the output.
module fp32_fma (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] r
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sc, sp;
  logic [7:0]  ea, eb, ec;
  logic        a_zero, b_zero, c_zero, a_inf, b_inf, c_inf, a_nan, b_nan, c_nan;
  logic [47:0] prod;
  logic [79:0] xw, yw, greater, lesser, sum;
  int          ep, e_ref, shamt, lead, e_res;
  logic        sticky, s_big, s_small, s_res, rnd_g, rnd_s;
  logic [79:0] norm;
  logic [24:0] mant;

  always_comb begin
    sa = a[31]; sb = b[31]; sc = c[31];
    ea = a[30:23]; eb = b[30:23]; ec = c[30:23];
    a_zero = (ea == 8'd0); b_zero = (eb == 8'd0); c_zero = (ec == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    c_inf  = (ec == 8'hFF) && (c[22:0] == '0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    c_nan  = (ec == 8'hFF) && (c[22:0] != '0);
    sp     = sa ^ sb;

    prod   = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    ep     = int'(ea) + int'(eb) - 127;
    xw     = {6'd0, prod, 26'd0};                       // product, leading one at bit 72 or 73
    yw     = {7'd0, 1'b1, c[22:0], 49'd0};              // addend, leading one at bit 72

    sticky = 1'b0; shamt = 0; e_ref = 0; lead = 0; e_res = 0;
    greater = '0; lesser = '0; sum = '0; norm = '0; mant = '0;
    s_big = 1'b0; s_small = 1'b0; s_res = 1'b0; rnd_g = 1'b0; rnd_s = 1'b0;
    r = '0;

    if (a_nan || b_nan || c_nan || (a_inf && b_zero) || (b_inf && a_zero) ||
        ((a_inf || b_inf) && c_inf && (sp != sc))) begin
      r = QNAN;
    end else if (a_inf || b_inf) begin
      r = {sp, 8'hFF, 23'd0};
    end else if (c_inf) begin
      r = {sc, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      r = c_zero ? {sp & sc, 31'd0} : c;
    end else begin
      // align the smaller operand to the larger exponent
      if (c_zero || ep >= int'(ec)) begin
        e_ref = ep; greater = xw; s_big = sp; s_small = sc;
        shamt = c_zero ? 80 : ep - int'(ec);
        lesser = c_zero ? '0 : yw;
      end else begin
        e_ref = int'(ec); greater = yw; s_big = sc; s_small = sp;
        shamt = int'(ec) - ep;
        lesser = xw;
      end
      if (shamt >= 80) begin
        sticky = (lesser != '0);
        lesser  = '0;
      end else begin
        sticky = ((lesser & ((80'd1 << shamt) - 80'd1)) != '0);
        lesser  = lesser >> shamt;
      end
      lesser[0] = lesser[0] | sticky;

      if (s_big == s_small) begin
        sum = greater + lesser; s_res = s_big;
      end else if (greater >= lesser) begin
        sum = greater - lesser; s_res = s_big;
      end else begin
        sum = lesser - greater; s_res = s_small;
      end

      if (sum == '0) begin
        r = 32'd0;                                      // exact cancellation: +0
      end else begin
        for (int i = 0; i < 80; i++) if (sum[i]) lead = i;
        e_res = lead + e_ref - 72;
        norm  = sum << (79 - lead);                     // leading one at bit 79
        mant  = {1'b0, norm[79:56]};
        rnd_g = norm[55];
        rnd_s = (norm[54:0] != '0);
        if (rnd_g && (rnd_s || mant[0])) mant = mant + 25'd1;
        if (mant[24]) begin
          mant  = mant >> 1;
          e_res = e_res + 1;
        end
        if (e_res >= 255)     r = {s_res, 8'hFF, 23'd0};
        else if (e_res <= 0)  r = {s_res, 31'd0};       // flush to zero
        else                  r = {s_res, e_res[7:0], mant[22:0]};
      end
    end
  end
endmodule
