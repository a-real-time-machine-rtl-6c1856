// fp_add: combinational FP32 adder, y = a + b (subtract by negating b).
//
// The operand of larger magnitude is kept, the other is aligned right with
// 26 extra low bits whose shifted-out remainder is folded into a sticky bit.
// Sign-magnitude add or subtract, a leading-one search renormalises, and
// fp32_pkg::fp_round_pack rounds to nearest even.
// Special cases: NaN or (+inf)+(-inf) gives quiet NaN, an infinite operand
// gives that infinity, an exact zero sum is +0 (both operands -0 give -0).
// No clock: the detector uses its arithmetic units without pipeline stages,
// as the source design does; subnormals follow fp32_pkg.
module fp_add
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    fp32_t              big, sml;
    logic [23:0]        mb, ms;
    logic [7:0]         d;
    logic [49:0]        wide_s, mask;
    logic               sticky;
    logic [50:0]        lw, sw, res;
    logic               eff_sub;
    logic signed [11:0] e;
    int                 lead;
    logic [50:0]        norm;

    // Datapath, evaluated unconditionally; the special cases select below.
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    mb = fp_mant(big);
    ms = fp_mant(sml);
    d  = big[30:23] - sml[30:23];
    wide_s = {ms, 26'h0};
    mask   = (d >= 8'd50) ? '1 : ((50'd1 << d) - 50'd1);
    sticky = |(wide_s & mask);
    sw = {1'b0, (d >= 8'd50) ? 50'h0 : (wide_s >> d)};
    sw[0] = sw[0] | sticky;
    lw = {1'b0, mb, 26'h0};
    eff_sub = big[31] ^ sml[31];
    res = eff_sub ? (lw - sw) : (lw + sw);
    lead = 0;
    for (int i = 0; i < 51; i++) if (res[i]) lead = i;
    e = {4'h0, big[30:23]};
    if (lead == 50) begin
      norm = {1'b0, res[50:1]};
      norm[0] = norm[0] | res[0];
      e = e + 12'sd1;
    end else begin
      norm = res << (49 - lead);
      e = e - 12'(49 - lead);
    end

    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_inf(b) && (a[31] != b[31])))
      y = FP_QNAN;
    else if (fp_is_inf(a))
      y = a;
    else if (fp_is_inf(b))
      y = b;
    else if (fp_is_zero(a) && fp_is_zero(b))
      y = {a[31] & b[31], 31'h0};
    else if (fp_is_zero(a))
      y = b;
    else if (fp_is_zero(b))
      y = a;
    else if (res == 51'h0)
      y = FP_ZERO;
    else
      y = fp_round_pack(big[31], e, norm[49:26], norm[25], |norm[24:0]);
  end

endmodule
