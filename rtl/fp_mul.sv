// fp_mul: combinational FP32 multiplier, y = a * b.
//
// The two 24-bit significands are multiplied into a 48-bit product, which is
// normalised by at most one place; the exponents are added and re-biased, and
// fp32_pkg::fp_round_pack rounds to nearest even (overflow to infinity,
// underflow to signed zero). NaN or inf*0 gives quiet NaN. No clock.
module fp_mul
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic               s;
    logic [47:0]        p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    p = fp_mant(a) * fp_mant(b);
    e = $signed({4'h0, a[30:23]}) + $signed({4'h0, b[30:23]}) - 12'sd127;
    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b)))
      y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_inf(b))
      y = {s, 8'hFF, 23'h0};
    else if (fp_is_zero(a) || fp_is_zero(b))
      y = {s, 31'h0};
    else if (p[47])
      y = fp_round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else
      y = fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
  end

endmodule
