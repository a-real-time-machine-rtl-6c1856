// fp_div: combinational FP32 divider, y = a / b.
//
// The dividend significand, extended by 26 zero bits, is divided by the
// divisor significand; the quotient lies in (2^25, 2^27) and the remainder
// feeds the sticky bit, so fp32_pkg::fp_round_pack rounds to nearest even.
// NaN, 0/0 and inf/inf give quiet NaN; x/0 gives signed infinity; 0/x and
// x/inf give signed zero. No clock. Used for the scaling step of the
// pre-processing channel.
module fp_div
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic               s;
    logic [49:0]        num;
    logic [26:0]        q;
    logic [23:0]        r;
    logic signed [11:0] e;
    s   = a[31] ^ b[31];
    num = {fp_mant(a), 26'h0};
    q   = 27'(num / {26'h0, fp_mant(b) | {23'h0, fp_is_zero(b)}});
    r   = 24'(num % {26'h0, fp_mant(b) | {23'h0, fp_is_zero(b)}});
    e   = $signed({4'h0, a[30:23]}) - $signed({4'h0, b[30:23]}) + 12'sd127;
    if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_zero(a) && fp_is_zero(b)) ||
        (fp_is_inf(a) && fp_is_inf(b)))
      y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_zero(b))
      y = {s, 8'hFF, 23'h0};
    else if (fp_is_zero(a) || fp_is_inf(b))
      y = {s, 31'h0};
    else if (q[26])
      y = fp_round_pack(s, e, q[26:3], q[2], (|q[1:0]) | (r != 24'h0));
    else
      y = fp_round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] | (r != 24'h0));
  end

endmodule
