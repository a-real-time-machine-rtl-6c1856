// fp_sqrt: combinational FP32 square root, y = sqrt(a).
//
// The unbiased exponent is made even (moving one factor of two into the
// significand), the significand is scaled to a 50-bit radicand, and a
// restoring digit-by-digit integer square root produces a 25-bit root; the
// final remainder feeds the sticky bit for round-to-nearest-even.
// sqrt(-0) = -0, sqrt(+inf) = +inf, a negative number or NaN gives quiet
// NaN. No clock. Used to turn the running variance into a standard deviation.
module fp_sqrt
  import fp32_pkg::*;
(
  input  fp32_t a,
  output fp32_t y
);

  always_comb begin
    logic signed [11:0] eu;
    logic [49:0]        rad;
    logic [26:0]        rem, trial;
    logic [24:0]        root;
    eu   = $signed({4'h0, a[30:23]}) - 12'sd127;
    rad  = {26'h0, fp_mant(a)} << 25;
    if (eu[0]) begin
      rad = rad << 1;
      eu  = eu - 12'sd1;
    end
    rem  = '0;
    root = '0;
    for (int i = 24; i >= 0; i--) begin
      rem   = {rem[24:0], rad[2*i+1], rad[2*i]};
      trial = {root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[23:0], 1'b1};
      end else begin
        root = {root[23:0], 1'b0};
      end
    end
    if (fp_is_nan(a) || (a[31] && !fp_is_zero(a)))
      y = FP_QNAN;
    else if (fp_is_zero(a))
      y = {a[31], 31'h0};
    else if (fp_is_inf(a))
      y = a;
    else
      y = fp_round_pack(1'b0, (eu >>> 1) + 12'sd127, root[24:1], root[0],
                        rem != 27'h0);
  end

endmodule
