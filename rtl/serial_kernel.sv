// serial_kernel: the shared, time-multiplexed support-vector channel. For the
// normalised sample z and one support vector sv it computes
//   term = ya * exp(k * sum_j (z_j - sv_j)^2)
// i.e. one RBF kernel value weighted by y_i * alpha_i (k = -gamma).
//
// Per feature: subtract, square; the squared differences are summed in a
// chain of adders; then the kernel scale multiply, the exponential unit and
// the weight multiply. Fully combinational: the channel produces one term per
// fast-clock cycle. The subtract / square / exp / multiply order follows the
// source design; summing over features and the explicit scale k are this
// implementation's reading of the RBF kernel, which the source design's
// figures draw per channel without the -gamma factor.
module serial_kernel
  import fp32_pkg::*;
#(
  parameter int N_FEAT = 2
) (
  input  fp32_t z      [N_FEAT],
  input  fp32_t sv     [N_FEAT],
  input  fp32_t ya,
  input  fp32_t kscale,
  output fp32_t dist2,   // sum of squared differences (for observation)
  output fp32_t kern,    // exp(k * dist2)
  output fp32_t term     // ya * kern
);

  fp32_t diff [N_FEAT];
  fp32_t sq   [N_FEAT];
  fp32_t acc  [N_FEAT];
  fp32_t arg;

  for (genvar j = 0; j < N_FEAT; j++) begin : g_feat
    fp_add u_sub (.a(z[j]),    .b(fp_neg(sv[j])), .y(diff[j]));
    fp_mul u_sq  (.a(diff[j]), .b(diff[j]),       .y(sq[j]));
    if (j == 0) begin : g_first
      assign acc[0] = sq[0];
    end else begin : g_acc
      fp_add u_acc (.a(acc[j-1]), .b(sq[j]), .y(acc[j]));
    end
  end

  assign dist2 = acc[N_FEAT-1];

  fp_mul u_scale (.a(kscale), .b(dist2), .y(arg));
  fp_exp u_exp   (.u(arg),    .y(kern));
  fp_mul u_wt    (.a(ya),     .b(kern),  .y(term));

endmodule
