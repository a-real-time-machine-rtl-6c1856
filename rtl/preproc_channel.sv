// preproc_channel: centres and scales one fNIRS feature stream with running
// statistics, z = (x - mean) / std, so that the RBF kernel sees normalised
// data.
//
// Two ewma_iir filters run side by side: one on x gives the running mean, one
// on x*x gives the running mean square. variance = meansq - mean^2, the
// standard deviation is its square root, and the centred sample x - mean is
// divided by it. Everything between the sample input and z is combinational
// (the filters' feed-through included); en = 1 commits both filter states.
// A variance that rounds to zero or below gives std = 0 and then z = +0: the
// source design shows no guard for this case, the guard is a choice here (it
// only acts while the filters start from their zero reset state or on a
// constant input). The filter structure and a = 0.01 follow the source design.
module preproc_channel
  import fp32_pkg::*;
#(
  parameter fp32_t A           = FP_IIR_A,
  parameter fp32_t ONE_MINUS_A = FP_IIR_ONE_MINUS_A
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,        // sample strobe
  input  fp32_t x,         // raw sample
  output fp32_t z,         // centred and scaled sample (combinational)
  output fp32_t mean,      // running mean including x
  output fp32_t std_dev    // running standard deviation including x
);

  fp32_t x_sq, mean_sq, mean_x_sq, variance, sd_raw, centred, quot;
  fp32_t mean_sq_state, mean_state;
  logic  var_pos;

  fp_mul  u_sq   (.a(x), .b(x), .y(x_sq));

  ewma_iir #(.A(A), .ONE_MINUS_A(ONE_MINUS_A)) u_mean (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(mean), .state(mean_state));

  ewma_iir #(.A(A), .ONE_MINUS_A(ONE_MINUS_A)) u_meansq (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x_sq), .y(mean_sq), .state(mean_sq_state));

  fp_mul  u_msq  (.a(mean),    .b(mean),            .y(mean_x_sq));
  fp_add  u_var  (.a(mean_sq), .b(fp_neg(mean_x_sq)), .y(variance));
  fp_sqrt u_sqrt (.a(variance), .y(sd_raw));
  fp_add  u_ctr  (.a(x),       .b(fp_neg(mean)),    .y(centred));
  fp_div  u_div  (.a(centred), .b(std_dev),         .y(quot));

  assign var_pos = !variance[31] && !fp_is_zero(variance) && !fp_is_nan(variance);
  assign std_dev = var_pos ? sd_raw : FP_ZERO;
  assign z       = var_pos ? quot   : FP_ZERO;

endmodule
