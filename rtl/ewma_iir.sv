// ewma_iir: single-pole IIR filter giving the exponentially weighted running
// mean of an FP32 sample stream, H(z) = a / (1 - (1-a) z^-1), that is
//   y[n] = a * x[n] + (1 - a) * y[n-1].
//
// The filter has direct feed-through: y is combinational in x and the stored
// state y[n-1], so the current sample is already part of the mean it returns.
// On a clock edge with en = 1 the state takes the value y. The state resets
// to +0. The coefficient a = 0.01 (parameter A) and the filter form are from
// the source design; the reset value and the separate 1 - a parameter
// (ONE_MINUS_A, which must equal 1 - A rounded to FP32) are choices here.
module ewma_iir
  import fp32_pkg::*;
#(
  parameter fp32_t A           = FP_IIR_A,
  parameter fp32_t ONE_MINUS_A = FP_IIR_ONE_MINUS_A
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,      // sample strobe: commit y as the new state
  input  fp32_t x,       // current sample
  output fp32_t y,       // running mean including x (combinational)
  output fp32_t state    // running mean up to the previous sample
);

  fp32_t ax, bs;

  fp_mul u_mul_a (.a(A),           .b(x),     .y(ax));
  fp_mul u_mul_b (.a(ONE_MINUS_A), .b(state), .y(bs));
  fp_add u_add   (.a(ax),          .b(bs),    .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= FP_ZERO;
    else if (en) state <= y;
  end

endmodule
