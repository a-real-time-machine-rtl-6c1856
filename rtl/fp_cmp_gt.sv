// fp_cmp_gt: combinational FP32 relational operator, gt = (a > b).
//
// Each operand is mapped to an unsigned key that orders like the real number
// (positive: set the top bit; negative: invert all bits; zero and subnormals
// map to the key of +0), and the keys are compared. Any NaN operand gives 0.
// In the detector it is the final threshold unit, with b tied to 0.0: a
// positive decision value marks a motion artifact.
module fp_cmp_gt
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output logic  gt
);

  function automatic logic [31:0] order_key(fp32_t x);
    if (fp_is_zero(x)) return 32'h8000_0000;
    else if (x[31])    return ~x;
    else               return {1'b1, x[30:0]};
  endfunction

  always_comb begin
    if (fp_is_nan(a) || fp_is_nan(b)) gt = 1'b0;
    else                               gt = order_key(a) > order_key(b);
  end

endmodule
