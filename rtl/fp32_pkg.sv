// fp32_pkg: shared IEEE-754 single-precision (FP32) type, field helpers,
// constants and the common round-and-pack step used by every arithmetic unit
// of the motion-artifact SVM.
//
// All datapath values of the detector are FP32, as in the original design.
// Simplifications chosen for this implementation (not from the source
// design): subnormal inputs are read as zero and subnormal results are
// flushed to signed zero; rounding is round-to-nearest-even; every NaN
// produced is the quiet NaN 32'h7FC00000.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_fields_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_NEG_ONE = 32'hBF80_0000;
  localparam fp32_t FP_QNAN    = 32'h7FC0_0000;
  localparam fp32_t FP_POS_INF = 32'h7F80_0000;

  // Smoothing constant a = 0.01 of the running-mean filter, and 1 - a = 0.99.
  localparam fp32_t FP_IIR_A           = 32'h3C23_D70A;
  localparam fp32_t FP_IIR_ONE_MINUS_A = 32'h3F7D_70A4;

  function automatic logic fp_is_nan(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 23'h0);
  endfunction

  function automatic logic fp_is_inf(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 23'h0);
  endfunction

  // Zero, including subnormals (which this design reads as zero).
  function automatic logic fp_is_zero(fp32_t x);
    return x[30:23] == 8'h00;
  endfunction

  function automatic fp32_t fp_neg(fp32_t x);
    return {~x[31], x[30:0]};
  endfunction

  // 24-bit significand with the hidden bit (zero for zero/subnormal inputs).
  function automatic logic [23:0] fp_mant(fp32_t x);
    return (x[30:23] == 8'h00) ? 24'h0 : {1'b1, x[22:0]};
  endfunction

  // Round to nearest even and pack. m is a normalised significand (bit 23
  // set) with biased exponent e; g is the first bit below m, s the OR of all
  // bits below g. Overflow gives infinity, underflow gives signed zero.
  function automatic fp32_t fp_round_pack(logic sign, logic signed [11:0] e,
                                          logic [23:0] m, logic g, logic s);
    logic [24:0]        mr;
    logic signed [11:0] er;
    mr = {1'b0, m} + {24'h0, g & (s | m[0])};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255)    return {sign, 8'hFF, 23'h0};
    else if (er <= 12'sd0) return {sign, 31'h0};
    else                   return {sign, er[7:0], mr[22:0]};
  endfunction

endpackage
