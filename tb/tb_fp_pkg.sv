// tb_fp_pkg: testbench-only conversions between SystemVerilog real (IEEE
// double) and FP32 bit patterns, plus small helpers. The conversion works on
// the double's bit fields and rounds to nearest even, flushing results below
// the FP32 normal range to zero, which is the number format of the design.
// Because a double carries more than twice the FP32 precision, rounding the
// double result of one +, -, *, / or sqrt to FP32 gives the correctly rounded
// FP32 result, so these helpers give exact reference values.
package tb_fp_pkg;

  function automatic logic [31:0] r2f(real v);
    logic [63:0] d;
    logic [52:0] m53;
    logic [24:0] m;
    int          e;
    d = $realtobits(v);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'h0};
    if (d[62:52] == 11'h000) return {d[63], 31'h0};
    m53 = {1'b1, d[51:0]};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b0, m53[52:29]} + 25'(m53[28] & ((|m53[27:0]) | m53[29]));
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0)   return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'h0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  // Distance in units of the last place between two finite FP32 values of
  // the same sign.
  function automatic int ulp_dist(logic [31:0] a, logic [31:0] b);
    int d;
    d = int'(a[30:0]) - int'(b[30:0]);
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 32'h7FFF_FFFF;
    return (d < 0) ? -d : d;
  endfunction

  // Random finite FP32 with exponent drawn from [emin, emax] (biased).
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(emin + int'($urandom_range(emax - emin))), 23'($urandom)};
  endfunction

endpackage
