// fp_exp: combinational FP32 exponential, y = e^u, the nonlinearity of the
// RBF kernel.
//
// e^u is evaluated as 2^t with t = u * log2(e). The input is first turned
// into a fixed-point magnitude with 40 fraction bits and multiplied by a
// 41-bit log2(e), so t carries far more precision than FP32. The integer part
// n of t becomes the result exponent; the fraction f = i/64 + r is split into
// a 6-bit table index and a remainder r < 1/64. 2^(i/64) comes from a 64-entry
// table, 2^r from the cubic Taylor series 1 + x + x^2/2 + x^3/6 with
// x = r*ln2 (truncation error below 6e-10). The product of the two is rounded
// to nearest even; results are within one unit in the last place.
// Range: |u| >= 128 saturates to +inf or +0, results below the normal range
// flush to +0, +/-inf give +inf / +0, NaN gives NaN, and u = 0 gives 1.0.
// The source design only names an exponential unit; this table-plus-series
// method is a choice of this implementation. No clock.
module fp_exp
  import fp32_pkg::*;
(
  input  fp32_t u,
  output fp32_t y
);

  localparam logic [40:0] LOG2E_Q40 = 41'h171_5476_52B8;  // log2(e) * 2^40
  localparam logic [39:0] LN2_Q40   = 40'hB1_7217_F7D2;   // ln(2)   * 2^40
  localparam logic [37:0] SIXTH_Q40 = 38'h2A_AAAA_AAAB;   // 1/6     * 2^40

  // TWO_POW_FRAC(i) = round(2^(i/64) * 2^31), i = 0..63.
  function automatic logic [31:0] two_pow_frac(logic [5:0] i);
    case (i)
      6'd0: return 32'h80000000;
      6'd1: return 32'h8164D1F4;
      6'd2: return 32'h82CD8699;
      6'd3: return 32'h843A28C4;
      6'd4: return 32'h85AAC368;
      6'd5: return 32'h871F6197;
      6'd6: return 32'h88980E81;
      6'd7: return 32'h8A14D575;
      6'd8: return 32'h8B95C1E4;
      6'd9: return 32'h8D1ADF5B;
      6'd10: return 32'h8EA4398B;
      6'd11: return 32'h9031DC43;
      6'd12: return 32'h91C3D374;
      6'd13: return 32'h935A2B2F;
      6'd14: return 32'h94F4EFA9;
      6'd15: return 32'h96942D37;
      6'd16: return 32'h9837F052;
      6'd17: return 32'h99E04593;
      6'd18: return 32'h9B8D39BA;
      6'd19: return 32'h9D3ED9A7;
      6'd20: return 32'h9EF53261;
      6'd21: return 32'hA0B05110;
      6'd22: return 32'hA2704303;
      6'd23: return 32'hA43515AE;
      6'd24: return 32'hA5FED6AA;
      6'd25: return 32'hA7CD93B5;
      6'd26: return 32'hA9A15AB5;
      6'd27: return 32'hAB7A39B6;
      6'd28: return 32'hAD583EEA;
      6'd29: return 32'hAF3B78AD;
      6'd30: return 32'hB123F582;
      6'd31: return 32'hB311C413;
      6'd32: return 32'hB504F334;
      6'd33: return 32'hB6FD91E3;
      6'd34: return 32'hB8FBAF47;
      6'd35: return 32'hBAFF5AB2;
      6'd36: return 32'hBD08A39F;
      6'd37: return 32'hBF1799B6;
      6'd38: return 32'hC12C4CCA;
      6'd39: return 32'hC346CCDA;
      6'd40: return 32'hC5672A11;
      6'd41: return 32'hC78D74C9;
      6'd42: return 32'hC9B9BD86;
      6'd43: return 32'hCBEC14FF;
      6'd44: return 32'hCE248C15;
      6'd45: return 32'hD06333DB;
      6'd46: return 32'hD2A81D92;
      6'd47: return 32'hD4F35AAC;
      6'd48: return 32'hD744FCCB;
      6'd49: return 32'hD99D15C2;
      6'd50: return 32'hDBFBB798;
      6'd51: return 32'hDE60F482;
      6'd52: return 32'hE0CCDEEC;
      6'd53: return 32'hE33F8973;
      6'd54: return 32'hE5B906E7;
      6'd55: return 32'hE8396A50;
      6'd56: return 32'hEAC0C6E8;
      6'd57: return 32'hED4F301F;
      6'd58: return 32'hEFE4B99C;
      6'd59: return 32'hF281773C;
      6'd60: return 32'hF5257D15;
      6'd61: return 32'hF7D0DF73;
      6'd62: return 32'hFA83B2DB;
      6'd63: return 32'hFD3E0C0D;
      default: return 32'h8000_0000;
    endcase
  endfunction

  always_comb begin
    logic [7:0]          e;
    logic [47:0]         ufix;
    logic [88:0]         tprod;
    logic [48:0]         tmag;
    logic signed [49:0]  t;
    logic signed [11:0]  n;
    logic [39:0]         f;
    logic [33:0]         r;
    logic [73:0]         lr_p;
    logic [39:0]         lr;
    logic [79:0]         sq_p;
    logic [39:0]         sq;
    logic [79:0]         cu_p;
    logic [39:0]         cu;
    logic [77:0]         c6_p;
    logic [40:0]         p;
    logic [72:0]         m;

    e = u[30:23];
    if (e >= 8'd110) ufix = {24'h0, fp_mant(u)} << (e - 8'd110);
    else             ufix = {24'h0, fp_mant(u)} >> (8'd110 - e);
    tprod = ufix * LOG2E_Q40;
    tmag  = tprod[88:40];
    t     = u[31] ? -$signed({1'b0, tmag}) : $signed({1'b0, tmag});
    n     = 12'(t >>> 40);
    f     = t[39:0];
    r     = f[33:0];
    lr_p  = r * LN2_Q40;
    lr    = {6'h0, lr_p[73:40]};
    sq_p  = lr * lr;
    sq    = sq_p[79:40];
    cu_p  = sq * lr;
    cu    = cu_p[79:40];
    c6_p  = cu * SIXTH_Q40;
    p     = {1'b1, 40'h0} + {1'b0, lr} + {2'b0, sq[39:1]} + {3'b0, c6_p[77:40]};
    m     = two_pow_frac(f[39:34]) * p;

    if (fp_is_nan(u))
      y = FP_QNAN;
    else if (fp_is_zero(u))
      y = FP_ONE;
    else if (e >= 8'd134)            // |u| >= 128, or infinity
      y = u[31] ? FP_ZERO : FP_POS_INF;
    else if (m[72])
      y = fp_round_pack(1'b0, n + 12'sd128, m[72:49], m[48], |m[47:0]);
    else
      y = fp_round_pack(1'b0, n + 12'sd127, m[71:48], m[47], |m[46:0]);
  end

endmodule
