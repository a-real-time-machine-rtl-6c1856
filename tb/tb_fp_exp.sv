// tb_fp_exp: checks fp_exp against the double-precision exponential rounded
// to FP32, allowing one unit in the last place, over the whole input range
// the RBF kernel can produce (large negative to moderate positive), plus the
// saturation and special cases.
module tb_fp_exp;
  import tb_fp_pkg::*;
  logic [31:0] u, y;
  int checks = 0, failures = 0, worst = 0;

  fp_exp dut (.u(u), .y(y));

  task automatic check(logic [31:0] tu, logic [31:0] want, int tol);
    int d;
    u = tu;
    #1;
    checks++;
    d = ulp_dist(y, want);
    if (d > worst && tol > 0) worst = d;
    if (d > tol) begin
      failures++;
      if (failures < 10) $display("FAIL exp(%h) = %h want %h (%0d ulp)", tu, y, want, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] x;
      real v;
      x = rand_fp(90, 133);
      v = $exp(f2r(x));
      if (v < 1.2e-38 || v > 3.0e38) continue;
      check(x, r2f(v), 1);
    end
    check(32'h0000_0000, 32'h3F80_0000, 0);   // e^0 = 1
    check(32'h3F80_0000, 32'h402D_F854, 1);   // e^1
    check(32'hC300_0000, 32'h0000_0000, 0);   // e^-128 -> 0
    check(32'h4300_0000, 32'h7F80_0000, 0);   // e^128  -> inf
    check(32'hFF80_0000, 32'h0000_0000, 0);
    $display("worst error %0d ulp", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
