// tb_serial_kernel: random normalised samples, support vectors, weights and
// kernel scales; checks the squared distance bit-exactly and the kernel value
// and weighted term against an FP32 model (the exponential allowed one unit
// in the last place, the weighted term two).
module tb_serial_kernel;
  import tb_fp_pkg::*;
  localparam int NF = 2;
  logic [31:0] z [NF], sv [NF];
  logic [31:0] ya, kscale, dist2, kern, term;
  int checks = 0, failures = 0;

  serial_kernel #(.N_FEAT(NF)) dut (.z(z), .sv(sv), .ya(ya), .kscale(kscale),
    .dist2(dist2), .kern(kern), .term(term));

  task automatic expect_near(string what, logic [31:0] got, logic [31:0] want, int tol);
    checks++;
    if (ulp_dist(got, want) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s = %h want %h", what, got, want);
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
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] d2, arg, kv, tv;
      real acc;
      for (int j = 0; j < NF; j++) begin
        z[j]  = r2f(($urandom_range(8000) - 4000) / 1000.0);
        sv[j] = r2f(($urandom_range(8000) - 4000) / 1000.0);
      end
      ya     = r2f(($urandom_range(2000) - 1000) / 10.0);
      kscale = r2f(-($urandom_range(3000) + 1) / 1000.0);
      acc = 0.0;
      d2  = 0;
      for (int j = 0; j < NF; j++) begin
        logic [31:0] df, sq;
        df = r2f(f2r(z[j]) - f2r(sv[j]));
        sq = r2f(f2r(df) * f2r(df));
        d2 = (j == 0) ? sq : r2f(f2r(d2) + f2r(sq));
      end
      arg = r2f(f2r(kscale) * f2r(d2));
      kv  = r2f($exp(f2r(arg)));
      tv  = r2f(f2r(ya) * f2r(kv));
      #1;
      expect_near("dist2", dist2, d2, 0);
      expect_near("kern", kern, kv, 1);
      if (tv[30:23] != 0) expect_near("term", term, tv, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
