// tb_fp_cmp_gt: checks fp_cmp_gt against real-number comparison for random
// operands of both signs, and for zeros of both signs and NaN.
module tb_fp_cmp_gt;
  import tb_fp_pkg::*;
  logic [31:0] a, b;
  logic        gt;
  int checks = 0, failures = 0;

  fp_cmp_gt dut (.a(a), .b(b), .gt(gt));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic want);
    a = ta; b = tb_;
    #1;
    checks++;
    if (gt !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h > %h gave %b", ta, tb_, gt);
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
      logic [31:0] x, z;
      x = rand_fp(100, 140);
      z = (i % 3 == 0) ? 32'h0 : ((i % 5 == 0) ? x ^ 32'(1 << $urandom_range(3)) : rand_fp(100, 140));
      check(x, z, f2r(x) > f2r(z));
    end
    check(32'h8000_0000, 32'h0000_0000, 1'b0);
    check(32'h0000_0000, 32'h8000_0000, 1'b0);
    check(32'h7FC0_0000, 32'h0000_0000, 1'b0);
    check(32'h3400_0000, 32'h0000_0000, 1'b1);
    check(32'hB400_0000, 32'h0000_0000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
