// tb_fp_add: checks fp_add bit-exactly against double-precision addition
// rounded to FP32, over random operands of nearby and distant exponents, both
// signs (so cancellation happens), and the special cases.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] want);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h want %h", ta, tb_, y, want);
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
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(100, 150);
      z = (i % 2) ? rand_fp(100, 150) : rand_fp(int'(x[30:23]) - 2, int'(x[30:23]) + 2);
      if (i % 7 == 0) z = {~x[31], x[30:0]} ^ 32'(1 << $urandom_range(5));
      exp_y = r2f(f2r(x) + f2r(z));
      check(x, z, exp_y);
    end
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1 - 1 = +0
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);
    check(32'h0000_0000, 32'h4049_0FDB, 32'h4049_0FDB);
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
