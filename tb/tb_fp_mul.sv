// tb_fp_mul: checks fp_mul bit-exactly against double-precision products
// rounded to FP32, plus overflow, underflow and the special cases.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] want);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h want %h", ta, tb_, y, want);
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
      x = rand_fp(90, 160);
      z = rand_fp(90, 160);
      check(x, z, r2f(f2r(x) * f2r(z)));
    end
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);
    check(32'hFF80_0000, 32'h4000_0000, 32'hFF80_0000);
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);
    check(32'h0100_0000, 32'h0100_0000, 32'h0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
