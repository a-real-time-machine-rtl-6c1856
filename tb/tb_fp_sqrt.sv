// tb_fp_sqrt: checks fp_sqrt bit-exactly against double-precision square
// roots rounded to FP32, for odd and even exponents and the special cases.
module tb_fp_sqrt;
  import tb_fp_pkg::*;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_sqrt dut (.a(a), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] want);
    a = ta;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt %h = %h want %h", ta, y, want);
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
      logic [31:0] x;
      x = rand_fp(1, 254);
      x[31] = 1'b0;
      check(x, r2f($sqrt(f2r(x))));
    end
    check(32'h4080_0000, 32'h4000_0000);   // sqrt 4 = 2
    check(32'h8000_0000, 32'h8000_0000);   // -0
    check(32'hBF80_0000, 32'h7FC0_0000);   // sqrt(-1)
    check(32'h7F80_0000, 32'h7F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
