// tb_error_counter: random classifications and labels with random valid,
// counted independently by the testbench; checks all four counters every
// cycle, the synchronous clear, and saturation of a narrow (4-bit) instance.
module tb_error_counter;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, predicted = 0, label = 0;
  logic [31:0] total, errors, fa, miss;
  logic [3:0]  t4, e4, f4, m4;
  int r_total = 0, r_err = 0, r_fa = 0, r_miss = 0, n4 = 0;
  int checks = 0, failures = 0;

  error_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid),
    .predicted(predicted), .label(label), .total(total), .errors(errors),
    .false_alarms(fa), .misses(miss));
  error_counter #(.CW(4)) dut4 (.clk(clk), .rst_n(rst_n), .clear(1'b0), .valid(valid),
    .predicted(predicted), .label(label), .total(t4), .errors(e4),
    .false_alarms(f4), .misses(m4));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s = %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      valid = $urandom_range(3) != 0;
      predicted = $urandom_range(1);
      label = $urandom_range(1);
      clear = (i == 1500);
      @(posedge clk);
      if (clear) begin r_total = 0; r_err = 0; r_fa = 0; r_miss = 0; end
      else if (valid) begin
        r_total++;
        if (predicted != label) r_err++;
        if (predicted && !label) r_fa++;
        if (!predicted && label) r_miss++;
      end
      if (valid) n4++;
      #1;
      expect_eq("total", int'(total), r_total);
      expect_eq("errors", int'(errors), r_err);
      expect_eq("false_alarms", int'(fa), r_fa);
      expect_eq("misses", int'(miss), r_miss);
      expect_eq("saturating total", int'(t4), (n4 > 15) ? 15 : n4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
