// tb_ewma_iir: drives the running-mean filter with a random positive stream
// and random enable, and checks its combinational output and its state
// bit-exactly against y = a*x + (1-a)*y_prev evaluated with FP32 rounding
// after every operation (a = 0.01).
module tb_ewma_iir;
  import tb_fp_pkg::*;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] x = 0, y, state;
  logic [31:0] ref_state;
  int checks = 0, failures = 0, commits = 0;

  ewma_iir dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y), .state(state));

  always #5 clk = ~clk;

  function automatic logic [31:0] model_y(logic [31:0] xi, logic [31:0] s);
    real a, b;
    a = f2r(32'h3C23_D70A);
    b = f2r(32'h3F7D_70A4);
    return r2f(f2r(r2f(a * f2r(xi))) + f2r(r2f(b * f2r(s))));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x  = r2f(5.0 + 2.0 * $sin(i * 0.05) + ($urandom_range(1000) / 1000.0) - 0.5);
      en = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (y !== model_y(x, ref_state)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h want %h", y, model_y(x, ref_state));
      end
      @(posedge clk);
      if (en) begin ref_state = model_y(x, ref_state); commits++; end
      #1;
      checks++;
      if (state !== ref_state) begin
        failures++;
        if (failures < 10) $display("FAIL state=%h want %h", state, ref_state);
      end
    end
    // after ~2000 commits of a stream around 5, the mean must be near 5
    checks++;
    if (f2r(state) < 4.0 || f2r(state) > 6.0) failures++;
    $display("commits %0d, final mean %f", commits, f2r(state));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
