// tb_preproc_channel: streams a drifting, noisy signal with occasional large
// spikes (the shape of a motion artifact) through one pre-processing channel
// and checks z, mean and standard deviation bit-exactly against an FP32 model
// of running mean, running mean square, variance, square root and division.
// The first sample is zero, which exercises the zero-variance guard.
module tb_preproc_channel;
  import tb_fp_pkg::*;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] x = 0, z, mean, std_dev;
  logic [31:0] m_state, q_state;
  int checks = 0, failures = 0, guards = 0;

  preproc_channel dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .z(z),
                       .mean(mean), .std_dev(std_dev));

  always #5 clk = ~clk;

  function automatic logic [31:0] iir(logic [31:0] xi, logic [31:0] s);
    return r2f(f2r(r2f(f2r(32'h3C23_D70A) * f2r(xi))) +
               f2r(r2f(f2r(32'h3F7D_70A4) * f2r(s))));
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s = %h want %h", what, got, want);
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
    logic [31:0] mu, msq, v, sd, zz;
    m_state = 0;
    q_state = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      real s;
      @(negedge clk);
      s = (i == 0) ? 0.0 : 0.8 + 0.3 * $sin(i * 0.02) + ($urandom_range(1000) - 500) / 5000.0;
      if (i > 0 && $urandom_range(99) == 0) s = s + 4.0;
      x  = r2f(s);
      en = 1;
      mu  = iir(x, m_state);
      msq = iir(r2f(f2r(x) * f2r(x)), q_state);
      v   = r2f(f2r(msq) - f2r(r2f(f2r(mu) * f2r(mu))));
      if (v[31] == 1'b0 && v[30:23] != 0) begin
        sd = r2f($sqrt(f2r(v)));
        zz = r2f(f2r(r2f(f2r(x) - f2r(mu))) / f2r(sd));
      end else begin
        sd = 0; zz = 0; guards++;
      end
      #1;
      expect_eq("mean", mean, mu);
      expect_eq("std", std_dev, sd);
      expect_eq("z", z, zz);
      @(posedge clk);
      m_state = mu;
      q_state = msq;
    end
    checks++;
    if (guards == 0) begin failures++; $display("FAIL zero-variance guard never used"); end
    $display("guards %0d", guards);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
