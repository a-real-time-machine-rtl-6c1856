// tb_deserializer: feeds frames of 55 random words in slot order (with idle
// gaps and back-to-back frames), checks that the parallel output holds the
// previous frame until the last slot, then shows the new frame exactly, with
// a one-cycle par_valid pulse.
module tb_deserializer;
  localparam int N = 55, W = 32;
  logic         clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  logic [5:0]   sel = 0;
  logic [W-1:0] din = 0;
  logic [W-1:0] par_out [N];
  logic         par_valid;
  logic [W-1:0] cur [N], shown [N];
  int checks = 0, failures = 0, pulses = 0;

  deserializer #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_last(in_last), .sel(sel), .din(din), .par_out(par_out), .par_valid(par_valid));

  always #5 clk = ~clk;

  task automatic check_out(logic want_valid);
    checks++;
    if (par_valid !== want_valid) begin
      failures++;
      if (failures < 10) $display("FAIL par_valid %b", par_valid);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (par_out[i] !== shown[i]) begin
        failures++;
        if (failures < 10) $display("FAIL par_out[%0d] = %h want %h", i, par_out[i], shown[i]);
      end
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
    for (int i = 0; i < N; i++) shown[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      for (int s = 0; s < N; s++) begin
        @(negedge clk);
        in_valid = 1; sel = 6'(s); in_last = (s == N - 1);
        din = $urandom;
        cur[s] = din;
        @(posedge clk);
        #1;
        if (s == N - 1) begin
          for (int i = 0; i < N; i++) shown[i] = cur[i];
          pulses++;
        end
        check_out(s == N - 1);
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      if (f % 2 == 1) begin
        repeat ($urandom_range(5)) @(negedge clk);
      end
    end
    @(posedge clk);
    #1;
    check_out(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
