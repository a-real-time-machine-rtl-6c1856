// tb_serializer: loads random 55 x 64-bit sets, reads every position through
// sel, changes the inputs without load to check that the captured set holds,
// and checks the zero reset state.
module tb_serializer;
  localparam int N = 55, W = 64;
  logic         clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] par_in [N];
  logic [5:0]   sel = 0;
  logic [W-1:0] ser_out;
  logic [W-1:0] ref_held [N];
  int checks = 0, failures = 0;

  serializer #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load),
    .par_in(par_in), .sel(sel), .ser_out(ser_out));

  always #5 clk = ~clk;

  task automatic sweep();
    for (int i = 0; i < N; i++) begin
      sel = 6'(i);
      #1;
      checks++;
      if (ser_out !== ref_held[i]) begin
        failures++;
        if (failures < 10) $display("FAIL sel %0d: %h want %h", i, ser_out, ref_held[i]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin par_in[i] = '1; ref_held[i] = '0; end
    repeat (2) @(negedge clk);
    sweep();
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) par_in[i] = {$urandom, $urandom};
      load = (r % 3 != 2);
      @(posedge clk);
      #1;
      if (load) for (int i = 0; i < N; i++) ref_held[i] = par_in[i];
      load = 0;
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
