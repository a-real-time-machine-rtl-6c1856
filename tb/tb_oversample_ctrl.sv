// tb_oversample_ctrl: offers samples with random gaps (and continuously for a
// while) and checks, against a cycle counter kept by the testbench, that each
// accepted sample is followed by slots 0..54 on consecutive cycles, that
// last_slot marks slot 54 only, that in_ready is low exactly while a frame
// runs (except in its last slot), and that back-to-back samples are accepted
// exactly 55 cycles apart.
module tb_oversample_ctrl;
  localparam int N = 55;
  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic       in_ready, accept, slot_valid, last_slot;
  logic [5:0] slot;
  int checks = 0, failures = 0, stalls = 0, b2b = 0, frames = 0;
  int since = -1;      // cycles since the last accept, -1 when idle
  int last_acc = -1000, cyc = 0;
  logic acc = 1'b0;

  oversample_ctrl #(.N_SLOTS(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .accept(accept), .slot_valid(slot_valid), .slot(slot), .last_slot(last_slot));

  always #5 clk = ~clk;

  task automatic expect_true(string what, logic c);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (acc) in_valid = 1'b0;
      if (cyc < 3000 || cyc > 15000) in_valid = 1'b1;
      else                           in_valid = ($urandom_range(79) == 0) ? 1'b1 : in_valid;
      #1;
      // expected state from the testbench's own counter
      expect_true("slot_valid", slot_valid == (since >= 0 && since < N));
      if (since >= 0 && since < N) begin
        expect_true("slot", int'(slot) == since);
        expect_true("last_slot", last_slot == (since == N - 1));
      end else begin
        expect_true("no last_slot when idle", !last_slot);
      end
      expect_true("in_ready", in_ready == !(since >= 0 && since < N - 1));
      if (in_valid && !in_ready) stalls++;
      acc = accept;
      expect_true("accept", acc == (in_valid && in_ready));
      @(posedge clk);
      if (acc) begin
        if (since == N - 1) b2b++;
        if (last_acc >= 0 && since == N - 1) expect_true("b2b spacing", cyc - last_acc == N);
        last_acc = cyc;
        since = 0;
        frames++;
      end else if (since >= 0) begin
        since = (since == N - 1) ? -1 : since + 1;
      end
    end
    expect_true("stalls seen", stalls > 0);
    expect_true("back-to-back seen", b2b > 0);
    $display("frames %0d stalls %0d back-to-back %0d", frames, stalls, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
