// oversample_ctrl: schedules the time-multiplexed support-vector channel.
//
// One input sample (one base-rate period) is spread over N_SLOTS consecutive
// fast-clock cycles, one per support vector. A sample is accepted when
// in_valid and in_ready are both high; the next cycles then carry slots
// 0 .. N_SLOTS-1 (slot_valid high, slot = index, last_slot on the final one).
// in_ready is high when idle and also during the last slot, so a new sample
// can be accepted back to back and the channel sustains one sample every
// N_SLOTS cycles: the oversampling ratio equals the number of support
// vectors, as in the source design (55). While a frame is running in_ready is
// low and an offered sample waits (a stall). The handshake is a choice here.
module oversample_ctrl #(
  parameter int N_SLOTS = 55,
  localparam int SW = (N_SLOTS > 1) ? $clog2(N_SLOTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          accept,      // in_valid && in_ready
  output logic          slot_valid,  // a slot is being processed this cycle
  output logic [SW-1:0] slot,        // its support-vector index
  output logic          last_slot    // it is slot N_SLOTS-1
);

  logic busy;

  assign slot_valid = busy;
  assign last_slot  = busy && (slot == SW'(N_SLOTS - 1));
  assign in_ready   = !busy || last_slot;
  assign accept     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      slot <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      slot <= '0;
    end else if (busy) begin
      if (last_slot) busy <= 1'b0;
      else           slot <= slot + SW'(1);
    end
  end

  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(slot) < N_SLOTS));

endmodule
