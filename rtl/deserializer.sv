// deserializer: serial-to-parallel converter at the exit of the oversampled
// channel. Each cycle with in_valid the W-bit result of slot sel is stored in
// staging flip-flop sel. On the last slot (in_last) the whole set, with the
// final result taken straight from din, is copied to the parallel output
// registers and par_valid pulses for one cycle, so par_out changes only once
// per base-rate period. Registers reset to zero.
module deserializer #(
  parameter int N = 55,
  parameter int W = 32,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [SW-1:0] sel,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  par_out [N],
  output logic          par_valid
);

  logic [W-1:0] stage [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        stage[i]   <= '0;
        par_out[i] <= '0;
      end
      par_valid <= 1'b0;
    end else begin
      par_valid <= in_valid && in_last;
      if (in_valid) begin
        for (int i = 0; i < N; i++) if (i == int'(sel)) stage[i] <= din;
        if (in_last)
          for (int i = 0; i < N; i++)
            par_out[i] <= (i == int'(sel)) ? din : stage[i];
      end
    end
  end

  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (int'(sel) < N));

endmodule
