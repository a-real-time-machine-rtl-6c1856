// serializer: parallel-to-serial converter at the entry of the oversampled
// channel. On load it captures N parallel channel inputs of W bits; it then
// presents input number sel on ser_out (combinational read of the captured
// registers), so a slot counter can walk through all N in N fast cycles.
// In the detector every input carries the same normalised feature vector (all
// support-vector channels see the same sample), as drawn in the source
// design's serial-channel figure. Registers reset to zero.
module serializer #(
  parameter int N = 55,
  parameter int W = 64,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  par_in [N],
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  ser_out
);

  logic [W-1:0] held [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) held[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++) held[i] <= par_in[i];
    end
  end

  assign ser_out = (int'(sel) < N) ? held[sel] : '0;

endmodule
