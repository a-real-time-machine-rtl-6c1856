// coef_store: the trained SVM model held in registers: N_SV support vectors
// of N_FEAT FP32 features, the N_SV label-weighted Lagrange multipliers
// y_i * alpha_i, the bias b and the kernel scale k (k = -gamma of the RBF
// kernel exp(-gamma * |x - sv|^2)).
//
// The source design bakes these values in as constants from offline
// training; here they are registers written through a simple port so one
// netlist can run any trained model. Write map (word addresses):
//   i*N_FEAT + j               support vector i, feature j
//   N_SV*N_FEAT + i            y_i * alpha_i
//   N_SV*(N_FEAT+1)            bias b
//   N_SV*(N_FEAT+1) + 1        kernel scale k
// Reset: all zero except k = -1.0. Reads are combinational: the slot index
// rd_slot selects one support vector and its weight for the serial channel.
module coef_store
  import fp32_pkg::*;
#(
  parameter int N_SV   = 55,
  parameter int N_FEAT = 2,
  localparam int SW = (N_SV > 1) ? $clog2(N_SV) : 1,
  localparam int N_WORDS = N_SV * (N_FEAT + 1) + 2,
  localparam int AW = $clog2(N_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp32_t         wr_data,
  input  logic [SW-1:0] rd_slot,
  output fp32_t         sv_out [N_FEAT],
  output fp32_t         ya_out,
  output fp32_t         bias,
  output fp32_t         kscale
);

  localparam int YA_BASE = N_SV * N_FEAT;
  localparam int B_ADDR  = N_SV * (N_FEAT + 1);
  localparam int K_ADDR  = B_ADDR + 1;

  fp32_t sv [N_SV][N_FEAT];
  fp32_t ya [N_SV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SV; i++) begin
        ya[i] <= FP_ZERO;
        for (int j = 0; j < N_FEAT; j++) sv[i][j] <= FP_ZERO;
      end
      bias   <= FP_ZERO;
      kscale <= FP_NEG_ONE;
    end else if (wr_en) begin
      for (int i = 0; i < N_SV; i++) begin
        for (int j = 0; j < N_FEAT; j++)
          if (int'(wr_addr) == i * N_FEAT + j) sv[i][j] <= wr_data;
        if (int'(wr_addr) == YA_BASE + i) ya[i] <= wr_data;
      end
      if (int'(wr_addr) == B_ADDR) bias   <= wr_data;
      if (int'(wr_addr) == K_ADDR) kscale <= wr_data;
    end
  end

  always_comb begin
    for (int j = 0; j < N_FEAT; j++) sv_out[j] = FP_ZERO;
    ya_out = FP_ZERO;
    for (int i = 0; i < N_SV; i++) begin
      if (i == int'(rd_slot)) begin
        for (int j = 0; j < N_FEAT; j++) sv_out[j] = sv[i][j];
        ya_out = ya[i];
      end
    end
  end

endmodule
