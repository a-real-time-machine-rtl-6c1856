// adder_tree: combinational FP32 adder tree summing N inputs.
//
// The inputs are padded with +0 to the next power of two P and added pairwise
// in log2(P) levels (node i = node 2i + node 2i+1, leaves P .. 2P-1), so the
// rounding order is fixed by the input index. With N = 56 (55 weighted kernel
// values and the bias) the tree has six levels. Adders fed only by padding
// reduce to constants in synthesis. No clock.
module adder_tree
  import fp32_pkg::*;
#(
  parameter int N = 56,
  localparam int P = (N > 1) ? (1 << $clog2(N)) : 2
) (
  input  fp32_t in [N],
  output fp32_t sum
);

  fp32_t node [2*P];

  assign node[0] = FP_ZERO;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P + i] = in[i];
    end else begin : g_pad
      assign node[P + i] = FP_ZERO;
    end
  end

  for (genvar i = 1; i < P; i++) begin : g_node
    fp_add u_add (.a(node[2*i]), .b(node[2*i+1]), .y(node[i]));
  end

  assign sum = node[1];

endmodule
