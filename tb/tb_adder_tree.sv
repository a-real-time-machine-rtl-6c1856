// tb_adder_tree: sums 56 random FP32 values of mixed sign and magnitude and
// checks the result bit-exactly against a pairwise tree of FP32-rounded
// additions (inputs padded with zeros to 64, node i = node 2i + node 2i+1),
// and against the exact sum within a loose tolerance.
module tb_adder_tree;
  import tb_fp_pkg::*;
  localparam int N = 56, P = 64;
  logic [31:0] in [N];
  logic [31:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.N(N)) dut (.in(in), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [31:0] node [2*P];
      real exact, mag;
      exact = 0.0; mag = 0.0;
      for (int i = 0; i < P; i++) begin
        if (i < N) begin
          in[i] = r2f(($urandom_range(200000) - 100000) / 1000.0 * ((t % 2) ? 1.0 : 0.001));
          node[P + i] = in[i];
          exact += f2r(in[i]);
          mag += (f2r(in[i]) < 0) ? -f2r(in[i]) : f2r(in[i]);
        end else begin
          node[P + i] = 0;
        end
      end
      for (int i = P - 1; i >= 1; i--) node[i] = r2f(f2r(node[2*i]) + f2r(node[2*i+1]));
      #1;
      checks++;
      if (sum !== node[1]) begin
        failures++;
        if (failures < 10) $display("FAIL sum %h want %h", sum, node[1]);
      end
      checks++;
      if ((f2r(sum) - exact) > 1e-5 * mag || (exact - f2r(sum)) > 1e-5 * mag) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
