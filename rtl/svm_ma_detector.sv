// svm_ma_detector: real-time motion-artifact detector for fNIRS signals, an
// RBF-kernel support vector machine with streaming pre-processing, all in
// FP32.
//
// Data flow for one sample (one base-rate period):
//   1. N_FEAT preproc_channel units normalise the raw features with running
//      mean and standard deviation (combinational; their filter states are
//      committed when the sample is accepted). The result is registered into
//      the serializer, once per support-vector channel.
//   2. oversample_ctrl walks slots 0..N_SV-1 over the next N_SV fast cycles.
//      In each slot the single shared serial_kernel evaluates
//      ya_i * exp(k * |z - sv_i|^2) with support vector i from coef_store.
//   3. The deserializer collects the N_SV terms and releases them in parallel
//      at the end of the period; the adder_tree sums them with the bias b,
//      and fp_cmp_gt compares the sum with 0. A positive decision value
//      flags a motion artifact.
// Timing: a sample accepted at clock edge E gives out_valid for one cycle
// after edge E + N_SV + 1. A new sample may be accepted every N_SV cycles
// (in_ready also rises in the last slot); offered earlier, it waits. With the
// fast clock at 55x the sample rate this is the 55x oversampled single
// channel of the source design; its latency exceeds a fully parallel design
// by one base-rate period. The model (support vectors, weights, bias, kernel
// scale) is written through the cfg_* port (address map in coef_store)
// rather than fixed at build time, which is a choice of this design.
module svm_ma_detector
  import fp32_pkg::*;
#(
  parameter int    N_SV        = 55,
  parameter int    N_FEAT      = 2,
  parameter fp32_t A           = FP_IIR_A,
  parameter fp32_t ONE_MINUS_A = FP_IIR_ONE_MINUS_A,
  localparam int   SW = (N_SV > 1) ? $clog2(N_SV) : 1,
  localparam int   AW = $clog2(N_SV * (N_FEAT + 1) + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // raw fNIRS samples, one FP32 value per feature
  input  logic          in_valid,
  output logic          in_ready,
  input  fp32_t         in_sample [N_FEAT],
  // model load port
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  fp32_t         cfg_wdata,
  // classification
  output logic          out_valid,
  output logic          out_artifact,  // 1: motion artifact
  output fp32_t         out_score,     // SVM decision value
  // evaluation against labels
  input  logic          in_label,      // 1: sample is labelled as artifact
  input  logic          err_clear,
  output logic [31:0]   err_total,
  output logic [31:0]   err_errors,
  output logic [31:0]   err_false_alarms,
  output logic [31:0]   err_misses
);

  localparam int VW = 32 * N_FEAT;

  logic          accept, slot_valid, last_slot;
  logic [SW-1:0] slot;

  fp32_t         z      [N_FEAT];
  fp32_t         zs     [N_FEAT];
  fp32_t         sv     [N_FEAT];
  fp32_t         ya, bias, kscale, term, score;
  logic [VW-1:0] zvec;
  logic [VW-1:0] ser_in [N_SV];
  logic [VW-1:0] ser_out;
  fp32_t         terms  [N_SV];
  fp32_t         sum_in [N_SV + 1];
  logic          par_valid, is_artifact;

  oversample_ctrl #(.N_SLOTS(N_SV)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .accept(accept), .slot_valid(slot_valid), .slot(slot), .last_slot(last_slot));

  for (genvar j = 0; j < N_FEAT; j++) begin : g_pre
    fp32_t mean_j, std_j;
    preproc_channel #(.A(A), .ONE_MINUS_A(ONE_MINUS_A)) u_pre (
      .clk(clk), .rst_n(rst_n), .en(accept), .x(in_sample[j]),
      .z(z[j]), .mean(mean_j), .std_dev(std_j));
    assign zvec[32*j +: 32] = z[j];
    assign zs[j]            = ser_out[32*j +: 32];
  end

  for (genvar i = 0; i < N_SV; i++) begin : g_bcast
    assign ser_in[i] = zvec;
  end

  serializer #(.N(N_SV), .W(VW)) u_ser (
    .clk(clk), .rst_n(rst_n), .load(accept), .par_in(ser_in), .sel(slot),
    .ser_out(ser_out));

  coef_store #(.N_SV(N_SV), .N_FEAT(N_FEAT)) u_coef (
    .clk(clk), .rst_n(rst_n), .wr_en(cfg_we), .wr_addr(cfg_addr),
    .wr_data(cfg_wdata), .rd_slot(slot), .sv_out(sv), .ya_out(ya),
    .bias(bias), .kscale(kscale));

  fp32_t dist2, kern;
  serial_kernel #(.N_FEAT(N_FEAT)) u_kern (
    .z(zs), .sv(sv), .ya(ya), .kscale(kscale),
    .dist2(dist2), .kern(kern), .term(term));

  deserializer #(.N(N_SV), .W(32)) u_deser (
    .clk(clk), .rst_n(rst_n), .in_valid(slot_valid), .in_last(last_slot),
    .sel(slot), .din(term), .par_out(terms), .par_valid(par_valid));

  for (genvar i = 0; i < N_SV; i++) begin : g_sum_in
    assign sum_in[i] = terms[i];
  end
  assign sum_in[N_SV] = bias;

  adder_tree #(.N(N_SV + 1)) u_tree (.in(sum_in), .sum(score));

  fp_cmp_gt u_thresh (.a(score), .b(FP_ZERO), .gt(is_artifact));

  // label of the sample in the channel, then of the sample in the tree
  logic label_frame, label_par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      label_frame <= 1'b0;
      label_par   <= 1'b0;
    end else begin
      if (accept)                  label_frame <= in_label;
      if (slot_valid && last_slot) label_par   <= label_frame;
    end
  end

  error_counter #(.CW(32)) u_err (
    .clk(clk), .rst_n(rst_n), .clear(err_clear), .valid(par_valid),
    .predicted(is_artifact), .label(label_par), .total(err_total),
    .errors(err_errors), .false_alarms(err_false_alarms), .misses(err_misses));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_artifact <= 1'b0;
      out_score    <= FP_ZERO;
    end else begin
      out_valid <= par_valid;
      if (par_valid) begin
        out_artifact <= is_artifact;
        out_score    <= score;
      end
    end
  end

endmodule
