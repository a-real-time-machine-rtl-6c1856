// tb_svm_ma_detector: end-to-end test of the detector at its default size
// (55 support vectors, 2 features, a = 0.01).
//
// A random RBF model is written through the configuration port, then two
// synthetic fNIRS feature streams (slow oscillation plus noise, with bursts of
// large offsets imitating motion artifacts) are streamed in. A testbench
// model repeats every FP32 step of the design (running statistics,
// normalisation, kernel terms, pairwise adder tree, threshold) and predicts
// decision value and class for each sample. Checked per sample: the decision
// value (within a small tolerance, since the exponential may differ from the
// model by one unit in the last place), the class when the decision value is
// not within that tolerance of zero, and the latency of N_SV + 1 cycles from
// acceptance to out_valid. Also checked: back-to-back samples are accepted
// exactly N_SV cycles apart. Counted, and required at least once each:
// stalls (a sample offered while a frame runs), back-to-back acceptance,
// both classes, the zero-variance guard of the pre-processing, and a model
// reload between samples.
module tb_svm_ma_detector;
  import tb_fp_pkg::*;
  localparam int NS = 55, NF = 2;
  localparam int NW = NS * (NF + 1) + 2;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_sample [NF];
  logic        cfg_we = 0;
  logic [7:0]  cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic        out_valid, out_artifact;
  logic [31:0] out_score;
  logic        in_label = 0, err_clear = 0;
  logic [31:0] err_total, err_errors, err_fa, err_miss;
  int          r_total = 0, r_err = 0, r_fa = 0, r_miss = 0;
  logic        exp_label [$];

  svm_ma_detector dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_sample(in_sample), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .out_valid(out_valid), .out_artifact(out_artifact), .out_score(out_score),
    .in_label(in_label), .err_clear(err_clear), .err_total(err_total), .err_errors(err_errors),
    .err_false_alarms(err_fa), .err_misses(err_miss));

  always #5 clk = ~clk;

  // model state
  logic [31:0] mdl [NW];
  logic [31:0] m_state [NF], q_state [NF];
  real         exp_score [$];
  real         exp_mag [$];
  logic        exp_class [$];
  int          exp_cycle [$];

  int checks = 0, failures = 0, cycle = 0;  // cycle: edge index, $time / 10
  int n_stall = 0, n_b2b = 0, n_art = 0, n_clean = 0, n_guard = 0, n_reload = 0, n_out = 0;
  int last_accept = -1;

  function automatic logic [31:0] iir(logic [31:0] xi, logic [31:0] s);
    return r2f(f2r(r2f(f2r(32'h3C23_D70A) * f2r(xi))) +
               f2r(r2f(f2r(32'h3F7D_70A4) * f2r(s))));
  endfunction

  // Predicts decision value for one accepted sample and advances the model's
  // filter state, as the design does on acceptance.
  task automatic predict(logic [31:0] xs [NF]);
    logic [31:0] zz [NF];
    logic [31:0] node [128];
    real mag;
    mag = 0.0;
    for (int j = 0; j < NF; j++) begin
      logic [31:0] mu, msq, v, sd;
      mu  = iir(xs[j], m_state[j]);
      msq = iir(r2f(f2r(xs[j]) * f2r(xs[j])), q_state[j]);
      v   = r2f(f2r(msq) - f2r(r2f(f2r(mu) * f2r(mu))));
      if (v[31] == 1'b0 && v[30:23] != 0) begin
        sd = r2f($sqrt(f2r(v)));
        zz[j] = r2f(f2r(r2f(f2r(xs[j]) - f2r(mu))) / f2r(sd));
      end else begin
        zz[j] = 0;
        n_guard++;
      end
      m_state[j] = mu;
      q_state[j] = msq;
    end
    for (int i = 0; i < 64; i++) begin
      if (i < NS) begin
        logic [31:0] d2, kv;
        d2 = 0;
        for (int j = 0; j < NF; j++) begin
          logic [31:0] df, sq;
          df = r2f(f2r(zz[j]) - f2r(mdl[i*NF + j]));
          sq = r2f(f2r(df) * f2r(df));
          d2 = (j == 0) ? sq : r2f(f2r(d2) + f2r(sq));
        end
        kv = r2f($exp(f2r(r2f(f2r(mdl[NW-1]) * f2r(d2)))));
        node[64 + i] = r2f(f2r(mdl[NS*NF + i]) * f2r(kv));
      end else if (i == NS) begin
        node[64 + i] = mdl[NS*(NF+1)];
      end else begin
        node[64 + i] = 0;
      end
      mag += (f2r(node[64 + i]) < 0.0) ? -f2r(node[64 + i]) : f2r(node[64 + i]);
    end
    for (int i = 63; i >= 1; i--) node[i] = r2f(f2r(node[2*i]) + f2r(node[2*i+1]));
    exp_score.push_back(f2r(node[1]));
    exp_mag.push_back(mag);
    exp_class.push_back(f2r(node[1]) > 0.0);
  endtask

  task automatic load_model(int seed_shift);
    for (int k = 0; k < NW; k++) begin
      logic [31:0] w;
      // support vectors 0..27 sit near the origin of the normalised space
      // (clean signal, negative weight); 28..54 sit where an artifact burst
      // pushes feature 0 up and feature 1 down (positive weight)
      if (k < NS * NF) begin
        if (k / NF < 28)  w = r2f(($urandom_range(1000) - 500) / 1000.0);
        else if (k % NF == 0) w = r2f(1.0 + $urandom_range(3000) / 1000.0);
        else              w = r2f(-1.0 - $urandom_range(3000) / 1000.0);
      end else if (k < NS * (NF + 1)) begin
        w = r2f(((k - NS * NF < 28) ? -1.0 : 1.0) * (0.5 + $urandom_range(1000) / 100.0));
      end else if (k == NS * (NF + 1)) begin
        w = r2f(-0.5 + seed_shift * 0.25);
      end else begin
        w = r2f(-0.8);
      end
      @(negedge clk);
      cfg_we = 1; cfg_addr = 8'(k); cfg_wdata = w;
      mdl[k] = w;
    end
    @(negedge clk);
    cfg_we = 0;
    n_reload++;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real want, tol;
      n_out++;
      if (exp_score.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        want = exp_score.pop_front();
        tol  = 1e-5 * exp_mag.pop_front() + 1e-30;
        checks++;
        if (f2r(out_score) - want > tol || want - f2r(out_score) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL score %f want %f", f2r(out_score), want);
        end
        if (want > tol || want < -tol) begin
          checks++;
          if (out_artifact !== exp_class[0]) begin
            failures++;
            if (failures < 10) $display("FAIL class %b want %b", out_artifact, exp_class[0]);
          end
        end
        if (exp_class[0]) n_art++; else n_clean++;
        // the design's own classification is scored against the label
        r_total++;
        if (out_artifact != exp_label[0]) r_err++;
        if (out_artifact && !exp_label[0]) r_fa++;
        if (!out_artifact && exp_label[0]) r_miss++;
        void'(exp_label.pop_front());
        void'(exp_class.pop_front());
        checks++;
        // out_valid rises at edge E + N_SV + 1 (E: accepting edge), so it is
        // sampled here at edge E + N_SV + 2
        if (int'($time / 10) - exp_cycle[0] != NS + 2) begin
          failures++;
          $display("FAIL latency %0d cycles", int'($time / 10) - exp_cycle[0]);
        end
        void'(exp_cycle.pop_front());
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int idx, bit artifact_burst);
    logic [31:0] xs [NF];
    for (int j = 0; j < NF; j++) begin
      real v;
      v = (idx == 0) ? 0.0 :
          1.0 + 0.2 * j + 0.1 * $sin(idx * 0.07 + j) + ($urandom_range(1000) - 500) / 20000.0;
      if (artifact_burst) v = v + ((j == 0) ? 3.0 : -2.0) * ($urandom_range(100) / 100.0 + 0.5);
      xs[j] = r2f(v);
    end
    @(negedge clk);
    in_sample = xs;
    in_label  = artifact_burst;
    in_valid  = 1;
    #1;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    // accepted at this edge
    cycle = int'($time / 10);
    checks++;
    if (last_accept >= 0 && cycle - last_accept < NS) begin
      failures++;
      $display("FAIL accepted %0d cycles after previous", cycle - last_accept);
    end
    if (last_accept >= 0 && cycle - last_accept == NS) n_b2b++;
    last_accept = cycle;
    predict(xs);
    exp_cycle.push_back(cycle);
    exp_label.push_back(artifact_burst);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int j = 0; j < NF; j++) begin m_state[j] = 0; q_state[j] = 0; end
    in_sample[0] = 0; in_sample[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_model(0);
    for (int n = 0; n < 300; n++) begin
      if (n == 150) begin
        repeat (NS + 5) @(negedge clk);   // let the pipeline drain
        load_model(1);
      end
      send(n, (n > 40) && ((n / 20) % 3 == 0));
      if (n % 17 == 5) repeat ($urandom_range(80)) @(negedge clk);
    end
    repeat (NS + 10) @(negedge clk);
    checks++;
    if (exp_score.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_score.size()); end
    $display("outputs %0d artifact %0d clean %0d stalls %0d back-to-back %0d guard %0d reloads %0d",
             n_out, n_art, n_clean, n_stall, n_b2b, n_guard, n_reload);
    checks += 4;
    if (int'(err_total) != r_total || int'(err_errors) != r_err ||
        int'(err_fa) != r_fa || int'(err_miss) != r_miss) begin
      failures++;
      $display("FAIL error counter %0d/%0d/%0d/%0d want %0d/%0d/%0d/%0d", err_total, err_errors,
               err_fa, err_miss, r_total, r_err, r_fa, r_miss);
    end
    $display("labelled accuracy on synthetic stream: %0d of %0d correct", r_total - r_err, r_total);
    @(negedge clk);
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    if (err_total != 0 || err_errors != 0) begin
      failures++;
      $display("FAIL error counter clear");
    end
    checks += 6;
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back"); end
    if (n_art == 0)    begin failures++; $display("FAIL no artifact class"); end
    if (n_clean == 0)  begin failures++; $display("FAIL no clean class"); end
    if (n_guard == 0)  begin failures++; $display("FAIL zero-variance guard never used"); end
    if (n_reload < 2)  begin failures++; $display("FAIL no model reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
