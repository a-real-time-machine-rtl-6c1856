// error_counter: scores the detector against labelled data by counting
// classified samples and misclassifications (predicted class != label),
// split into false alarms (artifact reported on clean signal) and misses
// (artifact not reported). Accuracy = 1 - errors / total.
//
// Each cycle with valid = 1 one classification and its label are counted.
// clear = 1 zeroes all counters synchronously (it wins over valid).
// Counters saturate at their maximum instead of wrapping. The source design
// scores its models with an error counter; the counter widths, the split into
// false alarms and misses, and saturation are choices here.
module error_counter #(
  parameter int CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          valid,
  input  logic          predicted,     // 1: artifact reported
  input  logic          label,         // 1: artifact present
  output logic [CW-1:0] total,
  output logic [CW-1:0] errors,
  output logic [CW-1:0] false_alarms,
  output logic [CW-1:0] misses
);

  function automatic logic [CW-1:0] sat_inc(logic [CW-1:0] v);
    return (&v) ? v : v + CW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total <= '0; errors <= '0; false_alarms <= '0; misses <= '0;
    end else if (clear) begin
      total <= '0; errors <= '0; false_alarms <= '0; misses <= '0;
    end else if (valid) begin
      total <= sat_inc(total);
      if (predicted != label) errors <= sat_inc(errors);
      if (predicted && !label) false_alarms <= sat_inc(false_alarms);
      if (!predicted && label) misses <= sat_inc(misses);
    end
  end

endmodule
