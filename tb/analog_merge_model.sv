// analog_merge_model: behavioural model of the analog tap-merging front end,
// for simulation only: one analog switch per tap, enabled by its tap_en,
// with the switch outputs tied together and sampled by an ADC. An enabled
// switch passes its tap's level; a disabled one contributes nothing. The
// ADC latches the merged level on each sample strobe (ideal, no
// quantization). `conflict` counts clocks with more than one switch on.
module analog_merge_model #(
  parameter int unsigned NTAPS = 2
) (
  input  logic             clk,
  input  logic [NTAPS-1:0] tap_en,
  input  int               tap_video [NTAPS],
  input  logic             adc_sample,
  output int               merged,
  output int               adc_value,
  output logic             adc_valid,
  output int               conflict
);

  initial begin
    conflict = 0; adc_valid = 0; adc_value = 0;
  end

  always_comb begin
    merged = 0;
    for (int t = 0; t < NTAPS; t++) if (tap_en[t]) merged += tap_video[t];
  end

  always @(posedge clk) begin
    adc_valid <= adc_sample;
    if (adc_sample) adc_value <= merged;
    if ($countones(tap_en) > 1) conflict++;
  end

endmodule
