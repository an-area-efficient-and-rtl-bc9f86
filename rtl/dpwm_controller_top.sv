// dpwm_controller_top: digital part of a digitally controlled buck converter.
//
// Output-voltage samples from an external ADC pass through a moving-average
// filter, a PI controller turns each averaged sample into a duty ratio, and
// a counter-comparator DPWM turns the duty ratio into the switch signal that
// goes to the MOSFET drivers of the power stage. This chain, and the set-up
// inputs Vref, Kp and KI, follow the converter architecture; the ADC, the
// drivers and the power stage are outside and appear here as ports.
//
// Interface: after reset, hold cfg_* with cfg_valid high until the set-up is
// taken (one clock). adc_valid/adc_data are one ADC sample per strobe. pwm
// is the switch command, high duty_count out of every cfg_cycle clocks.
// Timing: one clock through the filter, 3 or 4 more to a new duty count
// (alternating; cycle_state shows which form of the PI
// update the next sample will use), after which the DPWM applies it from its next period.
module dpwm_controller_top #(
  parameter int unsigned ADC_W    = 12,
  parameter int unsigned GAIN_W   = 16,
  parameter int unsigned D_FRAC   = 16,
  parameter int unsigned CNT_W    = 10,
  parameter int unsigned AVG_LOG2 = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  logic [ADC_W-1:0]  cfg_vref,
  input  logic [GAIN_W-1:0] cfg_kp,
  input  logic [GAIN_W-1:0] cfg_ki,
  input  logic [CNT_W-1:0]  cfg_cycle,
  input  logic              adc_valid,
  input  logic [ADC_W-1:0]  adc_data,
  output logic              pwm,
  output logic              period_start,
  output logic [D_FRAC:0]   duty_ratio,
  output logic [CNT_W-1:0]  duty_count,
  output logic              duty_valid,
  output logic              busy,
  output logic              cycle_state
);

  logic              avg_valid;
  logic [ADC_W-1:0]  avg_data;
  logic [CNT_W-1:0]  cycle;

  averaging_filter #(.DATA_W(ADC_W), .AVG_LOG2(AVG_LOG2)) u_avg (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (adc_valid),
    .in_data  (adc_data),
    .out_valid(avg_valid),
    .out_data (avg_data)
  );

  digital_controller #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .D_FRAC(D_FRAC), .CNT_W(CNT_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_valid  (cfg_valid),
    .cfg_vref   (cfg_vref),
    .cfg_kp     (cfg_kp),
    .cfg_ki     (cfg_ki),
    .cfg_cycle  (cfg_cycle),
    .adc_ready  (avg_valid),
    .vout       (avg_data),
    .duty_ratio (duty_ratio),
    .duty_count (duty_count),
    .duty_valid (duty_valid),
    .cycle      (cycle),
    .busy       (busy),
    .cycle_state(cycle_state)
  );

  dpwm #(.CNT_W(CNT_W)) u_dpwm (
    .clk         (clk),
    .rst_n       (rst_n),
    .cycle       (cycle),
    .duty_count  (duty_count),
    .duty_valid  (duty_valid),
    .pwm         (pwm),
    .period_start(period_start)
  );

endmodule
