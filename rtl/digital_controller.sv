// digital_controller: programmable digital PI controller with one shared multiplier.
//
// Computes the switch duty ratio D(k) from each averaged output-voltage
// sample. The control unit (control_fsm plus instruction_register) loads the
// set-up Vref, Kp, KI and Cycle, waits for adc_ready and then steps the
// datapath (pi_datapath) through three or two multiplications, alternating
// between the two equivalent forms of the incremental PI law from sample to
// sample. The result is given both as D(k) (unsigned, 2**D_FRAC = 100 %) and
// as the DPWM on-time in counter clocks, D(k)*Cycle.
//
// Interface: hold cfg_* stable with cfg_valid high after reset until the
// set-up is taken (one clock in Initialize Setup). adc_ready is a one-clock
// strobe with vout valid; it is accepted only while busy is low.
// Timing: duty_valid pulses 4 clocks after an accepted adc_ready on form A
// samples (even samples, counting from 0) and 3 clocks after on form B
// samples. A new set-up requires a reset.
//
// The control unit with its instruction register, the two alternating forms
// and the single multiplier follow the controller's published structure; the
// cfg_valid handshake, the clock counts and the reset behaviour are this
// design's own.
module digital_controller
  import pi_pkg::*;
#(
  parameter int unsigned ADC_W  = 12,
  parameter int unsigned GAIN_W = 16,
  parameter int unsigned D_FRAC = 16,
  parameter int unsigned CNT_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  logic [ADC_W-1:0]  cfg_vref,
  input  logic [GAIN_W-1:0] cfg_kp,
  input  logic [GAIN_W-1:0] cfg_ki,
  input  logic [CNT_W-1:0]  cfg_cycle,
  input  logic              adc_ready,
  input  logic [ADC_W-1:0]  vout,
  output logic [D_FRAC:0]   duty_ratio,
  output logic [CNT_W-1:0]  duty_count,
  output logic              duty_valid,
  output logic [CNT_W-1:0]  cycle,
  output logic              busy,
  output logic              cycle_state
);

  state_e              state;
  logic                cfg_load;
  logic                sample_load;
  logic [ADC_W-1:0]    vref;
  logic [GAIN_W-1:0]   kp;
  logic [GAIN_W-1:0]   ki;
  logic [GAIN_W:0]     kpki;

  control_fsm u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_valid  (cfg_valid),
    .adc_ready  (adc_ready),
    .state      (state),
    .cfg_load   (cfg_load),
    .sample_load(sample_load),
    .cycle_state(cycle_state)
  );

  instruction_register #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .CNT_W(CNT_W)) u_ir (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (cfg_load),
    .cfg_vref (cfg_vref),
    .cfg_kp   (cfg_kp),
    .cfg_ki   (cfg_ki),
    .cfg_cycle(cfg_cycle),
    .vref     (vref),
    .kp       (kp),
    .ki       (ki),
    .kpki     (kpki),
    .cycle    (cycle)
  );

  pi_datapath #(.ADC_W(ADC_W), .GAIN_W(GAIN_W), .D_FRAC(D_FRAC), .CNT_W(CNT_W)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .state      (state),
    .init       (cfg_load),
    .init_vref  (cfg_vref),
    .sample_load(sample_load),
    .vout_in    (vout),
    .vref       (vref),
    .kp         (kp),
    .ki         (ki),
    .kpki       (kpki),
    .cycle      (cycle),
    .duty_ratio (duty_ratio),
    .duty_count (duty_count),
    .duty_valid (duty_valid)
  );

  assign busy = (state != ST_WAIT_MULTI);

endmodule
