// control_fsm: six-state Mealy state machine that sequences the shared multiplier.
//
// After reset the machine sits in Initialize Setup until cfg_valid is high;
// it then pulses cfg_load (the instruction register captures Vref, Kp, KI,
// Cycle) and goes to WAIT_MULTI. There it waits for adc_ready. On adc_ready
// it pulses sample_load in the same clock (the Mealy output: the datapath
// captures Vout) and starts one of two multiplication sequences, chosen by
// the Cycle_state register:
//
//   Cycle_state = 0: MULTI_KI -> MULTI_KP -> MULTI_DUTY   (3 products)
//   Cycle_state = 1: MULTI_KI_KP -> MULTI_DUTY            (2 products)
//
// MULTI_DUTY returns to WAIT_MULTI and toggles Cycle_state, so the two
// sequences alternate from sample to sample, starting with Cycle_state = 0.
// Each state lasts one clock. The states, their arcs and the alternation
// follow the state diagram of the controller; one clock per state, the
// cfg_valid handshake and the reset behaviour are this design's choices.
// An adc_ready seen outside WAIT_MULTI is ignored.
module control_fsm
  import pi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cfg_valid,
  input  logic   adc_ready,
  output state_e state,
  output logic   cfg_load,
  output logic   sample_load,
  output logic   cycle_state
);

  state_e state_next;

  always_comb begin
    state_next  = state;
    cfg_load    = 1'b0;
    sample_load = 1'b0;
    unique case (state)
      ST_INIT: begin
        if (cfg_valid) begin
          cfg_load   = 1'b1;
          state_next = ST_WAIT_MULTI;
        end
      end
      ST_WAIT_MULTI: begin
        if (adc_ready) begin
          sample_load = 1'b1;
          state_next  = cycle_state ? ST_MULTI_KIKP : ST_MULTI_KI;
        end
      end
      ST_MULTI_KI:   state_next = ST_MULTI_KP;
      ST_MULTI_KP:   state_next = ST_MULTI_DUTY;
      ST_MULTI_KIKP: state_next = ST_MULTI_DUTY;
      ST_MULTI_DUTY: state_next = ST_WAIT_MULTI;
      default:       state_next = ST_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_INIT;
      cycle_state <= 1'b0;
    end else begin
      state <= state_next;
      if (state == ST_INIT)       cycle_state <= 1'b0;
      if (state == ST_MULTI_DUTY) cycle_state <= ~cycle_state;
    end
  end

endmodule
