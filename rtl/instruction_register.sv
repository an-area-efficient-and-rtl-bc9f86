// instruction_register: configuration register of the PI controller's control unit.
//
// Holds the set-up of the controller: the digital voltage reference Vref,
// the proportional gain Kp, the integral gain KI and Cycle, the number of
// DPWM counter clocks in one switching period. It is written while the
// control unit is in Initialize Setup (load = 1) and is constant afterwards.
// At load it also forms Kp + KI, the gain sum that the second form of the
// control law multiplies by, so that this constant addition is done once per
// set-up rather than once per sample. Outputs are registered and valid from
// the clock after load.
//
// The register's existence and the Vref/Kp/KI contents come from the control
// unit's description; storing Cycle and Kp + KI here is this design's choice.
module instruction_register #(
  parameter int unsigned ADC_W  = 12,
  parameter int unsigned GAIN_W = 16,
  parameter int unsigned CNT_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADC_W-1:0]  cfg_vref,
  input  logic [GAIN_W-1:0] cfg_kp,
  input  logic [GAIN_W-1:0] cfg_ki,
  input  logic [CNT_W-1:0]  cfg_cycle,
  output logic [ADC_W-1:0]  vref,
  output logic [GAIN_W-1:0] kp,
  output logic [GAIN_W-1:0] ki,
  output logic [GAIN_W:0]   kpki,
  output logic [CNT_W-1:0]  cycle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vref  <= '0;
      kp    <= '0;
      ki    <= '0;
      kpki  <= '0;
      cycle <= '0;
    end else if (load) begin
      vref  <= cfg_vref;
      kp    <= cfg_kp;
      ki    <= cfg_ki;
      kpki  <= {1'b0, cfg_kp} + {1'b0, cfg_ki};
      cycle <= cfg_cycle;
    end
  end

endmodule
