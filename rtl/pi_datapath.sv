// pi_datapath: registers, multiplexers and adders of the incremental PI law.
//
// The controller updates the duty ratio once per averaged ADC sample with
//   D(k) = D(k-1) + Kp*(Vout(k-1) - Vout(k)) + KI*(Vref - Vout(k)).
// It uses one multiplier for all products and computes the update in two
// alternating ways, selected by the control unit's state:
//   form A (Cycle_state 0): MULTI_KI  stores KI*e(k), e(k) = Vref - Vout(k);
//                           MULTI_KP  D(k)   = D(k-1) + Kp*(Vout(k-1)-Vout(k)) + KI*e(k)
//   form B (Cycle_state 1): MULTI_KI_KP
//                           D(k+1) = D(k) + (Kp+KI)*(Vout(k)-Vout(k+1)) + KI*e(k)
// Form B reuses KI*e(k) stored by form A in the previous sample, so it needs
// one product fewer; algebraically both give the same D. In MULTI_DUTY the
// multiplier forms D*Cycle, and its integer part (>> D_FRAC) is the DPWM
// on-time in counter clocks.
//
// Number formats (this design's choice): Vout and Vref are unsigned ADC
// codes; Kp, KI are unsigned integers in units of one D LSB per ADC LSB; D is
// unsigned with D_FRAC fraction bits, 2**D_FRAC being 100 %. Each new D is
// clamped to [0, 2**D_FRAC] after the full-width sum, so the clamp cannot
// make the two forms differ. init (one clock, from Initialize Setup) sets
// D = 0, the stored KI*e = 0 and Vout(k-1) = Vref, i.e. e(k-1) = 0.
//
// Timing: vout_in is captured when sample_load is high (the clock that
// leaves WAIT_MULTI). D is written at the end of MULTI_KP or MULTI_KI_KP;
// duty_count is written at the end of MULTI_DUTY, with duty_valid high for
// the following clock.
module pi_datapath
  import pi_pkg::*;
#(
  parameter int unsigned ADC_W  = 12,
  parameter int unsigned GAIN_W = 16,
  parameter int unsigned D_FRAC = 16,
  parameter int unsigned CNT_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  state_e            state,
  input  logic              init,
  input  logic [ADC_W-1:0]  init_vref,
  input  logic              sample_load,
  input  logic [ADC_W-1:0]  vout_in,
  input  logic [ADC_W-1:0]  vref,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  input  logic [GAIN_W:0]   kpki,
  input  logic [CNT_W-1:0]  cycle,
  output logic [D_FRAC:0]   duty_ratio,
  output logic [CNT_W-1:0]  duty_count,
  output logic              duty_valid
);

  // Multiplier operand widths: gains (up to GAIN_W+1 bits) or D (D_FRAC+1
  // bits) on a, both unsigned plus a sign bit; voltage differences (ADC_W+1
  // signed) or Cycle (CNT_W unsigned plus a sign bit) on b.
  localparam int unsigned A_W   = ((GAIN_W > D_FRAC) ? GAIN_W : D_FRAC) + 2;
  localparam int unsigned B_W   = ((ADC_W > CNT_W) ? ADC_W : CNT_W) + 1;
  localparam int unsigned P_W   = A_W + B_W;
  localparam int unsigned SUM_W = P_W + 2;
  localparam logic signed [SUM_W-1:0] D_MAX = SUM_W'(1) <<< D_FRAC;

  logic        [ADC_W-1:0] v_cur;    // Vout(k)
  logic        [ADC_W-1:0] v_prev;   // Vout(k-1)
  logic signed [P_W-1:0]   kie;      // KI * e, stored for the next sample
  logic        [D_FRAC:0]  d;        // D(k)

  logic signed [A_W-1:0]   mul_a;
  logic signed [B_W-1:0]   mul_b;
  logic signed [P_W-1:0]   prod;
  logic signed [ADC_W:0]   err;      // Vref - Vout(k)
  logic signed [ADC_W:0]   dv;       // Vout(k-1) - Vout(k)
  logic signed [SUM_W-1:0] d_sum;
  logic        [D_FRAC:0]  d_clamped;

  assign err = $signed({1'b0, vref}) - $signed({1'b0, v_cur});
  assign dv  = $signed({1'b0, v_prev}) - $signed({1'b0, v_cur});

  // Operand multiplexers.
  always_comb begin
    mul_a = '0;
    mul_b = '0;
    unique case (state)
      ST_MULTI_KI: begin
        mul_a = $signed(A_W'(ki));
        mul_b = B_W'(err);
      end
      ST_MULTI_KP: begin
        mul_a = $signed(A_W'(kp));
        mul_b = B_W'(dv);
      end
      ST_MULTI_KIKP: begin
        mul_a = $signed(A_W'(kpki));
        mul_b = B_W'(dv);
      end
      ST_MULTI_DUTY: begin
        mul_a = $signed(A_W'(d));
        mul_b = $signed(B_W'(cycle));
      end
      default: ;
    endcase
  end

  shared_multiplier #(.A_W(A_W), .B_W(B_W)) u_mult (
    .a(mul_a),
    .b(mul_b),
    .p(prod)
  );

  // Duty-ratio adder and clamp.
  always_comb begin
    d_sum = $signed(SUM_W'(d)) + SUM_W'(prod) + SUM_W'(kie);
    if (d_sum < 0)          d_clamped = '0;
    else if (d_sum > D_MAX) d_clamped = (D_FRAC+1)'(D_MAX);
    else                    d_clamped = d_sum[D_FRAC:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_cur      <= '0;
      v_prev     <= '0;
      kie        <= '0;
      d          <= '0;
      duty_count <= '0;
      duty_valid <= 1'b0;
    end else begin
      duty_valid <= 1'b0;
      if (init) begin
        v_prev <= init_vref;
        kie    <= '0;
        d      <= '0;
      end
      if (sample_load) v_cur <= vout_in;
      unique case (state)
        ST_MULTI_KI:   kie <= prod;
        ST_MULTI_KP,
        ST_MULTI_KIKP: d   <= d_clamped;
        ST_MULTI_DUTY: begin
          duty_count <= CNT_W'(prod >>> D_FRAC);
          duty_valid <= 1'b1;
          v_prev     <= v_cur;
        end
        default: ;
      endcase
    end
  end

  assign duty_ratio = d;

endmodule
