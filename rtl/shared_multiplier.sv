// shared_multiplier: the single signed multiplier of the PI controller.
//
// Every product of the control law (KI*e, Kp*dV, (Kp+KI)*dV and D*Cycle) is
// computed here, one per clock, with the operands chosen by the datapath's
// multiplexers under the control unit. Reusing one multiplier instead of one
// per product is the central area saving of the design. The multiplier is
// combinational: p = a * b settles within the clock period in which the
// operands are presented; the caller registers the result. Both operands are
// two's complement; the product is exact (A_W + B_W bits). The structure of
// the multiplier is left to synthesis.
module shared_multiplier #(
  parameter int unsigned A_W = 18,
  parameter int unsigned B_W = 13
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb begin
    p = (A_W+B_W)'(a) * (A_W+B_W)'(b);
  end

endmodule
