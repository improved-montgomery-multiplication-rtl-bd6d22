// rmm_digit_mul: one d x d -> 2d bit unsigned digit multiplier.
//
// The RMM splits every n-bit operand into k digits of d bits and builds all
// of its products from m copies of this unit, one digit product per unit and
// clock cycle. The unit is purely combinational: its product is added into
// an accumulator register in the same cycle, as the published RMM(2,1) and
// RMM(2,2) schedules show (a digit product issued in cycle c is part of the
// accumulated value seen in cycle c+1). How the multiplier is built inside
// is left to synthesis; that choice is this design's own.
module rmm_digit_mul #(
  parameter int unsigned D = 64        // digit width in bits
) (
  input  logic [D-1:0]   x,
  input  logic [D-1:0]   y,
  output logic [2*D-1:0] p
);

  always_comb p = (2*D)'(x) * (2*D)'(y);

endmodule
