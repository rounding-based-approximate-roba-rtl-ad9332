// roba_sign_apply: puts the product sign back on the unsigned RoBA result.
//
// The multiplier computes the approximate product of the two magnitudes; the
// last stage turns it into a two's complement number, negating it when
// exactly one operand was negative. That the sign is applied at the last
// stage follows the multiplier's description; the conditional negation
// (invert and add one) is this design's own, simplest, choice.
//
// Interface: mag is the WIDTH-bit unsigned result, neg says the result is
// negative, y is the WIDTH-bit two's complement result.
// Timing: purely combinational.
module roba_sign_apply #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] mag,
  input  logic             neg,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = neg ? (~mag + WIDTH'(1)) : mag;
  end

endmodule
