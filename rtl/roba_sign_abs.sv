// roba_sign_abs: sign and absolute value of one two's complement operand.
//
// The RoBA multiplier works on magnitudes: the nearest power of two of a
// negative number is not a power of two in two's complement, so each operand
// is first split into a sign flag and its absolute value, and the sign of the
// product is put back at the end (roba_sign_apply). Splitting the operands
// this way follows the multiplier's description; the circuit, a conditional
// two's complement negation, is the simplest one that does it.
//
// Interface: x is an N-bit two's complement number; mag is |x| as an N-bit
// unsigned number (the most negative value -2^(N-1) gives 2^(N-1), which
// still fits in N unsigned bits); neg is the sign bit of x.
// Timing: purely combinational.
module roba_sign_abs #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] mag,
  output logic         neg
);

  always_comb begin
    neg = x[N-1];
    mag = neg ? (~x + N'(1)) : x;
  end

endmodule
