// rounding2: rounds an unsigned magnitude to the nearest power of two.
//
// This is the rounding block of the RoBA multiplier. For a value whose leading
// one is at bit k, the two candidate powers are 2^k and 2^(k+1), and the
// midpoint between them is 3*2^(k-1): the value rounds up exactly when bit
// k-1 is set. A value on the midpoint (3*2^(p-2)) goes to the larger power,
// except the value 3, which goes to 2; those tie rules are the multiplier's
// own. Zero gives zero. Each output bit is one term of a sum of products:
//   b[j] = (nothing above bit j is set) & ( a[j] & ~a[j-1]
//                                         | ~a[j] & a[j-1] & a[j-2] )
// with the second term left out for j = 2 (so that 3 rounds to 2), and
// b[1] = (nothing above bit 1) & a[1], b[0] = (nothing above bit 0) & a[0].
// The per-bit equations are this design's own derivation from the rounding
// rule.
//
// Interface: a is an N-bit unsigned magnitude at most 2^(N-1), as produced by
// roba_sign_abs from an N-bit two's complement number; b is the rounded value,
// one-hot, or zero when a is zero. With that input range the result always
// fits in N bits. Timing: purely combinational.
module rounding2 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] b
);

  // none_above[j]: no bit of a above bit j is set.
  logic [N-1:0] none_above;

  always_comb begin
    none_above[N-1] = 1'b1;
    for (int j = N - 2; j >= 0; j--) begin
      none_above[j] = none_above[j+1] & ~a[j+1];
    end
  end

  always_comb begin
    b[0] = none_above[0] & a[0];
    b[1] = none_above[1] & a[1];
    b[2] = none_above[2] & a[2] & ~a[1];
    for (int j = 3; j < N; j++) begin
      b[j] = none_above[j] & ((a[j] & ~a[j-1]) | (~a[j] & a[j-1] & a[j-2]));
    end
  end

endmodule
