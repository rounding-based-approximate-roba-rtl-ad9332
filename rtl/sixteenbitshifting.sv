// sixteenbitshifting: multiplies an operand by a power of two by shifting.
//
// The RoBA multiplier replaces its three products Br*A, Ar*B and Ar*Br by
// shifts, because Ar and Br are powers of two. Here the power of two b arrives
// one-hot (the output of rounding2), so each bit b[i] selects the copy of a
// shifted left by i and the selected copies are ORed together: a one-level
// shifter steered directly by the one-hot amount, with no encoder. If b is
// zero the product is zero. The result is registered on the rising edge of
// clk.
//
// The block's name, its ports and its clock pin follow the multiplier's RTL
// schematic; the one-hot steering and the output register are this design's
// reading of it.
//
// Interface: a is N bits unsigned, b is N bits one-hot or zero, c = a*b is
// 2*N bits. Timing: c is valid one clock after a and b; no reset, since the
// register is reloaded every cycle.
module sixteenbitshifting #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);

  logic [2*N-1:0] shifted;

  always_comb begin
    shifted = '0;
    for (int i = 0; i < N; i++) begin
      if (b[i]) shifted = shifted | ((2*N)'(a) << i);
    end
  end

  always_ff @(posedge clk) begin
    c <= shifted;
  end

endmodule
