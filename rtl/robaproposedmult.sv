// robaproposedmult: RoBA (rounding-based approximate) signed multiplier with a
// Han-Carlson adder.
//
// Each operand is split into sign and magnitude (roba_sign_abs), and each
// magnitude is rounded to its nearest power of two, Ar and Br (rounding2, r1
// and r2). The exact product
//   A*B = (Ar-A)(Br-B) + Ar*B + Br*A - Ar*Br
// is approximated by dropping the first term, whose weight is small:
//   A*B ~= Br*A + Ar*B - Ar*Br.
// All three remaining products have a power-of-two factor, so they are shifts
// (sixteenbitshifting, r3 = Br*A, r5 = Ar*B, r4 = Ar*Br). A Han-Carlson
// prefix adder (r6) adds the first two and a subtractor (r7) removes the
// third. Finally the product sign, the XOR of the operand signs, is applied
// (roba_sign_apply). The algorithm, the block split, the instance names and
// the use of a Han-Carlson adder follow the multiplier's description and RTL
// schematic. The one register stage at the shifter outputs comes from the
// clock pin that the schematic shows on the shifters; the sign flag is
// registered alongside to stay aligned. No reset is needed: every register is
// reloaded on each clock.
//
// Worked example, a = 7, b = 14: Ar = 8, Br = 16, Br*A = 112, Ar*Br = 128,
// Ar*B = 112, Br*A + Ar*B = 224, p = 96 (the exact product is 98).
//
// Range: with N-bit two's complement operands every magnitude is at most
// 2^(N-1), so Ar, Br fit in N bits, each shifted product in 2N-1 bits, their
// sum in 2N bits and the result magnitude below 2^(2N-1): p never overflows.
//
// Interface: a, b are N-bit two's complement operands; p is the 2N-bit two's
// complement approximate product. Timing: p is valid one rising clk edge
// after a and b are applied (latency 1, a new operand pair every clock).
module robaproposedmult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  logic [N-1:0] mag_a, mag_b;   // |A|, |B|
  logic         neg_a, neg_b;
  logic         neg_q;          // product sign, aligned with the shifters
  logic [N-1:0] ar, br;         // rounded magnitudes
  logic [W-1:0] br_a;           // Br*A
  logic [W-1:0] ar_br;          // Ar*Br
  logic [W-1:0] ar_b;           // Ar*B
  logic [W-1:0] sum;            // Br*A + Ar*B
  logic         sum_cout;       // never set: the sum is below 2^(2N)
  logic [W-1:0] diff;           // unsigned approximate product
  logic         diff_cout;      // always set: Ar*Br never exceeds the sum

  roba_sign_abs #(.N(N)) u_abs_a (.x(a), .mag(mag_a), .neg(neg_a));
  roba_sign_abs #(.N(N)) u_abs_b (.x(b), .mag(mag_b), .neg(neg_b));

  rounding2 #(.N(N)) r1 (.a(mag_a), .b(ar));
  rounding2 #(.N(N)) r2 (.a(mag_b), .b(br));

  sixteenbitshifting #(.N(N)) r3 (.clk(clk), .a(mag_a), .b(br), .c(br_a));
  sixteenbitshifting #(.N(N)) r5 (.clk(clk), .a(ar),    .b(mag_b), .c(ar_b));
  sixteenbitshifting #(.N(N)) r4 (.clk(clk), .a(ar),    .b(br), .c(ar_br));

  always_ff @(posedge clk) begin
    neg_q <= neg_a ^ neg_b;
  end

  han_carlson_adder #(.WIDTH(W)) r6 (
    .a(br_a), .b(ar_b), .cin(1'b0), .sum(sum), .cout(sum_cout)
  );

  sub16bit #(.WIDTH(W)) r7 (
    .A(sum), .B(ar_br), .C_in(1'b1), .Sum_out(diff), .C_out(diff_cout)
  );

  roba_sign_apply #(.WIDTH(W)) u_sign (.mag(diff), .neg(neg_q), .y(p));

endmodule
