// sub16bit: WIDTH-bit subtractor, the last arithmetic stage of the RoBA
// multiplier, forming (Br*A + Ar*B) - Ar*Br.
//
// It adds A to the one's complement of B with C_in as carry in, so C_in = 1
// gives A - B. The addition is a ripple of full adders, each bit using
//   s_i = a_i ^ b_i ^ c_(i-1),   c_i = a_i b_i + a_i c_(i-1) + b_i c_(i-1).
// The multiplier names only a subtractor; its port names follow the RTL
// schematic, while the ripple-carry structure is this design's simplest
// choice.
//
// Interface: A, B WIDTH bits, C_in carry in (1 for a plain difference),
// Sum_out = A + ~B + C_in modulo 2^WIDTH, C_out the carry out (1 when there
// is no borrow). Timing: purely combinational.
module sub16bit #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             C_in,
  output logic [WIDTH-1:0] Sum_out,
  output logic             C_out
);

  logic [WIDTH-1:0] bn;
  logic [WIDTH:0]   c;

  assign bn   = ~B;
  assign c[0] = C_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign Sum_out[i] = A[i] ^ bn[i] ^ c[i];
    assign c[i+1]     = (A[i] & bn[i]) | (A[i] & c[i]) | (bn[i] & c[i]);
  end

  assign C_out = c[WIDTH];

endmodule
