// han_carlson_adder: WIDTH-bit Han-Carlson parallel-prefix adder.
//
// The adder works in three phases. Pre-processing forms, for every bit, the
// generate g = a & b and propagate p = a ^ b; the carry in is folded into bit
// 0's generate. The prefix tree then merges (g, p) pairs with the prefix
// operator (roba_pkg::prefix_op) in the Han-Carlson pattern, for WIDTH = 16:
//   stage 1        : every odd bit i merges with bit i-1;
//   stages 2..L    : a Kogge-Stone tree over the odd bits only, bit i merging
//                    with bit i-2, i-4, i-8, ... (L = log2(WIDTH));
//   last stage     : every even bit i >= 2 merges with odd bit i-1.
// That is log2(WIDTH)+1 stages, with half the cells of a Kogge-Stone tree.
// Post-processing gives c[i] = g[i:0] (carry out of bit i) and
// sum[i] = p[i] ^ c[i-1], with sum[0] = p[0] ^ cin.
// The equations and the 16-bit topology follow the adder's description; the
// folding of the carry in into bit 0 is this design's own choice.
//
// Interface: a, b WIDTH bits, cin, sum WIDTH bits, cout the carry out of the
// top bit. WIDTH must be a power of two, at least 2.
// Timing: purely combinational.
module han_carlson_adder
  import roba_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned L = $clog2(WIDTH);

  // Stage s holds, for every bit i, the group (g, p) reached at bit i after
  // that stage: s = 0 is pre-processing, 1..L the odd-bit tree, L+1 the
  // even-bit fix-up. Each stage is a generate block of its own.
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] c;

  for (genvar s = 0; s <= L + 1; s++) begin : g_stage
    gp_t v [WIDTH];
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (s == 0) begin : g_pre
        // Pre-processing; the carry in is folded into bit 0.
        if (i == 0) begin : g_bit0
          assign v[i].g = (a[i] & b[i]) | (p[i] & cin);
        end else begin : g_bitn
          assign v[i].g = a[i] & b[i];
        end
        assign v[i].p = p[i];
      end else if (s == 1) begin : g_s1
        // Odd bits merge with their even neighbour below.
        if (i % 2 == 1) begin : g_black
          assign v[i] = prefix_op(g_stage[s-1].v[i], g_stage[s-1].v[i-1]);
        end else begin : g_pass
          assign v[i] = g_stage[s-1].v[i];
        end
      end else if (s <= L) begin : g_ks
        // Kogge-Stone over the odd bits, span 2^(s-1).
        if ((i % 2 == 1) && (i >= (1 << (s - 1)))) begin : g_black
          assign v[i] = prefix_op(g_stage[s-1].v[i], g_stage[s-1].v[i - (1 << (s - 1))]);
        end else begin : g_pass
          assign v[i] = g_stage[s-1].v[i];
        end
      end else begin : g_last
        // Even bits above bit 0 take the prefix of the odd bit below.
        if ((i % 2 == 0) && (i >= 2)) begin : g_black
          assign v[i] = prefix_op(g_stage[s-1].v[i], g_stage[s-1].v[i-1]);
        end else begin : g_pass
          assign v[i] = g_stage[s-1].v[i];
        end
      end
    end
  end

  // Post-processing.
  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    assign p[i] = a[i] ^ b[i];
    assign c[i] = g_stage[L+1].v[i].g;
    if (i == 0) begin : g_bit0
      assign sum[i] = p[i] ^ cin;
    end else begin : g_bitn
      assign sum[i] = p[i] ^ c[i-1];
    end
  end

  assign cout = c[WIDTH-1];

endmodule
