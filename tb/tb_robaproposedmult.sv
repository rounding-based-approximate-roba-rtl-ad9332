// tb_robaproposedmult: end-to-end self-checking test of the RoBA multiplier
// at its default size (8-bit operands, 16-bit product).
//
// First the worked example a = 7, b = 14 is applied and every intermediate
// value is compared with the hand-computed one (Ar = 8, Br = 16,
// Br*A = 112, Ar*Br = 128, Ar*B = 112, sum 224, product 96). Then all 65536
// operand pairs are streamed through, one pair per clock. The reference
// rounds the magnitudes by searching for the nearest power of two and uses
// the identity  approx = |A||B| - (Ar-|A|)(Br-|B|),  which is a different
// expression from the shift-add-subtract form the hardware uses. Each result
// is checked one clock after its operands, and the output is checked to hold
// until that edge (latency of exactly one clock, one result per clock).
//
// Mechanisms counted, each of which must occur: a negative product, two
// negative operands, the most negative operand, a zero operand, a midpoint
// rounded up, the value 3 rounded down to 2, an exact result, a result above
// the exact product and a result below it.
module tb_robaproposedmult;

  localparam int N = 8;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;

  int n_neg_product = 0, n_both_neg = 0, n_most_neg = 0, n_zero = 0;
  int n_tie_up = 0, n_three = 0, n_exact = 0, n_over = 0, n_under = 0;

  robaproposedmult dut (.clk(clk), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  function automatic int nearest_pow2(input int v);
    int best = 0;
    int best_d = v;
    if (v == 0) return 0;
    for (int k = 0; k < 16; k++) begin
      int d = (v > (1 << k)) ? v - (1 << k) : (1 << k) - v;
      if (d < best_d || (d == best_d && v != 3)) begin
        best = 1 << k;
        best_d = d;
      end
    end
    return best;
  endfunction

  // A midpoint 3*2^(k-2) with k > 2, which must round up.
  function automatic bit is_tie(input int v);
    for (int k = 3; k < 16; k++) if (v == 3 * (1 << (k - 2))) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int ref_product(input int av, input int bv);
    int ma = (av < 0) ? -av : av;
    int mb = (bv < 0) ? -bv : bv;
    int ra = nearest_pow2(ma);
    int rb = nearest_pow2(mb);
    int m  = ma * mb - (ra - ma) * (rb - mb);
    return ((av < 0) != (bv < 0)) ? -m : m;
  endfunction

  task automatic count_mechanisms(input int av, input int bv);
    int ma = (av < 0) ? -av : av;
    int mb = (bv < 0) ? -bv : bv;
    int approx = ref_product(av, bv);
    int exact  = av * bv;
    int am = (approx < 0) ? -approx : approx;
    int em = (exact < 0) ? -exact : exact;
    if ((av < 0) != (bv < 0) && av != 0 && bv != 0) n_neg_product++;
    if (av < 0 && bv < 0) n_both_neg++;
    if (av == -(1 << (N - 1)) || bv == -(1 << (N - 1))) n_most_neg++;
    if (av == 0 || bv == 0) n_zero++;
    if (is_tie(ma) || is_tie(mb)) n_tie_up++;
    if (ma == 3 || mb == 3) n_three++;
    if (am == em) n_exact++;
    if (am > em) n_over++;
    if (am < em) n_under++;
  endtask

  task automatic expect_mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else begin
      $display("  %-24s %0d", name, n);
    end
  endtask

  task automatic expect_val(input string name, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", name, got, want);
    end
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_a, prev_b;

    // Worked example.
    @(negedge clk);
    a = 8'd7;
    b = 8'd14;
    #1;
    expect_val("Ar", int'(dut.ar), 8);
    expect_val("Br", int'(dut.br), 16);
    @(posedge clk);
    #1;
    expect_val("Br*A", int'(dut.br_a), 112);
    expect_val("Ar*Br", int'(dut.ar_br), 128);
    expect_val("Ar*B", int'(dut.ar_b), 112);
    expect_val("Br*A+Ar*B", int'(dut.sum), 224);
    expect_val("p", int'(p), 96);

    // All operand pairs, pipelined one per clock. Between applying a pair
    // on the falling edge and the next rising edge, p must still show the
    // previous pair's product.
    prev_a = 7;
    prev_b = 14;
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      int av, bv;
      av = int'($signed(N'(i >> N)));
      bv = int'($signed(N'(i)));
      @(negedge clk);
      a = N'(av);
      b = N'(bv);
      #1;
      checks++;
      if (p !== (2*N)'(ref_product(prev_a, prev_b))) begin
        failures++;
        if (failures < 20) $display("FAIL p changed before the clock edge");
      end
      @(posedge clk);
      #1;
      checks++;
      if (p !== (2*N)'(ref_product(av, bv))) begin
        failures++;
        if (failures < 20)
          $display("FAIL %0d * %0d: p = %0d, expected %0d",
                   av, bv, $signed(p), ref_product(av, bv));
      end
      count_mechanisms(av, bv);
      prev_a = av;
      prev_b = bv;
    end

    $display("mechanisms:");
    expect_mech("negative product", n_neg_product);
    expect_mech("both operands negative", n_both_neg);
    expect_mech("most negative operand", n_most_neg);
    expect_mech("zero operand", n_zero);
    expect_mech("midpoint rounded up", n_tie_up);
    expect_mech("3 rounded to 2", n_three);
    expect_mech("exact result", n_exact);
    expect_mech("result above exact", n_over);
    expect_mech("result below exact", n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
