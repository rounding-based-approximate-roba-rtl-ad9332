// tb_rounding2: exhaustive self-checking test of rounding2.
// For every magnitude from 0 to 2^(N-1) the reference searches all powers of
// two for the nearest one, picking the larger power on a tie except for the
// value 3, which must give 2. Two instances are tested: the default N = 8
// and N = 12.
module tb_rounding2;

  logic [7:0]  a8,  b8;
  logic [11:0] a12, b12;
  int          checks = 0, failures = 0;
  int          ties = 0;

  rounding2 #(.N(8))  dut8  (.a(a8),  .b(b8));
  rounding2 #(.N(12)) dut12 (.a(a12), .b(b12));

  // Nearest power of two by search; independent of the per-bit equations.
  function automatic int nearest_pow2(input int v);
    int best = 0;
    int best_d = v;     // distance to 0
    if (v == 0) return 0;
    for (int k = 0; k < 20; k++) begin
      int d = (v > (1 << k)) ? v - (1 << k) : (1 << k) - v;
      if (d < best_d || (d == best_d && v != 3)) begin
        best = 1 << k;
        best_d = d;
      end
    end
    return best;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 128; v++) begin
      a8 = 8'(v);
      #1;
      checks++;
      if (b8 !== 8'(nearest_pow2(v))) begin
        failures++;
        $display("FAIL N=8 a=%0d b=%0d expected %0d", v, b8, nearest_pow2(v));
      end
    end
    for (int v = 0; v <= 2048; v++) begin
      a12 = 12'(v);
      #1;
      checks++;
      if (b12 !== 12'(nearest_pow2(v))) begin
        failures++;
        $display("FAIL N=12 a=%0d b=%0d expected %0d", v, b12, nearest_pow2(v));
      end
    end
    // Spot checks of the tie rule, written out by hand.
    a8 = 8'd3;  #1; checks++; if (b8 !== 8'd2)   failures++;
    a8 = 8'd6;  #1; checks++; if (b8 !== 8'd8)   failures++;
    a8 = 8'd12; #1; checks++; if (b8 !== 8'd16)  failures++;
    a8 = 8'd96; #1; checks++; if (b8 !== 8'd128) failures++;
    a8 = 8'd5;  #1; checks++; if (b8 !== 8'd4)   failures++;
    a8 = 8'd7;  #1; checks++; if (b8 !== 8'd8)   failures++;
    a8 = 8'd14; #1; checks++; if (b8 !== 8'd16)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
