// tb_roba_sign_abs: exhaustive self-checking test of roba_sign_abs at N = 8.
// Every 8-bit two's complement value is applied; the expected magnitude and
// sign are computed with integer arithmetic on the signed value.
module tb_roba_sign_abs;

  localparam int N = 8;

  logic [N-1:0] x, mag;
  logic         neg;
  int           checks = 0, failures = 0;

  roba_sign_abs #(.N(N)) dut (.x(x), .mag(mag), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (N - 1)); v < (1 << (N - 1)); v++) begin
      int exp_mag;
      x = N'(v);
      #1;
      exp_mag = (v < 0) ? -v : v;
      checks++;
      if (mag !== N'(exp_mag) || neg !== (v < 0)) begin
        failures++;
        $display("FAIL x=%0d mag=%0d neg=%0b expected %0d %0b", v, mag, neg, exp_mag, v < 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
