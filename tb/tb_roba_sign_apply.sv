// tb_roba_sign_apply: self-checking test of roba_sign_apply at WIDTH = 16.
// Random and corner magnitudes are applied with both signs; the expected
// result is the magnitude or its negation computed with integer arithmetic.
module tb_roba_sign_apply;

  localparam int W = 16;

  logic [W-1:0] mag, y;
  logic         neg;
  int           checks = 0, failures = 0;

  roba_sign_apply #(.WIDTH(W)) dut (.mag(mag), .neg(neg), .y(y));

  task automatic check(input int m, input bit n);
    int expv;
    mag = W'(m);
    neg = n;
    #1;
    expv = n ? -m : m;
    checks++;
    if (y !== W'(expv)) begin
      failures++;
      $display("FAIL mag=%0d neg=%0b y=%h expected %h", m, n, y, W'(expv));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(0, 1); check(1, 1); check(16384, 1); check(32767, 1);
    for (int i = 0; i < 20000; i++) check(int'($urandom_range(0, 32767)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
