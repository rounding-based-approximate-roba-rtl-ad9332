// tb_sub16bit: self-checking test of the 16-bit subtractor.
// Corner and random operands are applied with both carry-in values; the
// reference is the integer A + ~B + C_in, whose carry out is 1 exactly when
// A - B does not borrow (for C_in = 1).
module tb_sub16bit;

  logic [15:0] A, B, S;
  logic        ci, co;
  int          checks = 0, failures = 0;

  sub16bit dut (.A(A), .B(B), .C_in(ci), .Sum_out(S), .C_out(co));

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    A = x; B = y; ci = c;
    #1;
    e = 17'(x) + {1'b0, ~y} + 17'(c);
    checks++;
    if ({co, S} !== e) begin
      failures++;
      $display("FAIL %h - %h (cin %0b) = %h, expected %h", x, y, c, {co, S}, e);
    end
    if (c) begin
      checks++;
      if (S !== 16'(x - y) || co !== (x >= y)) begin
        failures++;
        $display("FAIL difference %0d - %0d", x, y);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd224, 16'd128, 1'b1);
    check(16'd0, 16'd0, 1'b1);
    check(16'd0, 16'd1, 1'b1);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'h8000, 16'h0001, 1'b1);
    for (int i = 0; i < 50000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
