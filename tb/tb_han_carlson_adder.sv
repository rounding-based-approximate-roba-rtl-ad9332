// tb_han_carlson_adder: self-checking test of the Han-Carlson adder.
// The default 16-bit instance gets corner cases (all-ones carry chains,
// alternating patterns) and random operands with random carry in; 8-bit and
// 32-bit instances check that the prefix tree generalises. The reference is
// the integer sum a + b + cin.
module tb_han_carlson_adder;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  int          checks = 0, failures = 0;

  han_carlson_adder dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  han_carlson_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  han_carlson_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    a16 = x; b16 = y; ci16 = c;
    #1;
    e = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co16, s16} !== e) begin
      failures++;
      $display("FAIL16 %h + %h + %0b = %h, expected %h", x, y, c, {co16, s16}, e);
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
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'h5555, 16'h5555, 1'b0);
    check16(16'h0070, 16'h0070, 1'b0);
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'h0001, 1'b0);
      check16(16'(1 << k), 16'(1 << k), 1'b0);
    end
    for (int i = 0; i < 50000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));

    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y += 3) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + c)) begin
            failures++;
            $display("FAIL8 %0d + %0d + %0d", x, y, c);
          end
        end
      end
    end

    for (int i = 0; i < 20000; i++) begin
      logic [32:0] e;
      a32 = $urandom; b32 = $urandom; ci32 = 1'($urandom);
      #1;
      e = 33'(a32) + 33'(b32) + 33'(ci32);
      checks++;
      if ({co32, s32} !== e) begin
        failures++;
        $display("FAIL32 %h + %h + %0b", a32, b32, ci32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
