// tb_sixteenbitshifting: self-checking test of the registered shifter, N = 8.
// Every operand a is paired with every power of two and with zero as b. The
// inputs change on the falling clock edge; the expected a*b is compared one
// rising edge later, and the output is also checked not to change before
// that edge (latency of exactly one clock).
module tb_sixteenbitshifting;

  localparam int N = 8;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] c;
  int             checks = 0, failures = 0;

  sixteenbitshifting #(.N(N)) dut (.clk(clk), .a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] prev;
    a = '0;
    b = '0;
    @(posedge clk);
    for (int av = 0; av < (1 << N); av++) begin
      for (int k = -1; k < N; k++) begin
        @(negedge clk);
        prev = c;
        a = N'(av);
        b = (k < 0) ? '0 : N'(1 << k);
        #1;
        checks++;
        if (c !== prev) begin
          failures++;
          $display("FAIL output changed before the clock edge");
        end
        @(posedge clk);
        #1;
        checks++;
        if (c !== (2*N)'(av * ((k < 0) ? 0 : (1 << k)))) begin
          failures++;
          $display("FAIL a=%0d b=%0d c=%0d", av, b, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
