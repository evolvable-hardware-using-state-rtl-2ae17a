// tb_mul_env: self-checking test of the multiplier environment.  Checks
// that a read strobe comes exactly every HOLD running clocks, that the
// operands stay put between reads, that `product` is a*b as the testbench
// computes it, that the operands vary, and that a pause in `run` stretches
// the hold time.
module tb_mul_env;
  localparam int A_W = 4, HOLD = 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, run = 1'b0;
  logic [A_W-1:0] a, b;
  logic [2*A_W-1:0] product;
  logic sample;
  int checks = 0, failures = 0;

  mul_env #(.A_W(A_W), .HOLD(HOLD)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since, distinct;
    logic [A_W-1:0] a0, b0;
    bit seen [256];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    run = 1'b1;
    since = 0; distinct = 0;
    #1; a0 = a; b0 = b;
    for (int c = 0; c < 1600; c++) begin
      // an occasional pause
      run = (c % 97) != 50;
      #1;
      checks++;
      if (product !== (2*A_W)'(a) * (2*A_W)'(b)) begin
        failures++;
        $display("product %0d*%0d = %0d", a, b, product);
      end
      checks++;
      if (a !== a0 || b !== b0) begin
        failures++;
        $display("operands changed inside a hold");
      end
      if (run) since++;
      checks++;
      if (sample !== (since == HOLD)) begin
        failures++;
        $display("read strobe wrong after %0d running clocks", since);
      end
      if (sample) begin
        if (!seen[{a, b}]) distinct++;
        seen[{a, b}] = 1'b1;
        since = 0;
      end
      @(negedge clk);
      #1;
      if (since == 0) begin
        a0 = a;
        b0 = b;
      end
    end
    checks++;
    if (distinct < 50) begin
      failures++;
      $display("only %0d distinct operand pairs", distinct);
    end
    $display("distinct pairs: %0d", distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
