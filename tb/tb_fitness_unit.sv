// tb_fitness_unit: self-checking test of the scoring unit.  Runs several
// scorings with random outputs, correct values and read instants, computes
// bias + penalty + sum |y - x| itself and compares; checks that `done`
// rises in the clock of the n-th reading and not before, that readings
// outside a run are ignored, and that a constant output earns the penalty
// while a varying one does not.
module tb_fitness_unit;
  localparam int W = 8, N_W = 8, FIT_W = 16, PENALTY = 64;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0, sample = 1'b0;
  logic [N_W-1:0]   n_reads = '0;
  logic [7:0]       bias = '0;
  logic [W-1:0]     x = '0, y = '0;
  logic             busy, done, constant;
  logic [FIT_W-1:0] err_sum, fitness;
  int checks = 0, failures = 0, const_runs = 0, varying_runs = 0;

  fitness_unit #(.W(W), .N_W(N_W), .FIT_W(FIT_W), .PENALTY(PENALTY)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string m);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", m);
    end
  endtask

  // mode 0: random x, 1: constant x, 2: one-bit values
  task automatic score(input int n, input int b, input int mode);
    int sum, want;
    logic [W-1:0] x0;
    bit changed;
    @(negedge clk);
    n_reads = N_W'(n); bias = 8'(b);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sum = 0; changed = 0; x0 = W'($urandom);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom % 4) begin
        sample = 1'b0;
        @(negedge clk);
      end
      check(busy && !done, $sformatf("not busy before reading %0d", i));
      sample = 1'b1;
      case (mode)
        0: begin x = W'($urandom); y = W'($urandom); end
        1: begin x = x0; y = W'($urandom); end
        default: begin x = W'($urandom % 2); y = W'($urandom % 2); end
      endcase
      if (i == 0) x0 = x; else if (x != x0) changed = 1;
      sum += (x > y) ? int'(x) - int'(y) : int'(y) - int'(x);
      @(negedge clk);
    end
    sample = 1'b0;
    want = b + sum + (changed ? 0 : PENALTY);
    if (changed) varying_runs++; else const_runs++;
    check(done && !busy, "done not raised after the last reading");
    check(int'(fitness) == want, $sformatf("fitness %0d want %0d", fitness, want));
    check(constant == !changed, "constant flag wrong");
    // readings after the run are ignored
    sample = 1'b1; x = 8'hFF; y = 8'h00;
    repeat (3) @(negedge clk);
    sample = 1'b0;
    check(int'(fitness) == want, "reading after the run changed the score");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    score(40, 128, 2);
    score(70, 128, 2);
    score(40, 0, 0);
    score(25, 0, 1);
    score(1, 0, 0);
    for (int r = 0; r < 10; r++) score(1 + int'($urandom % 100), int'($urandom % 256), int'($urandom % 3));
    check(const_runs > 0 && varying_runs > 0, "penalty case not exercised both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
