// tb_ir_env: self-checking test of the IR-detector environment.
// Follows the generator clock by clock and checks, from its own rules:
// no signal outside a burst; inside a burst a wave that starts high and
// toggles every HALF_PERIOD clocks; burst and pause lengths that are
// whole periods within the stated range; read strobes spaced MIN_GAP+1 to
// MIN_GAP+32 clocks apart; nothing moving while `run` is low; and the
// same sequence again after `clear`.
module tb_ir_env;
  localparam int HALF = 4, MINP = 2, MING = 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, run = 1'b0;
  logic sig, present, sample;
  int checks = 0, failures = 0;
  int bursts = 0, pauses = 0, samples_on = 0, samples_off = 0;
  logic [1:0] rec [300];

  ir_env #(.HALF_PERIOD(HALF), .MIN_PERIODS(MINP), .MIN_GAP(MING)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string m);
    failures++;
    $display("%s", m);
  endtask

  initial begin
    int k, len, since_sample;
    logic prev_present;
    bit first_phase;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    run = 1'b1;
    k = 0; len = 0; since_sample = 0; prev_present = 1'b0; first_phase = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      #1;
      if (c < 300) rec[c] = {sig, sample};
      // phase bookkeeping
      if (present != prev_present) begin
        checks++;
        if (!first_phase && (len % (2*HALF) != 0 || len < 2*HALF*MINP || len > 2*HALF*(MINP+15)))
          fail($sformatf("phase length %0d out of rule", len));
        if (first_phase && len != 2*HALF*MINP) fail($sformatf("first pause %0d", len));
        first_phase = 1'b0;
        if (present) bursts++; else pauses++;
        len = 0; k = 0;
      end
      checks++;
      if (!present && sig) fail("signal outside a burst");
      if (present && sig !== (((k / HALF) % 2) == 0)) fail($sformatf("wave wrong at %0d", k));
      if (sample) begin
        checks++;
        if (c != 0 && (since_sample < MING + 1 || since_sample > MING + 32) && since_sample != c)
          fail($sformatf("read gap %0d", since_sample));
        if (present) samples_on++; else samples_off++;
        since_sample = 0;
      end
      prev_present = present;
      @(negedge clk);
      len++; k++; since_sample++;
    end
    // pause: nothing may move
    begin
      logic s0, p0;
      run = 1'b0;
      #1; s0 = sig; p0 = present;
      repeat (20) begin
        @(negedge clk); #1;
        checks++;
        if (sig !== s0 || present !== p0 || sample) fail("moved while run is low");
      end
    end
    // restart reproduces the sequence
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    run = 1'b1;
    for (int c = 0; c < 300; c++) begin
      #1;
      checks++;
      if ({sig, sample} !== rec[c]) fail($sformatf("replay differs at %0d", c));
      @(negedge clk);
    end
    checks++;
    if (bursts < 3 || pauses < 3 || samples_on == 0 || samples_off == 0)
      fail($sformatf("too little activity: %0d bursts %0d reads on %0d off", bursts, samples_on, samples_off));
    $display("bursts=%0d pauses=%0d reads_on=%0d reads_off=%0d", bursts, pauses, samples_on, samples_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
