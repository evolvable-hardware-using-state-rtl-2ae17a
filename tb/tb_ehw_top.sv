// tb_ehw_top: end-to-end test of the evolvable structure with its on-chip
// test environments, at the design's default sizes.
//
// The testbench keeps its own model of the structure: a copy of every
// table and select register it loads, the state of every machine, the
// bus, the output net and the output multiplexers.  Every clock it
// compares the bus and the outputs with the model, and at the end of each
// scoring run it compares the score with bias + penalty + sum |y - x|
// worked out from the model's outputs.  The predefined unit is played by
// the testbench (one clock after it is given a value it returns the
// inverse).
//
// Runs:
//   1. multiplier problem, output net loaded as a 4x4 product table:
//      must score 0 (a perfect individual);
//   2. multiplier problem, all-zero net: constant output, penalty applied;
//   3. IR-detector problem, machine 0 loaded as a detector (counts clocks
//      without signal, "present" while the count is small), machine 1 in
//      pure-Moore mode counting machine 0's output, others random;
//      scored with 40 and then 70 readings;
//   4. stimulus and correct values from pins, all units random.
// Each mechanism (deleted transition, pure-Moore output, unused output
// bits forced to 0, predefined-unit path, Mealy path through the net,
// constant-output penalty, each environment, both reading counts) is
// counted, and one that never happened counts as a failure.
module tb_ehw_top;
  import ehw_pkg::*;

  localparam int IN_W = 8, OUT_W = 8, N_SM = 4, SM_IN = 4, STATE_W = 4, SLOT_W = 4;
  localparam int PU_IN = 4, PU_W = 4, CN_IN = 8, CN_OUT = 8;
  localparam int BUS_W = IN_W + N_SM * SLOT_W + PU_W;
  localparam int OBUS_W = CN_OUT + BUS_W;
  localparam int PU_LSB = BUS_W - PU_W;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cfg_t              cfg = '0;
  env_e              env_sel = ENV_EXTERNAL;
  logic [7:0]        n_reads = 8'd40;
  logic [IN_W-1:0]   ext_in = '0;
  logic              ext_sample = 1'b0;
  logic [OUT_W-1:0]  ext_expected = '0;
  logic [PU_IN-1:0]  pu_in;
  logic [PU_W-1:0]   pu_out = '0;
  logic [OUT_W-1:0]  out;
  logic [BUS_W-1:0]  bus;
  logic              busy, done, constant;
  logic [15:0]       fitness;

  ehw_top dut (.*);

  // the predefined unit, played by the testbench: a register of the inverse
  always @(posedge clk) pu_out <= ~pu_in;

  always #5 clk = !clk;

  // ------------------------------------------------------------- model
  logic [STATE_W:0]   tt_m [N_SM][2**(STATE_W+SM_IN)];
  logic [SLOT_W-1:0]  ot_m [N_SM][2**STATE_W];
  logic               pure_m [N_SM];
  int                 nout_m [N_SM];
  int                 smsel_m [N_SM][SM_IN];
  logic [STATE_W-1:0] st_m [N_SM];
  int                 pusel_m [PU_IN];
  int                 cnsel_m [CN_IN];
  logic [CN_OUT-1:0]  cntt_m [2**CN_IN];
  int                 outsel_m [OUT_W];

  logic [BUS_W-1:0]   bus_m;
  logic [OUT_W-1:0]   out_m;
  logic [CN_IN-1:0]   row_m;
  logic [PU_IN-1:0]   pin_m;
  logic [PU_W-1:0]    pu_m;

  int checks = 0, failures = 0;
  int n_deleted = 0, n_pure = 0, n_masked = 0, n_pu = 0, n_mealy = 0;
  int n_penalty = 0, n_perfect = 0, n_ir = 0, n_mult = 0, n_ext = 0, n_70 = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string m);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t %s", $time, m);
    end
  endtask

  function automatic logic sel_bit(input logic [OBUS_W-1:0] v, input int s, input int w);
    return (s < w) ? v[s] : 1'b0;
  endfunction

  // combinational part of the model, from the input slot
  function automatic void model_eval(input logic [IN_W-1:0] in_slot);
    logic [OBUS_W-1:0] ob;
    bus_m = '0;
    bus_m[IN_W-1:0] = in_slot;
    for (int k = 0; k < N_SM; k++) begin
      logic [SLOT_W-1:0] raw;
      raw = pure_m[k] ? SLOT_W'(st_m[k]) : ot_m[k][st_m[k]];
      for (int i = 0; i < SLOT_W; i++) bus_m[IN_W + k*SLOT_W + i] = raw[i] && (i < nout_m[k]);
    end
    bus_m[PU_LSB +: PU_W] = pu_m;
    for (int i = 0; i < PU_IN; i++) pin_m[i] = sel_bit(OBUS_W'(bus_m), pusel_m[i], BUS_W);
    for (int i = 0; i < CN_IN; i++) row_m[i] = sel_bit(OBUS_W'(bus_m), cnsel_m[i], BUS_W);
    ob = {bus_m, cntt_m[row_m]};
    for (int i = 0; i < OUT_W; i++) out_m[i] = sel_bit(ob, outsel_m[i], OBUS_W);
  endfunction

  function automatic logic [SM_IN-1:0] sm_inputs(input int k);
    logic [SM_IN-1:0] v;
    for (int i = 0; i < SM_IN; i++) v[i] = sel_bit(OBUS_W'(bus_m), smsel_m[k][i], BUS_W);
    return v;
  endfunction

  // --------------------------------------------------------- configuration
  task automatic cfg_write(input int unit, input cfg_region_e r, input int a, input int d);
    @(negedge clk);
    cfg.we   = 1'b1;
    cfg.unit = CFG_UNIT_W'(unit);
    cfg.addr = {r, (CFG_ADDR_W-2)'(a)};
    cfg.data = CFG_DATA_W'(d);
    @(negedge clk);
    cfg.we   = 1'b0;
  endtask

  task automatic load_machine_random(input int k);
    for (int a = 0; a < 2**(STATE_W+SM_IN); a++) begin
      logic [STATE_W:0] e;
      e = (STATE_W+1)'($urandom);
      e[STATE_W] = ($urandom % 4) != 0;
      tt_m[k][a] = e;
      cfg_write(k, RGN_TABLE, a, int'(e));
    end
    for (int s = 0; s < 2**STATE_W; s++) begin
      ot_m[k][s] = SLOT_W'($urandom);
      cfg_write(k, RGN_OUTPUT, s, int'(ot_m[k][s]));
    end
    for (int i = 0; i < SM_IN; i++) begin
      smsel_m[k][i] = int'($urandom % BUS_W);
      cfg_write(k, RGN_SELECT, i, smsel_m[k][i]);
    end
    pure_m[k] = 1'($urandom);
    nout_m[k] = 1 + int'($urandom % SLOT_W);
    cfg_write(k, RGN_CTRL, 0, (nout_m[k] << 4) | int'(pure_m[k]));
  endtask

  task automatic load_net_random();
    for (int a = 0; a < 2**CN_IN; a++) begin
      cntt_m[a] = CN_OUT'($urandom);
      cfg_write(N_SM + 1, RGN_TABLE, a, int'(cntt_m[a]));
    end
    for (int i = 0; i < CN_IN; i++) begin
      cnsel_m[i] = int'($urandom % BUS_W);
      cfg_write(N_SM + 1, RGN_SELECT, i, cnsel_m[i]);
    end
  endtask

  task automatic set_pu_random();
    for (int i = 0; i < PU_IN; i++) begin
      pusel_m[i] = int'($urandom % PU_LSB);   // never its own outputs
      cfg_write(N_SM, RGN_SELECT, i, pusel_m[i]);
    end
  endtask

  task automatic set_out(input int i, input int s);
    outsel_m[i] = s;
    cfg_write(N_SM + 2, RGN_SELECT, i, s);
  endtask

  // ------------------------------------------------------------- scoring
  // Runs one scoring and checks the structure every clock against the model.
  task automatic run_score(input env_e env, input int n, output int score);
    int sum, reads, bias;
    logic [OUT_W-1:0] x, y, x0;
    bit changed;
    env_sel = env;
    n_reads = 8'(n);
    bias = (env == ENV_IR) ? 128 : 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < N_SM; k++) st_m[k] = '0;
    pu_m = pu_out;
    sum = 0; reads = 0; changed = 0; x0 = '0;
    for (int c = 0; c < 100000 && busy; c++) begin
      logic smp;
      if (env == ENV_EXTERNAL) begin
        ext_in = IN_W'($urandom);
        ext_sample = ($urandom % 5) == 0;
        ext_expected = OUT_W'($urandom);
      end
      #1;
      model_eval(bus[IN_W-1:0]);
      check(bus === bus_m, $sformatf("bus %h want %h", bus, bus_m));
      check(out === out_m, $sformatf("out %h want %h", out, out_m));
      // mechanism counters
      for (int k = 0; k < N_SM; k++) begin
        logic [SLOT_W-1:0] raw;
        if (pure_m[k] && st_m[k] != 0) n_pure++;
        raw = pure_m[k] ? SLOT_W'(st_m[k]) : ot_m[k][st_m[k]];
        for (int i = 0; i < SLOT_W; i++) if (raw[i] && i >= nout_m[k]) n_masked++;
      end
      for (int i = 0; i < OUT_W; i++)
        if (outsel_m[i] >= CN_OUT + PU_LSB && outsel_m[i] < OBUS_W && out_m[i]) n_pu++;
      for (int i = 0; i < CN_IN; i++) if (cnsel_m[i] < IN_W && outsel_m[0] < CN_OUT) n_mealy++;
      // reading
      case (env)
        ENV_IR:   begin smp = dut.u_ir.sample; x = OUT_W'(out_m[0]); y = OUT_W'(dut.u_ir.present); end
        ENV_MULT: begin smp = dut.u_mul.sample; x = out_m; y = OUT_W'(bus[3:0]) * OUT_W'(bus[7:4]); end
        default:  begin smp = ext_sample; x = out_m; y = ext_expected; end
      endcase
      if (smp) begin
        if (reads == 0) x0 = x; else if (x != x0) changed = 1;
        sum += (x > y) ? int'(x) - int'(y) : int'(y) - int'(x);
        reads++;
      end
      @(posedge clk);
      pu_m = ~pin_m;
      for (int k = 0; k < N_SM; k++) begin
        logic [STATE_W:0] e;
        e = tt_m[k][{st_m[k], sm_inputs(k)}];
        if (e[STATE_W]) st_m[k] = e[STATE_W-1:0];
        else n_deleted++;
      end
      @(negedge clk);
    end
    ext_sample = 1'b0;
    score = bias + sum + (changed ? 0 : 32);
    if (!changed) n_penalty++;
    check(done && reads == n, $sformatf("run ended with done=%b after %0d of %0d reads", done, reads, n));
    check(int'(fitness) == score, $sformatf("fitness %0d want %0d", fitness, score));
    check(constant == !changed, "constant flag");
    $display("env %0d n=%0d: fitness %0d (model %0d), constant=%b", env, n, fitness, score, constant);
    if (env == ENV_IR) n_ir++;
    if (env == ENV_MULT) n_mult++;
    if (env == ENV_EXTERNAL) n_ext++;
    if (n == 70) n_70++;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int score;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // model of the reset values
    for (int k = 0; k < N_SM; k++) begin
      pure_m[k] = 0; nout_m[k] = SLOT_W; st_m[k] = '0;
      for (int i = 0; i < SM_IN; i++) smsel_m[k][i] = 0;
    end
    for (int i = 0; i < PU_IN; i++) pusel_m[i] = 0;
    for (int i = 0; i < CN_IN; i++) cnsel_m[i] = 0;
    for (int i = 0; i < OUT_W; i++) outsel_m[i] = 0;

    for (int k = 0; k < N_SM; k++) load_machine_random(k);
    set_pu_random();

    // 1. perfect multiplier in the output net
    for (int a = 0; a < 2**CN_IN; a++) begin
      cntt_m[a] = CN_OUT'(a % 16) * CN_OUT'(a / 16);
      cfg_write(N_SM + 1, RGN_TABLE, a, int'(cntt_m[a]));
    end
    for (int i = 0; i < CN_IN; i++) begin
      cnsel_m[i] = i;
      cfg_write(N_SM + 1, RGN_SELECT, i, i);
    end
    for (int i = 0; i < OUT_W; i++) set_out(i, i);
    run_score(ENV_MULT, 40, score);
    check(score == 0, "hand-made multiplier does not score 0");
    if (score == 0 && fitness == 0) n_perfect++;

    // 2. constant zero output
    for (int a = 0; a < 2**CN_IN; a++) begin
      cntt_m[a] = '0;
      cfg_write(N_SM + 1, RGN_TABLE, a, 0);
    end
    run_score(ENV_MULT, 40, score);

    // 3. IR detector in machine 0, counter in machine 1
    for (int s = 0; s < 2**STATE_W; s++) begin
      for (int in = 0; in < 2**SM_IN; in++) begin
        logic [STATE_W:0] e;
        if (in % 2 == 1)       e = {1'b1, STATE_W'(0)};
        else if (s == 15)      e = '0;                       // deleted: stay
        else                   e = {1'b1, STATE_W'(s + 1)};
        tt_m[0][s * 2**SM_IN + in] = e;
        cfg_write(0, RGN_TABLE, s * 2**SM_IN + in, int'(e));
        if (in % 2 == 1)       e = {1'b1, STATE_W'(s + 1)};
        else                   e = '0;                       // deleted: stay
        tt_m[1][s * 2**SM_IN + in] = e;
        cfg_write(1, RGN_TABLE, s * 2**SM_IN + in, int'(e));
      end
      ot_m[0][s] = (s <= 4) ? 4'b1111 : 4'b0000;
      cfg_write(0, RGN_OUTPUT, s, int'(ot_m[0][s]));
    end
    for (int i = 0; i < SM_IN; i++) begin
      smsel_m[0][i] = 0;        cfg_write(0, RGN_SELECT, i, 0);
      smsel_m[1][i] = IN_W;     cfg_write(1, RGN_SELECT, i, IN_W);
    end
    pure_m[0] = 0; nout_m[0] = 1; cfg_write(0, RGN_CTRL, 0, 'h10);
    pure_m[1] = 1; nout_m[1] = 4; cfg_write(1, RGN_CTRL, 0, 'h41);
    load_net_random();
    set_out(0, CN_OUT + IN_W);
    for (int i = 1; i <= 4; i++) set_out(i, CN_OUT + IN_W + SLOT_W + i - 1);
    set_out(5, CN_OUT + PU_LSB);
    set_out(6, 0);
    set_out(7, OBUS_W + 3);
    run_score(ENV_IR, 40, score);
    run_score(ENV_IR, 70, score);

    // 4. everything random, stimulus from pins; net output 0 as output 0
    for (int k = 0; k < N_SM; k++) load_machine_random(k);
    load_net_random();
    for (int i = 0; i < IN_W; i++) if (i < CN_IN) begin
      cnsel_m[i] = i;
      cfg_write(N_SM + 1, RGN_SELECT, i, i);
    end
    set_out(0, 0);
    for (int i = 1; i < OUT_W; i++) set_out(i, int'($urandom % (OBUS_W + 2)));
    set_out(7, CN_OUT + PU_LSB + 1);
    run_score(ENV_EXTERNAL, 30, score);

    $display("deleted=%0d pure=%0d masked=%0d pu=%0d mealy=%0d penalty=%0d perfect=%0d ir=%0d mult=%0d ext=%0d n70=%0d",
             n_deleted, n_pure, n_masked, n_pu, n_mealy, n_penalty, n_perfect, n_ir, n_mult, n_ext, n_70);
    check(n_deleted > 0, "no deleted transition taken");
    check(n_pure > 0, "pure-Moore output never shown");
    check(n_masked > 0, "unused outputs never forced to 0");
    check(n_pu > 0, "predefined-unit path never used");
    check(n_mealy > 0, "input-to-output path through the net never used");
    check(n_penalty > 0, "constant-output penalty never applied");
    check(n_perfect > 0, "no perfect individual scored");
    check(n_ir > 0 && n_mult > 0 && n_ext > 0, "an environment never ran");
    check(n_70 > 0, "70-reading scoring never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
