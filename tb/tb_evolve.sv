// tb_evolve: the two evolution experiments run intrinsically: the
// IR detector, then the 4x4 multiplier.
//
// The testbench plays the host.  It keeps a population of 16 individuals
// and runs a steady-state tournament algorithm: four individuals are drawn
// at random and ranked by score, the two worst are removed, and the two
// best produce two children that take their places.  Children are made by
// crossover (each machine slot taken from one parent or the other, the
// output net taken from one parent or mixed row by row), duplication of a
// machine over another, and mutation (change, add or delete a transition,
// change a state's output, change the net, re-route an input).  Every
// individual is loaded through the configuration port and scored by the
// hardware.  IR detector: 40 readings for the first 200 tournaments, then
// 70, with the whole population rescored at the switch, 300 tournaments in
// all.  Multiplier: 40 readings of the 8-bit product, 300 tournaments (its
// tournament count and population are not given; the detector's are used).
//
// Checks: every score the hardware reports equals the score worked out by
// the testbench's own clock-by-clock model of the structure (the model
// also checks the bus and outputs every clock); the best score in the
// population never gets worse between switches of n; rescoring the final
// best individual reproduces its score.  The run prints the best and mean
// score as it goes.
module tb_evolve;
  import ehw_pkg::*;

  localparam int IN_W = 8, OUT_W = 8, N_SM = 4, SM_IN = 4, STATE_W = 4, SLOT_W = 4;
  localparam int PU_IN = 4, PU_W = 4, CN_IN = 8, CN_OUT = 8;
  localparam int BUS_W = IN_W + N_SM * SLOT_W + PU_W;
  localparam int OBUS_W = CN_OUT + BUS_W;
  localparam int PU_LSB = BUS_W - PU_W;
  localparam int TT_N = 2**(STATE_W+SM_IN);
  localparam int POP = 16;
  localparam int TOURNAMENTS = 300;
  localparam int SWITCH_AT = 200;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cfg_t              cfg = '0;
  env_e              env_sel = ENV_IR;
  logic [7:0]        n_reads = 8'd40;
  logic [IN_W-1:0]   ext_in = '0;
  logic              ext_sample = 1'b0;
  logic [OUT_W-1:0]  ext_expected = '0;
  logic [PU_IN-1:0]  pu_in;
  logic [PU_W-1:0]   pu_out;
  logic [OUT_W-1:0]  out;
  logic [BUS_W-1:0]  bus;
  logic              busy, done, constant;
  logic [15:0]       fitness;

  ehw_top dut (.*);

  assign pu_out = '0;   // no predefined unit in this experiment

  always #5 clk = !clk;

  // ------------------------------------------------------------ genomes
  typedef struct {
    logic [STATE_W:0]  tt [N_SM][TT_N];
    logic [SLOT_W-1:0] ot [N_SM][2**STATE_W];
    logic              moore_pure [N_SM];
    int                nout [N_SM];
    int                smsel [N_SM][SM_IN];
    logic [CN_OUT-1:0] cntt [2**CN_IN];
    int                cnsel [CN_IN];
    int                outsel [OUT_W];
  } genome_t;

  genome_t pop [POP];
  int      score [POP];
  genome_t cur;              // the individual loaded in the hardware

  int checks = 0, failures = 0;

  initial begin
    #2000000000;
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

  function automatic int rnd(input int n);
    return int'($urandom % n);
  endfunction

  function automatic void random_genome(output genome_t g);
    for (int k = 0; k < N_SM; k++) begin
      for (int a = 0; a < TT_N; a++) begin
        g.tt[k][a] = (STATE_W+1)'($urandom);
        g.tt[k][a][STATE_W] = rnd(4) != 0;
      end
      for (int s = 0; s < 2**STATE_W; s++) g.ot[k][s] = SLOT_W'($urandom);
      g.moore_pure[k] = 1'($urandom);
      g.nout[k] = 1 + rnd(SLOT_W);
      for (int i = 0; i < SM_IN; i++) g.smsel[k][i] = rnd(PU_LSB);
    end
    for (int a = 0; a < 2**CN_IN; a++) g.cntt[a] = CN_OUT'($urandom);
    for (int i = 0; i < CN_IN; i++) g.cnsel[i] = rnd(PU_LSB);
    for (int i = 0; i < OUT_W; i++) g.outsel[i] = rnd(CN_OUT + PU_LSB);
  endfunction

  // ---------------------------------------------------------- the model
  logic [STATE_W-1:0] st_m [N_SM];
  logic [BUS_W-1:0]   bus_m;
  logic [OUT_W-1:0]   out_m;

  function automatic logic sel_bit(input logic [OBUS_W-1:0] v, input int s, input int w);
    return (s < w) ? v[s] : 1'b0;
  endfunction

  function automatic void model_eval(input logic [IN_W-1:0] in_slot);
    logic [CN_IN-1:0] row;
    logic [OBUS_W-1:0] ob;
    bus_m = '0;
    bus_m[IN_W-1:0] = in_slot;
    for (int k = 0; k < N_SM; k++) begin
      logic [SLOT_W-1:0] raw;
      raw = cur.moore_pure[k] ? SLOT_W'(st_m[k]) : cur.ot[k][st_m[k]];
      for (int i = 0; i < SLOT_W; i++) bus_m[IN_W + k*SLOT_W + i] = raw[i] && (i < cur.nout[k]);
    end
    for (int i = 0; i < CN_IN; i++) row[i] = sel_bit(OBUS_W'(bus_m), cur.cnsel[i], BUS_W);
    ob = {bus_m, cur.cntt[row]};
    out_m = '0;
    for (int i = 0; i < OUT_W; i++)
      if (env_sel == ENV_MULT || i == 0) out_m[i] = sel_bit(ob, cur.outsel[i], OBUS_W);
  endfunction

  // ------------------------------------------------------ configuration
  task automatic w(input int unit, input cfg_region_e r, input int a, input int d);
    cfg.we   = 1'b1;
    cfg.unit = CFG_UNIT_W'(unit);
    cfg.addr = {r, (CFG_ADDR_W-2)'(a)};
    cfg.data = CFG_DATA_W'(d);
    @(negedge clk);
  endtask

  task automatic load(input genome_t g);
    @(negedge clk);
    for (int k = 0; k < N_SM; k++) begin
      for (int a = 0; a < TT_N; a++) w(k, RGN_TABLE, a, int'(g.tt[k][a]));
      for (int s = 0; s < 2**STATE_W; s++) w(k, RGN_OUTPUT, s, int'(g.ot[k][s]));
      for (int i = 0; i < SM_IN; i++) w(k, RGN_SELECT, i, g.smsel[k][i]);
      w(k, RGN_CTRL, 0, (g.nout[k] << 4) | int'(g.moore_pure[k]));
    end
    for (int a = 0; a < 2**CN_IN; a++) w(N_SM + 1, RGN_TABLE, a, int'(g.cntt[a]));
    for (int i = 0; i < CN_IN; i++) w(N_SM + 1, RGN_SELECT, i, g.cnsel[i]);
    for (int i = 0; i < OUT_W; i++) w(N_SM + 2, RGN_SELECT, i, (env_sel == ENV_MULT || i == 0) ? g.outsel[i] : OBUS_W);
    cfg.we = 1'b0;
    cur = g;
  endtask

  // Scores the loaded individual in hardware and in the model.
  task automatic evaluate(input int n, output int hw);
    int sum, reads, model;
    logic [OUT_W-1:0] x, y, x0;
    bit changed;
    n_reads = 8'(n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < N_SM; k++) st_m[k] = '0;
    sum = 0; reads = 0; changed = 0; x0 = '0;
    while (busy) begin
      #1;
      model_eval(bus[IN_W-1:0]);
      if (bus !== bus_m || out !== out_m) begin
        check(1'b0, $sformatf("bus %h/%h out %h/%h", bus, bus_m, out, out_m));
      end
      if (env_sel == ENV_IR) begin
        x = OUT_W'(out_m[0]);
        y = OUT_W'(dut.u_ir.present);
      end else begin
        x = out_m;
        y = OUT_W'(bus[3:0]) * OUT_W'(bus[7:4]);
      end
      if (env_sel == ENV_IR ? dut.u_ir.sample : dut.u_mul.sample) begin
        if (reads == 0) x0 = x; else if (x != x0) changed = 1;
        sum += (x > y) ? int'(x) - int'(y) : int'(y) - int'(x);
        reads++;
      end
      @(posedge clk);
      for (int k = 0; k < N_SM; k++) begin
        logic [SM_IN-1:0] v;
        logic [STATE_W:0] e;
        for (int i = 0; i < SM_IN; i++) v[i] = sel_bit(OBUS_W'(bus_m), cur.smsel[k][i], BUS_W);
        e = cur.tt[k][{st_m[k], v}];
        if (e[STATE_W]) st_m[k] = e[STATE_W-1:0];
      end
      @(negedge clk);
    end
    model = ((env_sel == ENV_IR) ? 128 : 0) + sum + (changed ? 0 : 32);
    hw = int'(fitness);
    check(done && reads == n && hw == model,
          $sformatf("score %0d, model %0d, %0d reads", hw, model, reads));
  endtask

  // ------------------------------------------------- genetic operators
  function automatic void mutate(ref genome_t g);
    int k, a;
    k = rnd(N_SM);
    a = rnd(TT_N);
    case (rnd(7))
      0: g.tt[k][a] = {1'b1, STATE_W'($urandom)};                  // change a transition
      1: if (!g.tt[k][a][STATE_W]) g.tt[k][a] = {1'b1, STATE_W'($urandom)};  // introduce one
      2: g.tt[k][a][STATE_W] = 1'b0;                                // delete one
      3: g.ot[k][rnd(2**STATE_W)] = SLOT_W'($urandom);              // change an output
      4: g.cntt[rnd(2**CN_IN)] = CN_OUT'($urandom);                 // change the net
      5: g.smsel[k][rnd(SM_IN)] = rnd(PU_LSB);                      // re-route an input
      default: begin
        if (rnd(2) == 0) g.cnsel[rnd(CN_IN)] = rnd(PU_LSB);
        else g.outsel[rnd(OUT_W)] = rnd(CN_OUT + PU_LSB);
      end
    endcase
  endfunction

  function automatic void crossover(input genome_t a, input genome_t b, output genome_t c, output genome_t d);
    int net_mode;
    c = a;
    d = b;
    for (int k = 0; k < N_SM; k++) if (rnd(2) == 0) begin   // swap machine slot k
      c.tt[k] = b.tt[k]; c.ot[k] = b.ot[k]; c.moore_pure[k] = b.moore_pure[k];
      c.nout[k] = b.nout[k]; c.smsel[k] = b.smsel[k];
      d.tt[k] = a.tt[k]; d.ot[k] = a.ot[k]; d.moore_pure[k] = a.moore_pure[k];
      d.nout[k] = a.nout[k]; d.smsel[k] = a.smsel[k];
    end
    net_mode = rnd(3);
    if (net_mode == 1) begin              // exchange the nets
      c.cntt = b.cntt; c.cnsel = b.cnsel; c.outsel = b.outsel;
      d.cntt = a.cntt; d.cnsel = a.cnsel; d.outsel = a.outsel;
    end else if (net_mode == 2) begin     // mix rows
      for (int r = 0; r < 2**CN_IN; r++) if (rnd(2) == 0) begin
        c.cntt[r] = b.cntt[r];
        d.cntt[r] = a.cntt[r];
      end
    end
  endfunction

  function automatic void duplicate(ref genome_t g);
    int from, to;
    from = rnd(N_SM);
    to = rnd(N_SM);
    g.tt[to] = g.tt[from]; g.ot[to] = g.ot[from]; g.moore_pure[to] = g.moore_pure[from];
    g.nout[to] = g.nout[from]; g.smsel[to] = g.smsel[from];
  endfunction

  // ------------------------------------------------------------- main
  task automatic experiment(input env_e env, input int tournaments, input int switch_at);
    int n, best, best_prev, worse, s;
    real mean;
    env_sel = env;
    n = 40;
    for (int p = 0; p < POP; p++) begin
      random_genome(pop[p]);
      load(pop[p]);
      evaluate(n, score[p]);
    end
    best_prev = 1 << 30;
    worse = 0;
    for (int t = 0; t < tournaments; t++) begin
      int idx [4];
      genome_t c, d;
      if (t == switch_at) begin
        n = 70;
        for (int p = 0; p < POP; p++) begin
          load(pop[p]);
          evaluate(n, score[p]);
        end
        best_prev = 1 << 30;
      end
      // draw four distinct individuals and sort them by score
      for (int i = 0; i < 4; i++) begin
        bit dup;
        do begin
          idx[i] = rnd(POP);
          dup = 0;
          for (int j = 0; j < i; j++) if (idx[j] == idx[i]) dup = 1;
        end while (dup);
      end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 3 - i; j++)
          if (score[idx[j]] > score[idx[j+1]]) begin
            int tmp;
            tmp = idx[j]; idx[j] = idx[j+1]; idx[j+1] = tmp;
          end
      crossover(pop[idx[0]], pop[idx[1]], c, d);
      if (rnd(10) == 0) duplicate(c);
      if (rnd(10) == 0) duplicate(d);
      repeat (1 + rnd(3)) mutate(c);
      repeat (1 + rnd(3)) mutate(d);
      pop[idx[2]] = c;
      pop[idx[3]] = d;
      load(c);
      evaluate(n, score[idx[2]]);
      load(d);
      evaluate(n, score[idx[3]]);
      best = 1 << 30;
      mean = 0.0;
      for (int p = 0; p < POP; p++) begin
        if (score[p] < best) best = score[p];
        mean += real'(score[p]) / POP;
      end
      if (best > best_prev) worse++;
      best_prev = best;
      if (t % 25 == 0 || t == tournaments - 1)
        $display("tournament %0d (n=%0d): best %0d mean %0.1f", t, n, best, mean);
    end
    check(worse == 0, "best score got worse within a phase");
    // rescore the best individual: the hardware must reproduce its score
    begin
      int bi;
      bi = 0;
      for (int p = 1; p < POP; p++) if (score[p] < score[bi]) bi = p;
      load(pop[bi]);
      evaluate(n, s);
      check(s == score[bi], $sformatf("rescoring gave %0d, first %0d", s, score[bi]));
      $display("best individual: score %0d with n=%0d", s, n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    $display("IR detector (a score of 128 means no mistakes)");
    experiment(ENV_IR, TOURNAMENTS, SWITCH_AT);
    $display("multiplier (a score of 0 means no mistakes)");
    experiment(ENV_MULT, TOURNAMENTS, TOURNAMENTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
