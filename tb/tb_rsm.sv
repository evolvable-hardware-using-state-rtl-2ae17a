// tb_rsm: self-checking test of one reconfigurable state machine.
// Loads random transition tables (about a quarter of the entries deleted),
// random Moore outputs, then runs it on random inputs and compares state
// and outputs every clock with a model kept by the testbench.  It repeats
// this in pure-Moore mode and with fewer outputs in use, and checks that
// `clear` returns the machine to state 0.
module tb_rsm;
  import ehw_pkg::*;
  localparam int IN_W = 4, STATE_W = 4, OUT_W = 4;

  logic                  clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic                  cfg_we = 1'b0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_DATA_W-1:0] cfg_data = '0;
  logic [IN_W-1:0]       in = '0;
  logic [OUT_W-1:0]      out;
  logic [STATE_W-1:0]    state;

  logic [STATE_W:0]   t_m [2**(STATE_W+IN_W)];
  logic [OUT_W-1:0]   o_m [2**STATE_W];
  logic               pure_m = 1'b0;
  int                 nout_m = OUT_W;
  logic [STATE_W-1:0] s_m = '0;
  int checks = 0, failures = 0, deleted_seen = 0;

  rsm #(.IN_W(IN_W), .STATE_W(STATE_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input cfg_region_e r, input int a, input int d);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = {r, (CFG_ADDR_W-2)'(a)};
    cfg_data = CFG_DATA_W'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic logic [OUT_W-1:0] model_out();
    logic [OUT_W-1:0] raw, o;
    raw = pure_m ? OUT_W'(s_m) : o_m[s_m];
    for (int i = 0; i < OUT_W; i++) o[i] = raw[i] && (i < nout_m);
    return o;
  endfunction

  task automatic load_random();
    for (int a = 0; a < 2**(STATE_W+IN_W); a++) begin
      logic [STATE_W:0] e;
      e = (STATE_W+1)'($urandom);
      e[STATE_W] = ($urandom % 4) != 0;
      cfg_write(RGN_TABLE, a, int'(e));
      t_m[a] = e;
    end
    for (int s = 0; s < 2**STATE_W; s++) begin
      logic [OUT_W-1:0] o;
      o = OUT_W'($urandom);
      cfg_write(RGN_OUTPUT, s, int'(o));
      o_m[s] = o;
    end
  endtask

  task automatic run(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      in = IN_W'($urandom);
      #1;
      checks++;
      if (state !== s_m || out !== model_out()) begin
        failures++;
        $display("cycle %0d: state %0d/%0d out %b/%b", c, state, s_m, out, model_out());
      end
      @(posedge clk);
      if (!t_m[{s_m, in}][STATE_W]) deleted_seen++;
      else s_m = t_m[{s_m, in}][STATE_W-1:0];
      @(negedge clk);
    end
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    s_m = '0;
    #1;
    checks++;
    if (state !== '0) begin
      failures++;
      $display("clear: state %0d", state);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_random();
    do_clear();
    run(300);
    // pure Moore, all outputs
    cfg_write(RGN_CTRL, 0, 'h41);
    pure_m = 1'b1; nout_m = 4;
    do_clear();
    run(200);
    // Moore, two outputs used
    cfg_write(RGN_CTRL, 0, 'h20);
    pure_m = 1'b0; nout_m = 2;
    load_random();
    do_clear();
    run(300);
    checks++;
    if (deleted_seen == 0) begin
      failures++;
      $display("no deleted transition was exercised");
    end
    $display("deleted transitions exercised: %0d", deleted_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
