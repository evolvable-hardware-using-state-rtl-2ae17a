// tb_bus_select: self-checking test of the register-controlled bus
// multiplexers.  Writes random select values (some beyond the bus, which
// must read 0), applies random bus values and compares every multiplexer
// output with a bit picked by the testbench itself.  Also checks that the
// select registers come out of reset at 0.
module tb_bus_select;
  localparam int BUS_W = 28;
  localparam int N_SEL = 4;
  localparam int IDX_W = 2;
  localparam int SEL_W = 5;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             cfg_we = 1'b0;
  logic [IDX_W-1:0] cfg_idx = '0;
  logic [SEL_W-1:0] cfg_sel = '0;
  logic [BUS_W-1:0] bus = '0;
  logic [N_SEL-1:0] sel_out;
  int               sel_m [N_SEL];
  int checks = 0, failures = 0;

  bus_select #(.BUS_W(BUS_W), .N_SEL(N_SEL)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N_SEL; i++) begin
      logic want;
      want = (sel_m[i] < BUS_W) ? bus[sel_m[i]] : 1'b0;
      checks++;
      if (sel_out[i] !== want) begin
        failures++;
        $display("sel %0d (bit %0d): got %b want %b", i, sel_m[i], sel_out[i], want);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_SEL; i++) sel_m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      bus = BUS_W'($urandom);
      #1 check_all();
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if ($urandom % 2 == 0) begin
        int i, s;
        i = int'($urandom % N_SEL);
        s = int'($urandom % 32);
        cfg_we = 1'b1; cfg_idx = IDX_W'(i); cfg_sel = SEL_W'(s);
        @(negedge clk);
        cfg_we = 1'b0;
        sel_m[i] = s;
      end
      bus = BUS_W'($urandom);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
