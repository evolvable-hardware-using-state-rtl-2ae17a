// tb_comb_net: self-checking test of the output net.  Loads a random
// truth table and random input selections, applies random bus values and
// checks the net's outputs against the table row the testbench itself
// assembles from the selected bus bits.  Then rewrites half of the rows
// (as the row-mixing crossover would) and checks again.
module tb_comb_net;
  import ehw_pkg::*;
  localparam int BUS_W = 28, CN_IN = 8, CN_OUT = 8;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  cfg_we = 1'b0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_DATA_W-1:0] cfg_data = '0;
  logic [BUS_W-1:0]      bus = '0;
  logic [CN_OUT-1:0]     out;

  logic [CN_OUT-1:0] tt_m [2**CN_IN];
  int                sel_m [CN_IN];
  int checks = 0, failures = 0;

  comb_net #(.BUS_W(BUS_W), .CN_IN(CN_IN), .CN_OUT(CN_OUT)) dut (.*);

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

  task automatic check_random(input int n);
    for (int t = 0; t < n; t++) begin
      logic [CN_IN-1:0] row;
      @(negedge clk);
      bus = BUS_W'($urandom);
      for (int i = 0; i < CN_IN; i++) row[i] = bus[sel_m[i]];
      #1;
      checks++;
      if (out !== tt_m[row]) begin
        failures++;
        $display("row %h: got %h want %h", row, out, tt_m[row]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**CN_IN; a++) begin
      tt_m[a] = CN_OUT'($urandom);
      cfg_write(RGN_TABLE, a, int'(tt_m[a]));
    end
    for (int i = 0; i < CN_IN; i++) begin
      sel_m[i] = int'($urandom % BUS_W);
      cfg_write(RGN_SELECT, i, sel_m[i]);
    end
    check_random(300);
    for (int a = 0; a < 2**CN_IN; a += 2) begin
      tt_m[a] = CN_OUT'($urandom);
      cfg_write(RGN_TABLE, a, int'(tt_m[a]));
    end
    check_random(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
