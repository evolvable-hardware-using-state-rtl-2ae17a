// tb_config_ram: self-checking test of the configuration table RAM.
// Fills every entry with random words, keeps its own copy, and checks
// random reads (including a read of a word in the clock right after it was
// written) against that copy.
module tb_config_ram;
  localparam int ADDR_W = 8;
  localparam int DATA_W = 8;

  logic              clk = 1'b0;
  logic              we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] model [2**ADDR_W];
  int checks = 0, failures = 0;

  config_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = ADDR_W'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) write(a, DATA_W'($urandom));
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      raddr = ADDR_W'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("read %0d: got %h want %h", raddr, rdata, model[raddr]);
      end
    end
    // overwrite and read back immediately
    for (int i = 0; i < 50; i++) begin
      int a;
      logic [DATA_W-1:0] d;
      a = int'($urandom % (2**ADDR_W));
      d = DATA_W'($urandom);
      write(a, d);
      raddr = ADDR_W'(a);
      #1;
      checks++;
      if (rdata !== d) begin
        failures++;
        $display("rewrite %0d: got %h want %h", a, rdata, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
