// config_ram: a table memory that is filled through the configuration port
// and read by the logic it serves.
//
// The structure keeps every state-transition table, every Moore output
// table and the truth table of the output net in RAM, so that a new
// individual is loaded by writing tables instead of by place and route.
// This module is that RAM: one synchronous write port used while loading a
// configuration and one asynchronous read port used by the running
// machine, as in a distributed (LUT) RAM.  Asynchronous read is this
// design's choice; it lets a state machine take one transition per clock
// without an extra pipeline stage.  Contents are not reset: a
// configuration must write every entry that will be read.
//
// Timing: a write at a rising edge is visible on rdata right after that
// edge; rdata follows raddr combinationally.
module config_ram #(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
