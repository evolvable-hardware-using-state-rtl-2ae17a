// comb_net: the combinational net at the output of the structure, coded as
// a truth table in RAM.
//
// Each of the CN_IN inputs of the net is connected to any bus bit through a
// register-controlled multiplexer (bus_select); the selected bits form the
// address of a truth table whose CN_OUT-bit words are the net's outputs.
// Because the bus also carries the structure's inputs, the net can make
// the whole structure behave as a Mealy machine.  Crossover that mixes two
// nets takes some rows of this table from each parent, so one row is one
// configuration word.  Widths are this design's choice.
//
// Configuration (cfg_we set for this unit):
//   RGN_TABLE : cfg_addr[CN_IN-1:0] = row, cfg_data[CN_OUT-1:0] = outputs
//   RGN_SELECT: cfg_addr[3:0] = net input, cfg_data = bus bit index
// Timing: purely combinational from bus to out.
module comb_net
  import ehw_pkg::*;
#(
  parameter int BUS_W  = 28,
  parameter int CN_IN  = 8,
  parameter int CN_OUT = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  logic [CFG_DATA_W-1:0] cfg_data,
  input  logic [BUS_W-1:0]      bus,
  output logic [CN_OUT-1:0]     out
);

  localparam int IDX_W = (CN_IN > 1) ? $clog2(CN_IN) : 1;
  localparam int SEL_W = $clog2(BUS_W + 1);

  if (CN_IN > REGION_LSB) begin : g_check1
    $error("comb_net: truth table does not fit the address field");
  end
  if (CN_OUT > CFG_DATA_W) begin : g_check2
    $error("comb_net: output row wider than the data field");
  end
  if (SEL_W > CFG_DATA_W) begin : g_check3
    $error("comb_net: select value wider than the data field");
  end

  cfg_region_e rgn;
  assign rgn = region_of(cfg_addr);

  logic [CN_IN-1:0] row;

  bus_select #(.BUS_W(BUS_W), .N_SEL(CN_IN)) u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_we (cfg_we && rgn == RGN_SELECT),
    .cfg_idx(cfg_addr[IDX_W-1:0]),
    .cfg_sel(cfg_data[SEL_W-1:0]),
    .bus    (bus),
    .sel_out(row)
  );

  config_ram #(.ADDR_W(CN_IN), .DATA_W(CN_OUT)) u_truth (
    .clk  (clk),
    .we   (cfg_we && rgn == RGN_TABLE),
    .waddr(cfg_addr[CN_IN-1:0]),
    .wdata(cfg_data[CN_OUT-1:0]),
    .raddr(row),
    .rdata(out)
  );

endmodule
