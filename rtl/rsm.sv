// rsm: one reconfigurable synchronous state machine of the evolvable
// structure.
//
// The machine is a Moore machine whose next-state function is a table in
// RAM, indexed by {current state, inputs}.  Each table entry holds a valid
// bit and a next state; an entry whose valid bit is clear is a deleted
// transition and the machine stays in its state (this design's reading of
// "deletion of a state-transition").  In Moore mode the outputs come from
// a second table indexed by state (evolved output values); in pure-Moore
// mode the state bits themselves are the outputs.  A machine may use fewer
// outputs than the bus bits it owns; the unused bits are driven 0, as the
// structure prescribes.  The output count and the mode sit in a control
// register.  Table sizes and the register layout are this design's choice.
//
// Configuration (cfg_we set for this unit, region in cfg_addr[11:10]):
//   RGN_TABLE : cfg_addr[STATE_W+IN_W-1:0] = {state, in},
//               cfg_data[STATE_W] = valid, cfg_data[STATE_W-1:0] = next state
//   RGN_OUTPUT: cfg_addr[STATE_W-1:0] = state, cfg_data[OUT_W-1:0] = outputs
//   RGN_CTRL  : cfg_data[0] = pure-Moore mode, cfg_data[7:4] = outputs used
// Reset and `clear` put the machine in state 0; reset also selects Moore
// mode with all OUT_W outputs used.
//
// Timing: the state register takes the table's next state at each rising
// edge; `out` depends only on the state (and the tables), so a change on
// `in` shows on `out` one clock later.
module rsm
  import ehw_pkg::*;
#(
  parameter int IN_W    = 4,
  parameter int STATE_W = 4,
  parameter int OUT_W   = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  logic [CFG_DATA_W-1:0] cfg_data,
  input  logic [IN_W-1:0]       in,
  output logic [OUT_W-1:0]      out,
  output logic [STATE_W-1:0]    state
);

  localparam int TA_W = STATE_W + IN_W;

  if (TA_W > REGION_LSB) begin : g_check1
    $error("rsm: transition table does not fit the address field");
  end
  if (STATE_W + 1 > CFG_DATA_W) begin : g_check2
    $error("rsm: state too wide for the data field");
  end
  if (OUT_W > 15) begin : g_check3
    $error("rsm: output count field is 4 bits");
  end

  cfg_region_e rgn;
  assign rgn = region_of(cfg_addr);

  // Transition table: {valid, next state}
  logic [STATE_W:0] t_entry;
  config_ram #(.ADDR_W(TA_W), .DATA_W(STATE_W + 1)) u_table (
    .clk  (clk),
    .we   (cfg_we && rgn == RGN_TABLE),
    .waddr(cfg_addr[TA_W-1:0]),
    .wdata(cfg_data[STATE_W:0]),
    .raddr({state, in}),
    .rdata(t_entry)
  );

  // Moore output table
  logic [OUT_W-1:0] o_entry;
  config_ram #(.ADDR_W(STATE_W), .DATA_W(OUT_W)) u_outs (
    .clk  (clk),
    .we   (cfg_we && rgn == RGN_OUTPUT),
    .waddr(cfg_addr[STATE_W-1:0]),
    .wdata(cfg_data[OUT_W-1:0]),
    .raddr(state),
    .rdata(o_entry)
  );

  logic       pure_moore;
  logic [3:0] n_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pure_moore <= 1'b0;
      n_out      <= 4'(OUT_W);
    end else if (cfg_we && rgn == RGN_CTRL) begin
      pure_moore <= cfg_data[0];
      n_out      <= cfg_data[7:4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state <= '0;
    else if (clear)      state <= '0;
    else if (t_entry[STATE_W]) state <= t_entry[STATE_W-1:0];
  end

  logic [OUT_W-1:0] raw;
  assign raw = pure_moore ? OUT_W'(state) : o_entry;

  always_comb begin
    for (int i = 0; i < OUT_W; i++) out[i] = raw[i] && (i < int'(n_out));
  end

endmodule
