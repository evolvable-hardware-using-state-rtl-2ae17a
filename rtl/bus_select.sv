// bus_select: register-controlled multiplexers between the bus and the
// inputs of one unit.
//
// In the evolved structure the inputs of a state machine (and of the
// output net) are not tied to fixed bus pins: each input is connected to a
// bus bit chosen by evolution.  In the reconfigurable version every such
// input is a multiplexer whose select value sits in a register written by
// the configuration port.  This module holds N_SEL select registers and
// the N_SEL multiplexers.  A select value of BUS_W or more drives a 0,
// which gives evolution a way to leave an input unconnected (this
// design's choice).  Select registers reset to 0 (bus bit 0).
//
// Interface: cfg_we/cfg_idx/cfg_sel write select register cfg_idx at the
// rising edge; sel_out is a combinational function of bus and registers.
module bus_select #(
  parameter int BUS_W = 28,
  parameter int N_SEL = 4,
  parameter int IDX_W = (N_SEL > 1) ? $clog2(N_SEL) : 1,
  parameter int SEL_W = $clog2(BUS_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  logic [SEL_W-1:0] cfg_sel,
  input  logic [BUS_W-1:0] bus,
  output logic [N_SEL-1:0] sel_out
);

  logic [SEL_W-1:0] sel_q [N_SEL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SEL; i++) sel_q[i] <= '0;
    end else if (cfg_we && (int'(cfg_idx) < N_SEL)) begin
      sel_q[cfg_idx] <= cfg_sel;
    end
  end

  always_comb begin
    for (int i = 0; i < N_SEL; i++) begin
      sel_out[i] = (int'(sel_q[i]) < BUS_W) ? bus[sel_q[i]] : 1'b0;
    end
  end

endmodule
