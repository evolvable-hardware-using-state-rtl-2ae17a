// ehw_top: a reconfigurable structure of co-operating state machines that
// can be evolved and scored on chip without place and route.
//
// All units share one bus.  The structure's input owns the low IN_W bits;
// each of the N_SM state machines owns SLOT_W bits above them, and a
// predefined (problem-specific) unit owns the top PU_W bits.  Every unit
// reads the bus through register-controlled multiplexers, so any input can
// be tied to any bus bit.  A combinational net, stored as a truth table in
// RAM, reads CN_IN bus bits; each structure output is then a multiplexed
// choice among the net's outputs and all bus bits.  A new individual is
// loaded by writing tables and select registers through `cfg`.
//
// Around the structure sits the test environment: the input slot can be
// driven from pins, from the 10 kHz burst generator (IR-detector problem)
// or from the operand generator (4x4 multiplier problem), and a fitness
// unit compares the output with the correct value at each read instant.
// A one-clock `start` puts every machine in state 0, restarts the chosen
// environment and clears the score; `done` rises after `n_reads`
// readings with the score on `fitness` (lower is better).  The predefined
// unit is outside this module: its selected inputs leave on `pu_in`, its
// outputs return on `pu_out`.
//
// Configuration units (cfg.unit): 0..N_SM-1 state machines (see rsm and,
// for RGN_SELECT, the machine's input multiplexers), N_SM the predefined
// unit's input multiplexers, N_SM+1 the combinational net, N_SM+2 the
// output multiplexers (select value k < CN_OUT picks net output k, k >= CN_OUT
// picks bus bit k-CN_OUT).  The bus layout, the widths and the environment
// selector are this design's choices; the block structure follows the
// source's proposed test circuit.
//
// Timing: one state transition per machine per clock; the output path from
// the state registers through the net and multiplexers is combinational.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int IN_W        = 8,
  parameter int OUT_W       = 8,
  parameter int N_SM        = 4,
  parameter int SM_IN       = 4,
  parameter int SM_STATE_W  = 4,
  parameter int SLOT_W      = 4,
  parameter int PU_IN       = 4,
  parameter int PU_W        = 4,
  parameter int CN_IN       = 8,
  parameter int CN_OUT      = 8,
  parameter int IR_HALF     = 4,
  parameter int MUL_HOLD    = 8,
  parameter int IR_BIAS     = 128,
  parameter int PENALTY     = 32,
  parameter int FIT_W       = 16,
  localparam int BUS_W      = IN_W + N_SM * SLOT_W + PU_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  env_e              env_sel,
  input  logic              start,
  input  logic [7:0]        n_reads,
  input  logic [IN_W-1:0]   ext_in,
  input  logic              ext_sample,
  input  logic [OUT_W-1:0]  ext_expected,
  output logic [PU_IN-1:0]  pu_in,
  input  logic [PU_W-1:0]   pu_out,
  output logic [OUT_W-1:0]  out,
  output logic [BUS_W-1:0]  bus,
  output logic              busy,
  output logic              done,
  output logic              constant,
  output logic [FIT_W-1:0]  fitness
);

  localparam int U_PU  = N_SM;
  localparam int U_CN  = N_SM + 1;
  localparam int U_OUT = N_SM + 2;
  localparam int OBUS_W = CN_OUT + BUS_W;

  if (U_OUT >= 2**CFG_UNIT_W) begin : g_check1
    $error("ehw_top: too many units for the unit field");
  end
  if ($clog2(OBUS_W + 1) > CFG_DATA_W) begin : g_check2
    $error("ehw_top: output select wider than the data field");
  end
  if (IN_W < 8 || OUT_W < 8) begin : g_check3
    $error("ehw_top: multiplier environment needs 8 inputs and 8 outputs");
  end

  cfg_region_e rgn;
  assign rgn = region_of(cfg.addr);

  // one write-enable per configuration unit
  logic [2**CFG_UNIT_W-1:0] unit_hit;
  always_comb begin
    unit_hit = '0;
    unit_hit[cfg.unit] = cfg.we;
  end

  // ---------------------------------------------------------------- input
  logic       ir_sig, ir_present, ir_sample;
  logic [3:0] mul_a, mul_b;
  logic [7:0] mul_p;
  logic       mul_sample;
  logic [IN_W-1:0] in_slot;

  always_comb begin
    unique case (env_sel)
      ENV_IR:   in_slot = IN_W'(ir_sig);
      ENV_MULT: in_slot = IN_W'({mul_b, mul_a});
      default:  in_slot = ext_in;
    endcase
  end

  assign bus[IN_W-1:0] = in_slot;

  // --------------------------------------------------------- state machines
  for (genvar k = 0; k < N_SM; k++) begin : g_sm
    logic [SM_IN-1:0]      sm_in;
    logic [SM_STATE_W-1:0] sm_state;

    bus_select #(.BUS_W(BUS_W), .N_SEL(SM_IN)) u_sel (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg_we (unit_hit[k] && rgn == RGN_SELECT),
      .cfg_idx(cfg.addr[((SM_IN > 1) ? $clog2(SM_IN) : 1)-1:0]),
      .cfg_sel(cfg.data[$clog2(BUS_W + 1)-1:0]),
      .bus    (bus),
      .sel_out(sm_in)
    );

    rsm #(.IN_W(SM_IN), .STATE_W(SM_STATE_W), .OUT_W(SLOT_W)) u_sm (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (start),
      .cfg_we  (unit_hit[k]),
      .cfg_addr(cfg.addr),
      .cfg_data(cfg.data),
      .in      (sm_in),
      .out     (bus[IN_W + k*SLOT_W +: SLOT_W]),
      .state   (sm_state)
    );
  end

  // ------------------------------------------------------- predefined unit
  bus_select #(.BUS_W(BUS_W), .N_SEL(PU_IN)) u_pu_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_we (unit_hit[U_PU] && rgn == RGN_SELECT),
    .cfg_idx(cfg.addr[((PU_IN > 1) ? $clog2(PU_IN) : 1)-1:0]),
    .cfg_sel(cfg.data[$clog2(BUS_W + 1)-1:0]),
    .bus    (bus),
    .sel_out(pu_in)
  );

  assign bus[BUS_W-1 -: PU_W] = pu_out;

  // ------------------------------------------------ combinational net, output
  logic [CN_OUT-1:0] cn_out;

  comb_net #(.BUS_W(BUS_W), .CN_IN(CN_IN), .CN_OUT(CN_OUT)) u_cn (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_we  (unit_hit[U_CN]),
    .cfg_addr(cfg.addr),
    .cfg_data(cfg.data),
    .bus     (bus),
    .out     (cn_out)
  );

  bus_select #(.BUS_W(OBUS_W), .N_SEL(OUT_W)) u_out_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_we (unit_hit[U_OUT] && rgn == RGN_SELECT),
    .cfg_idx(cfg.addr[((OUT_W > 1) ? $clog2(OUT_W) : 1)-1:0]),
    .cfg_sel(cfg.data[$clog2(OBUS_W + 1)-1:0]),
    .bus    ({bus, cn_out}),
    .sel_out(out)
  );

  // ---------------------------------------------------------- environment
  ir_env #(.HALF_PERIOD(IR_HALF)) u_ir (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .run    (busy && env_sel == ENV_IR),
    .sig    (ir_sig),
    .present(ir_present),
    .sample (ir_sample)
  );

  mul_env #(.A_W(4), .HOLD(MUL_HOLD)) u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .run    (busy && env_sel == ENV_MULT),
    .a      (mul_a),
    .b      (mul_b),
    .product(mul_p),
    .sample (mul_sample)
  );

  logic             f_sample;
  logic [OUT_W-1:0] f_x, f_y;
  logic [7:0]       f_bias;

  always_comb begin
    unique case (env_sel)
      ENV_IR: begin
        f_sample = ir_sample;
        f_x      = OUT_W'(out[0]);
        f_y      = OUT_W'(ir_present);
        f_bias   = 8'(IR_BIAS);
      end
      ENV_MULT: begin
        f_sample = mul_sample;
        f_x      = out;
        f_y      = OUT_W'(mul_p);
        f_bias   = 8'd0;
      end
      default: begin
        f_sample = ext_sample;
        f_x      = out;
        f_y      = ext_expected;
        f_bias   = 8'd0;
      end
    endcase
  end

  logic [FIT_W-1:0] err_sum;

  fitness_unit #(.W(OUT_W), .N_W(8), .FIT_W(FIT_W), .PENALTY(PENALTY)) u_fit (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .n_reads (n_reads),
    .bias    (f_bias),
    .sample  (f_sample),
    .x       (f_x),
    .y       (f_y),
    .busy    (busy),
    .done    (done),
    .err_sum (err_sum),
    .constant(constant),
    .fitness (fitness)
  );

endmodule
