// ehw_pkg: types and constants shared by the reconfigurable state-machine
// structure.
//
// Configuration is written one word at a time over a single-cycle write
// port (cfg_t).  Every configurable unit has a unit number; inside a unit
// the two top bits of the address choose a region (transition table,
// output table, input-select registers, control register) and the
// remaining bits address an entry in that region.  The word layout is this
// design's own choice; the source only says that the tables are kept in RAM
// and that the multiplexers are set by registers.
package ehw_pkg;

  localparam int CFG_UNIT_W = 4;
  localparam int CFG_ADDR_W = 12;
  localparam int CFG_DATA_W = 8;
  // Region field position inside cfg_t.addr.
  localparam int REGION_LSB = CFG_ADDR_W - 2;

  typedef struct packed {
    logic                  we;
    logic [CFG_UNIT_W-1:0] unit;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_t;

  typedef enum logic [1:0] {
    RGN_TABLE  = 2'd0,  // transition table / truth table entry
    RGN_OUTPUT = 2'd1,  // Moore output table entry
    RGN_SELECT = 2'd2,  // input multiplexer select register
    RGN_CTRL   = 2'd3   // machine control register
  } cfg_region_e;

  // Source of the structure's input slot and of the expected values.
  typedef enum logic [1:0] {
    ENV_EXTERNAL = 2'd0,  // stimulus, expected value and read strobe from pins
    ENV_IR       = 2'd1,  // on-chip 10 kHz burst detector environment
    ENV_MULT     = 2'd2   // on-chip 4x4 multiplier environment
  } env_e;

  function automatic cfg_region_e region_of(logic [CFG_ADDR_W-1:0] a);
    return cfg_region_e'(a[REGION_LSB +: 2]);
  endfunction

endpackage
