# Evolvable state-machine structure

Evolving hardware works best when the thing being evolved is close to the
hardware that will run it. This design evolves neither gates nor FPGA
bitstreams. It evolves a fixed structure of small synchronous state machines
that co-operate over a shared bus, with a combinational net at the output.
Crossover swaps whole machines between two individuals, and mutation edits a
machine's transitions and outputs or the output net. Scoring an individual by
simulation, or by synthesis and place and route, is slow. So the RTL here
builds the structure in a form that can be **reconfigured**:

- every transition table, output table and truth table is a RAM;
- every connection from the bus to a unit goes through a multiplexer set by a
  register.

A host loads a new individual by writing tables and registers, then starts a
scoring run. On-chip test environments apply stimulus, and a fitness unit
counts the errors. No place and route happens between individuals.

Two test problems are built in:

- **IR-style burst detector.** A 10 kHz square wave is present or absent over
  random intervals. The output must say whether the wave is present.
- **4 × 4 multiplier.** Two 4-bit numbers go in and an 8-bit product comes out.

Stimulus can also come from pins, for any other problem.

```
            ext_in / IR burst wave / multiplier operands
                        |
   bus[7:0]   <---------+                                   +--> out[7:0]
   bus[11:8]  <-- machine 0  <-- mux <-- bus                |
   bus[15:12] <-- machine 1  <-- mux <-- bus          output muxes
   bus[19:16] <-- machine 2  <-- mux <-- bus          (any bus bit or
   bus[23:20] <-- machine 3  <-- mux <-- bus           any net output)
   bus[27:24] <-- pu_out (predefined unit, external)        ^
                  pu_in  <-- mux <-- bus                    |
                                        bus --> mux --> truth-table RAM (net)
```

## The bus

Every writer owns a fixed group of bus bits, and that assignment never changes.
This is what makes crossover by machine swapping meaningful: machine *k* of a
child still drives the same bits as machine *k* of its parent. With the
default parameters the bus is 28 bits wide:

| bits  | driven by |
|-------|-----------|
| 7:0   | the input slot: `ext_in`, or the IR wave in bit 0, or `{b, a}` of the multiplier |
| 11:8  | state machine 0 |
| 15:12 | state machine 1 |
| 19:16 | state machine 2 |
| 23:20 | state machine 3 |
| 27:24 | predefined unit (`pu_out` port) |

Readers are not tied to fixed bits. Each input of each unit has its own select
register, so it can take any bus bit. A select value past the end of the bus
reads 0, which is how an input is left unconnected. The hardware does not stop
an input from choosing a bus bit far from its machine. Limiting connections to
"nearby" bits is left to the software that makes the configurations.

## Reconfigurable state machine (`rsm`)

Each machine is a Moore machine with 16 states (`SM_STATE_W = 4`), 4 inputs and
4 outputs. It has two small RAMs:

- **Transition table**, 256 × 5 bits, addressed by `{state, inputs}`. An entry
  is `{valid, next_state}`. On each rising clock edge the machine moves to
  `next_state` if `valid` is 1. If `valid` is 0, the entry is a *deleted
  transition* and the machine stays where it is. Deleting, adding and
  changing transitions are the mutations the tables must support, so one
  entry is one transition.
- **Output table**, 16 × 4 bits, addressed by state. It is used in *Moore*
  mode, where the output values per state are evolved. In *pure-Moore* mode
  the state bits themselves are the outputs, and this table is ignored.

A control register holds the mode (bit 0) and the number of outputs the
machine really has (bits 7:4). Output bits at or above that count are driven 0.
This lets a machine with fewer outputs than bus bits leave its other bits at
logic 0. A machine with fewer than 16 states simply never reaches the others.

Timing: the state register is the only storage in the data path. Outputs
depend on the state alone. A change on a machine's inputs therefore shows on
its bus bits one clock later. Every machine makes one transition per clock,
and all machines share the same clock. The RAM read is asynchronous (a
distributed/LUT RAM). With a block RAM's registered read, the state register
would move into the RAM's output register instead.

`start` (`clear` on the machine) puts every machine in state 0. Every
individual therefore begins its scoring from the same point.

## Output net and output multiplexers (`comb_net`, `bus_select`)

The combinational net is a truth table of 256 rows × 8 bits. Its 8 address
bits are 8 bus bits, each chosen by a select register. The input slot is on
the bus, so the net can combine structure inputs with machine states. This
makes the structure as a whole a Mealy machine, although each machine is a
Moore machine. Mixing two parents' nets (some rows from each) is a row-by-row
copy of this table.

Each of the 8 structure outputs is one more multiplexer over a 36-bit
vector `{bus, net outputs}`:

- select value 0..7 picks net output *k*;
- 8..35 picks bus bit *k − 8*;
- anything higher gives 0.

The path from the state registers through the net and the multiplexers to
`out` is combinational.

## Loading an individual

Configuration is one 25-bit word per clock on `cfg` (a `cfg_t` struct in
`ehw_pkg`): `we`, `unit[3:0]`, `addr[11:0]`, `data[7:0]`. Bits `addr[11:10]`
choose a region within the unit.

| unit | region `addr[11:10]` | `addr` low bits | `data` |
|------|----------------------|-----------------|--------|
| 0..3 (machine *k*) | 0 table  | `{state, inputs}` (8 bits) | `{valid, next_state}` |
|                    | 1 output | state (4 bits) | output bits (4) |
|                    | 2 select | machine input (2 bits) | bus bit index |
|                    | 3 ctrl   | – | bit 0 pure-Moore, bits 7:4 outputs used |
| 4 (predefined unit) | 2 select | unit input | bus bit index |
| 5 (output net) | 0 table  | row (8 bits) | output bits (8) |
|                | 2 select | net input (3 bits) | bus bit index |
| 6 (outputs)    | 2 select | output bit (3 bits) | index into `{bus, net}` |

A full individual takes 4 × (256 + 16 + 4 + 1) + 4 + 256 + 8 + 8 = 1384
writes. Table RAMs are not reset, so every entry must be written once before
the first run. Select and control registers reset to 0 (Moore mode, all
outputs).

## Scoring an individual

1. Set `env_sel` (`ENV_EXTERNAL`, `ENV_IR` or `ENV_MULT`) and `n_reads`.
2. Pulse `start` for one clock. This clears every machine to state 0, restarts
   the chosen environment's pseudo-random sequence from its seed, clears the
   score and raises `busy`.
3. While `busy` is high, the environment drives the input slot. At each of its
   read strobes the fitness unit adds |y − x|, where x is the output and y is
   the correct value.
4. After the `n_reads`-th reading, `busy` falls and `done` rises in the same
   clock. `fitness` then holds the score until the next `start`.

The score is `bias + f(x) + Σ|y − x|`, and lower is better:

- `bias` is 128 for the detector problem and 0 otherwise.
- `f(x)` is `PENALTY` (32) if every reading of x was the same value, and 0
  otherwise. This stops an individual from scoring well with a constant
  output. With 70 one-bit readings the detector's score stays within
  128 … 230, so it fits in 8 bits as intended. `constant` shows whether the
  penalty was applied.

The two environments:

- **IR (`ir_env`)**:
  - Signal and timing:
    - The wave is a square wave whose half period is `IR_HALF` clocks. The
      default of 4 means an 80 kHz clock gives 10 kHz.
    - It appears only in bursts, and each burst starts high.
    - Burst and pause lengths are 2 to 17 whole periods.
    - Reads come 9 to 40 clocks apart, at irregular times.
  - Only bit 0 of the input slot and of the output are used. The correct
    answer is 1 during a burst and 0 during a pause.
  - The irregular bursts and reads mean that a construction cannot answer from
    elapsed time alone.
  - A construction may toggle its output all the time and still score
    perfectly, as long as the value is right at every read instant.
- **Multiplier (`mul_env`)**:
  - An operand pair is applied as `{b, a}` on bus bits 7:0 and held for
    `MUL_HOLD` (8) clocks.
  - The output is read in the last of those clocks, and the correct value is
    `a*b`.

With `ENV_EXTERNAL` the input slot is `ext_in`, the read strobe is
`ext_sample` and the correct value is `ext_expected`. The bias is 0.

## Parameters of `ehw_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `IN_W` | 8 | input-slot bits (two 4-bit operands) |
| `OUT_W` | 8 | structure outputs (8-bit product) |
| `N_SM` | 4 | state machines |
| `SM_IN`, `SM_STATE_W`, `SLOT_W` | 4, 4, 4 | machine inputs, state bits, bus bits per machine |
| `PU_IN`, `PU_W` | 4, 4 | predefined-unit inputs and bus bits |
| `CN_IN`, `CN_OUT` | 8, 8 | output-net address bits and outputs |
| `IR_HALF` | 4 | clocks per half period of the 10 kHz wave |
| `MUL_HOLD` | 8 | clocks each operand pair is held |
| `IR_BIAS`, `PENALTY` | 128, 32 | score offset for the detector, constant-output penalty |
| `FIT_W` | 16 | score width |

Elaboration-time checks stop configurations that cannot be addressed through
the 12-bit address and 8-bit data fields. Examples are `SM_STATE_W + SM_IN`
above 10, or more than 15 units. The multiplier environment needs `IN_W` and
`OUT_W` of at least 8.

With the defaults the design holds 345 flip-flops and 7424 RAM bits: four
machines of 1344 bits each plus the 2048-bit truth table.

## What follows the source and what is this design's own

The following come from the source:

- the structure itself: co-operating synchronous Moore / pure-Moore machines;
- a bus on which each machine and the input own fixed bits, and unused machine
  outputs drive 0;
- inputs connected to any bus bit;
- a combinational output net that reads any bus bits;
- outputs taken from the bus or from the net;
- tables in RAM and connections through register-controlled multiplexers;
- a slot for a predefined unit;
- four machines per individual;
- the two test problems: two 4-bit inputs with an 8-bit output, and a 10 kHz
  signal with random intervals and irregular reads;
- the score `128 + f(x) + Σ|y − x|` (bias 0 for the multiplier), with n = 40
  readings later raised to 70.

This design chose the following:

- all widths other than the ones above: 4 inputs, 16 states and 4 bus bits
  per machine, and the size of the net;
- the valid bit that represents a deleted transition;
- the control-register output count;
- asynchronous-read RAMs;
- the configuration word format and address map;
- resetting to state 0 at the start of every scoring run;
- the clock rate relative to 10 kHz;
- the burst, pause and read-gap ranges and the LFSR seeds;
- the hold time of the multiplier operands;
- the form of `f(x)`: a fixed penalty for an output that never changed;
- the environment selector that lets the pins, the detector environment and
  the multiplier environment share one structure.

## What is not here

- **The predefined unit.** Its function depends on the problem and is not
  defined. `pu_in` carries the bus bits selected for it, and the unit's
  outputs return on `pu_out` into bus bits 27:24. Tie `pu_out` to 0 if there is
  none.
- **The evolutionary algorithm.** It belongs on a host:
  - crossover that swaps machines and mixes net rows;
  - mutation of transitions, outputs and the net;
  - duplication of a machine over another;
  - steady-state tournaments of four, or generational selection.

  The hardware scores one individual per `start`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_config_ram` | table RAM against a copy, including a read just after a rewrite |
| `tb_bus_select` | random select values (some off the bus) against bits picked by the testbench |
| `tb_rsm` | random tables with deleted entries, Moore, pure-Moore and reduced-output modes, `clear`, state and outputs every clock |
| `tb_comb_net` | random truth tables and selections, then half the rows rewritten |
| `tb_ir_env` | wave shape, burst and pause lengths, read gaps, freeze when idle, identical replay after restart |
| `tb_mul_env` | read every `HOLD` clocks, operands held, correct product, variety of operands |
| `tb_fitness_unit` | score against the formula for random runs of 1..100 readings, `done` timing, penalty on and off |
| `tb_ehw_top` | whole design at default sizes, against a full cycle-accurate model kept by the testbench (see below) |
| `tb_evolve` | the two evolution experiments run on the hardware, with the testbench as host (see below) |

`tb_ehw_top` compares the bus and the outputs every clock, and each score, with
its model. It runs:

- a hand-loaded perfect multiplier, which must score 0;
- a constant-output individual, which must receive the penalty;
- a hand-built detector, scored with 40 and then 70 readings. Machine 0 counts
  quiet clocks, and machine 1 runs in pure-Moore mode. The detector scores
  128, which means no errors;
- a random individual driven from the pins.

It also counts each mechanism and fails if one never occurs:

- deleted transitions;
- pure-Moore outputs;
- masked output bits;
- the predefined-unit path;
- the path from input to output through the net;
- the penalty;
- each environment;
- both reading counts.

`tb_evolve` plays the host program. It runs a steady-state genetic algorithm
over a population of 16 and loads every individual through `cfg`:

1. Each step draws four individuals at random. The two best make two children,
   which replace the two worst. Children come from machine-slot crossover,
   copying or mixing the output net, machine duplication and table mutations.
2. The detector experiment runs 300 such tournaments. It uses 40 readings,
   switching to 70 after 200 tournaments, and rescores the whole population at
   the switch.
3. The multiplier experiment then runs 300 tournaments with 40 readings.

Every score the hardware reports must equal the score of the testbench's own
clock-by-clock model, and the bus and output are compared with that model
every clock. The run prints the best and mean scores as evolution proceeds.
It takes a few seconds.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ehw_top \
    rtl/ehw_pkg.sv tb/tb_ehw_top.sv
./obj_dir/Vtb_ehw_top
```

Substitute any other testbench name. `ehw_pkg.sv` must come first because
`rsm`, `comb_net` and `ehw_top` import it.

## Files

`rtl/`:

- `ehw_pkg.sv` – configuration word, regions, environment codes
- `config_ram.sv` – table RAM
- `bus_select.sv` – select registers and multiplexers
- `rsm.sv` – state machine
- `comb_net.sv` – output net
- `lfsr16.sv` – pseudo-random source
- `ir_env.sv`, `mul_env.sv` – environments
- `fitness_unit.sv` – scoring
- `ehw_top.sv` – top level

`tb/` holds one testbench per module, except `lfsr16`, which is tested through
the two environments.
