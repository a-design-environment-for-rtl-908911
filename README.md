# CRC array: a processor-like reconfigurable datapath in SystemVerilog

A processor-like reconfigurable array changes its whole configuration every
clock cycle. A CRC (Configurable Reconfigurable Core) is a grid of identical
processing elements (PEs). Each PE holds a small memory of configurations,
called *contexts*. A context fixes three things for one cycle: the PE's
operation, the register it writes and how it connects to its neighbours. A
per-PE finite state machine (FSM) picks the context for each cycle. This
lets a compiler lay out a scheduled C data-flow graph over both time (one
context per control step) and space (one PE per operation). The FSMs play the
part of the control unit that high-level synthesis would normally produce.

Operations in neighbouring PEs can be *chained*: their results flow through
the network combinationally within the same cycle. For example,
`a = b * c` and `d = (e - f) + (g - h)` both finish in one cycle on six PEs.
Without chaining they would take two cycles.

This RTL is one instance of that model, with these defaults:

| parameter    | default | meaning                                   |
|--------------|---------|-------------------------------------------|
| `ROWS, COLS` | 2, 3    | array size                                |
| `WIDTH`      | 32      | datapath width                            |
| `NUM_DREG`   | 12      | data registers per PE                     |
| `NUM_SREG`   | 12      | one-bit status registers per PE           |
| `NUM_CTX`    | 16      | contexts per PE                           |
| `NUM_STATES` | 16      | FSM states per PE                         |

The published instance family uses the register counts, 16 contexts, 16
states and a 32-bit datapath (8 bits for its power figures). The 2 x 3 size
only follows the overview drawing of the model; the published text gives no
array size. All of these are parameters of `crc_array`.

## The array (`crc_array`)

Each PE (row `r`, column `c`) connects only to its four nearest neighbours.
The east data and status output of one PE is the west input of the PE to its
right, and so on for the other sides. The sides of the PEs on the edge of the
grid become the ports of the top level:

* `north_*` and `south_*` ports are indexed by column.
* `west_*` and `east_*` ports are indexed by row.

Each side has a `WIDTH`-bit data signal and a separate one-bit status
signal. Data and status never mix: comparisons produce status, and status
drives `SEL` and the FSM branches.

The general model also has an array memory. These instances leave it out,
so this RTL has none. Operands enter through the border inputs, and results
leave through the border outputs.

Observation outputs:

* `running`
* the state of every PE (`pe_state`)
* the context of every PE (`pe_ctx`)
* the branch condition of every PE (`pe_taken`)

## Inside a PE (`crc_pe`)

```
             context memory --(context word)--> every multiplexer, FU, registers
  FSM state ----^
                     din[N,E,S,W] + data regs  --mux--> a --\
                     din[N,E,S,W] + data regs  --mux--> b ---> FU --> y (data), s (status)
                     sin[N,E,S,W] + status regs --mux--> s_in/
  per side: dout[side] <- mux(data regs, y, din[N,E,S,W])
            sout[side] <- mux(status regs, s, sin[N,E,S,W])
```

With the default parameters, a context word is 65 bits. Fields from the most
significant end:

| field            | bits | coding                                                   |
|------------------|------|----------------------------------------------------------|
| `op`             | 3    | MUL=0 ADD=1 EQ=2 LT=3 AND=4 OR=5 NOT=6 SEL=7              |
| `src_a`, `src_b` | 4+4  | 0..3 = input from N,E,S,W; 4+i = data register i          |
| `src_s`          | 4    | 0..3 = status input N,E,S,W; 4+i = status register i      |
| `dreg_we, dst`   | 1+4  | write FU data result to data register `dst`               |
| `sreg_we, dst`   | 1+4  | write FU status result to status register `dst`           |
| `dout_sel[4]`    | 4x5  | per side: i = data reg i; 12 = FU result; 13..16 = pass input N,E,S,W |
| `sout_sel[4]`    | 4x5  | same coding over status registers, FU status and status inputs |

The side arrays are packed with N (index 0) at the least significant end.
`sout_sel[N]` occupies bits 4:0.

The functions `crc_pkg::ctx_word_w` and `crc_pkg::fsm_word_w` give the
widths for other parameter values. An all-zero context writes nothing and
drives every output from register 0. Reset clears the context memory to this
safe state.

FU operations (`crc_fu`):

* `MUL`: signed product of the low `WIDTH/2` bits of both operands. The
  result always fits the datapath width.
* `ADD`: sum modulo 2^WIDTH.
* `EQ`, `LT`: comparisons. `LT` is signed. They produce status only (data
  result 0).
* `AND`, `OR`, `NOT`: bitwise on data.
* `SEL`: returns `b` when `s_in` is 1 and `a` otherwise.

The status result of the data operations is:

* `AND`: `s_in & (a != 0)`
* `OR`: `s_in | (a != 0)`
* `NOT`: `~s_in`
* every other data operation: `s_in`, passed on unchanged

There is no subtract operator and no immediate operand. Subtraction is
`~(~x + y) = x - y`. Constants come in through the array border.

## Control: the per-PE FSM (`crc_fsm`) and lockstep

Every PE has its own FSM with a table of `NUM_STATES` entries. Each entry is
`{ctx, cond, next_t, next_f}`. The layout is 17 bits by default: 4, 5, 4 and
4 bits, most significant first.

In each cycle:

1. The current state's entry names the context to execute.
2. At the rising edge, the state moves to `next_t` or `next_f`, depending on
   `cond_in[cond]`.

The condition sources are:

* 0..3: the status inputs N, E, S, W
* 4..15: the status registers
* 16: the PE's own FU status in the same cycle

For a plain jump, set `next_t = next_f`.

The FSMs are separate, so the PEs must be kept in step. To do this, route
the same status bit to every PE that branches. The PE that computes the
condition drives it on its status outputs. The other PEs pass it on with
the pass-through output codes, and each of them branches on it. The
end-to-end test does exactly this: a compare in one PE steers all six FSMs
in the same cycle.

## Timing and the combinational network

Within one cycle, this path is purely combinational:

state register → context memory read → operand multiplexers → FU → side
output multiplexers → the neighbour's operand multiplexers → …

Register writes and state changes take place at the rising clock edge. So a
chain of FU operations across PEs completes in one cycle. This is the
chaining the design is built for, and its delay grows with the length of
the chain.

Because of this, the network contains combinational rings in its structure.
For example, PE A's east output can come from its FU, and that FU can take
its input from PE B's west output, which can in turn come from B's FU. Lint
tools report this ring (Verilator: `UNOPTFLAT`). A configuration must never
close such a ring. A mapping tool (or whoever writes contexts by hand) has
to schedule chains as acyclic paths. Reset contexts only read registers, so
an unconfigured array has no active loop.

## Boot configuration (`crc_bootcfg`)

All PEs share one configuration bus:

* `cfg_we`: write strobe
* `cfg_pe`: PE number, `r*COLS + c`
* `cfg_tgt`: 0 = context memory, 1 = FSM table
* `cfg_addr`: context or state index
* `cfg_wdata`: the word, 65 bits by default

A write takes one cycle. Out-of-range addresses are dropped, and an
assertion reports them in simulation. A one-cycle `cfg_start` pulse ends the
boot phase. From the next edge on, every FSM steps and register writes are
enabled. After that, configuration writes are ignored until reset. Reset is
synchronous and active high. It clears the registers, the context memories,
the FSM tables and the run flag.

To run an application:

1. Reset.
2. Write every PE's contexts and FSM entries.
3. Pulse `cfg_start`.

State 0 executes in the first cycle after the start edge.

## How far this follows the published design

Taken from the published design:

* the PE's blocks: context memory, FSM, boot-time configuration, FU,
  register set, FU input multiplexers, and data and status multiplexers on
  all four sides
* the separation of data and status
* one FSM per PE
* the nearest-neighbour network without memory
* the operator set, including the half-width multiplier and `SEL` driven by
  status
* the register, context and state counts
* the 32-bit width
* the way a new context is formed: next state, then context chosen by the
  state, then context memory read

Choices made here, where the source says nothing:

* the bit layout of the context and FSM words, and all code values
* the sources of the output multiplexers, including pass-through of any
  side input
* signed `MUL` and `LT`
* the status results of the data operations
* the two-way branch FSM with state 0 as the start state
* the addressed configuration bus, `cfg_start` and the lock after start
* reset behaviour and the asynchronous context read
* the array size and the border ports

Not built:

* the array memory of the general model
* the later low-power variant, in which the configuration logic stops
  switching after boot

The published figures for area, speed (a 32-bit addition takes 3.25 ns in
0.13 µm) and power (1.34 mW per 8-bit PE at 100 MHz) come from commercial
synthesis. They are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/crc_pkg.sv` | operation and side enums, configuration target codes, word-width functions |
| `rtl/crc_array.sv` | top level: PE grid, border ports |
| `rtl/crc_pe.sv` | processing element, context word layout |
| `rtl/crc_fu.sv` | functional unit |
| `rtl/crc_regset.sv` | data and status registers |
| `rtl/crc_ctxmem.sv` | context memory |
| `rtl/crc_fsm.sv` | configurable FSM |
| `rtl/crc_bootcfg.sv` | configuration port |
| `rtl/crc_mux.sv` | context-controlled multiplexer |
| `tb/crc_tb_pkg.sv` | testbench helpers: context and FSM word packing, reference product |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb/tb_crc_array.sv` runs the default 2 x 3 array end to end. It does the
following:

* runs the chaining example in one cycle on all six PEs
* loops with an accumulator and counter, with the loop test computed in one
  PE and routed to all FSMs
* checks the results and the cycle count `1 + 2*ceil(b/c)`
* counts configuration writes, context switches, chained cycles,
  pass-through cycles, and taken and not-taken branches

`tb/tb_crc_array_w8.sv` runs the same scenario on an 8-bit array, the
datapath width that the published power figures use.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
after a fixed number of cycles if something hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/crc_pkg.sv tb/crc_tb_pkg.sv tb/tb_crc_array.sv --top-module tb_crc_array
./obj_dir/Vtb_crc_array
```

Replace `tb_crc_array` with any other `tb_*` to test a single block. The
unit testbenches for the FU, the multiplexer, the register set, the context
memory, the FSM and the configuration port do not need `tb/crc_tb_pkg.sv`.

Verilator prints `UNOPTFLAT` warnings for the top level. These come from
the structural rings described above, and the simulation handles them
correctly.

To build another instance, override the parameters of `crc_array`. The
testbench helper package assumes the default register, context and state
counts when it packs words.
