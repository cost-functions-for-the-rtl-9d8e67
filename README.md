# CRC: a cycle-by-cycle reconfigurable processing-element array

This is synthesizable SystemVerilog for an instance of the *Configurable
Reconfigurable Core* (CRC) model. The CRC model describes a class of
"processor-like" reconfigurable architectures, as set out in *Cost Functions
for the Design of Dynamically Reconfigurable Processor Architectures*.

The idea: a grid of small processing elements (PEs) whose datapath is
reconfigured every clock cycle. Each PE has its own little state machine. Its
current state indexes a local context memory, and the context word read out
says, for this cycle only:

- what the PE's functional unit computes;
- where its operands come from;
- which register receives the result;
- how the PE's four ports route data and status signals to its neighbours.

A compiler using C-based (high-level) synthesis can therefore map a
temporally partitioned datapath onto the array one context per clock cycle.
The same hardware is reused for different operations within one program,
with no reconfiguration penalty.

The main unusual property is **operator chaining across PEs**. A PE's port can
drive its FU result straight to a neighbour, or pass a neighbour's input
straight through. Several PEs can therefore form one combinational path in a
single cycle. A PE can also route for others while its own FU does something
unrelated.

## The array

```
          n_din/n_sin[0..2]   (device ports, north border)
             |      |      |
 w_*[0] -- PE(0,0)-PE(0,1)-PE(0,2) -- e_*[0]
             |      |      |
 w_*[1] -- PE(1,0)-PE(1,1)-PE(1,2) -- e_*[1]
             |      |      |
          s_din/s_sin[0..2]   (device ports, south border)
```

`crc_array` (the top) places `ROWS x COLS` identical PEs (default 2 x 3). Each
connection between neighbours carries, in each direction, a `D`-bit data
signal and a 1-bit status signal. Ports on the border are device ports.
There is no shared controller, bus or memory: PEs cooperate only through
their ports. `pe_state` exposes every PE's current state for observation.

## Inside a PE (`crc_pe`)

```
                 +--------------------+
 cfg chain ----> | crc_boot_config    |--> writes one line into:
                 +--------------------+
                   |                 |
          +----------------+   +-----------+
 state -->| crc_context_mem|   | crc_fsm   |<-- FU status, 4 port status
          +----------------+   +-----------+    inputs, status registers
                 | context word      | state
   +-------------+----------------+--------------------------+
   v                              v                          v
 crc_operand_mux  --a,b,sa,sb-->  crc_fu  --y,sy-->  crc_regfile x2 (data, status)
   ^ port inputs, registers         |                        |
                                    v                        v
                     crc_port x4 (N,E,S,W): data and status output multiplexers
```

| Part | Module | What it does |
|---|---|---|
| Functional unit | `crc_fu` | Combinational ALU on unsigned `D`-bit operands. It produces a data result and a 1-bit status result (carry, borrow, compare). |
| FU input multiplexers | `crc_operand_mux` | Pick 2 data and 2 status operands. Each comes from one of the 4 input ports or one of the `NREGS` registers. |
| Data / status registers | `crc_regfile` | `NREGS` registers of width `D`, and `NREGS` of 1 bit. Only the FU output can write them. All register outputs feed every multiplexer. |
| Context memory | `crc_context_mem` | `NCTX` context words, read combinationally at the current state. |
| FSM | `crc_fsm` | State register (= context address) and a configurable two-way transition table. |
| Port modules | `crc_port` | For each side, separate data and status output multiplexers. The source is the FU result, a register, or the input of one of the *other three* ports. |
| Boot configuration | `crc_boot_config` | Serial shift register holding one address and one line; a write strobe stores the line. |

The FSM is a *Medvedev* machine: the context is the state itself. The number
of states therefore equals the number of contexts (16 by default), and no
decoding sits between the state register and the context memory.

## The context word

This is the part that needs the most care when writing a program for the
array. With the default parameters (`D=32`, `NREGS=12`, `NCTX=16`) a context
word is 63 bits. The fields are listed from the most significant end; the
layout is the `ctx_t` struct in `crc_pe`.

| Field | Bits | Meaning |
|---|---|---|
| `op` | 5 | FU operation (`crc_pkg::fu_op_e`) |
| `sel_a`, `sel_b` | 4 each | data operands: 0..3 = input N,E,S,W; 4+i = data register i |
| `sel_sa`, `sel_sb` | 4 each | status operands: 0..3 = status in N,E,S,W; 4+i = status register i |
| `dwe`, `dwa` | 1 + 4 | write FU data result into data register `dwa` |
| `swe`, `swa` | 1 + 4 | write FU status result into status register `swa` |
| `pdsel[3:0]` | 4 x 4 | data source of output port W,S,E,N (index 3..0) |
| `pssel[3:0]` | 4 x 4 | status source of output port W,S,E,N |

The encoding of a port select:

- **0**: FU result.
- **1..3**: the input of one of the other three ports, in N,E,S,W order with
  the port's own side skipped. For example, on port E the value 1 means N,
  2 means S and 3 means W.
- **4+i**: register i.

A port can therefore never echo its own input back.

All-zero is a safe context: every port drives the FU result, and the FU
reads only the N input. Reset clears every context to zero. While `run` is
low, the PE executes this zero context whatever its memory holds.

### FSM entries

Each state also has a 13-bit transition entry `{cond[5], next_t[4], next_f[4]}`:

- `cond` selects the condition: 0 = always, 1 = FU status result,
  2..5 = status input N,E,S,W, 6+i = status register i.
- The FSM goes to `next_t` when the condition is 1, and to `next_f` when it
  is 0.

Because the FU status result can be the condition, a compare or a carry
decides the next state in the same cycle in which it is computed.

## Functional-unit operations

| op | name | data result | status result |
|---|---|---|---|
| 0 / 1 | `*l` / `*h` | low / high half of the 2D-bit product | 0 |
| 2 / 3 | `+co` / `-co` | a+b / a-b | carry / borrow (1 when a<b) |
| 4 / 5 | `+` / `-` | a+b / a-b | 0 |
| 6 | `shift` | b read as signed: b>=0 gives a<<b, b<0 gives a>>-b (logical); amounts of D or more give 0 | 0 |
| 7..12 | `== != > >= < <=` | 0 | comparison result |
| 13..16 | `AND_d OR_d XOR_d NOT_d` | bitwise on a, b | 0 |
| 17..20 | `AND_s OR_s XOR_s NOT_s` | 0 | logic on sa, sb |
| 21 | `sel` | sa ? a : b | 0 |
| 22 / 23 | `in1_d` / `in1_s` | a / 0 | 0 / sa |

There is no divide or remainder, and no carry input. A full 2D-bit product
takes two PEs working in parallel, one running `*l` and one running `*h`.
Since only the FU writes registers, `in1_d` / `in1_s` are how a port value
gets into a register.

## Timing and operator chains

- At each rising edge, every PE writes its registers (if enabled) and moves to
  its next state.
- Within the cycle the path is purely combinational: the state selects a
  context word, which sets the multiplexers, the FU, the port multiplexers,
  the neighbours' multiplexers, and so on.
- A chain can therefore start in one PE's register or at a device input, pass
  through any number of FUs and routing PEs, and end in a register or FSM of
  another PE, all in one cycle. The clock period must cover the longest such
  chain.

Because every port can forward the other ports' inputs, neighbouring PEs form
**structural combinational loops**:

- `verilator --lint-only -Wall` reports them as `UNOPTFLAT`.
- A synthesis tool's loop check lists them at great length.

These loops are inherent in the routing network and are left in deliberately.
It is up to the configuration never to close a loop in any cycle, just as an
operator chain must not feed back on itself. A configuration that does close
one, such as two neighbours each forwarding the other's FU result into their
own FU, has no stable value. Verilator then stops with a "did not converge"
error.

## Boot-time configuration

- The configuration shift registers of all PEs form one serial chain in
  row-major order: `cfg_din` feeds PE(0,0), and the last PE drives
  `cfg_dout`.
- Each PE's register holds 80 bits (defaults): `{state[4], context[63],
  fsm_entry[13]}`.

To load state `s` in every PE:

1. Hold `run` low.
2. For each PE from the last to the first, shift its 80-bit line in, most
   significant bit first, with `cfg_shift` high. That is `ROWS*COLS*80`
   clocks in total.
3. Pulse `cfg_write` for one clock. Every PE then stores its line at the
   address held in the line.

Repeat for each state used, then raise `run`. All PEs start in state 0 on the
same edge.

The size of this register does not depend on `D`.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `D` | 32 | data path width (also tested at 8 and 16) |
| `NREGS` | 12 | data registers and status registers per PE |
| `NCTX` | 16 | states = contexts per PE |
| `ROWS`, `COLS` | 2, 3 | array size (top only) |

The context-word and line widths follow from `NREGS` and `NCTX`. The
testbench package `tb/crc_tb_pkg.sv` hard-codes the default widths.

## What follows the architecture and what is this design's own

Taken from the architecture:

- the PE structure (FU, data and status registers, context memory, FSM, four
  port modules, boot configuration);
- separate data and 1-bit status paths;
- the FU operation list and the rule that only the FU writes registers;
- port sources (FU, registers, the other ports' inputs);
- a Medvedev FSM whose next state depends on FU status, port status and
  status registers;
- a context switch every cycle;
- one shift register holding the address and content of one line;
- the default sizes (32 bits, 12 registers, 16 contexts).

Chosen here, because the architecture leaves it open:

- the array size;
- all bit encodings and field layouts;
- the two-way transition table;
- borrow as the `-co` status, and the sign convention of `shift`;
- `sel` steered by the first status operand;
- zero for undefined results;
- synchronous active-high reset, which clears registers, contexts and
  transition tables;
- the `run` input and the zero context while booting;
- chaining the PEs' configuration registers and writing all PEs with one
  strobe.

Not included:

- the memory block of the general CRC model (this instance has none);
- a shared FSM or microcontroller, which are alternative control schemes;
- any timing, area or power model. The component delays and area or power
  shares that motivated the architecture come from gate-level synthesis in a
  0.13 um library and cannot be reproduced from RTL simulation.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example, for the full array at default parameters:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/crc_pkg.sv tb/crc_tb_pkg.sv tb/tb_crc_array.sv \
  --top-module tb_crc_array -o sim
./obj_dir/sim
```

Replace `tb_crc_array` with any other testbench. `-Wno-fatal` is needed
because Verilator warns about the array's structural loops (`UNOPTFLAT`, see
above) and about width truncations in the testbenches.

| Testbench | Covers |
|---|---|
| `tb_crc_fu` | all 24 operations: corner cases, hand-computed values, 20k random vectors against a reference FU |
| `tb_crc_operand_mux`, `tb_crc_port` | every select value, including own-port skipping on all four sides |
| `tb_crc_regfile`, `tb_crc_context_mem` | reset, writes and enables, combinational read |
| `tb_crc_fsm` | random transition tables, every condition source used, `run` low returning to state 0 |
| `tb_crc_boot_config` | serial load, address/line extraction, chain output, shift pauses |
| `tb_crc_pe` | serial configuration; a carry-branch program checked both ways; 12 random programs of 16 contexts, every cycle compared with a reference PE |
| `tb_crc_pe_widths` | one PE at D = 8, 16 and 32 running the same 8-state program (multiply halves, add with carry and carry branch, signed shift, compare) |
| `tb_crc_array` | full-size array loaded through the chain, then two programs together |

The two programs run by `tb_crc_array` are:

- **Neighbour status steering.** PE(0,0) inverts a device status input and
  passes it south. PE(1,0) adds and subtracts registers, and branches on that
  status. PE(0,0) branches on the same status.
- **Four-PE chain.** In one cycle it computes
  `((n_din[2] + e_din[0]) * n_din[1]) -/+ s_din[2]`. PE(1,1) only routes the
  value while its own FU stores a neighbour's result.

Every cycle is compared with a reference model of the whole array. The test
counts how often each of these happened: configuration lines written,
chaining, routing, context switches, both branch directions, and register
writes.
