# SHyRA: a hyperreconfigurable LUT machine for control tasks

A run-time reconfigurable machine normally reloads its whole configuration at every
reconfiguration step, even when a computation only ever touches a small part of it.
A *hyperreconfigurable* machine adds a second, coarser kind of step. A
**hyperreconfiguration** chooses which configuration switches are available for a while
(the *hypercontext* `h`). Each following **ordinary reconfiguration** then loads only
those `|h|` switches. A phase that needs few switches therefore reconfigures cheaply.
Choosing a larger or smaller hypercontext trades the fixed price of a hyperreconfiguration
against the per-step price `|h|`.

Used as a control system, several control tasks share one machine. The reconfiguration
cost of one task then depends on what runs beside it. Swapping a neighbour task for a
variant that needs fewer switches allows smaller hypercontexts and fewer bits per step. The
task itself runs faster without any change to it.

This repository holds synthesizable SystemVerilog for SHyRA (Simple HYperReconfigurable
Architecture). SHyRA is the small example machine for this idea. Its sizes are 18 LUTs,
73 registers and 5400 switches. The host that decides what to run and when to
hyperreconfigure is software and is not included. Its command and bit-stream ports are
brought out.

## The machine

```
            +-------------------- configuration memory (5400 switches) --------------------+
            |  hypercontext mask (1 bit/switch)      context (1 bit/switch)  -> cfg = ctx & mask
            +-----------+----------------------------+-----------------------+------------+
                        | 18 x 8 truth-table bits    | 54 x 73 crosspoints   | 18 x 73 crosspoints
                        v                            v                       v
 regs[72:0] --> MUX (73 -> 54 LUT inputs) --> 18 LUTs (3 in, 1 out) --> DeMUX (18 -> 73) --> regs
      ^                                                                                    |
      +---------------------------- written at the end of a compute cycle -----------------+
```

* **LUTs** (`shyra_lut`): each has three inputs and one output. Its eight truth-table bits
  are eight of the machine's switches. Input `x[0]` is the first operand, `x[1]` the second
  and `x[2]` the third. The output is `tt[{x[2],x[1],x[0]}]`.
* **MUX** (`shyra_mux`): each of the 54 LUT inputs has one switch per register. With one
  switch closed it is a 73:1 multiplexer. With none closed the input reads 0. With several
  closed it reads their OR.
* **DeMUX** (`shyra_demux`): each of the 18 LUT outputs has one switch per register. A
  register with at least one closed switch is written in the compute cycle. One LUT may
  write many registers. A register with no closed switch keeps its value.
* **Registers** (`shyra_regfile`): 73 single-bit registers. All LUTs read the values from
  before the compute cycle. All selected registers update together at its end. So a LUT
  may read and overwrite the same register in one cycle, and two LUTs may exchange values.
  Outside compute cycles the controlled processes can load any register (`proc_we`/`proc_d`).
  All register values are visible on `regs`.

Counting one switch per crosspoint gives 18·8 + 54·73 + 18·73 = 144 + 3942 + 1314 = 5400
switches. This matches the published switch count of the machine.

### Configuration layout

`shyra_pkg` defines the layout. Switch index 0 comes first in every stream.

| field | switches | index of one switch |
|---|---|---|
| LUT `j` truth-table bit `k` | 144 | `8*j + k` |
| LUT `j` input `p` reads register `r` | 3942 | `144 + (3*j + p)*73 + r` |
| LUT `j` writes register `r` | 1314 | `4086 + j*73 + r` |

## Hypercontexts and the loading chain

This is the part of the design that differs most from an ordinary configurable array. It
lives in `shyra_cfg_mem` and `shyra_reconf_ctrl`.

**Switch model.** Every switch is either in the hypercontext or not. A hyperreconfiguration
therefore carries one mask bit per switch and always costs `w = 5400` bits. An ordinary
step carries one bit per available switch and costs `|h|`. Over a run with hypercontexts
`h_1..h_r`, where `S_i` is the sequence of steps under `h_i`, the total cost is
`r·w + Σ |h_i|·|S_i|`. Loading is serial, one bit per clock, so this cost is also the number
of loading cycles. The counter `bits_loaded` reports it directly.

**Scope.** The parameter `NH` of the configuration memory makes only switches
`0 .. NH-1` hyperreconfigurable. Switches `NH .. N-1` are always available. Because the
LUT bits come first in the layout, the top-level parameter `HYPER_LUT_ONLY = 1` sets
`NH = 144`. This gives a machine whose hypercontexts choose LUT bits only, while every
step still loads all crosspoints.

**Mask loading.** The mask shifts into a shadow register. The active mask is replaced only
with the last bit, so the machine never sees half a hypercontext. A running count of ones
(+1 for each one shifted in, −1 for each one shifted out) gives `|h|` at commit time
without a 5400-input adder.

**Context loading.** The context bits form a shift chain in which every switch outside the
hypercontext is bypassed by a 2:1 multiplexer. An available switch takes the value of the
next higher available switch, and the highest available switch takes the stream bit. After
exactly `|h|` shifts each available switch holds its bit, with the first bit of the stream
on the lowest-numbered available switch. No other switch has changed. The host sends a
step as "the context's bits at the positions where the mask is 1, in ascending order".

**Unavailable switches are open.** The datapath sees `ctx & mask`. A crosspoint left closed
under an earlier hypercontext cannot act under a later one that drops it. A LUT whose bits
are all dropped outputs 0. The stored bit is kept. It applies again only if a later step
under a hypercontext that includes it reloads it, because every step redefines every
available switch.

**Timing.** With a stream that never pauses:

| operation | cycles busy | bits |
|---|---|---|
| accept a command (`cmd_valid && cmd_ready`) | 1 (idle cycle) | 0 |
| `CMD_HYPER` | 5400 (144 with `HYPER_LUT_ONLY`) | 5400 (144) |
| `CMD_STEP` | `|h|` load + 1 compute | `|h|` |
| `CMD_STEP` with an empty hypercontext | 1 compute | 0 |

The bypass chain is a ripple through up to 5400 multiplexers in one cycle. It is the
machine's critical path. A fast implementation would cut it into segments, with a
pipelined or per-segment pointer scheme. This was not done here, to keep the loading
behaviour obvious.

## Host interface

| port | dir | meaning |
|---|---|---|
| `cmd_valid`, `cmd_ready`, `cmd` | in/out/in | command handshake. `cmd` is `CMD_HYPER` or `CMD_STEP` (`shyra_pkg::cmd_e`). Commands are taken only when idle. A waiting command must be held stable, and an assertion checks this. |
| `bit_valid`, `bit_ready`, `bit_data` | in/out/in | serial (hyper)reconfiguration bits. The host may pause at any time. The controller takes exactly `5400` or `|h|` bits, then drops `bit_ready`. |
| `proc_we`, `proc_d`, `regs` | in/in/out | process data. The registers can be loaded outside compute cycles, and all are visible. |
| `busy`, `exec`, `h_size` | out | command in progress, compute cycle, size of the current hypercontext |
| `n_hyper`, `n_steps`, `bits_loaded` | out | 32-bit cost counters |

Reset (`rst_n` low at a clock edge) clears the context and the registers. It also empties
the hyperreconfigurable part of the hypercontext. With `HYPER_LUT_ONLY = 1` the crosspoints
stay available.

## Programming a control task

A task is a time-partitioned program: one context per step, and one instruction per LUT
per step. An instruction `OP out, in1, in2[, in3]` becomes the following switches:

* the LUT's truth table, with `tt[k] = OP(a=k[0], b=k[1], c=k[2])`;
* one MUX switch per used input, from register `in1` to input 0, `in2` to input 1 and
  `in3` to input 2;
* one DeMUX switch from the LUT to register `out`.

An unused input reads 0. A conditional move uses the third input for the old value of
its own output register: `CMOV out, val, cond` is `out = cond ? val : out`, with
`tt = 8'b1011_1000`.

The hypercontext for a phase is the union of the switches that any of its steps closes.
Tasks run in parallel by using disjoint LUTs and output registers in the same steps.

Example: 4-bit counter with an upper bound, on two LUTs, 11 steps. The value is in r0..r3,
the bound in r4..r7, and r8/r9 are temporaries.

| step | LUT A | LUT B |
|---|---|---|
| 1 | `NOT r0 <- r0` | `BUF r8 <- r0` (carry) |
| 2..4 | `XOR ri <- ri, r8` | `AND r8 <- r8, ri` (i = 1..3) |
| 5 | `EQ r9 <- r0, r4` | `ONE r8` |
| 6..8 | `EQ r9 <- ri, r(i+4)` | `AND r8 <- r8, r9` |
| 9 | `NULL r9` | `AND r8 <- r8, r9` |
| 10, 11 | `CMOV r0/r2 <- r9, r8` | `CMOV r1/r3 <- r9, r8` |

One pass increments the value, compares it with the bound and clears it on equality. Its
hypercontext holds 16 LUT bits, 24 MUX crosspoints and 8 DeMUX crosspoints, so each step
loads 48 bits instead of 5400. With the adder beside it the hypercontext grows to 80.

## Departures and readings

* The register-to-LUT network is the multiplexer and the LUT-to-register network the
  demultiplexer, as the block diagram of the machine draws them: MUX 73→54, DeMUX 18→73.
  Some of the published text names the two networks with their port counts the other
  way round. This design follows the data flow.
* One bit per crosspoint reproduces both published switch counts. The machine has 5400
  switches in total. The counter's hypercontext has 48: 8 + 8 truth-table bits, 24 MUX
  crosspoints and 8 DeMUX crosspoints. The published per-task breakdown of 8, 8, 8 and 24
  matches exactly.
* The truth-table bit order (bit `k` answers input pattern `k`, first operand least
  significant) is the one under which the published counter tables for AND, XOR, EQ, ONE,
  NULL and the carry copy read correctly. The testbench programs compute every table
  from its Boolean operation rather than from published bit strings.
* Not specified in the published description, and chosen here:
  * serial loading at one bit per cycle;
  * the command/stream handshake;
  * the field and bit order;
  * open switches outside the hypercontext;
  * the wired-OR for several closed crosspoints;
  * the process port;
  * reset behaviour.
* Both hyperreconfiguration scopes of the published experiments are available. With
  `HYPER_LUT_ONLY = 0`, the default, all 5400 switches are hyperreconfigurable. With
  `HYPER_LUT_ONLY = 1`, only the 144 LUT bits are: a hyperreconfiguration costs 144 bits,
  and the 5256 crosspoints are always available and loaded in every step.
* The adder variants (4 to 9 LUTs) and the host's optimal partitioning are not published
  in enough detail to reproduce. The published cost totals of the experiments are
  therefore not reproduced.

## Files

| file | content |
|---|---|
| `rtl/shyra_pkg.sv` | sizes, layout helpers, command type |
| `rtl/shyra_top.sv` | the machine |
| `rtl/shyra_reconf_ctrl.sv` | command/stream sequencer and cost counters |
| `rtl/shyra_cfg_mem.sv` | hypercontext mask, bypassed context chain |
| `rtl/shyra_mux.sv`, `rtl/shyra_demux.sv` | crosspoint networks |
| `rtl/shyra_lut.sv` | 3-input LUT |
| `rtl/shyra_regfile.sv` | 73 one-bit registers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_shyra_lut_only` and `tb_shyra_phases` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one has a watchdog.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/shyra_pkg.sv tb/tb_shyra_top.sv \
          --top-module tb_shyra_top -o sim && ./obj_dir/sim
```

Replace `tb_shyra_top` with `tb_shyra_lut`, `tb_shyra_mux`, `tb_shyra_demux`,
`tb_shyra_regfile`, `tb_shyra_cfg_mem` or `tb_shyra_reconf_ctrl` for the unit tests.
`tb_shyra_lut_only` repeats the end-to-end run on the `HYPER_LUT_ONLY = 1` machine.
`tb_shyra_phases` is described below.

`tb_shyra_top` runs the full-size machine with default parameters. It plays the host and
the processes in four phases:

1. The counter alone, with bound 5. The counter wraps.
2. The counter beside a 4-bit ripple-carry adder of this design's own, on two more LUTs.
   The adder gets new random operands every 5 steps.
3. The adder alone, in a hypercontext without the counter's switches. The counter must
   stay frozen.
4. A step in an empty hypercontext.

It checks every counter value and every sum against arithmetic. It also checks:

* the step and hyperreconfiguration cycle counts;
* `|h|`;
* `bits_loaded` against `r·w + Σ|h_i|·|S_i|`.

The bit stream pauses at random. The test fails if any of these mechanisms never happened:
a stall, a wrap, parallel tasks, frozen switches, an empty step, process writes. The run
takes a few seconds.

`tb_shyra_phases` runs one control-task phase after another, each under its own
hypercontext, at full size:

| phase | tasks | LUTs | hypercontext |
|---|---|---|---|
| I | one 4-bit ripple-carry adder | 2 | 32 switches |
| III | one 8-bit parallel-prefix adder (5 steps) | 16 | 226 switches |
| IV | the 8-bit adder and the counter | 18 | 274 switches |
| V | two 4-bit adders | 4 | 64 switches |

The 8-bit adder first forms propagate and generate for every bit (16 LUTs). It then
combines them in place over distances 1, 2 and 4, with two LUTs per bit. This works
because all LUTs read the registers from before the cycle. A last step forms the sums
with three-input XORs. Phase IV keeps every LUT busy, and the test checks this from the
contexts it loads. The phases use the LUT counts of the published phase experiment.
The adder programs are this design's own.

The unit testbenches cover the following:

* the LUT, exhaustively;
* both crosspoint networks at full size, with open, single and multiple switches;
* the register priorities;
* the configuration memory, with random, empty and full hypercontexts, shrinking
  hypercontexts and idle cycles in the stream;
* the controller's bit and cycle counts, with and without stalls.
