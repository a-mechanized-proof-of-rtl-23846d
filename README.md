# A 6-bit command counter with a four-node micro-sequencer

This is a small counter, specified and built at the level of gates. It stores a 6-bit
word. A 2-bit command tells it to keep the word, load a new one, add one or add two,
always modulo 64. The incrementer adds only one at a time, so the counter does not
finish every command in one clock cycle. A four-state control machine runs each
command over one, two or three cycles. It then returns to its only "primary" state,
FETCH, where the next command is taken.

The RTL gives the counter twice, at two levels of description:

* **the circuit** (default): the gate netlist of the next-state logic, which has
  five parts, plus three clocked registers;
* **the host machine**: the same four-node state machine written as behavioural
  RTL.

Both have the same ports and the same cycle-by-cycle behaviour. The parameter `IMPL`
of `counter_top` chooses between them.

## Interface of `counter_top`

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1 | clock; all registers change on the rising edge |
| `rst`      | in  | 1 | synchronous, active high: count 0, double 0, node FETCH |
| `func`     | in  | 2 | command. It is obeyed only in a cycle where `node` is FETCH |
| `loadin`   | in  | 6 | load word. It is used only in the LOAD cycle |
| `count`    | out | 6 | the stored count |
| `double_q` | out | 1 | the DOUBLE register: `func[0]` from the previous cycle |
| `node`     | out | 2 | control node: `00` FETCH, `01` INC1, `10` INC2, `11` LOAD |

The only parameter is `IMPL` (`counter_pkg::IMPL_CIRCUIT` or `IMPL_HOST`). The widths
(6, 2, 2) are fixed, because the gate netlist is fixed.

## Commands and their timing

Suppose `node` is FETCH in cycle *t* and `func` carries a command. The counter's next
FETCH cycle is *t'*, and `count` in that cycle is:

| func | command       | path through the nodes    | t' − t | count at t'                       |
|------|---------------|---------------------------|--------|-----------------------------------|
| 00   | hold          | FETCH → FETCH             | 1      | count(t)                          |
| 01   | load          | FETCH → LOAD → FETCH      | 2      | loadin(t+1)                       |
| 10   | increment     | FETCH → INC1 → FETCH      | 2      | count(t)+1 mod 64                 |
| 11   | increment ×2  | FETCH → INC1 → INC2 → FETCH | 3    | count(t)+2 mod 64 (62→0, 63→1)    |

Two points are easy to miss:

* **A load takes the word of the second cycle.** The word on `loadin` beside the
  command in cycle *t* is ignored. The register is loaded from `loadin(t+1)`, which is
  the word present while the machine is in LOAD.
* **`func` is sampled in every cycle.** The DOUBLE register takes `func[0]` on every
  edge. Only in FETCH, though, does `func` choose the next node. In INC1 the machine
  reads DOUBLE, which then holds `func[0]` of the command: 1 for "increment twice"
  (and for "load", where it does no harm). Values of `func` in the busy cycles (INC1,
  INC2, LOAD) have no effect on the count. The caller can watch `node == 2'b00` to
  know when the next command will be taken.

```
cycle      t        t+1       t+2       t+3
node       FETCH    INC1      INC2      FETCH
func       11       xx        xx        next command
count      c        c         c+1       c+2
double_q   ?        1         x         x
```

## The control machine

Each node gives the next values of all three registers:

| node  | next count      | next node                          | next double |
|-------|-----------------|------------------------------------|-------------|
| FETCH | count           | FETCH / LOAD / INC1 / INC1 for func 0/1/2/3 | func[0] |
| INC1  | count + 1       | INC2 if double, else FETCH         | func[0] |
| INC2  | count + 1       | FETCH                              | func[0] |
| LOAD  | loadin          | FETCH                              | func[0] |

Every command returns to FETCH within three cycles. `counter_top` asserts this
(`a_returns_to_fetch`).

## The circuit: `countlogic` and its five parts

`countlogic` is purely combinational. Its outputs go into three registers
(`state_latch`): COUNT (6 bits), DOUBLE (1 bit) and NODE (2 bits). The register
outputs are fed back to its inputs:

```
count' = MULTIPLEX( INCLOGIC(count, INCCON(node)), loadin, MPLXCON(node) )
double' = func[0]
node'   = NEXTNODE(node, func, double)
```

The table implies that the count is held in FETCH, incremented in INC1 and INC2, and
replaced in LOAD. Two control signals produce this behaviour:

* **`inccon`** is one NOR of the node bits. `noinc` is 1 only in FETCH, so there the
  incrementer passes the count through.
* **`mplxcon`** is one NAND of the node bits. `mplxsel` is 0 only in LOAD, so there
  the multiplexer takes `loadin`. The incrementer is also active in LOAD, but its
  result is discarded.

**`inclogic`** is the part that takes the most effort to read. It is a 6-bit
incrementer with an enable, and it has no ripple chain. Let `b' = ~noinc`. The
active-low carry into each bit is formed directly:

```
x1 = NAND (b', c0)             carry into bit 1
x2 = NAND3(b', c0, c1)         carry into bit 2
x3 = NAND4(b', c0, c1, c2)     carry into bit 3
x4 = NAND (~x3, c3)            carry into bit 4
x5 = NAND3(~x3, c3, c4)        carry into bit 5
d0 = XNOR(c0, noinc),  di = XNOR(ci, xi)  for i = 1..5
```

XNOR with an active-low carry is XOR with the carry: bit *i* toggles when every lower
bit is 1 and the increment is enabled. The carry is split after bit 2: the inverted
`x3` is reused for bits 4 and 5. This keeps every gate at four inputs or fewer. From
63 the result wraps to 0 without any extra logic.

**`multiplex`** is a 2:1 selector of NAND–NAND form for each bit:
`q = NAND( NAND(loadin, ~sel), NAND(incout, sel) )`.

**`nextnode`** decodes the node and the command with six gates:

```
x1 = NOR(n1, n0)               node is FETCH
x4 = NAND (x1, f1)             FETCH and func is 2 or 3
x5 = NAND3(x1, f0, ~f1)        FETCH and func is 1
x6 = NAND3(n0, double, ~n1)    INC1 and double
n0' = NAND(x4, x5)     n1' = NAND(x5, x6)
```

Hence FETCH+func 1 gives `11` (LOAD), FETCH+func 2 or 3 gives `01` (INC1),
INC1+double gives `10` (INC2), and everything else gives `00`.

After synthesis, the top holds 9 flip-flops and 49 gate-level cells.

## The host machine: `host_machine`

This is the same machine as the table in "The control machine" section. It is written
as an enum-coded state machine in `always_comb`/`always_ff`, and the increment is
written as `count + 1`. It is useful as a readable model and as an alternative build
(`IMPL_HOST`). The gate-level next-state function equals this one for every state and
input. `tb_countlogic` checks this exhaustively against an independent model.

## What is this design's own choice

The command set, node codes, gate netlists and cycle timing are those of the counter
described above. The following were added or chosen here:

* **Reset.** The counter as designed has no reset: its registers simply hold their
  previous input. A synchronous active-high `rst` was added, which clears count and
  DOUBLE and sets NODE to FETCH. Without it, the registers would power up in an
  unknown node.
* **`IMPL` switch.** The switch that selects between the circuit and the host machine
  was added here.
* **Register style.** The three registers are rising-edge D flip-flops.
* **Parameterised mux.** `multiplex` has a `WIDTH` parameter (default 6). The
  incrementer is fixed at 6 bits, because its gate netlist is.
* **Single-bit gates as expressions.** Gates are written as continuous assignments of
  `~&`, `~|` and XNOR, one per gate. The intermediate nets keep the names `x1`… used
  above. No cell library is implied.

## Files

| file | contents |
|------|----------|
| `rtl/counter_pkg.sv` | widths, `node_e`, `func_e`, `impl_e`, `path_cycles()` |
| `rtl/counter_top.sv` | the counter; selects circuit or host machine |
| `rtl/countlogic.sv` | next-state logic: wires the five parts below |
| `rtl/inclogic.sv`, `rtl/multiplex.sv`, `rtl/inccon.sv`, `rtl/mplxcon.sv`, `rtl/nextnode.sv` | the five parts |
| `rtl/state_latch.sv` | the register used for COUNT, DOUBLE and NODE |
| `rtl/host_machine.sv` | behavioural four-node state machine |
| `tb/counter_ref_pkg.sv` | reference model: the command specification, path lengths, one-cycle step |
| `tb/counter_driver.sv` | random command stream and checker shared by the sequential testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_counter_top_host` runs the top built with `IMPL_HOST` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The combinational parts are tested exhaustively. `tb_inclogic` covers all 64 counts
  × enable. `tb_multiplex` covers 64 × 64 × select. `tb_nextnode` covers 4 nodes × 4
  commands × double. `tb_countlogic` covers every state and command with several load
  words, against the reference step.
* `tb_counter_top` runs the default top (the gate-level circuit). `tb_host_machine`
  runs the host machine. Each gets 4000 random commands, with `func` randomised in the
  busy cycles too. Both check two things:
  * every cycle against the reference machine;
  * every command against the one-step specification (hold, load the second-cycle
    word, +1, +2), together with its cycle count of 1, 2, 2 or 3.

  The testbench counts each of the following and fails if any never happened: the
  four paths, a +1 wrap from 63, a +2 wrap from 62 or 63, a load whose `loadin`
  changed between the two cycles, and a command ignored while busy. It also checks a
  reset in the middle of a command.

Running a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/counter_pkg.sv tb/counter_ref_pkg.sv tb/tb_counter_top.sv \
  --top-module tb_counter_top -Mdir obj_tb
./obj_tb/Vtb_counter_top
```

`-y` lets Verilator find each module in the file of its own name; the two packages are
listed first. For another testbench, change the last file and `--top-module`. To test the host machine through the top,
instantiate `counter_top #(.IMPL(counter_pkg::IMPL_HOST))` in place of the default.
