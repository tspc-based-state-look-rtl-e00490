# TSPC state look-ahead counter

A wide synchronous binary counter is slow because the enable of each bit
is the AND of all the bits below it: the longer the counter, the longer the
AND chain that has to settle within one clock period. The state look-ahead
counter avoids that chain. It builds the counter from 2-bit pieces that
are separated by pipeline flip-flops. A small separate path of gates and
flip-flops (the *state look-ahead path*) decodes the low bits one or two
clocks early. So every enable and qualifier a 2-bit piece needs already
sits in a flip-flop when the clock edge arrives, and every flip-flop in the
counter switches on the same rising edge.

The circuit this RTL follows was designed at transistor level. All of its
flip-flops are true single phase clock (TSPC) D flip-flops, which need only
the clock and never an inverted clock. In RTL every one of them is a plain
rising-edge register (`tspc_dff`). What the RTL keeps is the block
structure and the cycle behaviour: after reset the 8-bit output counts
0, 1, 2, ... 255, 0, ... and advances by one on every rising edge, with no
latency.

## Blocks

The counter is built from three kinds of block, repeated:

| Block | Module | What it is |
|---|---|---|
| Block 1 | `block1` | free-running 2-bit counter for bits 1:0, plus one AND gate |
| Block 2 | `tspc_dff` | the D flip-flop; used inside the other blocks, as the pipeline register between blocks and in the look-ahead path |
| Block 3s | `block3s` | 2-bit counter with enable `ins`, plus a 3-input AND gate; Block 31, 32, 33 hold bits 3:2, 5:4, 7:6 |

`counting_path` chains Block 1, Block 2, Block 31, Block 2, Block 32,
Block 2, Block 33. `sla_path` is the state look-ahead path.
`tspc_sla_counter` is the top and joins the two.

```
            +---------+   la   +----+ ins1 +----------+ cy1 +----+ ins2 +----------+ cy2 +----+ ins3 +----------+
  clk,res ->| Block 1 |------->| B2 |----->| Block 31 |---->| B2 |----->| Block 32 |---->| B2 |----->| Block 33 |--> cout
            +---------+        +----+      +----------+     +----+      +----------+     +----+      +----------+
              q[1:0]                         q[3:2]  ^pre1                q[5:4]  ^pre2               q[7:6]  ^cy2
                |                              |     |                             |
                v                              v     |                             |
            +-----------------------------------------------------------------------+
            |  sla_path:  p1 = reg(~c1 & c0)   h2 = reg(~c1 & ~c0)                  |
            |             p2 = reg(h2 & c3 & c2)                                    |
            +-----------------------------------------------------------------------+
```

## How the look-ahead timing works

This is the part to read if you plan to change the design. Write `c` for
the count in a given clock cycle.

**The window argument.** The bits above bit 1 can only change on an edge
that ends a cycle in which `c[1:0] == 11`. So over any four cycles in which
`c[1:0]` runs 00, 01, 10, 11, every higher bit stays constant. Any product
of higher bits can therefore be sampled a cycle or two early and registered
without becoming wrong.

**The enable of Block 3s.** Block 3s number s must advance on an edge
exactly when all bits below it, `c[2s-1:0]`, are ones. It takes its enable
`ins` from a pipeline flip-flop. So the signal going into that flip-flop
must say, one cycle early, "all lower bits become ones in the next cycle",
that is `c[2s-1:0] == 11...10`:

* Block 1's AND gate gives `la = q1 & ~q0`, which is `c[1:0] == 10`.
  Registered, it is `ins1`, which is 1 exactly when `c[1:0] == 11`.
* Block 3s's AND gate gives `cout = q1 & q0 & pre`. Here `pre` is 1 when
  the bits below the block read 11...10. So `cout` of block s is 1 when
  `c[2s+1:0] == 11...10`. Registered, it is the enable of block s+1.

**The `pre` inputs come from the look-ahead path.** For them to come
straight out of flip-flops, the path decodes Block 1 early:

* `p1 = reg(~c1 & c0)`. Bits 1:0 were 01 in the previous cycle, so they
  are 10 now. This feeds Block 31's `pre`.
* `h2 = reg(~c1 & ~c0)`, which is "bits 1:0 are 01 now". Then
  `p2 = reg(h2 & c3 & c2)`, which is "bits 3:0 are 1110 now". The window
  argument is why `c[3:2]` may be sampled one cycle early. This feeds
  Block 32's `pre`.

All flip-flops reset to 0. Count 0 is consistent with every registered
signal being 0, so the counter is correct from the first edge after reset.

**Longer counters.** `N3` sets the number of Block 3s, and the width is
`2 + 2*N3`. For Block 3s number 3 and above, `pre` is the `cout` of the
block below. This design adds that rule so the structure can be repeated.
It brings back a short AND chain, one gate per added block, but only on the
`pre` inputs. At the default `N3 = 3` it feeds only the top block's `cout`.
The counter has been simulated at 6, 8 and 12 bits. `N3` must be at
least 2.

## Inside the 2-bit blocks

* `block1`: the low bit takes its own complement. The high bit takes
  `q1 XOR q0`, built from three NAND gates.
* `block3s`: one inverter on `ins`. The low bit is `q0 XOR ins`, from two
  NANDs into a NAND. The high bit is `q1 XOR (q0 AND ins)`, from three NANDs
  (two 2-input, one 3-input) into a 3-input NAND. With `ins = 0` the state
  holds.

These gate networks follow the gate counts of the original schematics. The
equations are the simplest ones that make those gates work as 2-bit
counters.

## Interface of the top, `tspc_sla_counter`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | the single clock; everything is on its rising edge |
| `res` | in | 1 | active-high asynchronous reset, count to 0 |
| `q` | out | `2*N3+2` (8) | count, `q[0]` least significant |
| `cout` | out | 1 | 1 in the cycle before `q` becomes all ones (a look-ahead carry for one more Block 2 + Block 3s stage) |

The top holds a concurrent assertion: the count must advance by one per
clock, or read 0 right after an asynchronous reset pulse. Verilator warns
that `res` is used both as an asynchronous reset and in this clocked check.
That is intended.

## What follows the original and what is this design's own

Taken from the original design:
* the 8-bit size and the three kinds of block, repeated;
* Block 1 as a free-running 2-bit counter;
* Block 3s as a 2-bit counter advancing only when `ins = 1` (states
  00-01-10-11, holding when `ins = 0`);
* a pipeline D flip-flop between neighbouring blocks of the counting path;
* a look-ahead path built from inverters, AND gates and the same flip-flop;
* one single-phase clock, with all blocks switching on the same edge;
* the waveform: `q0` toggles on every edge, and `q7` first rises on the
  128th edge after reset.

This design's own choices:
* the exact equations of the look-ahead path, which states the AND gates
  decode, and what the pipeline flip-flops carry. They are worked out so
  that the counter counts in plain binary, and are checked against a
  reference counter;
* the reset. It is active high and asynchronous on every flip-flop. The
  original only says the counter starts after a reset. Its flip-flop
  schematic has no reset device;
* the `cout` output, the `N3` parameter and the rule for `pre` beyond the
  second Block 3s;
* the count-step assertion.

Not modelled: transistor sizing, the 180 nm process, and the delay, power,
transistor-count and frequency figures that the original reports for the
circuit.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_tspc_dff` | q follows d on every edge, qbar is its complement, asynchronous reset in mid-cycle |
| `tb_block1` | the sequence 00-01-10-11, `la` only in state 10, reset part way |
| `tb_block3s` | random `ins`/`pre`: step or hold per `ins`, `cout == (q==11) & pre` |
| `tb_sla_path` | driven by a reference counter: `p1 == (c[1:0]==10)`, `p2 == (c[3:0]==1110)` in every cycle |
| `tb_counting_path` | look-ahead inputs from a reference model; count and `cout` over two full wraps |
| `tb_tspc_sla_counter` | the whole 8-bit counter at default parameters with a 4 ns clock: count every cycle, `cout` at 254, three wraps, asynchronous reset mid-count, `q7` first high after 128 edges; also counts how often `pre1`, `pre2` and each Block 3s enable fired, and fails if any never fired |
| `tb_tspc_sla_counter_sizes` | 6-bit and 12-bit instances through a full 4096-count wrap |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_tspc_sla_counter tb/tb_tspc_sla_counter.sv
./obj_dir/Vtb_tspc_sla_counter
```

Each testbench finishes within a second.
