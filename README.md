# 8-bit parallel counter with state anticipation

A plain synchronous binary counter slows down as it grows. The toggle condition of bit *n* is
"all lower bits are 1", so a wide AND or carry chain sits in front of the top flip-flops. This
design splits an 8-bit up counter into three small counting modules. It makes the enables of the
upper modules ahead of time: a few gates decode the low-order module's state one or two clock
cycles before it wraps, and D flip-flops carry the decode forward. When the wrap comes, each
upper module's enable is already sitting in a flip-flop. All flip-flops change on the same rising
edge, and no logic path runs from bit 0 to bit 7 within a cycle.

The counting modules are built from JK flip-flops in toggle mode, which keeps the gate count
low. The modules differ in width (3 + 2 + 3 bits) so that the look-ahead logic stays small. It
is three D flip-flops, three 3-input AND gates and two inverters.

## Structure

```
            +-------+  bcm_q[2:0]                      count[2:0]
   clk,rst->|  BCM  |---------------+---------------------------->
            | 3 bit |               |
            +-------+               v
                          +-------------------+  scm1_en  +--------+  count[4:3]
                          |        SAM        |---------->|  SCM1  |------------>
                          | 3 DFF, 3 AND3,    |           | 2 bit  |--+
                          | 2 inverters       |<----------+--------+  | scm1_q
                          |                   |  scm1_q               |
                          |                   |  scm2_en  +--------+  count[7:5]
                          |                   |---------->|  SCM2  |------------>
                          +-------------------+           | 3 bit  |
                                                          +--------+
```

| Module | File | Role |
|---|---|---|
| `parallel_counter` | `rtl/parallel_counter.sv` | Top: wires the four blocks, `count = {SCM2, SCM1, BCM}` |
| `bcm` | `rtl/bcm.sv` | Basic counting module: count bits 2..0, steps every clock |
| `scm1` | `rtl/scm1.sv` | First subsequent counting module: bits 4..3, steps when `en` |
| `scm2` | `rtl/scm2.sv` | Second subsequent counting module: bits 7..5, steps when `en` |
| `sam` | `rtl/sam.sv` | State anticipation module: produces `scm1_en`, `scm2_en` |
| `jk_ff` | `rtl/jk_ff.sv` | JK flip-flop used by all counting modules |
| `pcnt_pkg` | `rtl/pcnt_pkg.sv` | Module widths and state types |

Top-level ports: `clk`, `rst` (synchronous, active high) and `count[7:0]`. In the cycle after
reset is released, `count` is 0. After that it rises by one on every rising edge and wraps from
255 to 0. There is no count-enable or load input.

## How the state anticipation module times the enables

SCM1 must step on the edge where the BCM goes from 7 to 0. SCM2 must step on the edge where
BCM and SCM1 both wrap, i.e. where the lower five bits go from 31 to 0. Both happen in the cycle
where BCM = 7. The SAM makes an enable that is high exactly in that cycle. It decodes an earlier
BCM state and delays the decode by one clock per D flip-flop:

| Path | Decode (AND3 with inverter) | Delay | High while | Output |
|---|---|---|---|---|
| SCM1 | BCM = 6: `q2 & q1 & ~q0` | 1 DFF | BCM = 7 | `scm1_en` = DFF output |
| SCM2 | BCM = 5: `q2 & ~q1 & q0` | 2 DFFs | BCM = 7 | `scm2_en` = DFF output `& scm1_q[1] & scm1_q[0]` |

Cycle by cycle, starting with the BCM at 5:

```
cycle           n      n+1    n+2    n+3
BCM             5      6      7      0
dec BCM=5       1      0      0      0
dec BCM=6       0      1      0      0
scm1_en         0      0      1      0     (DFF of dec BCM=6)
SCM2 pipe 1     0      1      0      0
SCM2 pipe 2     0      0      1      0
edge n+2 -> n+3: BCM wraps, SCM1 steps; SCM2 steps too if SCM1 was 3
```

The third AND gate can read SCM1's state directly because SCM1 only changes on the edge where
the BCM wraps, so its state is steady through the whole cycle in which BCM = 7.

This timing works only because the BCM steps on every clock. That is why the counter has no
count-enable input. Gating the BCM would need the same gating on the SAM pipeline.

## Counting modules

Each counting module is a synchronous binary counter of JK flip-flops with J = K (toggle mode).
Bit *i* toggles when the enable is high and all lower bits of the same module are 1:

- BCM: `t0 = 1`, `t1 = q0`, `t2 = q0 & q1`
- SCM1: `t0 = en`, `t1 = en & q0`
- SCM2: `t0 = en`, `t1 = en & q0`, `t2 = en & q0 & q1`

The JK flip-flop computes `q_next = (j & ~q) | (~k & q)`, with a synchronous reset that takes
priority. The longest combinational path in the design runs from SCM1's state (or the SAM's last
flip-flop), through the SAM's third AND gate, through SCM2's bit-2 toggle AND, to a J/K input.
That is two levels of 3-input AND, whatever the bit position.

## What was chosen here

The partition into BCM/SCM1/SCM2 with 3, 2 and 3 bits, the JK flip-flop construction, and the
SAM's make-up (three D flip-flops, three 3-input ANDs, two inverters, a two-flip-flop delay
towards SCM2) are the design's. The following were worked out or chosen for this RTL:

- **Which states the SAM decodes** (BCM = 6 for SCM1, BCM = 5 for SCM2) and where the third AND
  gate sits. These follow from the parts count and the rule that a decode made *X* cycles early
  passes through *X* flip-flops.
- **Reset**: synchronous and active high. It clears all eight JK flip-flops and the three SAM
  flip-flops, which is a consistent state (count 0, no enable pending). The design's reference
  FPGA implementation has one plain input besides the clock, and `rst` takes that place.
- **Toggle-mode JK wiring** inside each counting module (the standard synchronous-counter
  terms).
- **No parameters**: the widths live in `pcnt_pkg`, but they are not free to change. The SAM
  logic is specific to the 3/2/3 split. A different width needs a new SAM: one decode per upper
  module, made as many cycles early as it has flip-flops.

The reference results reported for this design were measured on a Xilinx FPGA with ISE 8.1i:
3.968 ns delay, 164 equivalent gates, 9 mW, 10 four-input LUTs, 9 bonded I/O plus one clock
input. They depend on technology and tool, and they have not been reproduced. The I/O count
matches this RTL: eight count bits plus reset, and the clock.

The design improves on an earlier parallel counter. That counter uses
uniform 2-bit modules, separate D flip-flop pipeline stages between them, and state decoders of
2-input ANDs. The earlier counter is not part of this RTL.

## Assertions

`parallel_counter` checks two look-ahead invariants with concurrent assertions. They are
disabled during reset and in the cycle after it:

- `a_scm1_en`: `scm1_en` is high exactly when BCM = 7;
- `a_scm2_en`: `scm2_en` is high exactly when BCM = 7 and SCM1 = 3.

## Simulation

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog that fails the run if it hangs.

| Testbench | What it checks |
|---|---|
| `jk_ff_tb` | 400 random J/K/reset cycles against the JK truth table; all four J/K combinations must occur |
| `bcm_tb` | 0..7 sequence and wrap every clock, reset in mid count |
| `scm1_tb`, `scm2_tb` | random enable and reset against a modulo-4 / modulo-8 reference, hold and wrap both occur |
| `sam_tb` | counter-like stimulus, then random BCM/SCM1 states and resets; enables compared with a history of the inputs |
| `parallel_counter_tb` | full-size top: four 256-count periods plus a reset in mid count, `count` checked every cycle; it also counts SCM1 steps, SCM2 steps, 255→0 wraps, SAM enable cycles and mid-count resets, and fails if any is zero or if the enable counts differ from the step counts |

To run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wall -Wno-fatal \
  --top-module parallel_counter_tb \
  rtl/pcnt_pkg.sv rtl/jk_ff.sv rtl/bcm.sv rtl/scm1.sv rtl/scm2.sv rtl/sam.sv \
  rtl/parallel_counter.sv tb/parallel_counter_tb.sv
./obj_dir/Vparallel_counter_tb
```

For a block testbench, replace the top module and the testbench file, and keep `pcnt_pkg.sv`
and the modules the block uses. Every testbench finishes in well under a second.
