# Phased logic gate with decoupled control and compute

Phased logic (PL) turns an ordinary clocked netlist (flip-flops and LUT4s)
into a netlist with no clock. Every gate keeps a one-bit *phase*, even or
odd. Every signal carries tokens that also have a phase. A gate *fires* once
every one of its inputs carries a token in the gate's phase. Firing toggles
the gate's phase and sends a new token to the gate's fan-out. One round of
firings over the whole netlist does the work of one clock cycle. Because a
gate only acts once all of its inputs have arrived, the netlist works for any
wire delays between gates.

Every gate changes phase once per computation, even when no data value
changes. So what a PL gate switches on a phase change sets its power. The gate
in this repository keeps the two paths apart:

* the **control** path switches on every firing: phase detection, gate phase
  and the output latch enable;
* the **compute** path switches only when a data value changes: the LUT4 and
  the value rail.

A configuration bit can also hold the LUT inputs until the gate fires. Then
the transient LUT changes that a clocked netlist makes, while its inputs
arrive at different times, never happen.

The RTL has no clock anywhere. It is made of XOR/XNOR gates, a Muller
C-element and level-sensitive latches.

## Signals: LEDR pairs

Each logical signal is a pair of wires, `pl_pkg::ledr_t {v, t}`. `v` carries
the data bit. `t` is set so that the phase of the pair, `v ^ t`, alternates
from one token to the next:

| v t | value | phase |
|-----|-------|-------|
| 0 0 | 0 | even (0) |
| 1 1 | 1 | even (0) |
| 0 1 | 0 | odd (1) |
| 1 0 | 1 | odd (1) |

Exactly one wire changes per token. If the value is unchanged, `t` toggles.
If the value changes, `v` toggles. A receiver sees that a new token has
arrived when the phase has changed, whatever the value is. Feedback nets are
single wires that carry a phase and no value.

## How the gate fires (`pl4gate`)

```
 a..d (LEDR) ──► phase_detect ──► gate_phase ──┬──► fo / fo_b (feedback outputs)
 fi ──────────►  (XORs + C)                    │
                                               ▼
 a.v..d.v ────► lut4 ──► new_v ──────────► pl_output ──► y = (v,t), y_inv = (v,~t)
                 ▲                             │
                 └──────────── enable ◄────────┘
```

1. **Input phase detection.** Each input pair is reduced to its phase with an
   XOR. The four phases and the feedback input `fi` go into a 5-input Muller
   C-element. The gate phase is the complement of the C-element's state. So
   when all five inputs equal the gate phase, the C-element switches and the
   gate phase toggles. An input that arrives early waits: the C-element holds
   until the last one comes in.
2. **Enable pulse.** At rest, the output pair's phase is the opposite of the
   gate phase. Once the gate phase toggles, the two phases are equal, and
   `enable = ~r & (gate_phase == v ^ t)` goes high.
3. **Output latch.** While `enable` is high, two transparent latches take
   `v = new_v` and `t = ~(new_v ^ gate_phase)`. The new pair therefore has the
   phase opposite to the new gate phase, so `enable` falls and the latches
   hold. When the value is unchanged only `t` moves, and the LUT is not read
   again.
4. **Outputs.** `y` is the normal output. `y_inv = (v, ~t)` carries the same
   value in the opposite phase, which equals the gate phase. A net driven
   from `y_inv` holds a token right after reset. `fo = ~gate_phase` and
   `fo_b = gate_phase` are the two feedback outputs.

The enable pulse is self-timed. In silicon it has to last longer than the LUT
delay, so that `new_v` settles before the latches close. The RTL has no
delays, so this is a constraint for a physical implementation. It cannot be
seen in a zero-delay simulation.

### LUT configurations (`protect`)

| `protect` | name | LUT inputs | LUT output changes |
|-----------|------|-----------|--------------------|
| 0 | B | always live | on every change of a value input, including transients while a new input set is still arriving |
| 1 | A | held in latches that open only while `enable` (or reset) is high | at most once per firing |

With "A", the LUT's delay is added to the gate's critical path: phase detection
must finish before the LUT starts. That is why it is a per-configuration
choice and not fixed.

### Reset

While `r` is high:

* the gate phase is even (C-element state 1);
* the output pair is loaded from `v_rbit` / `t_rbit`;
* `enable` is held low;
* in "A", the LUT hold latches are open.

The output must start in the odd phase (the opposite of even), so use
`t_rbit = ~v_rbit`. Choose `v_rbit` as the reset value of the flip-flop or
gate that this gate replaces.

### Tie-offs

* An unused data input is tied to value 0 in the gate's own phase:
  `'{v: 0, t: fo_b}`.
* An unused feedback input is tied to `fo_b`.

Either way, the input always agrees with the firing condition and never
blocks the gate.

## Netlists: tokens and feedback

A PL netlist only runs forever without deadlock if it follows two rules:

* **live**: every directed loop holds a token, so some gate on it can fire;
* **safe**: no loop holds more than one token, so a token can never
  overwrite an unconsumed one.

Tokens are placed by driving a net from `y_inv`. A gate whose output is not on
any loop back to itself must wait for an acknowledgement: a feedback net from
the gate that consumes its output (`fo` of the consumer into `fi` of the
producer). Several feedback nets can be merged with a 4-input C-element
(`c_element`, default `N = 4`). Its output changes only once all four nets
have toggled.

### Example: 2-bit counter (`pl_counter2`)

The clocked counter is `q0 <= ~q0; q1 <= q1 ^ q0`. In PL form:

| gate | function | inputs | output net | drives from |
|------|----------|--------|-----------|-------------|
| G1 | buffer, replaces DFF0 | G2, feedback from G4 | n1 → G2, G4 | `y_inv` (token) |
| G2 | inverter | G1 | n2 → G1 | `y` |
| G3 | buffer, replaces DFF1 | G4 | n3 → G4 | `y_inv` (token) |
| G4 | XOR | G1, G3 | n4 → G3; `fo` → G1 | `y` |

Without the feedback net, G1 could produce the next `q0` before G4 had used
the current one.

After reset, G2 and G4 are ready to fire. They fire, then G1 and G3, and
then the cycle repeats. One full cycle is one count. `q0` and `q1` are the
value rails of G1 and G3.

All nets between gates leave the module on `n1_o … n4_o, fb_o` and come back
on the `*_i` inputs. Connect each output to its inputs, as listed in the
module header, through any positive delay. Every loop in a PL netlist must
contain some delay. With zero delay, the netlist has no defined behaviour in
simulation, and synthesizable RTL cannot contain delays. So the wiring, which
in silicon supplies that delay, sits outside the module. The testbench
supplies it as random transport delays.

## Files

| file | contents |
|------|----------|
| `rtl/pl_pkg.sv` | `ledr_t`, `phase_e`, `ledr_phase()`, `ledr_encode()` |
| `rtl/c_element.sv` | N-input Muller C-element with reset (default 4: feedback concentrator) |
| `rtl/phase_detect.sv` | input phase XORs + 5-input C-element → gate phase, `fo`, `fo_b` |
| `rtl/lut4.sv` | 16-entry LUT with optional input hold latches |
| `rtl/pl_output.sv` | output latches, timing-rail encoding, enable pulse, reset values |
| `rtl/pl4gate.sv` | the complete gate |
| `rtl/pl_counter2.sv` | the 2-bit counter netlist (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

LUT contents use `init[{d,c,b,a}]`. For example, `16'hAAAA` is a buffer of
`a`, `16'h5555` an inverter, and `16'h6666` is `a ^ b`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. It has a watchdog that stops it if it hangs. With Verilator 5:

```
verilator --binary --timing -y rtl -Irtl rtl/pl_pkg.sv tb/tb_pl_counter2.sv \
          --top-module tb_pl_counter2 -Wno-fatal
./obj_dir/Vtb_pl_counter2
```

Replace the testbench name for the other modules. Lint reports latches and
combinational loops. These are intended in a clockless design. Each module
header explains the ones it has.

What the testbenches check:

* **`tb_pl4gate`**
  * Tokens arrive in random order, with random gaps.
  * Nothing fires before the last input, including a late feedback input.
  * After firing: the output value and phase, `y_inv`, the feedback outputs,
    and that `enable` has fallen.
  * In "B", the LUT follows its inputs. In "A", it does not move while tokens
    are still arriving.
  * Both reset values.
* **`tb_pl_counter2`**
  * Six runs: both LUT configurations, each with three ranges of random wire
    delay (1–3, 2–40 and 5–12 time units).
  * After every firing of every gate, it checks the value that gate produced
    against the clocked counter.
  * No gate may get more than one firing ahead of its neighbours.
  * It requires each of these to happen at least once:
    * reset;
    * G1 held back by the feedback net;
    * a stall: one net is held, the netlist stops, then it resumes correctly;
    * fewer LUT output changes in G4 under "A" than under "B".
  * It prints control firings and LUT changes per gate. G4, the only gate
    with two data inputs, changes its LUT about 1.4 times per firing under "B"
    and at most once under "A".
  * It also prints an estimate of the switched capacitance per count. It
    takes 1.05 pF per LUT4 output change and 0.20 pF per gate phase change
    (0.25 µm estimates). The result is about 4.9 pF under "B" and 3.8 pF
    under "A": four phase changes and about 3.9 or 2.9 LUT changes per count.
* **`tb_c_element`, `tb_phase_detect`, `tb_lut4`, `tb_pl_output`**: each
  block is checked against a reference model.

## Departures, choices and limits

* **Gate-phase polarity.** The gate phase is the complement of the C-element
  state. This is derived from two rules: reset gives even = 0, and the gate
  fires when its inputs match its phase.
* **Feedback polarity.** A feedback net carries `fo = ~gate_phase`, and the
  receiving gate compares it directly with its own phase. An unused feedback
  input is tied to `fo_b`. Both follow from the token labels of the counter
  example.
* **Reset values of the timing rail.** The reset value of `t` must be
  `~v_rbit`. A value of 1 would give the odd phase only when `v_rbit = 0`.
  Both stay separate inputs.
* **Where the "A" hold latches sit.** They are on the LUT inputs. The design
  only asks that the output latch enable also enables the LUT, and does not
  say where.
* **Nets as ports.** The counter's nets between gates are ports, not internal
  wires (see above).
* **One configuration bit for the whole counter.** The counter uses a single
  `protect` input for all four gates. A programmable fabric would have one
  bit per cell.
* **Not built:**
  * the original PL gate that reads its LUT RAM on every phase change (a
    predecessor, described only for comparison);
  * a programmable routing fabric;
  * the optional extra 4-input C-element inside every gate cell (use a
    separate `c_element` instead);
  * the FIR filter and matrix-vector benchmark netlists used to compare
    switched capacitance with clocked FPGAs. Their netlists are not available
    in enough detail: only their sizes are known, 573 to 1294 LUT4s and
    111 to 619 four-input C-elements each.
* **Timing is not modelled.** The constraint that the enable pulse must
  outlast the LUT delay is not checked. Neither is the speed of the netlist.
