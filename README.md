# TSPC dual-modulus prescalers: divide-by-32/33 and divide-by-16/17

A frequency synthesizer needs a programmable divider that runs at the
oscillator frequency. The usual way to get there is a *dual-modulus
prescaler*: a small divider that divides by N or N+1 under a single control
bit and is the only part working at full speed. A pulse-swallow counter
behind it, at a fraction of the rate, then builds any ratio from the two
moduli.

This RTL models two such prescalers built from true-single-phase-clock (TSPC)
flip-flops:

* **32/33** (`prescaler_32_33`): divides by 32 when `sm = 0` and by 33 when
  `sm = 1`. This is the main design.
* **16/17** (`prescaler_16_17`): divides by 16 when `mc = 0` and by 17 when
  `mc = 1`.

`prescaler_top` drives both from one input clock, so four ratios (16, 17, 32,
33) are available.

Both prescalers rest on the same idea. Only a two- or three-flip-flop
synchronous stage sees the input clock, and it can stretch one of its
periods by one input cycle. A ripple divide-by-8 behind it runs at a quarter
or half of the input rate. Once per ripple cycle, it asks the fast stage to
stretch one period. All the speed-critical logic sits in that tiny fast
loop. The work that went into these circuits was about removing gate and
inverter delays from that loop: the pseudo 2/3 stage and the clocking of the
ripple stages from inverted outputs.

The RTL describes the logic only. The TSPC transistor circuits, their dynamic
nodes, gate merging and the speed they reach are outside what RTL can say.

## The 32/33 prescaler

```
            +--------------------+   out45   +-----------------------+
 clock ---->| divide-by-4/5      |---------->| ripple divide-by-8    |---> out
            | (synchronous)      |           | 3 toggle FFs, Q->clk  |    (Q of last stage)
            +--------------------+           +-----------------------+
                     ^ div8                     | QN_a QN_b QN_c
                     |                          v
                     +------ NAND(sm, QN_a, QN_b, QN_c) <---- sm
```

* `div8 = 1`: the 4/5 counter divides by 4. `div8 = 0`: it divides by 5.
* `div8` is low only when `sm = 1` and the ripple counter is in the one
  state whose three inverted outputs are all high. That state lasts one 4/5
  period, so one period in eight is a 5: 7·4 + 5 = 33.
* With `sm = 0`, `div8` stays high: 8·4 = 32.
* The output is high for 16 input cycles in both modes. The extra cycle
  falls in the low half.
* `sm` acts in the same output period if it changes just after a rising edge
  of `out`, because the ripple counter reaches the NAND state in the last
  4/5 period before `out` rises.

### Divide-by-4/5 counter, flip-flop version (`div45_counter`, default)

Three flip-flops run at the full clock rate. Writing `qnK` for the inverted
output of flip-flop K:

```
D1 = NAND(qn2, qn3)     D2 = qn1     D3 = NOR(qn2, div8)     out = qn1
```

Which output feeds which gate follows the original schematic. The gate
types do not, because they could not be read from it. They were chosen as
the only AND/OR/NAND/NOR pair on those connections that divides as
required:

| div8 | state (qn1 qn2 qn3), repeating       | out = qn1  | period |
|------|--------------------------------------|------------|--------|
| 1    | 11x → 10x → 00x → 01x (qn3 held 1)   | 1 1 0 0    | 4      |
| 0    | 111 → 101 → 000 → 010 → 011          | 1 1 0 0 0  | 5      |

The three states outside the 5-cycle (001, 100, 110) reach it within two
clocks, so the counter starts by itself.

### Divide-by-4/5 counter, half-rate state machine (`fsm_div45_counter`)

This is an alternative form of the same counter, selected with
`COUNTER_IMPL = HALF_RATE_FSM` (type `prescaler_pkg::counter_impl_e`).

A toggle flip-flop makes Clk/2. A 3-bit state S advances once per Clk/2
period, so the next-state logic has two input periods to settle. Each state
drives A = S[2] and B = S[1]. The output shows A in the first half of the
Clk/2 period and B in the second, so it still moves at the full rate.

| div8 | states                         | output, two bits per state | periods |
|------|--------------------------------|----------------------------|---------|
| 1    | 000 ↔ 110                      | 00 11                      | 4       |
| 1    | 100 ↔ 010                      | 10 01                      | 4       |
| 0    | 000→110→001→010→101→000        | 00 11 00 01 10             | 5, 5    |

The decision is taken in states 110 and 010 only. A single divide-by-5
shifts the output by half a Clk/2 period. That is why there are two /4
loops: leaving the /5 path at 010 lands in the shifted loop, and the next
/5 brings it back.

This design made these choices where the description of this counter is
silent:

* State 001 goes to 010 and state 101 goes to 000, whatever `div8` is.
* State 100 goes to 010.
* The unused states 011 and 111 go to 000. An assertion checks that they are
  never entered after reset.
* A flip-flop on the full-rate clock makes the A/B choice, not a multiplexer
  switched by Clk/2. The waveform is the same, but the output cannot
  glitch. The ripple counter is clocked by this output, so a glitch would
  count as an edge.

## The 16/17 prescaler

```
        +-------------------------- pseudo 2/3 --------------------------+
 Fin -->| DFF0: D0 = MC1          DFF1: D1 = QN0 AND QN1                 |-- QN1 --+
        +-----------------------------------------------------------------+         |
             ^ MC1                                                                  v
             |                              DFF2 (clk QN1) -> DFF3 (clk QN2) -> DFF4 (clk QN3)
  MC1 = MC AND QN2 AND QN3 AND QN4  <-------------- QN2, QN3, QN4           Fout = Q4
```

Each ripple stage is clocked from the *inverted* output of the stage before.
That takes one inverter delay off each stage compared with clocking from Q.

### The pseudo divide-by-2/3 stage

With MC1 low, QN0 is high, D1 = QN1, and DFF1 simply toggles: Fin/2.

The stage can do one divide-by-3, but not several in a row. That is all a
16/17 prescaler needs, and it keeps the OR gate of a full 2/3 stage out of
the critical loop.

With `mc = 1`, MC1 rises when QN1 rises and the ripple counter enters its
MC1 state. It falls one QN1 period (two Fin periods) later. Rising edges of
Fin are numbered from that first edge. Each column shows the value just
after the edge:

| edge | t1 | t2 | t3 | t4 | t5 | t6 |
|------|----|----|----|----|----|----|
| MC1  | 1  | 1  | 0  | 0  | 0  | 0  |
| QN0  | 1  | 0  | 0  | 1  | 1  | 1  |
| D1   | 1  | 0  | 0  | 1  | 0  | 1  |
| QN1  | 1  | 0  | 1  | 1  | 0  | 1  |

QN1 rises at t1, t3 and t6, so the second period is 3. QN0 must still be low
after t3. Otherwise D1 would rise with QN1 and QN1 would fall again at t4.
This is why MC1 must last two Fin periods. Seven periods of 2 and one of 3
give 17.

The gate that makes MC1 is this design's choice. Any single one of the eight
ripple states would do. The one used is the state the ripple counter enters
as QN1 rises, which matches the described waveform.

MC1 decodes a ripple counter that counts up. On its way from 3 to 4, the
counter passes through the MC1 state while the ripple settles. That gives a
short MC1 pulse just after a QN1 edge, which is zero-width in simulation.
DFF0 only samples MC1 at the next Fin edge, so the pulse does no harm. The
32/33 ripple counter counts down and never passes through its decoded state
on the way to another.

An assertion in `pseudo_div23` flags MC1 held high for more than two Fin
periods.

### Start-up and the one lock state

From reset, or from any power-up state with `mc = 0`, the 16/17 prescaler
falls into its counting loop. With `mc = 1` there is one power-up state it
cannot leave:

* DFF0 is set and DFF1 is clear.
* The ripple counter is in its MC1 state.

QN0 = 0 then holds D1 low, so QN1 never rises. The ripple counter never
advances, and MC1 stays high. A reset clears the state, and so does `mc` low
for one Fin edge. Normal running never reaches it.

The two forms of the 4/5 counter, and so the 32/33 prescaler, have no such
state. The `rst_n` input exists so that simulation starts from a known phase.

## Where this RTL departs from, or goes beyond, its source

* **Reset.** Every flip-flop has an asynchronous active-low reset. TSPC
  flip-flops have none. Tie `rst_n` high to model the bare circuit.
* **Flip-flop model.** `tspc_dff` is an ideal edge-triggered flip-flop with Q
  and QN. The gates that the silicon merges into the flip-flop input stages
  are written as separate gates.
* **4/5 counter gate types** were derived from the required behaviour, not
  read from the schematic (see above).
* **AND in front of DFF0.** The source places an AND gate there but does not
  say what its second input is. Here D0 = MC1.
* **Which 4/5 counter is "the" design.** The source presents the flip-flop
  counter in its 32/33 schematic and also describes the half-rate state
  machine as its new counter. Both are provided. The flip-flop counter is
  the default because it is the one drawn.
* **"Pseudo" divide-by-4/5.** The source calls its 4/5 stage a pseudo
  divide-by-4/5 but never describes any restriction on it. The counters here
  divide by 5 for as long as `div8` is low.
* **Two prescalers together.** The source says the circuit offers the 16/17
  and 32/33 ratios but not how they are combined. Here they share the input
  clock and keep separate controls and outputs.
* **Not modelled.** The 0.10 µm layout and its analog results are outside
  RTL: propagation delays (a Fin-to-Fout delay of about 490 ps is shown),
  maximum and minimum input frequency, and power.

## Files

| file | contents |
|------|----------|
| `rtl/prescaler_pkg.sv` | `counter_impl_e`, division-ratio constants |
| `rtl/tspc_dff.sv` | D flip-flop with Q and QN, async reset |
| `rtl/div45_counter.sv` | full-rate divide-by-4/5 counter |
| `rtl/fsm_div45_counter.sv` | half-rate state-machine divide-by-4/5 counter |
| `rtl/async_div8.sv` | ripple divide-by-2^STAGES; `CHAIN_FROM_QN` picks Q or QN chaining |
| `rtl/pseudo_div23.sv` | pseudo divide-by-2/3 stage |
| `rtl/prescaler_32_33.sv` | 32/33 prescaler; parameter `COUNTER_IMPL` |
| `rtl/prescaler_16_17.sv` | 16/17 prescaler |
| `rtl/prescaler_top.sv` | both prescalers on one input clock |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Ports of the top: `fin`, `rst_n`, `sm`, `mc` in; `fout_32_33` and
`fout_16_17` out. The moduli controls `div8` and `mc1` are also brought out
for observation.

Parameters:

* `COUNTER_IMPL`: default `DFF_COUNTER`.
* `async_div8`: `STAGES` (default 3) and `CHAIN_FROM_QN` (default 0, set to 1
  inside the 16/17 prescaler).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/prescaler_pkg.sv \
    tb/tb_prescaler_top.sv --top-module tb_prescaler_top
./obj_dir/Vtb_prescaler_top +verilator+rand+reset+2 +verilator+seed+7
```

`+verilator+rand+reset+2` gives the flip-flops random power-up values. The
top-level test uses this to check that both prescalers start without reset.

What the testbenches check:

* **Output periods.** Every output period is measured in input cycles and
  compared with 32/33 or 16/17 as selected. High time and the length of the
  `div8` / MC1 pulse are checked too (5 input cycles and 2 Fin cycles).
* **Divide-by-3 waveform.** In the 16/17 test, every divide-by-3 operation
  is compared edge by edge with the MC1/QN0/QN1 table above.
* **Mode changes.** Control inputs are switched at random between output
  periods. The next period must already have the new ratio.
* **4/5 counters.** Both are checked in fixed /4 and /5 modes. They are also
  run under a divide-by-8 model that requests one /5 in eight, and each group
  of eight periods must total 33.
* **Ripple counter.** Checked state by state against a reference count, both
  counting down (Q chaining) and up (QN chaining).
* **Top.** `tb_prescaler_top` starts without reset and then resets in
  mid-run. It counts every mechanism: /32, /33, /16 and /17 periods,
  divide-by-5 and divide-by-3 insertions, switches of `sm` and `mc`, and
  start with and without reset. A mechanism that never occurs counts as a
  failure.

All testbenches pass. The design is small enough that the top-level test
runs at the default configuration in well under a second.
