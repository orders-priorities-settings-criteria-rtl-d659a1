# Multifunctional register with a speed-oriented command priority order

A multifunctional register (MFR) is one p-bit register that can hold its
value, clear, load a word in parallel, shift one place left or right, and
count up or down. Each bit is a D flip-flop whose D input comes from a
small tree of 2:1 multiplexers. When more than one command is active at
once, the position of each command in that tree decides which one wins:
the command nearest the flip-flop has the highest priority.

The point of this design is that the priority order also sets the maximum
clock frequency. Counting has by far the longest logic in front of the
multiplexers: a ripple AND chain that decides whether a bit toggles, then an
XOR. If counting is placed at the bottom of the priority order, that long
path still has to go through every multiplexer above it. Giving counting
the *highest* synchronous priority leaves only two multiplexers after the
XOR instead of four. The hardware is the same; only the wiring order of the
multiplexers changes.

Both orders are provided, selected by a parameter. The faster one is the
default.

## Commands and operations

| Port   | Meaning |
|--------|---------|
| `ck`   | clock, rising edge |
| `sr_n` | reset, active low, **asynchronous**, overrides everything |
| `pe_n` | parallel load, active low |
| `sh`   | shift enable |
| `ce`   | count enable |
| `l_rn` | shift direction: 1 = left (towards the MSB), 0 = right |
| `u_dn` | count direction: 1 = up, 0 = down |
| `dr`   | serial input of a right shift; enters bit p-1 |
| `dl`   | serial input of a left shift; enters bit 0 |
| `d[P-1:0]` | parallel data |
| `q[P-1:0]` | register contents |

| Operation   | Next state `q'` |
|-------------|-----------------|
| reset       | `0` (at once, no clock edge needed) |
| load        | `d` |
| shift right | `{dr, q[P-1:1]}` |
| shift left  | `{q[P-2:0], dl}` |
| count down  | `q - 1 mod 2^P` |
| count up    | `q + 1 mod 2^P` |
| hold        | `q` (when `pe_n = 1`, `sh = 0`, `ce = 0`) |

Every synchronous operation takes effect on the first rising edge of `ck`
after its command is applied; there is no pipeline.

## The two priority orders

`ORDER` (type `mfr_pkg::mfr_order_e`) picks one:

| `ORDER`          | Priority, highest first           | Multiplexers after the count XOR |
|------------------|-----------------------------------|----------------------------------|
| `ORDER_PE_SH_CE` | reset, load, shift, count         | 4 |
| `ORDER_CE_SH_PE` (default) | reset, count, shift, load | 2 |

So with `pe_n = 0`, `sh = 1` and `ce = 1` together, the first order loads
`d`, the second counts. When only one command is active the two orders
behave identically.

### Bit slice, order load > shift > count (`mfr_slice_alt1`)

```
 q^psi ─┐                                    q[i-1] ─┐
        ├─ mux (u_dn) ─┐                              ├─ mux (l_rn) ─┐
 q^phi ─┘              ├─ mux (ce) ─┐        q[i+1] ─┘               │
                  q ───┘            └──────────────── mux (sh) ◄─────┘
                                                          │
                                          d[i] ── mux (pe_n) ── D of flip-flop i
```

The counted value crosses the `u_dn`, `ce`, `sh` and `pe_n` multiplexers.

### Bit slice, order count > shift > load (`mfr_slice_alt2`)

```
 q ───┐                    q[i-1] ─┐
      ├─ mux (pe_n) ─┐             ├─ mux (l_rn) ─┐
 d[i]─┘              └── mux (sh) ◄───────────────┘
                             │
 q^psi ─┐                    │
        ├─ mux (u_dn) ─── mux (ce) ── D of flip-flop i
 q^phi ─┘
```

The counted value crosses only the `u_dn` and `ce` multiplexers; the load
and hold paths, which start straight at a flip-flop output, take the longer
route, where they have time to spare.

In both slices a multiplexer input marked 1 is taken when its select is 1;
`l_rn = 1` selects the left neighbour `q[i-1]`. For bit 0 the left
neighbour is `dl`, for bit P-1 the right neighbour is `dr`.

## Counting: the toggle chain

A binary counter bit toggles when every bit below it is 1 (counting up)
or 0 (counting down). `mfr_count_chain` produces these two conditions for
every bit:

```
psi[0] = 1,  psi[i] = psi[i-1] &  q[i-1]
phi[0] = 1,  phi[i] = phi[i-1] & ~q[i-1]
```

and the slices form `q[i] ^ psi[i]` (up) and `q[i] ^ phi[i]` (down). The
chain is a ripple of 2-input AND gates, one per bit, so its delay grows with
the width. The down chain is fed from the flip-flops' inverted outputs, as
a discrete build would do, rather than from extra inverters.

## Timing: why the order matters

`mfr_pkg` holds a worst-case timing model for a build from 74LS-series TTL
parts. Its constants are data-book maxima:

| Element | Delay |
|---------|-------|
| 74LS74A clock to Q | 40 ns |
| 74LS74A D set-up   | 20 ns |
| one AND gate (74LS08) of the toggle chain | 20 ns |
| XOR (74LS86) | 30 ns |
| 2:1 multiplexer (74LS126A tri-state pair + 74LS04 inverter) | 15 ns |

The critical path starts at a clock edge, runs through the flip-flop, the
AND chain, the XOR and the multiplexers, and must arrive a set-up time
before the next edge:

```
T_min = t_su + t_cq + ranks * t_and + t_xor + n_mux * t_mux
```

`mfr_pkg::min_period_ns(order, ranks)` evaluates it, with `ranks` the
number of AND gates on the longest carry chain. With a 4-gate chain:

| Order | n_mux | T_min | f_max |
|-------|-------|-------|-------|
| load > shift > count | 4 | 20 + 40 + 80 + 30 + 60 = 230 ns | about 4.35 MHz |
| count > shift > load | 2 | 20 + 40 + 80 + 30 + 30 = 200 ns | 5 MHz |

That is 13 % shorter (30 / 230). The saving is a fixed two multiplexer
delays, while the AND chain grows with the width, so the relative gain
falls as the register gets wider; at 12 gates it is 30 / 390, under 8 %.
The general rule: after reset, give the highest priority to the command
whose own logic from Q to D is slowest, so it passes the fewest selection
stages.

Count the gates carefully. Because `psi[0] = phi[0] = 1` needs no gate,
bit i sits behind i AND gates, so a P-bit register has P-1 of them on its
top bit. The 4-gate figures above therefore belong to a 5-bit register; the
default 4-bit register has a 3-gate chain and runs at 210 ns and 180 ns
(30 / 210, 14 %).

### Gate-level timing model

`tb/mfr_ttl.sv` rebuilds the register from delay-annotated models of the
74LS parts (`ttl_and2`, `ttl_xor2`, `ttl_mux2`, `ttl_dff`; the flip-flop
model counts set-up violations). `tb_mfr_timing` uses it to measure the
path rather than just add it up. The slowest edge is not the obvious
0111 -> 1000: there, every lower bit falls at the same moment and each AND
gate switches directly from its own Q input. The long ripple happens on
0110 -> 0111 when counting up (bit 0 rises and `psi` turns on gate by
gate) and on 1001 -> 1000 when counting down. At those edges the top bit's
D input glitches and recovers only after the full chain. Its last change
plus set-up time is the minimum period. The testbench also clocks the
model at that period through full count cycles with no violation, and
5 ns faster, where violations appear. Measured:

| Bits | AND gates | load > shift > count | count > shift > load |
|------|-----------|----------------------|----------------------|
| 4 | 3 | 210 ns | 180 ns |
| 5 | 4 | 230 ns | 200 ns |

These numbers describe the discrete circuit only. In an FPGA or a
standard-cell flow the synthesis tool restructures the logic and they do
not apply; the functional behaviour of the two orders is unchanged.

## Files and hierarchy

```
mfr                      top: P bits, ORDER
├── mfr_count_chain      toggle conditions phi/psi for all bits
└── per bit i
    ├── mfr_slice_alt1   (ORDER_PE_SH_CE) or mfr_slice_alt2 (ORDER_CE_SH_PE)
    │   └── 5 × mux2
    └── mfr_dff          D flip-flop with asynchronous clear
mfr_pkg                  order enum, command struct, timing model

tb/mfr_ttl               gate-level 74LS timing model (simulation only)
└── ttl_and2, ttl_xor2, ttl_mux2, ttl_dff
```

All RTL is in `rtl/`, one unit per file; testbenches are in `tb/`.

## Parameters

| Module | Parameter | Default | Notes |
|--------|-----------|---------|-------|
| `mfr`, `mfr_count_chain` | `P` | 4 | register width; any value ≥ 1 works |
| `mfr` | `ORDER` | `ORDER_CE_SH_PE` | priority order |

## Where this RTL departs from a literal reading of the circuit

* The down-count value is `q ^ phi`. Gate-level sketches of this circuit
  sometimes XOR the *inverted* bit with phi; that yields the complement of
  `q - 1`, so the arithmetic definition of counting down was followed.
* The AND gates of the toggle chain are collected in one module instead of
  sitting inside each bit slice. The gates and their connections are the
  same.
* The 2:1 multiplexer is written as AND-OR logic, not as two tri-state
  buffers on a shared wire; the function is identical.
* The flip-flop has no preset input.
* The selectable `ORDER` parameter and the choice of the faster order as
  default belong to this RTL; the two orders were originally two separate
  circuits.
* Reset is asynchronous in both assertion and release. A synchronous system
  should release `sr_n` away from the rising edge of `ck`.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mfr_pkg.sv rtl/mux2.sv rtl/mfr_count_chain.sv rtl/mfr_dff.sv \
  rtl/mfr_slice_alt1.sv rtl/mfr_slice_alt2.sv rtl/mfr.sv \
  tb/tb_mfr.sv --top-module tb_mfr
./obj_dir/Vtb_mfr
```

Replace `tb_mfr` with another testbench to run it. The timing testbench
needs the models in `tb/` and a 1 ns time unit:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl -y tb \
  rtl/mfr_pkg.sv tb/tb_mfr_timing.sv --top-module tb_mfr_timing
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_mux2` | all 8 input combinations |
| `tb_mfr_count_chain` | every state of a 4-bit and a 7-bit chain against a mask-based reference |
| `tb_mfr_dff` | sampling on the rising edge only, clear without a clock edge, clear held across edges, `q_n = ~q` |
| `tb_mfr_slice_alt1`, `tb_mfr_slice_alt2` | all 2048 input combinations of one slice against a priority if-chain |
| `tb_mfr_timing` | the gate-level 74LS model at 4 and 5 bits in both orders: measured minimum period against the formula and the table above, correct counting at that period, set-up violations 5 ns below it |
| `tb_mfr_full` | the top exactly at its defaults through one complete use: reset, load, hold, a full count-up and count-down cycle, a word shifted in serially through `dr` and out through the MSB with left shifts, conflicting commands, asynchronous reset |
| `tb_mfr` | the top at default parameters and in the other order, side by side: directed load, full count-up and count-down runs with wrap-around, shifts both ways with both serial input values, conflicting commands, asynchronous reset between edges, then 2000 random cycles; the state is compared after every edge with an arithmetic reference model, each mechanism (hold, reset, load, both shifts, both counts, both wrap-arounds, command conflicts) must occur at least once, and the timing model must give 230 ns, 200 ns and 13 % |

## Changing the design

* **Width:** set `P`. The only width-dependent logic is the toggle chain,
  which grows by one AND gate per bit.
* **Another priority order:** write a slice with the multiplexers stacked in
  the new order, add a value to `mfr_order_e`, a branch in `mfr`'s generate
  block and a case in `count_path_muxes`.
* **Faster counting at large widths:** the ripple chain dominates; a
  lookahead (tree) AND for `phi`/`psi` in `mfr_count_chain` would shorten it
  without touching the slices.
