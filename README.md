# Low-cost clock gating and two-cycle state retention

Clock gating and power gating both add logic of their own, and that overhead eats into what they
save. This design cuts the overhead in two places.

1. **Flip-flop state driven clock gating.** Many flip-flops in real designs sit at 0, or at 1, almost
   all the time. For such a group, a single OR-tree (or AND-tree) over the flip-flops' *next* inputs,
   plus a one-flip-flop "stretcher", decides whether the group needs a clock edge. Conventional
   toggling-based gating needs one XOR per flip-flop instead. The remaining flip-flops still get
   toggling-based gating, and flip-flops with a known idle condition get ordinary logic-driven
   gating.
2. **State retention for power gating with a wakeup of at most two cycles.** Before the supply of a
   block is switched off, its state is saved in always-on retention latches. Three cell types
   are used:
   - a *1st-phase* single-bit retention flip-flop (SBRFF), which saves and restores in the first
     cycle;
   - a *2nd-phase* SBRFF, which saves and restores in the second cycle;
   - a 2-bit multi-bit retention flip-flop (MBRFF), which keeps two consecutive states.

   Flip-flops that get no retention cell are recomputed by the logic during the two wakeup cycles.
   This includes flip-flops whose next state is usually their own value (a mux-feedback or
   "self-loop" register).

`cgpg_top` puts both side by side: a 32-flip-flop clock-gated register bank, and a power-gated
example circuit with its retention sequencer.

## Clock gating

### One gated group

```
            d[K-1:0] ──┬───────────────────────────────► D   K flip-flops   Q ──► q
                       │                                 ▲
                 ┌─────▼──────┐  en  ┌───────────┐  g  ┌─┴──┐
                 │ OR-tree or │────► │ stretcher │───► │ICG │◄── clk
                 │ ~AND-tree  │      │ g=en|en_d │     └────┘
                 └────────────┘      └───────────┘
```

- **State-0 group** (`cd_state`, `STATE1=0`): `en = |d`. The clock is needed only while some next
  value is 1.
- **State-1 group** (`STATE1=1`): `en = ~&d`. This is an AND-tree plus an inverter, because the
  enable is active high.
- **Stretcher** (`signal_stretcher`): `g = en | en_d`. Here `en_d` is `en` registered on the free
  clock. Look at the cycle in which the inputs go back to the resting value (say 1 → 0). In that
  cycle `en` is already 0, but the flip-flops still hold 1. The stretched `g` lets that one last
  edge through. Invariant: whenever `g = 0`, both the next value and the present value of every
  flip-flop in the group equal the resting value, so dropping the edge changes nothing.
  The stretcher flip-flop resets to 1, so the first edge after reset is always clocked, whatever
  reset value the group has.
- **Toggling group** (`cd_toggle`): `g = |(d ^ q)`, with one XOR per flip-flop. It has no stretcher
  and needs none, because it compares against Q.
- **Logic-driven group**: `g` is the design's own load enable `le`.
- **ICG** (`icg`): a latch, transparent while `clk` is low, followed by `gclk = clk & latched_g`.
  `g` must settle during the cycle before the edge it controls.

In every mode `cg_group` behaves exactly like K plain flip-flops that load `d` on every edge. Gating
is invisible at `q`. The testbenches check this against plain reference registers.

Cost: a state-driven group of k flip-flops needs k−1 two-input OR (or AND) gates, one flip-flop,
one OR and one ICG. A toggling group also needs k XORs. The price is a smaller gated fraction. With
independent inputs that leave rest with probability p, a state-0 group is gated in a fraction
(1−p)^(2k) of the cycles. A toggling group with toggle probability p is gated in (1−p)^k of them.
`tb/cg_sweep_tb.sv` measures both for k = 2…16 and p = 0.05.

### The register bank (`sdcg_regbank`)

N = 32 flip-flops, laid out from bit 0 upward:

| bits   | group            | reset | gating enable |
|--------|------------------|-------|---------------|
| 3:0    | logic-driven     | 0     | `le`          |
| 11:4   | state-0, k = 8   | 0     | `\|d[11:4]`, stretched  |
| 19:12  | state-1, k = 8   | 1     | `~&d[19:12]`, stretched |
| 27:20  | toggling, k = 8  | 0     | `\|(d^q)[27:20]` |
| 31:28  | ungated          | 0     | —             |

The split is set by parameters (`NL`, `K0`/`G0`, `K1`/`G1`, `KT`/`GT`; the ungated count follows).
In a real flow it comes from profiling each flip-flop's probability of being 1. Flip-flops above a
threshold (0.95–0.99) are placed in state-0 or state-1 groups. The groups are formed greedily
under a placement distance limit and a power-saving cost. That selection is a design-flow step and
is not hardware, so it is not part of this RTL. The `g` output gives each group's ICG enable, so a
simulation can count gated cycles.

## Two-cycle state retention

### Cycle table

Call the last two edges before sleep the 1st and 2nd power-down edges. They leave the flip-flops
holding d^{l+1} and then d^{l+2}. Call the first two edges after the supply returns the 1st and
2nd wakeup edges.

| edge             | 1st-phase SBRFF      | 2nd-phase SBRFF      | 2-bit MBRFF                          | no retention |
|------------------|----------------------|----------------------|--------------------------------------|--------------|
| 1st power-down   | d^{l+1}, saved       | d^{l+1}              | d^{l+1} → RL1, shifted into RL2      | d^{l+1}      |
| 2nd power-down   | d^{l+2}              | d^{l+2}, saved       | d^{l+2} → RL1, RL1 closed            | d^{l+2}      |
| sleep            | lost                 | lost                 | lost (RL1, RL2 kept)                 | lost         |
| 1st wakeup       | **d^{l+1}** restored | garbage              | **d^{l+1}** from RL2, RL1 → RL2      | garbage      |
| 2nd wakeup       | recomputed d^{l+2}   | **d^{l+2}** restored | **d^{l+2}** from RL2                 | recomputed   |

After the 2nd wakeup edge, the block holds exactly the state it had after the 2nd power-down
edge. Which cell a flip-flop needs depends on the flip-flop dependency graph:

- A flip-flop needs a 1st-phase cell if, at the 2nd wakeup edge, a flip-flop it drives needs its
  value, or it needs its own value (a self-loop).
- A flip-flop needs a 2nd-phase cell if its drivers are not valid after the 1st wakeup edge.
- A flip-flop needs a 2-bit MBRFF if it needs both.
- A flip-flop with no such need is simply recomputed.

Two constraints follow. A flip-flop driven by a 2nd-phase cell cannot be a 1st-phase cell. The
primary inputs of the block must be the same in the 2nd wakeup cycle as in the 2nd power-down cycle.

### The example circuit (`pg_retention_system`)

```
 in_a ─► f1 (self-loop) ─┐                    ┌─► f5 (self-loop) ─► f7
                         ├─► f3 ─► f4 ────────┤
 in_b ─► f2 (self-loop) ─┘    │               └─► f6 (self-loop) ─► f8
                              └─► f9
```

Each node is a W-bit register (W = 2). The allocation is:

- f1, f2, f5, f6: 1st-phase SBRFFs;
- f4: a 2-bit MBRFF per bit, banked into one 2-bit/2-bit MBR-MBFF;
- f9: 2nd-phase SBRFFs;
- f3, f7, f8: no retention.

That is 7 retention bits per bit slice for 9 flip-flops: 6 for f1..f8, and one more for f9. Note
that f3, f7 and f8 need nothing even though they sit next to self-loop registers. The logic is
simple but arbitrary:

- `f1 = c1 ? in_a : f1`, `f2 = c2 ? in_b : f2`;
- `f3 = f1 + f2`, `f4 = ~f3`;
- `f5 = c5 ? f4 : f5`, `f6 = c6 ? f4 + 1 : f6`;
- `f7 = ~f5`, `f8 = f6 + 1`, `f9 = f3 + 1`.

`rst_n` low clears all registers synchronously. The retention cells have no reset pin.

### Retention cells

- `sbrff`: a master flip-flop plus an always-on shadow latch. The latch is transparent while `save`
  is high. While `restore` is high, a rising edge loads the shadow value instead of `d`.
- `mbrff_2b`: two always-on latches. RL1 follows Q while `nret` is high. RL2 copies RL1 while
  `shift` is high. While `nret` is low, each rising edge loads Q from RL2. The separate SHIFT pin
  replaces the delay chains used by pulsed-latch multi-bit retention registers.
- `mbr_mbff`: `WIDTH` such cells on shared CLK/NRET/SHIFT. In silicon they share the clock and
  always-on control inverters. Banking went up to 8 bits.

These three are **behavioural models** of standard cells. The switched supply is the `vvdd_ok`
input. While it is low, flip-flops on the switched supply are forced to the parameter `LOST`
(default 1), which makes a missed restore visible in a two-state simulator. The latches are
intended. The power switch itself is outside the RTL: `nsleep` goes out, and `vvdd_ok` must come
back high before the next rising edge.

### The sequencer (`retention_ctrl`)

Its state machine runs on the rising edge:
`RUN → PD1 → PD2 → PD3 → SLEEP → PWRON → WK1 → RUN`. `pd_req` is honoured only in RUN, and
`wake_req` only in SLEEP.

- The edge that ends PD1 is the 1st power-down edge, and the edge that ends PD2 is the 2nd.
- The edge that ends PWRON is the 1st wakeup edge, and the edge that ends WK1 is the 2nd.
- `ready` is high in RUN. It returns exactly two edges after the cycle in which the supply comes
  back.

All cell controls are registered on the **falling** edge, so they never move next to a rising
edge:

```
clk       _|‾|_|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_|‾|_
state      RUN | PD1 | PD2 | PD3 |SLEEP... |PWRON| WK1 | RUN
save1          ‾‾‾‾‾‾            (mid PD1 → mid PD2)
save2                ‾‾‾‾‾‾      (mid PD2 → mid PD3)
shift                 ‾          (clock-high half after the 1st power-down edge)
nret     ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______________ ... ___________/‾‾‾
nsleep   ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______ ... __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
restore1                                   ‾‾‾‾‾‾        (covers 1st wakeup edge)
restore2                                         ‾‾‾‾‾‾  (covers 2nd wakeup edge)
shift                                              ‾     (clock-low half before the 2nd wakeup edge)
```

SHIFT is the delicate signal, and it is built from the clock itself. During power-down it must move
RL1 into RL2 while Q (and so RL1) holds d^{l+1}. That means after the 1st power-down edge and closed
before the 2nd, so it occupies the clock-high half. During wakeup, RL2 must still hold d^{l+1} at
the 1st wakeup edge and must already hold d^{l+2} at the 2nd, so it occupies the clock-low half
between them. A SHIFT pulse that spans a rising edge at which Q changes would copy the wrong value.

## Where this departs from, or goes beyond, the method it implements

- The grouping of flip-flops and the retention allocation are design-flow algorithms. They are
  represented here only by their result: parameters in `sdcg_regbank`, and fixed cell choices in
  `pg_retention_system`.
- The bank layout (4/8/8/8/4), the example circuit's logic, f9, W = 2 and all reset behaviour
  are choices of this RTL.
- The sequencer is this design's own. This includes the falling-edge control timing, the extra PD3
  cycle before the supply goes off, and the half-cycle SHIFT placement. It follows the cycle table
  above but not a specified circuit.
- The cell models are functional only. They do not model supplies, high-Vt leakage, or the shared
  inverters of the banked cell.
- Isolation cells at the outputs of the power-gated block are not included.
- The ICG has no scan/test enable.

## Simulating

Everything is SystemVerilog-2017. `rtl/lp_pkg.sv` holds the shared enums and the retention control
struct, and must be compiled first. For example, with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/lp_pkg.sv tb/cgpg_top_tb.sv --top-module cgpg_top_tb
./obj_dir/Vcgpg_top_tb
```

Every testbench prints `TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `cgpg_top_tb` | whole design at default parameters: bank vs. reference register; every gating mechanism and the stretcher seen; 150+ power-down/sleep/wakeup sequences with full state restored in two edges |
| `sdcg_regbank_tb` | default 32-bit bank vs. reference; each group gated at least once |
| `cg_group_tb` | all five gating modes vs. reference registers |
| `cg_sweep_tb` | gated-cycle fraction for k = 2…16 at p = 0.05 against (1−p)^k and (1−p)^(2k) |
| `cd_state_tb`, `cd_toggle_tb`, `icg_tb` | clock disable equations, stretcher delay, glitch-free ICG |
| `sbrff_tb`, `mbrff_2b_tb`, `mbr_mbff_tb` | retention cells driven with the two-cycle control timing; content lost while off, d^{l+1}/d^{l+2} restored on the right edges |
| `retention_ctrl_tb` | every control output in both clock halves against the expected waveform; two-cycle wakeup latency |
| `pg_retention_system_tb` | example circuit vs. a reference model across random sleeps |

The gated clocks are derived combinationally from `clk` in the ICGs. The testbenches change data on
the falling edge, as a real design's flip-flops would settle well before the next rising edge.

## Files

`rtl/`: `lp_pkg`, `icg`, `cd_toggle`, `signal_stretcher`, `cd_state`, `cg_group`, `sdcg_regbank`
(clock gating); `sbrff`, `mbrff_2b`, `mbr_mbff`, `retention_ctrl`, `pg_retention_system` (retention);
`cgpg_top`. `tb/`: the testbenches listed above (`signal_stretcher` is covered by `cd_state_tb`).
