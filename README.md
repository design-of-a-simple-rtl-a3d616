# A fault-tolerant wired-logic majority voter for TMR and NMR

Triple modular redundancy (TMR) runs three copies of a circuit and lets a
voter pass on the majority of their outputs. One broken copy is then masked.
The voter itself, though, sits in series with everything else. It is built in
the same technology as the modules, and a classical voter (three 2-input NANDs
feeding a 3-input NAND) must be counted as failed as soon as any one of its
transistors fails. The voter can end up as the weakest part of the system.

This RTL models a voter that tolerates a fault in itself. It has no final
gate at all. The output is a single wire pulled up by a resistor. Several
open-drain gates can pull that wire low, and each consists of nothing but
series n-channel transistors. Because the inputs of each gate normally agree,
a single stuck transistor, a dead gate or a dead input inverter does not
change the output. The structure extends directly to N = 2n+1 modules and to
multi-bit outputs.

## The triple voter

```
 a ──▷o── a'                                   VCC
 b ──▷o── b'                                    │
 c ──▷o── c'                                    R
                                                │
 gate AB:  node ──┤a'├──┤b'├── GND              │
 gate AC:  node ──┤a'├──┤c'├── GND      node ───┴─── v
 gate BC:  node ──┤b'├──┤c'├── GND
```

Each module output is inverted. There is one open-drain gate for each pair of
inputs. A gate is two n-channel transistors in series from the shared node to
ground, so it sinks the node when both of its inputs are 0. The node is high
only when no gate sinks it:

    v = (a | b) & (a | c) & (b | c) = majority(a, b, c)

That is 3 inverters (6 transistors), 6 pull-down transistors and one resistor:
12 transistors in all.

## Why one fault does not break it

This is the central property of the design. It holds **while the three
modules agree**, which is the case the voter must protect. A voter fault while
a module is also wrong is a double fault.

* **All inputs 1** (node must stay high). Every inverted input is 0, so every
  transistor is off. A transistor stuck *on* is still in series with a healthy
  partner whose gate is 0, and the chain stays open. A transistor stuck *off*
  only helps.
* **All inputs 0** (node must go low). All three gates conduct. A transistor
  stuck *off*, or an inverter stuck at 0, kills at most two gates: an inverter
  drives one transistor in each of two gates. The third gate still sinks the
  node.
* **An inverter stuck at 1** is the same as its two transistors stuck on. They
  are in different gates, and each is blocked by its partner when the inputs
  are 1.

The limit: two failed transistors *in the same gate* (both stuck on) short the
node to ground. The voter then reads 0 even though all modules say 1. An
exhaustive campaign over all 3^9 fault combinations of the 9 fault sites finds
21 cases of a double fault under agreeing inputs that break the voter, and no
single-fault case.

Two behaviours of the real circuit are analog and not modelled. The rising
edge of v, through the resistor, is slower than the falling edge through the
transistors, and a smaller resistor (bounded by the gates' sink current) makes
it faster. The static current through the resistor while v is low makes this
voter consume more power than a CMOS voter.

## Extension to N = 2n+1 modules

With N inputs there is one open-drain gate for every (n+1)-element subset of
the inputs, C(2n+1, n+1) gates of n+1 series transistors each. The node goes
low exactly when at least n+1 inputs are 0, which is the majority. While the
modules agree, up to n stuck transistors inside one gate are masked, as is any
single fault elsewhere. By the same argument as above, so are up to n failed
inverters (this is derived here and checked, not claimed by the original
design). All n+1 transistors of one gate stuck on break it.

| N | gates | transistors per gate | pull-down transistors |
|---|-------|----------------------|-----------------------|
| 3 | 3     | 2                    | 6                     |
| 5 | 10    | 3                    | 30                    |
| 7 | 35    | 4                    | 140                   |

`ft_voter_nmr` numbers its gates by taking the subsets in increasing order of
their bit mask (input 0 = bit 0). Transistor t of a gate is driven by the
t-th lowest input of the subset, and transistor 0 sits at the output node. For
N = 3 this gives exactly the gates (a,b), (a,c), (b,c) of the triple voter.

## How transistors are expressed in two-state RTL

RTL has no floating outputs or resistors, so the circuit is split at the
shared node:

* `od_nand` reports `pull_down = 1` when its series chain conducts, instead of
  driving a high-impedance output.
* `wired_and` resolves the node: `v = ~|pull_down`, which is what the resistor
  and the shared wire do.

Every inverter and pull-down transistor has a **fault-injection input**, typed
by `voter_pkg`:

| type          | values                                   |
|---------------|------------------------------------------|
| `tr_fault_e`  | `TR_OK`, `TR_OPEN` (never conducts), `TR_SHORT` (always conducts) |
| `inv_fault_e` | `INV_OK`, `INV_STUCK0`, `INV_STUCK1`     |

These inputs are what make the tolerance claims testable. In a real circuit,
tie every one of them to `*_OK`. Synthesis then reduces each voter bit to the
majority function. The injection ports and the choice of these three fault
classes belong to this model, not to the original circuit.

## Modules

| module          | role | parameters (default) |
|-----------------|------|----------------------|
| `voter_pkg`     | fault-mode enums, `n_choose_k()` | — |
| `in_inverter`   | input inverter with stuck-at injection | — |
| `od_nand`       | open-drain NAND: K series n-channel transistors | `K` (2) |
| `wired_and`     | pulled-up shared node (wired-AND) | `M` (3) |
| `ft_voter_tmr`  | the triple voter, wired as above | — |
| `ft_voter_nmr`  | the N-input voter | `N` (5) |
| `mr_voter_top`  | WIDTH-bit TMR stage and WIDTH-bit NMR stage, side by side | `WIDTH` (1), `N_NMR` (5) |

`mr_voter_top` ports:

| port | dir | shape | meaning |
|------|-----|-------|---------|
| `tmr_a`, `tmr_b`, `tmr_c` | in | `[WIDTH]` | output words of the three modules |
| `tmr_inv_fault` | in | `[WIDTH][3]` | inverter faults per bit (a, b, c) |
| `tmr_tr_fault` | in | `[WIDTH][3][2]` | transistor faults per bit, gate (AB, AC, BC), position (0 = node side) |
| `tmr_v` | out | `[WIDTH]` | voted word |
| `nmr_d` | in | `[N_NMR]` of `[WIDTH]` | output words of the N modules |
| `nmr_inv_fault` | in | `[WIDTH][N_NMR]` | inverter faults per bit |
| `nmr_tr_fault` | in | `[WIDTH][C(N,n+1)][n+1]` | transistor faults per bit |
| `nmr_v` | out | `[WIDTH]` | voted word |

Everything is combinational. There is no clock and no reset, and the output
follows the inputs in the same cycle. A wide word is voted as WIDTH
independent one-bit voters, which is this design's reading of "usable for
outputs of more than one bit". The redundant modules themselves are the
user's logic and are outside the top. So is the fan-out of the system input
to them.

## Reliability

`tb_voter_reliability` weights every fault configuration of the triple voter
by its probability. Each transistor fails with q = 1 − e^(−λt), open or
shorted with equal chance, and an inverter fails if either of its two
transistors does. The classical voter fails on any of its 16 transistor
faults, which gives (1 − 4λt)^4 to first order.

| λt    | classical voter | this voter | TMR system, classical voter | TMR system, this voter |
|-------|-----------------|------------|-----------------------------|------------------------|
| 0.001 | 0.9841          | 0.999987   | 0.9841                      | 1.0000                 |
| 0.01  | 0.8493          | 0.998774   | 0.8491                      | 0.9985                 |
| 0.05  | 0.4096          | 0.973709   | 0.4068                      | 0.9670                 |

The system columns multiply the voter's reliability by that of a two-out-of-
three module set, 3R_M^2 − 2R_M^3 with R_M = e^(−λt). With the classical
voter the voter dominates the system's loss. With this one the modules do.

To first order in λt this voter's reliability is exactly 1: no single fault
breaks it. The residual loss is second order and comes from same-gate double
faults. The numbers depend on the fault-mode split assumed above.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_in_inverter` | both inputs under every fault mode |
| `tb_od_nand` | K = 2 and 3, every input pattern under every per-transistor fault combination |
| `tb_wired_and` | every pull-down pattern for M = 3 and 10 |
| `tb_ft_voter_tmr` | fault-free majority. Exhaustive 3^9 fault campaign × 8 inputs against a switch-level reference. All 36 single faults masked with agreeing inputs. Same-gate double shorts break the voter. |
| `tb_ft_voter_nmr` | N = 3, 5, 7 (driver `nmr_voter_check`): majority, single faults against a reference, n faults per gate masked, n inverter faults masked, fully shorted gate breaks, random multi-faults |
| `tb_mr_voter_top` | end to end at default parameters: behavioural modules (`redundant_module_model`) feed both stages. Runs with no fault, module faults (1 of 3, up to n of N), single voter faults, n faults in one NMR gate, and beyond-tolerance faults. Each scenario must occur. |
| `tb_mr_voter_top_wide` | the same with WIDTH = 8 and N_NMR = 7 |
| `tb_voter_reliability` | the reliability table above |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/voter_pkg.sv tb/tb_mr_voter_top.sv --top-module tb_mr_voter_top
./obj_dir/Vtb_mr_voter_top
```

Replace the testbench name to run the others. All finish in a few seconds.

## Where the model departs from the circuit

* Transistors, the resistor and the floating node are abstracted to two-state
  logic (see above). Rise and fall times, the resistor value, static power
  and pull-up resistor failure are not modelled. The resistor is generally
  far more reliable than the transistors.
* Only stuck-open and stuck-on transistors and stuck-at inverter outputs are
  injected. Bridging between nodes is not.
* The NMR gate and transistor ordering, the per-bit treatment of wide words,
  and the side-by-side TMR and NMR stages in the top are choices of this
  implementation.
* The classical four-NAND voter appears only as a formula in the reliability
  test. It is a point of comparison, not part of the design.
