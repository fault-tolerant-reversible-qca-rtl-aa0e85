# Fault-tolerant reversible TMR stage with faulty-module detection

Triple modular redundancy (TMR) runs three copies of a circuit and takes a
bit-wise majority vote of their outputs. One faulty copy is outvoted, but a
plain voter cannot tell you *which* copy failed. This design adds a small
comparator to every output line. The comparator compares the three copies
pairwise, and its error signals name the faulty copy. The voter still masks
the fault, so the result stays correct.

The circuit was conceived for quantum-dot cellular automata (QCA). In QCA the
3-input majority gate is the basic logic element, so both the voter and the
comparator are built from majority gates. The comparator is also
*reversible*: its inputs can be recovered from its outputs. This RTL
describes the logic of that circuit at gate level (majority gates and
inverters) in synthesizable SystemVerilog. It models the QCA clocking as a
single register stage.

## One stage

```
             +------+  q1[3:0]
 in_bits ----| M1   |-------------+---------------+
 {K,Cin,B,A} +------+             |               |
   |         +------+  q2[3:0]    v               v
   +---------| M2   |-------> 4 x majority   4 x comparator --> ER12/ER13/ER23, Gar
   |         +------+             voter           |
   |         +------+  q3[3:0]    |               v
   +---------| M3   |-------------+         4 x fault locator --> fault_id, module_faulty
             +------+             |
                                  v
                                voted {Cout, Sum, A^B, A}
```

- **Replicated module (M1, M2, M3).** The three copies are reversible full
  adders (`rev_full_adder`). A reversible circuit has as many outputs as
  inputs, here four:
  - inputs `{K, Cin, B, A}`, where `K` is a constant input, 0 for addition;
  - outputs `{Cout, Sum, A^B, A}`, where `A^B` and `A` are garbage outputs
    that keep the mapping one-to-one.

  The adder is two cascaded Peres gates (`peres_gate`: `P=A, Q=A^B, R=AB^C`).
  The scheme itself works for any reversible module. The full adder is the
  example chosen here.
- **Fan-out.** Each input line drives all three copies. This is only wiring.
- **Voter.** Each output line has one `mv3`, `MV(a,b,c) = ab + ac + bc`.
- **Comparator and detector.** Each output line has one `rqca_comparator`
  and one `fault_locator`.

## The reversible comparator

For one output line, let `X1`, `X2`, `X3` be the values from M1, M2 and M3.
The comparator produces

```
ER12 = X1 ^ X2      ER13 = X1 ^ X3      ER23 = X2 ^ X3
```

so `ERij = 1` exactly when copies i and j disagree.

These three signals alone cannot form a reversible function. Their XOR is
always 0, so only four of the eight output patterns ever occur. The circuit
therefore gets one constant input `R` (tied to 1) and one garbage output
`Gar = R & X3`. With `R = 1` the eight input patterns map to eight different
outputs:

| X1 X2 X3 | ER12 ER13 ER23 | Gar |
|----------|----------------|-----|
| 000 | 000 | 0 |
| 001 | 011 | 1 |
| 010 | 101 | 0 |
| 011 | 110 | 1 |
| 100 | 110 | 0 |
| 101 | 101 | 1 |
| 110 | 011 | 0 |
| 111 | 000 | 1 |

`X3` can be read back from `Gar`. With `X3` known, `ER13` gives `X1` and
`ER23` gives `X2`. The half of the input space with `R = 0` is left
unspecified ("don't care"). There the circuit still outputs the pairwise XORs,
and `Gar` is 0.

**Gate structure.** The comparator uses exactly nine majority gates and one
AND:

- Each XOR (`qca_xor`) is three majority gates:
  `MV( MV(a,~b,0), MV(~a,b,0), 1 )`. These are two ANDs (control input at 0)
  feeding an OR (control input at 1).
- Three XORs give nine majority gates.
- The garbage output is one more majority gate with its control input at 0,
  which is the AND.

Inverters are free-standing elements in QCA and are not counted as gates.

## Naming the faulty copy

`fault_locator` applies this rule to each line:

| ER12 ER13 ER23 | meaning |
|----------------|---------|
| 000 | all copies agree (`FAULT_NONE`) |
| 110 | M1 differs (`FAULT_M1`) |
| 101 | M2 differs (`FAULT_M2`) |
| 011 | M3 differs (`FAULT_M3`) |

The faulty copy is the index shared by the two error signals that are set.
No other pattern can occur with binary inputs. `module_faulty[i]` is set when
any of the four lines names copy `i+1`.

**Limits:**

- The scheme assumes a single faulty copy.
- If two copies fail on the same line, the voter outputs the wrong value, and
  the locator names the *good* copy, which is now the odd one out.
- If all three copies fail the same way, nothing is detected.
- The comparator and the voter are assumed fault-free. Nothing checks them.

## Timing and interface (`ft_rqca_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset, clears all outputs |
| `in_bits` | in | 4 | `{K, Cin, B, A}` |
| `fault_mask` | in | 3x4 | `[copy][line]`: inverts that line of that copy (fault emulation), 0 in normal use |
| `voted` | out | 4 | voted `{Cout, Sum, A^B, A}` |
| `er` | out | 4 x `err_t` | `{er12, er13, er23}` per line |
| `gar` | out | 4 | comparator garbage output per line |
| `fault_id` | out | 4 x `fault_id_t` | faulty copy named per line |
| `module_faulty` | out | 3 | per-copy fault flag |

The stage is combinational. All results are registered once on the rising
edge of `clk`, so **latency is exactly one cycle**, and a new input can be
applied every cycle.

In QCA the comparator spans four clocking zones, which is one period of the
four-phase clock. The single register stage stands for that period. The
voter's own delay is not specified separately and shares the same cycle.

`fault_mask` is this design's own addition. It exists so that faults can be
injected in simulation or on a test chip. Tie it to zero otherwise.

The top contains two concurrent assertions on the registered outputs:

- every line's error signals have even parity;
- a copy is named exactly when two error signals are set.

Shared types are in `rqca_pkg`:

- `N_REPLICAS = 3`;
- `RFA_WIDTH = 4`;
- the `err_t` struct;
- the `fault_id_t` enum.

## Reliability

With a fault-free voter, and each copy's line correct with probability
`Rin`, a voted line is correct with probability

```
Rout = Rin^3 + 3 Rin^2 (1 - Rin)
```

`Rout` is greater than `Rin` whenever `Rin > 0.5`. Stages can be cascaded,
and each stage improves the signal again.

If the voter itself works only with probability `R_MV`, the stage reliability
is `R_MV * Rout`. TMR then pays off only if `R_MV > 8/9`. The RTL voter is
ideal logic, so this second formula is not modelled.

`tb_tmr_reliability` measures `Rout` by injecting independent faults through
`fault_mask`:

- it uses `Rin` = 0.4, 0.6, 0.8, 0.9 and 0.99, with 80,000 voted lines each;
- it checks that the measured `Rout` is within five standard deviations of
  the formula;
- it checks that every line with exactly one faulty copy had that copy named.

Measured values (for example 0.8946 against 0.8960 at `Rin = 0.8`) follow
the formula.

## Files

`rtl/`:

- `rqca_pkg.sv`: constants and types
- `mv3.sv`: majority gate
- `qca_xor.sv`: XOR from three majority gates
- `rqca_comparator.sv`: reversible comparator (3 XORs and the garbage AND)
- `fault_locator.sv`: error signals to faulty-copy index
- `peres_gate.sv`: Peres gate
- `rev_full_adder.sv`: reversible full adder from two Peres gates
- `tmr_stage.sv`: three adders, four voters, four comparators, four locators
- `ft_rqca_top.sv`: top level (`tmr_stage` plus the result registers)

`tb/`: there is one self-checking testbench per module, named `tb_<module>`.
The extra testbench `tb_tmr_reliability` is described above.

- Each testbench prints `TB_RESULT checks=N failures=M`.
- Each has a watchdog.
- Expected values come from arithmetic and comparison rules, not from the
  design's gates.
- `tb_ft_rqca_top` runs the top at its only size for 4000 cycles:
  - it mixes fault-free cycles, single faults on each copy, multi-copy faults
    and a mid-run reset;
  - it checks the one-cycle latency;
  - it counts each mechanism and fails if one never happened.

Simulate, for example:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/rqca_pkg.sv \
    tb/tb_ft_rqca_top.sv --top-module tb_ft_rqca_top -Mdir obj
./obj/Vtb_ft_rqca_top
```

Substitute any other `tb_*` file and its module name. The testbenches use
two-state logic only and `$urandom` for stimulus.

## What follows the original circuit and what does not

**Taken from the original circuit:**

- the TMR arrangement: three copies, one majority voter per output line, a
  3-way fan-out per input;
- one comparator per output line;
- the error-signal definitions;
- the constant input `R = 1` and the garbage output `R AND X3`;
- the comparator's truth table;
- the count of nine majority gates plus one AND, with XORs built as AND/AND/OR
  majority gates;
- the rule for naming the faulty copy;
- the single-fault assumption;
- the reliability formulas.

**Choices made here:**

- **Replicated module.** A two-Peres-gate reversible full adder. The original
  allows any reversible circuit and gives none in detail.
- **Inverter placement.** Where the inverters sit inside each XOR.
- **Fault-location code.** The 2-bit code and the `module_faulty` summary.
- **Fault emulation.** The `fault_mask` input.
- **Clocking.** One register stage for the four QCA clocking zones, with a
  synchronous reset.

**Not modelled:**

- the QCA cells and layout (cell size, wire crossings, clock-zone placement);
- the physics of the four-phase clock;
- the `R = 0` half of the comparator, which is unspecified;
- faults inside the voter or the comparator;
- a multi-stage cascade of TMR stages. Cascading is mentioned as an option,
  but no cascaded configuration is specified. Stages can be chained by feeding
  one stage's `voted` into the next stage's `in_bits`.
