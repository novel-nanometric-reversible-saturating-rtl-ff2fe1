# Reversible saturating adder

A saturating adder adds two signed numbers. If the true sum does not fit the output
width, it clamps the result instead of letting it wrap around. The result is the
largest positive value when two positive operands overflow, and the most negative
value when two negative operands do. Digital filters and other DSP kernels depend on
this behaviour, because a wrapped-around sum turns a large positive signal into a
large negative one.

This design builds the saturating adder only from **reversible gates**. A reversible
gate has as many outputs as inputs, and its mapping from inputs to outputs is a
bijection. Nothing is erased, so the inputs can always be recovered from the outputs.
This is the property that quantum circuits require. It is also what makes
computation with very low energy dissipation possible in principle. The cost is
extra wiring:

- **Constant inputs**: lines that enter with a fixed 0 or 1, because a reversible
  gate cannot make a new signal from nothing.
- **Garbage outputs**: lines that leave carrying values nobody needs, because a
  reversible gate cannot throw information away.

The RTL describes the Boolean function of this gate network. It is synthesizable
SystemVerilog, but it is purely combinational: there is no clock, register or reset.
The default operand width is N = 4. Any N ≥ 2 works.

## Behaviour

For N-bit two's-complement operands `a` and `b`:

```
o = clamp(a + b, -2^(N-1), 2^(N-1) - 1)
```

At N = 4 this means `0111` (+7) on positive overflow and `1000` (−8) on negative
overflow. In every other case `o` is the ordinary sum. The carry in is fixed at 0.

## The three stages

```
 a,b ──► ripple adder (N HNG gates) ──Z──────────────► saturation value ──► O
              │ carry into MSB (copied)                 generator
              │ carry out of MSB                        (N FG + N Fredkin)
              └──► overflow detection (1 FG) ──v──────────┘
```

1. **Addition** (`rev_ripple_adder`). N HNG gates form a ripple-carry adder. HNG is a
   4×4 reversible gate:
   - P = A and Q = B
   - R = A⊕B⊕C
   - S = (A⊕B)C ⊕ AB ⊕ D

   With D = 0 it is a full adder: R is the sum and S is the carry out. The carry out
   of stage i enters stage i+1 on its C line.
2. **Overflow detection** (`rev_overflow_detect`). A two's-complement addition
   overflows exactly when the carry into the MSB stage differs from the carry out of
   it, so `v = c_in(MSB) xor c_out(MSB)`. This is a single Feynman gate (CNOT: P = A,
   Q = A⊕B).

   A reversible line cannot be fanned out, however. The MSB carry-in is needed both
   by the MSB HNG and by this XOR. So, just before the MSB stage, a Feynman gate
   copies that carry onto a constant-0 line. The copying gate lives inside
   `rev_ripple_adder` and appears on its `cmsb` output.
3. **Saturation value generator** (`rev_sat_value_gen`). This stage holds the
   least obvious idea in the design.

### Why the saturation value comes from the sum's MSB

Overflow is only possible when both operands have the same sign. When it happens,
the sign bit of the wrapped sum Z is the *opposite* of the operands' sign:

- Two positive operands that overflow give Z[N−1] = 1.
- Two negative operands that overflow give Z[N−1] = 0.

The saturation value can therefore be built from Z[N−1] alone:

```
O[N-1] = not Z[N-1]
O[i]   =     Z[N-1]      for i < N-1
```

A positive overflow gives `0111…1` and a negative overflow gives `1000…0`. The
selection is then a 2:1 multiplexer controlled by `v` in every bit position.

The reversible version works in two steps:

1. N Feynman gates, all controlled by the Z[N−1] line, write Z[N−1] onto N constant
   lines. Lines 0 … N−2 start at 0, so they receive copies. Line N−1 starts at 1,
   so that gate acts as an inverter.
2. In every bit, a Fredkin gate (controlled swap: P = A, Q = A′B ⊕ AC,
   R = A′C ⊕ AB) with `v` on A chooses between Z[i] and the saturation bit. Q is the
   result and R is garbage.

The `v` line passes from one Fredkin gate to the next. After the last one it becomes
a garbage output.

An equivalent arrangement chains the copies: copy Z[N−1], then copy the copy, and so
on. It gives identical outputs. The RTL follows the arrangement in which all copies
are taken from the Z[N−1] line directly.

## Lines and cost

`rev_sat_adder_core` exposes every line, with the constant lines as inputs. It has
4N+2 lines in and 4N+2 lines out (18 at N = 4), and it is a bijection on them.

| Line group | Inputs (`anc`) | Outputs (`g`) |
|---|---|---|
| carry in (0) | `anc[0]` | becomes Z[0], feeds the generator |
| HNG D lines (0) | `anc[N:1]` | carries; the last is `g[N]` (MSB carry out) |
| MSB carry-in copy (0) | `anc[N+1]` | becomes `v`, leaves as `g[N+1]` |
| saturation lines (0…0,1) | `anc[2N+1:N+2]` | unselected Fredkin outputs `g[N-1:0]` |
| operands | `a`, `b` | `a_o`, `b_o` (pass through unchanged) |

The gate count is N HNG, N Fredkin and N+2 Feynman gates. The usual figures of merit
are implemented as functions in `rev_pkg`:

| n | constant inputs 2n+2 | garbage outputs n+2 | quantum cost 12n+2 |
|---|---|---|---|
| 4 | 10 | 6 | 50 |
| 8 | 18 | 10 | 98 |
| 16 | 34 | 18 | 194 |
| 24 | 50 | 26 | 290 |
| 32 | 66 | 34 | 386 |

The quantum cost uses HNG = 6, Fredkin = 5 and Feynman = 1:
n·(6+1+5) + 2·1 = 12n+2. The operands are not counted as garbage, because they leave
the circuit intact and are still useful.

## Modules

| Module | Role |
|---|---|
| `rev_pkg` | gate quantum costs; `const_inputs(n)`, `garbage_outputs(n)`, `quantum_cost(n)` |
| `rev_fg` | Feynman gate (CNOT) |
| `rev_frg` | Fredkin gate (controlled swap) |
| `rev_hng` | HNG gate / reversible full adder |
| `rev_ripple_adder` | N HNG gates plus the Feynman gate that copies the MSB carry-in |
| `rev_overflow_detect` | one Feynman gate: v = carry-out xor carry-in copy |
| `rev_sat_value_gen` | N Feynman gates plus N Fredkin gates |
| `rev_sat_adder_core` | complete reversible circuit with all 4N+2 lines exposed |
| `rev_sat_adder` | **top**: ties the constants (all 0 except the MSB saturation line, which is 1) |

Ports of the top, `rev_sat_adder #(N)`:

- Inputs: `a[N-1:0]` and `b[N-1:0]`.
- Outputs: `o[N-1:0]` (saturated sum), `a_o` and `b_o` (operand copies), and
  `g[N+1:0]` (garbage). `g[N+1]` is the overflow flag and `g[N]` is the MSB carry
  out.

A user who only needs the arithmetic can leave `a_o`, `b_o` and `g` unconnected. A
synthesis tool then reduces the design to an ordinary saturating adder. The `a_o` and
`b_o` outputs are wires from the inputs, so a lint tool will report them as
feed-throughs.

## Where this RTL departs from or adds to the original circuit

- Only the logic function of each gate is modelled. The HNG gate's realisation in
  quantum primitives (controlled-V, controlled-V† and CNOT) is not, so the quantum
  cost is a computed figure, not something the RTL measures.
- The carry in is tied to 0, as in the original 4-bit circuit. The core still exposes
  it as `anc[0]`. With `anc[0] = 1` the core computes a + b + 1 and saturates that sum
  correctly, but this is not part of the published design.
- The original circuit is drawn for n = 4 and said to extend to any width. The
  generalisation to width N (the saturation bit pattern and the placement of the
  carry copy before stage N−1) is this design's own.
- The order of the lines inside the `anc` and `g` vectors is this design's choice.
- There are no timing figures. The critical path runs through N HNG gates, two
  Feynman gates and the MSB Fredkin gate.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_rev_fg`, `tb_rev_frg`, `tb_rev_hng` | Exhaustive: the gate equations, that all output patterns are distinct, and self-inverse behaviour (FG, Fredkin) |
| `tb_rev_ripple_adder` | All 512 cases of a, b and carry in at N = 4; the effect of each constant line |
| `tb_rev_overflow_detect` | All four input cases |
| `tb_rev_sat_value_gen` | Pass-through and both saturation values; every 9-bit input pattern gives a distinct output |
| `tb_rev_sat_adder_core` | All 2^18 line patterns at N = 4: the circuit is a bijection, and it gives the correct saturated sum whenever the constants hold their working values |
| `tb_rev_sat_adder` | Top at default parameters, all 256 operand pairs against a signed clamped reference; overflow flag and carry out; counts that each case occurs: different signs, same sign in range, positive saturation, negative saturation |
| `tb_rev_sat_adder_widths` | N = 4, 8, 16, 24, 32: the cost functions against the table above, plus corner cases and 2000 random operand pairs per width, with both saturation directions required |

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rev_pkg.sv \
          tb/tb_rev_sat_adder.sv --top-module tb_rev_sat_adder -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others. All of them finish in well under
a second.
