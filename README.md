# A one-gate reversible full adder built on the HNG gate

A reversible circuit loses no information: every output vector comes from
exactly one input vector, so the inputs can always be recovered from the
outputs. Such circuits are the basis of quantum computing and of logic that
aims below the heat cost of erasing bits. A full adder is not reversible by
itself (three inputs, two outputs, and for example 001, 010 and 100 all give
SUM = 1, CARRY = 0), so a reversible full adder has to carry extra "garbage"
outputs and sometimes constant inputs.

This design does the whole job with a single 4x4 reversible gate, the HNG
gate, with one constant input and two garbage outputs. An earlier
construction of the same adder took three 3x3 "NG" gates; the one-gate
version needs fewer gates, a lower quantum cost, fewer garbage outputs and a
shorter delay (see [Figures of merit](#figures-of-merit)).

The RTL gives the HNG gate in two equivalent forms, as ordinary logic and as
a model of the gate's quantum circuit, and the full adder on top of it.

## The HNG gate

| input | output | value                          |
|-------|--------|--------------------------------|
| A     | P      | A                              |
| B     | Q      | B                              |
| C     | R      | A ⊕ B ⊕ C                      |
| D     | S      | (A ⊕ B)·C ⊕ A·B ⊕ D            |

`(A ⊕ B)·C ⊕ A·B` is the majority of A, B and C, which is the carry of
A + B + C. The gate is reversible: given P and Q you know A and B; R then
gives C; and knowing A, B and C, S gives D. The testbenches check this by
confirming that the 16 input vectors produce 16 different output vectors.

`rtl/hng_gate.sv` builds it as four XORs and two ANDs, with A ⊕ B formed
once and shared: this matches the gate's hardware complexity, counted as
4 XOR (CNOT) + 2 AND.

## The full adder: D tied to 0

With D = 0 the gate's outputs are exactly a full adder:

```
          +-----------+
   a ---->|           |----> garbage_a  (= a)
   b ---->|    HNG    |----> garbage_b  (= b)
   c ---->|           |----> sum        = a ^ b ^ c
   0 ---->|           |----> carry      = (a ^ b)c ^ ab
          +-----------+
```

`rtl/hng_full_adder.sv` is that picture. The two garbage outputs only repeat
`a` and `b`; in a reversible circuit they cannot be dropped, so they are
ports of the module. In ordinary logic they are wires from the inputs, and a
synthesis tool will report them as such. The module is purely combinational:
no clock, no reset.

## The quantum circuit of the HNG gate

The gate's quantum realization, which gives it quantum cost 6, uses six
elementary gates on four qubit lines:

```
A ──●─────────────────●───────────── A
B ──┼────●────────────┼────●──────── B
C ──┼────┼────●───────⊕────⊕────●─── A ⊕ B ⊕ C
D ──V────V────V─────────────────V+── (A ⊕ B)C ⊕ AB ⊕ D
    1    2    3       4    5    6
```

Steps 1-3 are controlled-V gates on D, controlled by A, B and C. Steps 4-5
are CNOTs that turn line C into A ⊕ B ⊕ C. Step 6 is a controlled-V+ on D,
controlled by the new C.

V is the square root of NOT: applying it twice flips a bit, and V+ undoes V.
After steps 1-3, D has been rotated by V once for every 1 among A, B and C.
Call that number n. Step 6 removes one rotation when A ⊕ B ⊕ C = 1, i.e. when
n is odd. What is left is V^0 for n = 0 or 1 and V^2 = NOT for n = 2 or 3:
D is flipped exactly when at least two inputs are 1, which is the carry.
On the way the D line passes through states that are not 0 or 1, but it
always ends in one.

`rtl/hng_qcascade.sv` simulates this circuit exactly, in the four-valued
logic usually used for such cascades. A line holds one of 0, V0 = V|0>,
1 or V1 = V|1>. Because every control in the circuit is a plain 0 or 1, V
always moves the target one step around the cycle 0 → V0 → 1 → V1 → 0. V+
moves it one step back, and NOT moves it two steps. `rtl/hng_pkg.sv` encodes
the four values in cycle order (0, V0, 1, V1 = 0..3). With that encoding V
is +1 mod 4, V+ is −1 and CNOT is +2. The module has one extra output,
`d_line_basis`, which is 1 when line D ends in 0 or 1. The full adder asserts
that it always does. It is a real check: a cascade with the wrong final gate
(for example V instead of V+) leaves D in V0 or V1 for some inputs.

This is a logic model of the circuit. It says what the circuit computes for
classical inputs. It does not model amplitudes, phases or superposed inputs.

## Choosing the realization

`hng_full_adder` has one parameter:

| parameter | type                 | default          | meaning |
|-----------|----------------------|------------------|---------|
| `IMPL`    | `hng_pkg::hng_impl_e` | `HNG_IMPL_LOGIC` | `HNG_IMPL_LOGIC`: the gate network of `hng_gate`. `HNG_IMPL_QUANTUM`: the six-gate circuit of `hng_qcascade`. |

Both give identical outputs. The logic form is the one to synthesize. The
quantum form documents and checks the quantum construction.

## Figures of merit

These are the counts claimed for the one-gate adder, set against the
three-NG-gate adder it replaces. They are properties of the circuit, not
measurements of this RTL.

|                       | HNG adder (this design) | three NG gates |
|-----------------------|-------------------------|----------------|
| gates                 | 1                       | 3              |
| quantum cost          | 6                       | 33             |
| hardware complexity   | 4α + 2β                 | 6α + 6β + 6δ   |
| garbage outputs       | 2                       | 4              |
| delay (gate levels)   | 1                       | 3              |

α counts XOR (CNOT) gates, β AND gates and δ NOT gates. In this RTL the
quantum cost shows up as the six gate steps of `hng_qcascade`, and the
hardware complexity as the four XORs and two ANDs of `hng_gate`. The garbage
outputs are `garbage_a` and `garbage_b`. "Delay 1" means one reversible-gate
level. It is not a clock cycle, since nothing here is clocked.

## Files

| file | contents |
|------|----------|
| `rtl/hng_pkg.sv` | realization enum; four-valued qubit line type and its V, V+, CNOT functions |
| `rtl/hng_gate.sv` | HNG gate as 4 XOR + 2 AND |
| `rtl/hng_qcascade.sv` | HNG gate as its quantum circuit |
| `rtl/hng_full_adder.sv` | top: full adder, HNG with D = 0 |
| `tb/tb_hng_gate.sv` | all 16 inputs, outputs against arithmetic, reversibility |
| `tb/tb_hng_qcascade.sv` | the same for the quantum circuit, plus the basis-state check |
| `tb/tb_hng_full_adder.sv` | all 8 inputs, four rounds in random order, default parameters; counts carry generate / propagate / kill cases and requires each |
| `tb/tb_hng_full_adder_quantum.sv` | the same with `IMPL = HNG_IMPL_QUANTUM` |

Every testbench computes its expected values from the integer sum
a + b + c rather than from the XOR/AND equations. Each ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Wall -y rtl rtl/hng_pkg.sv \
    tb/tb_hng_full_adder.sv --top-module tb_hng_full_adder
./obj_dir/Vtb_hng_full_adder
```

Replace `tb_hng_full_adder` with any other testbench name. `-y rtl` lets
Verilator find each module in `rtl/<module>.sv`. The package has to be named
on the command line. For a lint check only, use
`verilator --lint-only -Wall -y rtl rtl/hng_pkg.sv rtl/hng_full_adder.sv`.

## How far it follows the original, and what is added

Taken from the original design:

- the HNG gate's function;
- the full adder as one HNG gate with D = 0 and its two garbage outputs;
- the order and kind of the six gates in the quantum circuit;
- the 4 XOR + 2 AND gate count.

Added in this RTL:

- the exact netlist of `hng_gate`, with a shared A ⊕ B;
- the four-valued model of V and V+, which is standard reversible-logic
  background;
- the `d_line_basis` output;
- the `IMPL` parameter;
- all port names.

The NG gate and the three-gate NG adder appear only as the baseline in the
table above and are not implemented. Neither is the classical XOR/AND full
adder.
