# An 8-bit ALU built from reversible logic gates

This is an arithmetic logic unit whose every bit is made only of reversible
gates: Feynman, Toffoli, Fredkin, Peres, the Universal Reversible Gate (URG)
and the Peres Full Adder Gate (PFAG). A reversible gate has as many outputs
as inputs, and maps each input pattern to a different output pattern, so no
information is lost inside it. The outputs a circuit does not need are left
unconnected and are called *garbage outputs*. Low-power and quantum
technologies are the reason for building logic this way.

One 1-bit ALU slice is defined in two variants, *architecture 1* and
*architecture 2*. The slices are chained into a word by rippling the carry.
The top level, `rev_alu_top`, holds an 8-bit ALU of each architecture side by
side on the same inputs. It performs eleven micro-operations: transfer,
increment, add, add with carry, subtract with borrow, subtract, decrement,
AND, OR, XOR and complement.

In this RTL each gate is a small module that computes its defining Boolean
equations. Synthesised for a normal CMOS library or an FPGA, it becomes
ordinary combinational logic. The gate structure is kept so that the netlist
matches the reversible circuit gate for gate and garbage output for garbage
output. Nothing in the CMOS result is itself reversible, and no power saving
should be expected from it.

## The gates

| Gate | Size | Outputs |
|---|---|---|
| Feynman (FnG) | 2×2 | P = A, Q = A ⊕ B |
| Toffoli (TG) | 3×3 | P = A, Q = B, R = AB ⊕ C |
| Fredkin (FG) | 3×3 | P = A, Q = A'B + AC, R = AB + A'C |
| Peres (PG) | 3×3 | P = A, Q = A ⊕ B, R = AB ⊕ C |
| URG | 3×3 | P = (A + B) ⊕ C, Q = B, R = AB ⊕ C |
| PFAG | 4×4 | P = A, Q = A ⊕ B, R = A ⊕ B ⊕ C, S = (A ⊕ B)C ⊕ AB ⊕ D |

Every circuit in this design uses these gates in one of the following ways:

* **Fredkin as a 2:1 multiplexer.** The Fredkin gate is a controlled swap. If
  the select goes on A and the two data bits go on B and C, then Q equals
  S'·I0 + S·I1, and P and R are garbage (`mux2_fredkin`). Three of them make
  a 4:1 multiplexer (`mux4_fredkin`). Two gates controlled by S0 pick from
  I0/I1 and from I2/I3, and a third gate controlled by S1 picks between those
  two results. Each multiplexer in the ALU is built this way.
* **Constant inputs.** A gate input tied to 0 or 1 turns the gate into a
  logic function. For example, PG(A, B, 0) gives A ⊕ B and AB (a half
  adder), URG(A, B, 0) gives A + B and AB, and TG(A', B', 1) gives
  1 ⊕ A'B' = A + B.
* **Full adders.** `fa_pfag` is one PFAG with D = 0: R is the sum and S is the
  carry. `fa_peres2` uses two Peres gates. PG(A, B, 0) produces A ⊕ B and AB.
  These go into PG(A ⊕ B, Cin, AB), whose Q output is the sum and whose R
  output, (A ⊕ B)Cin ⊕ AB, is the carry.

In the PFAG, the ⊕D term on S is this design's choice. It keeps the gate
one-to-one. The adder always drives D with 0, so the term never changes a
result.

## The arithmetic unit: one adder, four operands

All seven arithmetic operations come from a single adder. The trick is in
choosing the adder's second operand Y (`au_slice`). A 4:1 Fredkin multiplexer
feeds Y from one of the constants 1 and 0, from B inverted, or from B. The
adder then forms F = A + Y + Cin. When every slice of the word selects the
constant 1, Y is all ones, which is −1 in two's complement. That operand is
how decrement works:

| S1 S0 | Y | Cin = 0 | Cin = 1 |
|---|---|---|---|
| 00 | 1…1 | F = A − 1 (decrement) | F = A (transfer) |
| 01 | 0 | F = A (transfer) | F = A + 1 (increment) |
| 10 | B' | F = A + B' (subtract with borrow, A − B − 1) | F = A − B (subtract) |
| 11 | B | F = A + B (add) | F = A + B + 1 (add with carry) |

The order of the multiplexer inputs is 1, 0, B', B. It comes from the wiring
of the published drawings. Cout is the carry out of the top slice. After a
subtraction, Cout = 1 means there was no borrow (A ≥ B).

Architecture 1 uses the PFAG adder. Architecture 2 uses the two-Peres adder.
Both give the same arithmetic results.

## The logic unit: two variants with different encodings

Both logic units make four functions at the same time and use a 4:1 Fredkin
multiplexer, controlled by the same S1 S0, to pick one of them.

* **Architecture 1** (`lu_urg_fng`): URG(A, B, 0) gives A + B and AB, and
  FnG(A, B) gives A and A ⊕ B. A NOT gate forms A'.
* **Architecture 2** (`lu_pg_tg`): PG(A, B, 0) gives A ⊕ B and AB, and
  TG(A', B', 1) gives A' and A + B.

| S1 S0 | Architecture 1 | Architecture 2 |
|---|---|---|
| 00 | A OR B | A XOR B |
| 01 | A AND B | A AND B |
| 10 | NOT A | NOT A |
| 11 | A XOR B | A OR B |

**OR and XOR trade codes between the two architectures.** This follows the
published drawings of the architecture-2 logic unit. The published text
gives both units the architecture-1 encoding. The constants in
`rev_alu_pkg` name the codes of each unit (`LU1_*`, `LU2_*`).

## The ALU slice and the word

An `alu_slice` runs its arithmetic unit and logic unit in parallel. A Fredkin
2:1 multiplexer, controlled by the mode bit M, chooses which result reaches
F: M = 0 selects the arithmetic result and M = 1 the logic result. The carry
out comes straight from the adder in both modes. `rev_alu` chains `WIDTH`
slices (default 8). Slice 0 takes `cin`, each slice passes its carry to the
next, and the top slice drives `cout`.

Full control table of `rev_alu` and `rev_alu_top` ({M, S1, S0, Cin}):

| Operation | M | S1 S0 | Cin |
|---|---|---|---|
| F = A (transfer) | 0 | 01 | 0 (or 00 with Cin = 1) |
| F = A + 1 | 0 | 01 | 1 |
| F = A + B | 0 | 11 | 0 |
| F = A + B + 1 | 0 | 11 | 1 |
| F = A + B' | 0 | 10 | 0 |
| F = A + B' + 1 = A − B | 0 | 10 | 1 |
| F = A − 1 | 0 | 00 | 0 |
| F = A AND B | 1 | 01 | x |
| F = A OR B | 1 | 00 (arch 1) / 11 (arch 2) | x |
| F = A XOR B | 1 | 11 (arch 1) / 00 (arch 2) | x |
| F = NOT A | 1 | 10 | x |

In logic mode, Cout is whatever the adder computes from the current inputs.
It has no meaning there.

**Timing.** There are no clocks or registers anywhere. Results settle one
combinational delay after the inputs change. The longest path is the carry
ripple through `WIDTH` full adders plus the output multiplexer.

## Gate count and garbage outputs

Counted from this RTL, per 1-bit slice:

| | Reversible gates | NOT gates | Garbage outputs |
|---|---|---|---|
| Architecture 1 | 10 (7 FG, 1 PFAG, 1 URG, 1 FnG) | 2 | 17 |
| Architecture 2 | 11 (7 FG, 3 PG, 1 TG) | 3 | 18 |

The published comparison gives 12 gates and 16 garbage outputs for
architecture 1, and 13 gates and 17 garbage outputs for architecture 2. It
also gives quantum costs of 50 and 54, which have no counterpart in RTL. The
architecture-1 gate count matches if the two NOT gates are included. The
garbage counts are each one higher here, because every unused gate output in
the netlist is counted.

## Where this RTL interprets or departs from the published design

* **Two architectures side by side.** Both architectures were proposed as
  alternatives, and both are built. `rev_alu_top` exposes both results,
  `f_arch1`/`cout_arch1` and `f_arch2`/`cout_arch2`. A user who wants only
  one can instantiate `rev_alu` with `ARCH` set to `ARCH1` or `ARCH2`.
* **Word width.** The design was published as 1-bit slices, "easily scaled"
  to 4 or 8 bits with serial adders. This RTL reads that as a ripple-carry
  chain. The default of 8 bits matches the operand width of the published
  simulations. 4-bit and 1-bit configurations are also tested.
* **PFAG outputs in architecture 1.** The architecture-1 drawing takes the
  PFAG's third output to Cout and its fourth output to the result
  multiplexer. The gate's own definition makes the third output the sum and
  the fourth the carry, so this RTL routes them that way.
* **Architecture-2 logic unit.** This RTL follows the drawings' input order,
  as covered above. One drawing also adds an inverter after the Toffoli
  gate's A' output. That would feed A to the multiplexer where NOT A is
  labelled, so the inverter is left out.
* **Architecture-2 adder.** The drawing leaves out the A input of the first
  Peres gate. It is taken from the stand-alone two-Peres adder.
* **Mode bit.** M = 0 selects arithmetic and M = 1 selects logic. This comes
  from the input order of the published output multiplexer.
* **Not reproduced.** The published FPGA synthesis results are not
  reproduced. Quantum cost is not modelled.

## Files

`rtl/` holds one module or package per file.

* `rev_alu_pkg.sv`: the `arch_e` type (`ARCH1`, `ARCH2`) and the select-code
  constants.
* Gates: `feynman_gate`, `toffoli_gate`, `fredkin_gate`, `peres_gate`,
  `urg_gate`, `pfag_gate`.
* Building blocks: `fa_pfag`, `fa_peres2`, `mux2_fredkin`, `mux4_fredkin`.
* Units: `au_slice` (parameter `ARCH` picks the adder), `lu_urg_fng`,
  `lu_pg_tg`.
* `alu_slice` (`ARCH`), `rev_alu` (`WIDTH` = 8, `ARCH` = `ARCH1`), and
  `rev_alu_top` (`WIDTH` = 8).

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`.
They share a reference package, `alu_ref_pkg.sv`, which computes every
micro-operation with integer arithmetic and maps each one to its control
code on each architecture. The gate testbenches check every input pattern
against the gate equations. They also check that the gate is one-to-one:
every output pattern must be different. `tb_rev_alu_top` applies all eleven
operations, on both architectures, to all 65,536 pairs of 8-bit operands. It
then runs a random mix of operations so that M switches in both directions.
It also confirms that a carry has rippled through all eight slices.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and then ends. With
Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module tb_rev_alu_top rtl/rev_alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_rev_alu_top.sv
./obj_dir/Vtb_rev_alu_top
```

For another testbench, replace `tb_rev_alu_top` with its name. Keep
`rtl/rev_alu_pkg.sv` first on the command line. `tb/alu_ref_pkg.sv` is
needed only by `tb_rev_alu` and `tb_rev_alu_top`. To lint the design:

```sh
verilator --lint-only -Wall -y rtl +libext+.sv rtl/rev_alu_pkg.sv rtl/rev_alu_top.sv
```

Lint reports the garbage outputs as unused signals. They are unused on
purpose.
