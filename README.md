# Scalable n-bit magnitude comparator

A combinational comparator for two unsigned N-bit operands A and B that
drives exactly one of three outputs: `agb` (A > B), `aeb` (A = B) or
`alb` (A < B). It rests on one observation: the answer is fixed by the most
significant bit position where A and B differ, and whichever operand holds
the 1 there is the larger. Everything below that position is irrelevant.

The circuit is built from identical 4-bit slices ("partitions"). Changing the
operand width only adds or removes slices, so the same RTL serves 16, 24 or
64 bits (`N` must be a multiple of 4). The default is `N = 16`.

## How the decision is formed: five sets of gates

The logic is organised as five layers, called *sets*. Sets 1 to 4 make up the
**comparison evaluation module** (`cem`); set 5 is the **final module**
(`final_module`).

| Set | Module | Gate type | Produces |
|-----|--------|-----------|----------|
| 1 | `cem_set1` (N × `xor_xnor_cell`) | XOR / XNOR per bit | `x[i] = a[i]^b[i]` (pair unequal), `e[i] = ~(a[i]^b[i])` (pair equal) |
| 2 | `cem_set2` | one AND per partition, chained | `en[k]`: every partition above k is equal; `aeb` at the end of the chain |
| 3 | `cem_set3` | one NAND per bit | `c_n[i] = 0` at the first unequal bit of an enabled partition when A holds the 1 |
| 4 | `cem_set4` | one 4-input NAND per partition | `g[k] = 1`: partition k decides A > B |
| 5 | `final_module` | NOR, NOR | `alb = ~(|g | aeb)`, `agb = ~(alb | aeb)`, `aeb` passed on |

The part that takes the most care to follow is how sets 2 and 3 work
together so that only one partition can speak:

* **Set 2 is an equality chain from the top.** Partition P-1 (P = N/4, the
  most significant) is always enabled: `en[P-1] = 1`. Each partition ANDs its
  own enable with its four equal flags and hands the result down as the next
  partition's enable. So `en[k]` is 1 only if every partition above k matched
  exactly, and the last link of the chain is `aeb`.
* **Set 3 looks inside a partition.** For bit j of partition k, its NAND
  fires (goes low) when the partition is enabled, all higher bits *of the
  same partition* are equal, the pair at j is unequal, and `a[j] = 1`. The
  gate for a partition's top bit has 3 inputs; the one for its bottom bit
  has 6.
* Together these pick out a single bit: the most significant unequal pair in
  the whole word. Partitions below it are disabled by the chain; bits below
  it inside its partition are blocked by the in-partition equal flags.
  Set 4 turns that bit into the flag `g[k]` of its partition, so at most one
  `g` bit is ever 1.
* **Set 5 needs no "A < B" detector.** If no partition reports A > B and the
  operands are not equal, A must be smaller: that is the NOR that drives
  `alb`. `agb` is then whatever is neither less nor equal.

### Worked trace (N = 16)

A = `1010101010101010`, B = `1001100110011001`:

| Stage | Value |
|-------|-------|
| set 1 equal flags `e` | `1100110011001100` |
| set 1 unequal flags `x` | `0011001100110011` |
| set 2 enables `en[3:0]`, `aeb` | `1000`, `0` (the top partition already differs) |
| set 3 `c_n` | `1101111111111111` (bit 13: first difference, A holds the 1) |
| set 4 `g[3:0]` | `1000` |
| set 5 | `agb = 1`, `aeb = 0`, `alb = 0` |

The lower three partitions have the same bit pattern and would say "A > B"
on their own, but their enables are 0, so they stay silent.

## Timing and structure

The whole comparator is combinational: no clock, no reset, no registers.
Outputs are valid one propagation delay after the operands change. The
longest path runs down the set 2 chain, which has one AND gate per
partition, then through one set 3 NAND, one set 4 NAND and the two set 5
NORs. The chain therefore grows linearly with N/4. It is kept as a ripple
because that is how the design connects the partitions. A log-depth AND tree
computing the same enables would be a drop-in replacement inside
`cem_set2` if a wide N needs a shorter path.

After generic synthesis the 16-bit comparator is about 116 word-level cells:
16 XORs plus AND/NOT/reduction gates.

In silicon each set 1 cell is a five-transistor pass-transistor XOR/XNOR.
The RTL keeps only its logic function. Power, delay and layout area of the
transistor-level circuit cannot be expressed in RTL and are not modelled.

## Design choices not fixed by the structure

* **Which inputs a set 3 NAND sees.** The gate count per bit and the NAND
  type are part of the design. Feeding it `a[i]` together with `x[i]` (which
  together mean A = 1, B = 0 at that bit) is this implementation's choice.
  It reproduces the set 3 pattern of the worked trace exactly.
* **Operands are unsigned.** There is no sign handling. For two's complement
  operands, invert both MSBs before comparing.
* **Width rule.** A width that is not a non-zero multiple of 4 stops
  elaboration with an error in sets 2 to 4.
* **Outputs.** `aeb` is the end of the set 2 chain passed straight to the
  output. `en[P-1]` is the constant 1 that starts the chain. Synthesis
  reports these as constant or pass-through bits; that is expected.
* Lint reports the equal flag of each partition's lowest bit as unused in
  `cem_set3`. No lower bit in the partition needs it; set 2 uses it.

## Files

RTL (`rtl/`), bottom-up:

* `cmp_pkg.sv`: partition width `PART_W = 4` and a `num_parts()` helper.
* `xor_xnor_cell.sv`: one bit pair → `x`, `e`.
* `cem_set1.sv`, `cem_set2.sv`, `cem_set3.sv`, `cem_set4.sv`: the four
  evaluation layers, each parameterised by `N`.
* `cem.sv`: sets 1–4 wired together; outputs `g[N/4-1:0]` and `aeb`.
* `final_module.sv`: set 5, parameterised by the partition count `PARTS`.
* `nbit_comparator.sv`: the top. Ports `a`, `b` (N bits), `agb`, `aeb`,
  `alb`. It carries an immediate assertion that the outputs are one-hot.

Testbenches (`tb/`), all self-checking. Each ends with a
`TB_RESULT checks=… failures=…` line and has a time-out watchdog:

* `tb_xor_xnor_cell`, `tb_cem_set1` … `tb_cem_set4`, `tb_cem`,
  `tb_final_module`: one per module. Each checks the worked trace above,
  then random stimulus against an independent reference loop.
* `tb_nbit_comparator`: end-to-end at the default N = 16 with no parameter
  override. It applies 100,000 operand pairs: directed cases (including
  36354 vs 1025 and the trace above), random pairs whose deciding bit is
  placed at every position in both directions, equal pairs, and plain random
  pairs. The reference is SystemVerilog's own `a > b`, `a == b`, `a < b`. It
  counts and requires each mechanism at least once: equality through the
  whole chain, each partition deciding A > B and A < B, and a higher
  partition overriding a lower one that would have answered the other way.
* `tb_comparator_workloads`: the same kind of check at N = 16, 24 and 64,
  through `cmp_size_check.sv`. `cmp_tb_pkg.sv` provides the operand-pair
  generator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cmp_pkg.sv tb/cmp_tb_pkg.sv tb/tb_nbit_comparator.sv \
  --top-module tb_nbit_comparator -o sim
./obj_dir/sim
```

Swap the testbench name to run any other one. Every testbench runs in well
under a second. To build a different width, set `N` on `nbit_comparator`,
e.g. `nbit_comparator #(.N(64)) u_cmp (...)`.

## Status

All modules lint cleanly under Verilator and elaborate under Yosys/slang.
All testbenches pass at the sizes listed. Each testbench was also run against
a deliberately broken copy of its module, and every one of them failed as it
should. The 24- and 64-bit versions differ from the default only in `N`.
