# Ternary Galois field adder: GF(3^2) and GF(3^4) in ternary logic

Arithmetic over a Galois field GF(3^m) is naturally base 3. An element is a
polynomial of degree below m whose coefficients are 0, 1 or 2. So if one wire
carries one ternary digit (a *trit*), an element fits on m wires. Adding two
elements is coefficient-wise addition modulo 3, with no carries. A GF(3^m)
adder is therefore m copies of a one-trit modulo-3 adder.

This RTL models such a system as built from ternary logic gates:

1. a library of ternary gates: inverters, NAND/NOR, decoder, multiplexer and XOR;
2. a modulo-3 adder cell made from a ternary XOR plus a few repair gates;
3. *element generators*, which turn an element number into the element's
   coefficient vector using canonical sum-of-products logic;
4. GF(3^2) and GF(3^4) adders built from the cells, with a top level that
   chains generators and adders.

The original circuits are analogue CMOS, with one trit per wire carried as
one of three voltage levels (0 V, 0.9 V, 1.8 V). Their cells use
forced-stack, multi-threshold transistors to cut leakage. This RTL keeps only
the logic: each trit is a 2-bit binary code. The transistor technique,
voltages and power figures have no counterpart here.

## Trits on binary wires

`ternary_pkg` defines `trit_t` (`logic [1:0]`) holding 0, 1 or 2, and the
constants `T0`, `T1` and `T2`. The code `2'b11` is not a trit. Every gate reads
it as 2, so an illegal input can never produce an illegal output.
`t_legal()` is there for checkers.

Vectors are packed arrays `trit_t [M-1:0]`, and index `i` always means the
coefficient of alpha^i. When this README writes a vector as (c0,c1,...), the
alpha^0 coefficient comes first.

## The gate library

| module     | function                                        | construction |
|------------|-------------------------------------------------|--------------|
| `sti`      | simple inverter, 2 - a                          | behavioural |
| `pti`      | positive inverter: 0,1 -> 2; 2 -> 0             | behavioural |
| `nti`      | negative inverter: 0 -> 2; 1,2 -> 0             | behavioural |
| `tnand #(N)` | 2 - min(inputs)                               | behavioural, any width |
| `tnor #(N)`  | 2 - max(inputs)                               | behavioural, any width |
| `tand #(N)`  | min (ternary AND)                             | `tnand` + `sti` |
| `tor #(N)`   | max (ternary OR)                              | `tnor` + `sti` |
| `tdecoder` | unary lines x[k] = 2 if a == k, else 0          | x0 = NTI(a), x2 = NTI(PTI(a)), x1 = NOR(x0, x2) |
| `tmux3`    | y = d[s]                                        | decoder on s; AND of each data trit with its line (NAND+STI); NOR3+STI |
| `txor`     | ternary XOR, max(min(2-a,b), min(a,2-b))        | four 2-input NANDs, the classic XOR arrangement |

The decoder is the key to all the wider logic. Its outputs only take the
values 0 and 2, so min(line, x) is either 0 or x. A ternary AND-OR network
driven by decoded lines therefore behaves like a binary multiplexer or
sum-of-products, and the data trits pass through unchanged.

The ternary XOR (truth table, rows a = 0,1,2, columns b = 0,1,2):

```
      b=0 b=1 b=2
a=0    0   1   2
a=1    1   1   1
a=2    2   1   0
```

## The modulo-3 adder cell (`tmod_adder`)

This cell is the least obvious part of the design. The modular sum and the
ternary XOR agree in five of the nine input cases: any case where one operand
is 0. In the other four, the XOR output is a known value, so one fixed
single-input gate turns it into the right sum:

| a | b | XOR | sum | repair |
|---|---|-----|-----|--------|
| 1 | 1 | 1 | 2 | PTI(XOR) |
| 1 | 2 | 1 | 0 | NTI(XOR) |
| 2 | 1 | 1 | 0 | NTI(XOR) |
| 2 | 2 | 0 | 1 | min(PTI(XOR), 1) |

The cell therefore holds one XOR, two PTIs, two NTIs and one AND, and a switch
passes either the XOR or one of the four repaired values. The switch is steered
by two decoders on the operands. They form the unary case terms c11, c12, c21
and c22, plus `cpass` = NOR of the four. The switch itself is an AND-OR network:
each candidate is ANDed with its case term and the results are ORed. This
steering is this design's choice. The reference only says that the repaired
values are switch-controlled.

In front of the adder logic, each operand passes through a `tmux3`. The cell
has three candidate trits per operand (`a_in[0..2]`, `b_in[0..2]`) and a
select trit (`a_sel`, `b_sel`). The selected operands are output as `a` and
`b` next to `sum`. These ports follow the reference cell, which has inputs
A0..A2 and B0..B2 and two input decoders.

## Element generators (`gf_elem_canon`)

A field element is named by an *element number* `idx`, an M-trit value with
`idx[M-1]` most significant:

- number 0 is the zero element;
- number k >= 1 is alpha^(k-1).

The 3^M numbers thus cover every element once. The generator outputs the
element's coefficient vector `y`.

Parameters:

- `M` is the number of trits.
- `P` holds the low coefficients of the monic primitive polynomial
  x^M + P[M-1]x^(M-1) + ... + P[0].

The defaults give GF(3^2) with p(x) = x^2 + x + 2, so alpha^2 = 2alpha + 1.
The GF(3^2) table this produces:

| number | element | (c0,c1) |
|---|---|---|
| 0 | 0 | (0,0) |
| 1 | 1 | (1,0) |
| 2 | alpha | (0,1) |
| 3 | alpha^2 = 1+2alpha | (1,2) |
| 4 | alpha^3 = 2+2alpha | (2,2) |
| 5 | alpha^4 = 2 | (2,0) |
| 6 | alpha^5 = 2alpha | (0,2) |
| 7 | alpha^6 = 2+alpha | (2,1) |
| 8 | alpha^7 = 1+alpha | (1,1) |

The top level also uses the module with `M = 4` and p(x) = x^4 + x + 2, so
alpha^4 = 1 + 2alpha. For example, alpha^5 = (0,1,2,0), alpha^6 = (0,0,1,2)
and alpha^58 = (0,1,0,2).

### How a generator is built

Every output trit is a canonical sum of products over the decoded inputs:

```
y[i] = max( OR of minterms whose coefficient is 2,
            min( OR of minterms whose coefficient is 1, 1 ) )
```

It is built from NANDs only, plus one STI:

1. One decoder per input trit.
2. One M-input NAND per element number (its minterm). It outputs 0 exactly
   when `idx` equals that number.
3. For each output trit, two wide NANDs collect the minterms of coefficient 2
   and of coefficient 1. A NAND of NANDs is an OR. Unused collector inputs are
   tied to 2, which a NAND ignores.
4. An STI on the logic-2 group, a NAND of the logic-1 group with the constant 1,
   and a final NAND combine the two groups.

For GF(3^2), writing the number's trits as (X, Y) and Xk for decoder line k,
this is exactly:

```
Y1 = (X1Y0 + X1Y1 + X2Y0)*2 + (X0Y2 + X2Y1 + X2Y2)*1
Y0 = (X1Y1 + X1Y2 + X2Y1)*2 + (X0Y1 + X1Y0 + X2Y2)*1
```

The minterm lists are not hand-written. At elaboration, the constant function
`elem()` computes the element table by repeated multiplication by alpha:
shift the vector up one place, then fold the overflow coefficient back using
-P. Changing `P` or `M` regenerates the logic. The GF(3^4) generator has 81
minterms and two 81-input collectors per output trit. Synthesis folds the
constant inputs away.

## GF adders and the top level

`gf_adder #(M)` holds M `tmod_adder` cells, one per coefficient. Its default
is M = 4. Candidate vector j of operand A is `a_in[j]`, and cell i takes
`a_in[0..2][i]`. All cells share `a_sel` and `b_sel`, so the adder adds one of
three candidate vectors to one of three others.

`tgf_top` has two independent datapaths: GF(3^2) (`gf9_*`) and GF(3^4)
(`gf81_*`). Each works the same way:

- Each operand has three candidate element numbers (`*_a_idx[0..2]`,
  `*_b_idx[0..2]`).
- Each candidate number passes through its own generator, giving the adder's
  candidate vectors.
- The selects pick the operands.
- The outputs are the selected operand vectors (`*_a`, `*_b`) and their sum
  (`*_sum`).

Example: with number 6 (alpha^5) selected for A and number 7 (alpha^6)
selected for B, `gf81_sum` is (0,1,0,2) = alpha^58.

## Timing

Everything is combinational. There is no clock, reset or pipeline, and the
sum is valid one propagation delay after the inputs settle. Testbenches use a
free-running clock only to pace stimulus and to run a watchdog.

## Where this departs from the reference circuits

- **Encoding.** The reference uses three voltage levels on one wire; this RTL
  uses a 2-bit code. Transistor-level properties (forced stacking, threshold
  choice, leakage and transistor counts) are not modelled.
- **Adder switch control.** The reference does not say how the repair
  switch is steered. Here two extra decoders drive an AND-OR switch, so the
  cell uses more gates than the reference's count (two decoders, one XOR,
  two PTIs, two NTIs, one AND).
- **Operand multiplexers.** The three candidate inputs per operand are read
  from the reference schematic. How its select lines were driven at the
  system level is not stated. Sharing one select per operand across all
  cells, and feeding each candidate from its own element generator, are this
  design's choices.
- **Generator width.** The reference draws the GF(3^2) generator with
  3-input gates. Here the collectors are parameterised to 3^M inputs, which
  gives 81-input NANDs for GF(3^4). The GF(3^4) minterm lists are derived
  from p(x) = x^4 + x + 2 at elaboration rather than written out.
- **Not built.** The design space also includes these, which were not
  implemented:
  - multiplexer-based generators using 3:1 and 9:1 multiplexers;
  - an adder written directly as a canonical expression;
  - a conventional ternary half adder.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
integer models or from truth tables written out in the testbench, never from
the RTL.

`tb/gf_ref_pkg.sv` is an independent GF(3^M) model. It computes powers of
alpha by square-and-multiply, with general polynomial multiplication and
reduction.

| testbench | what it covers |
|---|---|
| `tb_sti`, `tb_pti`, `tb_nti` | all inputs, including the non-trit code |
| `tb_tnand`, `tb_tnor`, `tb_tand`, `tb_tor` | every combination at N = 2 and N = 3 |
| `tb_tdecoder`, `tb_txor`, `tb_tmux3` | exhaustive |
| `tb_tmod_adder` | all operand pairs under all select pairs, with random unselected candidates; the four published transient input sets; each switch path counted |
| `tb_gf_elem_canon` | GF(3^2) against the published table; GF(3^4) against the model and seven published rows, and every non-zero element appears once |
| `tb_gf_adder` | both worked examples, plus 400 random vectors under all selects, at M = 4 and M = 2 |
| `tb_tgf_top` | with the top at its defaults: all 81 GF(3^2) pairs under all 9 select pairs, and all 6561 GF(3^4) pairs. It counts each switch path, each select value, zero operands and sums that cancel, and fails if any of them never occurs |

`tb_tgf_top` takes well under a second to run once built.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ternary_pkg.sv tb/gf_ref_pkg.sv tb/tb_tgf_top.sv \
  --top-module tb_tgf_top -Mdir obj_top
./obj_top/Vtb_tgf_top
```

To run any other testbench, swap in its name. The packages must come first on
the command line; everything else is found through `-Irtl` and `-Itb`.

To use a different field, instantiate `gf_elem_canon` with your own `M` and
`P`, where `P[i]` is the coefficient of x^i in the monic primitive
polynomial, and `gf_adder` with the same `M`. The polynomial must be
primitive for the numbering to cover every element.
