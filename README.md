# Moore machine with extended state codes and a code converter

A Moore machine has two pieces of combinational logic around its state register.
One computes the next state from the present state and the inputs. The other
computes the outputs (microoperations) from the present state. When both are mapped
onto PAL-style logic with a small number of product terms per output, the state
encoding cannot usually suit both at once:

- A code that makes the next-state logic small groups states by their transitions.
- A code that makes the output logic small groups states by their outputs.

This design splits the state code into two fields so that each piece of logic sees
the field that suits it:

- **Class code `tau`.** It names the class of *pseudoequivalent* states the present
  state belongs to. Pseudoequivalent states have identical outgoing transitions for
  identical inputs, so the next state depends only on the class and the inputs.
- **In-class code `T`.** It tells apart the states of one class.

The register holds `{tau, T}`. The next-state logic reads only `tau`, so it needs one
product term per transition of the *classes*. That is the transition count of the
equivalent Mealy machine, whatever codes the classes get. The output logic is split
in two:

- A **code converter (CC)** maps `{tau, T}` to a short code `z`. This code names the
  *collection* of microoperations the state issues.
- A **microoperation block (BMO)** decodes `z` into the individual outputs.

The collection codes are chosen so that BMO is as small as possible. The class and
in-class codes are chosen so that CC is small.

The RTL implements this structure for one concrete machine: a 10-state control
flow chart with 4 condition inputs and 8 microoperations. It is called Γ1 below.

## The example machine Γ1

States a1..a10 fall into four classes:

| class | states | class code `tau1 tau2` | next state |
|---|---|---|---|
| B1 | a1 | 00 | x1 → a2; ¬x1·x2 → a3; ¬x1·¬x2 → a4 |
| B2 | a2, a3, a4 | 01 | x2·x3 → a5; x2·¬x3 → a6; ¬x2·x4 → a7; ¬x2·¬x4 → a8 |
| B3 | a5, a6, a7, a8 | 11 | x3 → a9; ¬x3·x2 → a10; ¬x3·¬x2 → a8 |
| B4 | a9, a10 | 10 | → a1 (unconditional) |

a1 is both the start and the end of the flow chart. The number of in-class bits
follows from the largest class (B3, four states), so `T` has 2 bits. The register
therefore has 4 bits, the same as a plain binary code of 10 states would need.

Extended state codes `{tau1 tau2 T1 T2}` and the collections the states issue:

| state | code | microoperations | collection | `z1 z2 z3` |
|---|---|---|---|---|
| a1  | 0000 | none | Y1 | 000 |
| a2  | 0101 | y1 y2 y7 | Y2 | 111 |
| a3  | 0110 | y3 y5 y6 | Y3 | 001 |
| a4  | 0111 | y1 y3 y7 | Y4 | 011 |
| a5  | 1100 | y1 y2 y6 y8 | Y5 | 110 |
| a6  | 1101 | y1 y2 y7 | Y2 | 111 |
| a7  | 1111 | y2 y4 y5 | Y6 | 101 |
| a8  | 1110 | y2 y4 y6 | Y7 | 100 |
| a9  | 1011 | y1 y3 y7 | Y4 | 011 |
| a10 | 1010 | y2 y4 y6 | Y7 | 100 |

The codes 0001, 0010, 0011, 0100, 1000 and 1001 are unused. So is the collection
code 010. All of them are treated as don't-cares during minimisation.

## Blocks

```
 x[1:4] ──► u2_bim ──D[1:4]──► u2_rg ──┬─ tau[1:2] ──► (back to u2_bim)
                                 ▲     ├─ tau, t ───► u2_cc ──z[1:3]──► u2_bmo ──► y[1:8]
                       clk, start┘
```

| module | role |
|---|---|
| `moore_u2_pkg` | Sizes (L=4, N=8, R1=2, R2=2, R3=3), vector types, state and collection code constants |
| `u2_bim` | Next-state (input memory) functions D1..D4 from `tau` and `x` |
| `u2_rg` | 4-bit D register; `start` loads 0000 (a1) |
| `u2_cc` | Code converter `{tau, T}` → `z` |
| `u2_bmo` | Collection decoder `z` → `y1..y8` |
| `moore_u2` | Top: the four blocks wired together |

The logic is written as technology-independent sums of products. Fitting it into
CPLD macrocells is left to the synthesis tool; no device-specific primitives are
instantiated.

All vectors are numbered from 1 (`x[1]` is x1, `y[1]` is y1, `tau[1]` is tau1), so
the equations in the RTL read like their subscripted forms.

### Next-state logic (`u2_bim`)

The class transition table has ten rows. The return from B4 to a1 needs no term,
because every D is 0. After minimisation:

```
D1 = tau2
D2 = ~tau1 | tau2 ~x2 ~x3
D3 = tau1 tau2 | tau2 ~x2 | ~tau1 ~tau2 ~x1
D4 = ~tau1 ~tau2 x1 | ~tau1 ~tau2 ~x2 | ~tau1 tau2 x2 ~x3 | ~tau1 tau2 ~x2 x4 | tau1 tau2 x3
```

D1 is the one equation the method states in minimised form. D2 to D4 were minimised
by hand from the same table. The same chart coded conventionally, with the
next state depending on the full state code, has 23 transition rows instead of 10.

### Code converter (`u2_cc`)

The converter is the price of the method. It is also the part most easily got
wrong, because its equations depend on both code assignments at once:

```
z1 = tau2 ~T1 | tau1 tau2 | tau1 T1 ~T2
z2 = tau2 ~T1 | ~tau1 T2 | ~tau2 T2
z3 = T2 | ~tau1 tau2
```

Each equation has at most three product terms, so each fits a PAL macrocell with
three terms. The z1 and z3 equations are the published ones.

**Departure:** the published z2, `~T1 T2 | tau2 T2`, gives the wrong collection in
three states:

- a5 (1100) needs 1 and gets 0.
- a7 (1111) needs 0 and gets 1.
- a9 (1011) needs 1 and gets 0.

The z2 above was re-minimised from the state/collection table. It also has three
terms.

**Departure:** the flow chart lists y2 y4 y5 for a10, but the state/collection
table gives a10 the collection Y7 = {y2 y4 y6}. The published converter equations
are derived from that table. This design follows the table, so a10 issues
y2 y4 y6. To follow the chart instead, give a10 the code 101. That changes only
z3: it must then be 1 in state 1010, for example `z3 = T2 | ~tau1 tau2 | tau1 ~tau2`.

### Microoperation decoder (`u2_bmo`)

The collection codes were placed on a Karnaugh map so that each microoperation is
a short sum of products:

```
y1 = z2          y2 = z1          y3 = ~z1 z3      y4 = z1 ~z2
y5 = ~z2 z3      y6 = ~z1 ~z2 z3 | z1 ~z3          y7 = z2 z3       y8 = z2 ~z3
```

### State register (`u2_rg`) and timing

The register uses D flip-flops on the rising edge of `clk`. `start` is synchronous
and active high. While it is high, the next edge loads 0000, the code of a1. The
method only shows a Start input on the register; its polarity and timing are
choices of this design.

The machine makes one transition per clock. `y`, `z`, `tau` and `t` are
combinational functions of the register. They are valid throughout the cycle in
which the register holds a state, as Moore outputs should be. The register output
passes through two logic levels, CC and then BMO, before reaching `y`. This adds
delay compared with a single output decoder.

`moore_u2` exposes `tau`, `t` and `z` for observation. Only `y` is a functional
output.

## How far it is verified

Each block has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_u2_bim` | All 64 combinations of class code and conditions, against a next-state table written as nested condition tests |
| `tb_u2_rg` | 400 cycles of random D and random start |
| `tb_u2_cc` | All ten states against the state/collection table |
| `tb_u2_bmo` | All seven collections against their microoperation lists |
| `tb_moore_u2` | 3000 cycles of random conditions with random start pulses |

In `tb_moore_u2`, a reference model walks the flow chart by state number and knows
nothing of the codes. After every edge the test compares `y` and `{tau, t}` with
the model, and `z` with the state's collection code. It also counts each of the 11 transitions, each of the 7 collections and
start pulses taken mid-run, and fails if any count is zero. The top has no
parameters, so this test also runs the design at its full size.

The testbenches were also run against deliberately broken copies of each block,
and each broken copy was detected:

- a dropped product term;
- the published z2;
- swapped register bits;
- a start that does not clear.

The unused state codes are never reached from a1, so their behaviour is not
tested. A glitch on `start` or on `x` near the clock edge is also outside what a
cycle-based simulation shows.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/moore_u2_pkg.sv \
    rtl/u2_bim.sv rtl/u2_rg.sv rtl/u2_cc.sv rtl/u2_bmo.sv rtl/moore_u2.sv \
    tb/tb_moore_u2.sv --top-module tb_moore_u2
./obj_dir/Vtb_moore_u2
```

Each testbench ends with one line `TB_RESULT checks=N failures=M`. The unit
testbenches need only the package and their own module. `-Wno-fatal` is needed
because the ascending bit ranges (`[1:N]`) are deliberate and Verilator warns about
them (ASCRANGE).

## Adapting it to another machine

The structure is general; the logic is specific to Γ1. For another flow chart:

1. Find the classes of pseudoequivalent states.
2. Code the collections to minimise the BMO equations.
3. Code the classes and in-class states to minimise the CC equations, keeping one
   class code for all states of a class.
4. Rewrite the sizes in `moore_u2_pkg` and the equations in `u2_bim`, `u2_cc` and
   `u2_bmo`.
5. Rewrite the tables in the testbenches. `tb_moore_u2`'s reference model is the
   flow chart itself.

The method pays off when two conditions hold:

- R1 + R2 does not exceed the bits of a plain state code, so no extra flip-flops
  are needed.
- The collection code is shorter than the plain state code.
