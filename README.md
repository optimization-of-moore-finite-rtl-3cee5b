# Moore FSM "U4": a matrix circuit with a partial state-code transformer

A Moore machine built from AND/OR planes usually needs one AND-plane term for
every *state* transition: if three states all leave the same way under the
same inputs, their transitions are still written three times. Such states are
called **pseudoequivalent**. Grouping them into classes and forming one term
per *class* transition shrinks the next-state planes to the size they would
have in the equivalent Mealy machine. Two ways of doing that are usual:

* **Code the states so that each class is one cube** of the state code space.
  The class is then recognised straight from the register. This is cheap, but
  a good code does not always exist.
* **Add a code transformer.** It maps every state code to a class code, and
  the next-state terms are formed from that code. This always works, but the
  transformer costs area.

The structure here, called U4, does both. The states are coded so that as many
classes as possible are single cubes. Those classes take their code from the
state register. Only the classes left over go through a small transformer.
The next-state AND plane is split in two. One half is fed by the register and
the other by the transformer, and each half sees only the input conditions
its own classes test.

The RTL implements U4 for one example control algorithm, called Gamma_1 below.
It has 15 states, 8 logic conditions and 12 microoperations.

## Structure

```
          x1..x6 ──►┌───────┐ F1..F14
     ┌─────────────►│ M1^1  ├─────────┐
     │      T       │  AND  │         ▼
     │              └───────┘     ┌──────┐  Phi  ┌────┐  T
     │   x3,x5..x8 ►┌───────┐     │  M2  ├──────►│ RG ├──┬──────────────┐
     │              │ M1^2  ├────►│  OR  │       └────┘  │ Start, Clock │
     │   ┌─────────►│  AND  │F15..└──────┘               │              │
     │   │  tau     └───────┘ F22                        ▼              ▼
     │   │                                     ┌──────┐ Z ┌──────┐  ┌──────┐ A ┌──────┐
     │   └─────────────────────────────────────┤  M6  │◄──┤  M5  │  │  M3  ├──►│  M4  ├─► y1..y12
     │                                   tau   │  OR  │   │  AND │  │  AND │   │  OR  │
     │                                         └──────┘   └──────┘  └──────┘   └──────┘
     └──────────────────────────────────── T ───────────────┘
```

| Plane | Module | Kind | Inputs | Lines | Function |
|-------|--------|------|--------|-------|----------|
| M1^1 | `m1_1_matrix` | AND | T1..T4, x1..x6 | 14 terms F1..F14 | transitions of classes B1..B4 (class = a cube of T) |
| M1^2 | `m1_2_matrix` | AND | tau1, tau2, x3, x5..x8 | 8 terms F15..F22 | transitions of classes B5, B6 (class from the transformer) |
| M2 | `m2_matrix` | OR | F1..F22 | Phi1..Phi4 | D inputs of the register |
| RG | `state_register` | 4 D flip-flops | Phi, Start, Clock | T1..T4 | state code |
| M5 | `m5_matrix` | AND | T1..T4 | Z1..Z4 | cubes covering the states of B5 and B6 |
| M6 | `m6_matrix` | OR | Z1..Z4 | tau1, tau2 | class code (transformer output) |
| M3 | `m3_matrix` | AND | T1..T4 | A1..A15 | one-hot state decode |
| M4 | `m4_matrix` | OR | A1..A15 | y1..y12 | Moore outputs |

`and_matrix` and `or_matrix` are the generic programmable planes that every
block instantiates. `fsm_u4_pkg` holds the sizes, the state codes and the
target state of each term. `moore_u4_top` wires the blocks together.

## The example machine

### State codes and classes

The state code is T1 T2 T3 T4. Rows of the map are T1T2 and columns are T3T4.

|        | 00  | 01  | 11  | 10  |
|--------|-----|-----|-----|-----|
| **00** | a1  | a5  | a6  | a2  |
| **01** | a10 | a11 | a12 | a3  |
| **11** | a13 | a14 | a15 | a4  |
| **10** | a7  | a8  | a9  | –   |

| Class | States | Recognised by | Code |
|-------|--------|---------------|------|
| B1 | a1 | register | T = 0000 |
| B2 | a2, a3, a4 | register | T = **10 |
| B3 | a5, a6 | register | T = 00*1 |
| B4 | a7, a8, a9 | register | T = 10** (the unused code 1010 is a don't-care) |
| B5 | a10, a11, a12 | transformer | tau = *1 (driven as 01) |
| B6 | a13, a14, a15 | transformer | tau = 1* (driven as 10) |

B5 and B6 each need two cubes of T: 010* and 01*1 for B5, and 110* and 11*1
for B6. These four cubes are the transformer terms Z1..Z4. So
tau1 = Z3 ∨ Z4 and tau2 = Z1 ∨ Z2. tau = 00 means "not a transformed class".
In that case no M1^2 term can fire, and the register-fed half decides.

The cubes of the four register-fed classes contain no state of B5 or B6, so
only one half of the next-state plane is ever active. Because of this, the two
halves need no arbitration between them.

### Transition lines

| Line | Class | Condition | Next | Line | Class | Condition | Next |
|------|-------|-----------|------|------|-------|-----------|------|
| F1  | B1 | x1 | a2 | F12 | B4 | x1 ¬x3 | a7 |
| F2  | B1 | ¬x1 x2 | a3 | F13 | B4 | ¬x1 x4 | a12 |
| F3  | B1 | ¬x1 ¬x2 | a4 | F14 | B4 | ¬x1 ¬x4 | a9 |
| F4  | B2 | x3 | a5 | F15 | B5 | x5 x6 | a13 |
| F5  | B2 | ¬x3 x4 | a6 | F16 | B5 | x5 ¬x6 | a14 |
| F6  | B2 | ¬x3 ¬x4 | a4 | F17 | B5 | ¬x5 x7 | a15 |
| F7  | B3 | x4 x5 | a7 | F18 | B5 | ¬x5 ¬x7 | a10 |
| F8  | B3 | x4 ¬x5 | a8 | F19 | B6 | x3 x8 x6 | a13 |
| F9  | B3 | ¬x4 x6 | a9 | F20 | B6 | x3 x8 ¬x6 | a14 |
| F10 | B3 | ¬x4 ¬x6 | a10 | F21 | B6 | x3 ¬x8 | a1 |
| F11 | B4 | x1 x3 | a11 | F22 | B6 | ¬x3 | a10 |

M2 connects line F_h to Phi_r when bit r of the target code is 1. The
flip-flops are D type, so the register simply loads the target code. F21
leads to a1 (code 0000) and has no connection in M2.

### Microoperations

The only microoperation set known for this example is y1, which is active in
a2, a4, a5 and a9. Outputs y2..y12 have no crossing points by default and read
0. To program them, set the `Y_OF_STATE` parameter of `m4_matrix`. Entry
m-1 of that parameter is the y-vector of state a_m, with y1 in bit 0.

## Interface and timing

`moore_u4_top` ports:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | Clock; the register loads on the rising edge |
| `start` | in | 1 | Start; active high and asynchronous; clears to a1 (0000) |
| `x` | in | 8 | logic conditions; x_k is bit k-1 |
| `y` | out | 12 | microoperations; y_k is bit k-1 |
| `t` | out | 4 | state code T1..T4 (T1 is bit 3), for observation |

Everything except RG is combinational. The machine makes exactly one
transition per rising clock edge, chosen by the value of `x` just before that
edge. `y` is a Moore output: it depends only on the register, and it changes
right after the edge that changes the state.

## Programming conventions

* `and_matrix` has two parameters per term, `CARE[h]` and `VAL[h]`. A 1 in
  `CARE` connects that input to the term. `VAL` then chooses the true (1) or
  the complemented (0) literal. The term is the AND of its connected literals.
* `or_matrix` takes `CONN[o][i]`. A 1 connects input line i to output o.
* The literal tables in `m1_1_matrix` and `m1_2_matrix` have comments that
  give the column order: "T1T2T3T4 x1x2x3x4x5x6" and "tau1tau2 x3x5x6x7x8".
  The modules reorder the `x` bus to match.
* The bits of the state code and of tau are written MSB first. In every
  numbered set (x, y, A, F, Z), element k is at bit k-1.

## Size in crossing points

The usual area measure for such planes is one unit per crossing point. An AND
plane has two columns per input, one for the true literal and one for the
complement. Counted that way, the planes built here are:

| Plane | Size | Units |
|-------|------|-------|
| M1^1 | 2·(6+4) × 14 | 280 |
| M1^2 | 2·(5+2) × 8 | 112 |
| M2 | 22 × 4 | 88 |
| M5 | 2·4 × 4 | 32 |
| M6 | 4 × 2 | 8 |
| M3 | 2·4 × 15 | 120 |
| M4 | 15 × 12 | 180 |

Compare a plain matrix Moore machine. It would need one term for each of the
53 state transitions of this algorithm, so its next-state planes alone would
cost 2·(8+4)·53 + 53·4 = 1484 units. Here M1^1, M1^2, M2, M5 and M6 together
cost 520.

## How this departs from the published example

The method and the example come from the literature on matrix FSM synthesis.
Where the published example is incomplete or contradicts itself, this design
made the following choices:

* **Codes of B3 and B4.** The published text gives K(B3) = 10** and
  K(B4) = 00*1. B4 has three states, so it cannot fit in the two-cell cube
  00*1. The state map also puts a5 and a6 at 0001 and 0011. This design
  therefore uses K(B3) = 00*1 and K(B4) = 10**.
* **Second transition list.** The transition list of the transformed classes
  is labelled B4 in the source for its second class. Here it is taken as B6.
* **Number of lines.** The text states 21 Mealy-equivalent lines, but its
  transition lists and its own sums have 14 + 8 = 22. The design has 22.
* **Transformer cubes.** The source gives four Z terms but does not list them.
  The cubes above are the natural ones for the state map.
* **Register.** The flip-flop type, the polarity of Start and whether Start
  is synchronous are this design's choices: D flip-flops, active high,
  asynchronous clear.
* **M3 size.** The text works out M3 as 2·8·15 = 240 units, although its
  own formula 2R·M gives 120. The table above uses 2R·M.
* **y2..y12** are not given and are left unprogrammed (see above).

## Verification

Each block has a self-checking testbench in `tb/`. All of them use
`gamma1_ref_pkg`, a behavioural reference. It handles states by number and
writes the class transition formulas as plain if/else chains. It is
independent of the plane programming.

| Testbench | What it checks |
|-----------|----------------|
| `tb_m1_1_matrix` | all 15 states × 256 input values; exactly the term of the reference line fires |
| `tb_m1_2_matrix` | tau = 00/01/10 × 256 input values |
| `tb_m2_matrix` | each term alone gives its target code; random term sets OR together |
| `tb_state_register` | load, hold between edges, asynchronous clear |
| `tb_m5_matrix`, `tb_m6_matrix`, `tb_m3_matrix` | all input codes |
| `tb_m4_matrix` | each state term alone, and random sets |
| `tb_moore_u4_top` | 20 000 random cycles at default sizes; state and y checked every cycle; every one of the 22 lines, every state, both class sources and Start must occur |

Each prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/fsm_u4_pkg.sv tb/gamma1_ref_pkg.sv \
          tb/tb_moore_u4_top.sv --top-module tb_moore_u4_top
./obj_dir/Vtb_moore_u4_top
```

All the testbenches pass. Each was also run against a copy of its block with
one deliberate error, and each caught the error. Examples of those errors: a
class cube swapped, a crossing point dropped, tau bits exchanged, and Start
made synchronous.

## Adapting to another FSM

1. Partition the states into pseudoequivalent classes. Choose codes so that
   as many classes as possible are single cubes.
2. Update `fsm_u4_pkg`: the sizes, `STATE_CODE` and `F_TARGET`. M2 and M3
   derive their crossing points from these tables.
3. Rewrite the `CARE`/`VAL` tables of `m1_1_matrix`, `m1_2_matrix` and
   `m5_matrix`, and the `CONN` table of `m6_matrix`.
4. Program `Y_OF_STATE` of `m4_matrix`.
5. Update the reference in `tb/gamma1_ref_pkg.sv` to the new algorithm.
