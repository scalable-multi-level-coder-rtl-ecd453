# Multi-level one-hot to binary coder

A coder (encoder) turns a unitary code — 2^n lines of which exactly one
is high — into the n-bit binary number of the active line. The textbook circuit uses
one OR gate per output bit: bit j is the OR of every input whose number has bit j set,
so each of the n gates has 2^(n-1) inputs.

This design builds the same function as a chain of n-1 *levels*. Each level produces
one output bit and then folds its lines in half, so the level below has half as many
lines to deal with. Two properties follow:

* **Regularity.** Every level is the same circuit at a different width, and levels
  1 .. i-1 on their own form a complete i-bit coder.
* **Scaling without redesign.** To go from 2^n to 2^(n+1) inputs, one more level is
  placed *in front of* an existing coder. The existing coder is not modified.

The RTL is purely combinational: no clock, no reset, no state.

## How one level works

Level i receives 2^(i+1) lines, numbered 0 .. 2^(i+1)-1. Line k is high when the
active input's number has k as its low i+1 bits.

* **Block A** (`coder_or_a`) ORs the upper half, lines 2^i .. 2^(i+1)-1, into output
  bit y(i). This is bit i of the active input's number.
* **Block B** (`coder_or_b`) is a row of 2-input ORs. Element B(k) forms
  `x_next[k] = x[k] | x[k + 2^i]`. Lines k and k+2^i differ only in bit i, and bit i
  has just been handled by A. So the two can merge into one line of level i-1, which
  again holds a one-hot code, this time of the low i bits.

The coder inputs are the lines of the top level, level n-1. The chain stops at level 1,
which has four lines:

```
y(1)      = line3 | line2          (block A of level 1)
x_next[1] = line3 | line1  = y(0)  (element B(1) of level 1)
x_next[0] = line2 | line0          (element B(0), normally not built)
```

Element B(1) of level 1 therefore gives the lowest output bit directly. No level 0
exists.

Worked example, n = 4 (16 inputs, levels 3, 2, 1):

| level | block A                         | block B                                |
|-------|---------------------------------|----------------------------------------|
| 3     | y(3) = OR of x(8) .. x(15)      | x2(k) = x(k) \| x(k+8),  k = 1..7      |
| 2     | y(2) = OR of x2(4) .. x2(7)     | x1(k) = x2(k) \| x2(k+4), k = 1..3     |
| 1     | y(1) = x1(3) \| x1(2)           | y(0) = x1(3) \| x1(1)                  |

## Input 0 and the B(0) elements

Input 0 encodes to all zeros, so it never has to set an output bit. Element B(0) of a
level only ever carries lines that go on to encode to 0 in the bits still to come. The
main form of the design therefore leaves out every B(0) element (`USE_X0 = 0`):

* x[0] is unused;
* "input 0 active" and "no input active" both give y = 0.

With `USE_X0 = 1`, every level builds its B(0). Level 1's folded line 0 is then
brought out as `even_active`, the OR of all even-numbered inputs. Because y(0) is the
OR of all odd-numbered inputs, `even_active | y[0]` is high exactly when some input is
active. That is the way to tell input 0 apart from an idle input word. The port exists
in both forms; with `USE_X0 = 0` it is tied low.

When a coder is widened, the extra level must agree with the existing coder:

* if the existing coder carries input 0, the extra level needs its B(0) too;
* if not, neither has one.

`scaled_coder` passes one `USE_X0` to both parts, so they cannot disagree.

## Scaling: `scaled_coder`

`scaled_coder` is the top. It is the 16-input, 4-bit coder (`ml_coder`, N = 4)
widened to 32 inputs and 5 bits by one extra `coder_level` at level 4:

```
x[31:0] ──► coder_level (LEVEL = 4) ──► y(4)
                 │ x_next[15:0] = x[k] | x[k+16]
                 ▼
            ml_coder (N = 4): levels 3, 2, 1 ──► y(3..0)
```

The extra level adds one 2-input OR in front of every path of the existing coder.
The longest path is y(0), through n-1 two-input ORs (4 at the default size). The
widest gate is block A of the top level, with 2^(n-1) inputs; synthesis is free to
build it as a tree.

## Behaviour outside the unitary code

Every output bit is an OR of inputs. So for any input word, y is the bitwise OR of the
numbers of all active inputs. The design does no priority resolution and does not
detect several active inputs. The testbenches use this rule as their reference.

## Hardware cost

The cost measure is the total number of gate inputs (the Quine price). Count every
gate input of the structure as built, with B(0) removed:

* level i costs 2^i for block A plus 2·(2^i - 1) for block B;
* the whole coder costs 3·(2^n - 2) - 2·(n-1);
* with the B(0) elements kept, add 2 per level: 3·(2^n - 2).

| n  | this structure | with B(0) | single-level, n·2^(n-1) |
|----|---------------:|----------:|------------------------:|
| 4  | 36             | 42        | 32                      |
| 5  | 82             | 90        | 80                      |
| 6  | 176            | 186       | 192                     |
| 8  | 748            | 762       | 1024                    |
| 12 | 12260          | 12282     | 24576                   |

The structure costs less than the single-level coder from n = 6 on. Towards large n its
cost approaches 6/n of the single-level cost.

The published analysis uses a geometric series that costs level i at 4·2^(i-1) inputs,
which gives 4·(2^(n-1) - 1): 28 for n = 4, 508 for n = 8. That series matches level 1
(4 inputs) but not the higher levels as drawn, where block A alone has 2^i inputs and
block B another 2·(2^i - 1). The RTL follows the circuit as drawn, not the cost figure.
The ratios claimed for the reduction (0.875 at n = 4, 0.5 at n = 8) are therefore
optimistic for this circuit: the table above gives about 1.13 at n = 4 and 0.73 at
n = 8.

## Modules

| module         | what it is                                                        | parameters (default)           |
|----------------|-------------------------------------------------------------------|--------------------------------|
| `scaled_coder` | top: 2^(N_BASE+1)-input coder = extra level + existing coder      | `N_BASE` (4), `USE_X0` (0)     |
| `ml_coder`     | 2^N-input, N-bit multi-level coder, levels N-1 .. 1               | `N` (4, N >= 2), `USE_X0` (0)  |
| `coder_level`  | one level: block A and block B                                    | `LEVEL` (3), `KEEP_B0` (0)     |
| `coder_or_a`   | block A: OR of the upper half of a level's lines                  | `LEVEL` (3)                    |
| `coder_or_b`   | block B: 2-input ORs folding a level's lines                      | `LEVEL` (3), `KEEP_B0` (0)     |

Ports of the top: `x[31:0]` in, `y[4:0]` out, `even_active` out.

Inside `ml_coder`, the lines of all levels share one bus, `net`. The lines entering
level i sit at `net[2^(i+2)-1 : 2^(i+1)]`. The generate loop can then connect levels of
different widths without per-level declarations.

A removed B(0) drives its output line to 0. This keeps every level's port widths
regular. That line and its partners are left as constant or unused bits; tools report
them as idle, which is expected.

## Choices not fixed by the original description

* The design is described only at gate level. The registers, clocking and reset are
  not specified, so none are added. Register the outputs outside if needed.
* Level 1's element B(1) forms y(0), as the level-1 circuit and the 16-input example
  both draw it. One sentence of the description attributes y(0) to B(0) instead; the
  circuit was followed.
* In the 16-input example, the level-1 gate that produces y(1) carries a B label. It
  has the function of block A and is built as A.
* `even_active` is an addition. It exposes the level-0 line that the circuit draws
  when B(0) is kept.
* `N >= 2` is required; a 1-bit coder has no levels.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench:

* works out the expected output without the level structure, from the active inputs'
  numbers;
* drives inputs on a testbench clock and checks on the opposite edge;
* has a watchdog;
* ends with a `TB_RESULT checks=N failures=M` line.

| testbench            | covers                                                                                       |
|----------------------|----------------------------------------------------------------------------------------------|
| `tb_coder_or_a`      | levels 3 and 1, every input word                                                             |
| `tb_coder_or_b`      | level 3 with and without B(0): one-hot, zero and random words                                |
| `tb_coder_level`     | levels 3 and 1 without B(0), level 4 with B(0), every one-hot word                           |
| `tb_ml_coder`        | N = 4 without B(0), N = 3 with B(0): one-hot, zero and random multi-hot words                |
| `tb_scaled_coder`    | the top at its default size (32 inputs); see below                                           |
| `tb_scaled_coder_x0` | the top with `USE_X0 = 1`, including `even_active \| y[0]` as the any-input-active signal    |
| `tb_coder_sweep`     | `ml_coder` at every n from 2 to 12 (up to 4096 inputs), with and without B(0), every one-hot input |

`tb_scaled_coder` checks all 32 one-hot words, the zero word and random multi-hot
words. It counts, and fails if any never happens:

* each output bit set;
* an input handled by the extra level (16 .. 31);
* an input passed through to the existing coder (1 .. 15);
* input 0;
* the idle word;
* a multi-hot word.

To run one with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_scaled_coder.sv --top-module tb_scaled_coder
./obj_dir/Vtb_scaled_coder
```

All testbenches finish in well under a second. All modules pass `verilator --lint-only
-Wall` without warnings.
