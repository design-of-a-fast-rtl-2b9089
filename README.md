# Carry-free quaternary signed-digit (QSD) adder

A binary adder is slow because a carry may have to travel from the least significant
bit to the most significant one. This design removes that chain by adding numbers
written in a *redundant* radix-4 code: each digit may take any value from −3 to +3, so
most values have several spellings. The adder picks, digit by digit, a spelling whose
carry can always be swallowed by the next digit up. As a result no signal crosses more
than one digit position, and the delay of the adder is the delay of one digit cell,
whether it adds 4 digits or 128.

The RTL is pure combinational SystemVerilog: no clock, no reset, no state.

## Number representation

A QSD number of *n* digits x₀ … x₍ₙ₋₁₎ (x₀ least significant) has the value

    value = Σ xᵢ · 4ⁱ,   xᵢ ∈ {−3, −2, −1, 0, +1, +2, +3}

Every digit is carried on a 3-bit two's complement bus (`qsd_pkg::qsd_digit_t`,
`logic signed [2:0]`). The code `3'b100` (−4) is not a digit and must never be driven on
an operand. A negative number is the digit-wise negation of the positive one, e.g.
233 = (3, 3, −2, 1) and −233 = (−3, −3, 2, −1), most significant digit first.

An *n*-digit operand covers ±(4ⁿ − 1); two of them are added into *n* sum digits plus one
carry digit of weight 4ⁿ, so the sum never overflows.

## The two addition steps

### Step 1: recode each digit pair (`qsd_step1`)

The two operand digits of a position are added. Their sum lies in −6 … +6 and is
rewritten as `ic·4 + is`, an *intermediate carry* and an *intermediate sum*. Among the
possible spellings, the adder always takes the one with

* |is| ≤ 2, and
* |ic| ≤ 1.

| digit sum | −6 | −5 | −4 | −3 | −2 | −1 | 0 | +1 | +2 | +3 | +4 | +5 | +6 |
|-----------|----|----|----|----|----|----|---|----|----|----|----|----|----|
| `ic`      | −1 | −1 | −1 | −1 |  0 |  0 | 0 |  0 |  0 | +1 | +1 | +1 | +1 |
| `is`      | −2 | −1 |  0 | +1 | −2 | −1 | 0 | +1 | +2 | −1 |  0 | +1 | +2 |

The choice that matters most is ±3. A digit sum of +3 could stay as (0, +3), but a +3
intermediate sum could receive a +1 carry and reach +4, which is not a digit. So +3 is
sent up as (+1, −1), and likewise −3 as (−1, +1). ±2 stays in the sum digit, since
±2 ± 1 still fits. `ic` needs only two bits but travels on three, with `ic[2] = ic[1]`,
so that every digit bus has the same width.

`qsd_step1` writes the table as a `case` on the 4-bit sum of the operands. A synthesis
tool reduces it to six-input logic for each of the six output bits; Yosys maps it to a
small ROM of 64 × 6 bits before technology mapping. Deferred assertions check both range
rules on every evaluation.

### Step 2: absorb the carry from below (`qsd_step2`)

The final digit is `s = is + c_lo`, where `c_lo` is the intermediate carry of the next
lower position. Because |is| ≤ 2 and |c_lo| ≤ 1, the result lies in −3 … +3. It is
always a digit, so step 2 never makes a carry. Step 2 is a plain 3-bit two's complement
adder.

### One digit position (`qsd_digit_cell`)

`qsd_digit_cell` is step 1 followed by step 2 for one position:

| port    | dir | width | meaning                                             |
|---------|-----|-------|-----------------------------------------------------|
| `a`,`b` | in  | 3     | operand digits, −3 … +3                             |
| `c_in`  | in  | 3     | intermediate carry of the lower position, −1 … +1   |
| `s`     | out | 3     | sum digit, −3 … +3                                  |
| `c_out` | out | 3     | intermediate carry to the higher position, −1 … +1  |

`c_out` depends only on `a` and `b`, never on `c_in`. That property is what removes the
carry chain.

## The word-length adder (`qsd_adder`, the top)

```
           a[2] b[2]         a[1] b[1]         a[0] b[0]
             |   |             |   |             |   |
          [ step 1 ]        [ step 1 ]        [ step 1 ]
   c_out <--ic   is    +-----ic   is    +-----ic   is    +-- 0
                 |     |          |     |          |     |
              [ step 2 ]<+     [ step 2 ]<+     [ step 2 ]<+
                 |                |                |
                s[2]             s[1]             s[0]
```

Each step-1 carry goes one position to the left, into that position's step 2, and no
further.

`qsd_adder #(DIGITS)` is a row of `DIGITS` cells. The carry into cell 0 is 0, and the
carry out of the top cell is the output `c_out`:

| port    | dir | width        | meaning                                   |
|---------|-----|--------------|-------------------------------------------|
| `a`,`b` | in  | `[DIGITS-1:0]` of `qsd_digit_t` | operands, index 0 least significant |
| `s`     | out | `[DIGITS-1:0]` of `qsd_digit_t` | sum digits                          |
| `c_out` | out | `qsd_digit_t` | carry digit of weight 4^DIGITS, −1 … +1  |

`value(s) + c_out·4^DIGITS = value(a) + value(b)`, exactly.

`DIGITS` defaults to 64. Lengths of 64 and 128 digits are the sizes this adder is meant
for. Any positive value works. The longest path, whatever `DIGITS` is, runs through one
recoder and one 3-bit adder. Wiring only joins neighbouring cells.

Worked example, most significant digit first:

```
a =  107  = ( 2, -2,  3, -1)
b = -233  = (-3, -3,  2, -1)
digit sums  (-1, -5,  5, -2)
ic          ( 0, -1,  1,  0)      carries move one place left
is          (-1, -1,  1, -2)
s           (-2,  0,  1, -2)  = -128 + 0 + 4 - 2 = -126,  c_out = 0
```

## Files

| file                        | contents                                                       |
|-----------------------------|----------------------------------------------------------------|
| `rtl/qsd_pkg.sv`            | digit type `qsd_digit_t`, helper `qsd_is_digit`                 |
| `rtl/qsd_step1.sv`          | step 1 recoder (table above) with range assertions             |
| `rtl/qsd_step2.sv`          | step 2 digit adder                                             |
| `rtl/qsd_digit_cell.sv`     | one digit position                                             |
| `rtl/qsd_adder.sv`          | `DIGITS`-digit adder, top of the design                        |
| `tb/tb_qsd_step1.sv`        | all 49 digit pairs against the recoding table and both rules   |
| `tb/tb_qsd_step2.sv`        | all 15 (sum, carry) pairs                                       |
| `tb/tb_qsd_digit_cell.sv`   | 49 pairs × 3 carries; checks `c_out` does not depend on `c_in` |
| `tb/tb_qsd_adder.sv`        | top at its default 64 digits, end to end                       |
| `tb/qsd_adder_bench.sv`     | driver and checker for one adder of any size                   |
| `tb/tb_qsd_adder_workloads.sv` | the adder at 1, 4 and 128 digits                            |

## Simulating

Every testbench checks itself, stops itself and prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qsd_pkg.sv tb/tb_qsd_adder.sv --top-module tb_qsd_adder
./obj_dir/Vtb_qsd_adder
```

Replace the testbench file and top with any of the others. `-Wall` lint of `rtl/` is
clean.

`tb_qsd_adder` compares every result against wide integer arithmetic (140-bit) and
against the digit rule worked out independently in the testbench. It applies the worked
example, extreme operands (all +3, all −3), alternating carry patterns and 3000 random
vectors. It also counts how often each case occurs: positive and negative intermediate
carries, a carry absorbed by a digit that ends at ±3, a carry out of either sign, every
digit sum from −6 to +6, and mixed-sign operands. A case that never occurs counts as a
failure. Each testbench runs in about a second.

## Limits and design choices

* **Operand code −4.** `3'b100` is not a digit. For it, `qsd_step1` outputs
  (0, 0) and the sum is meaningless. Nothing checks operands at the ports.
* **No external carry-in.** Position 0 gets a carry of 0. To chain two adders, feed the
  lower adder's `c_out` into the upper adder's position-0 `c_in`. That needs a small edit
  to `qsd_adder`.
* **No binary conversion.** Operands come in as QSD digits and the result leaves as QSD
  digits. Converting two's complement binary to QSD is trivial: the radix-4 digits of a
  positive number are already legal QSD digits. Converting QSD back to binary takes an
  ordinary carry-propagating subtraction, which this design leaves to the user.
* **Recoding logic.** The recoder is described by its truth table, not by hand-minimised
  equations. The function is identical to the published mapping; gate-level structure
  and delay are left to synthesis.
* **Port count of a single cell.** The published single-digit result counts 17 I/Os. This
  cell has 15 (five 3-bit digits). The other two are not identified in the source, so they
  are not reproduced here.
* **Intermediate sum bound.** In places the source bounds the intermediate sum as "less
  than 2" or "less than 3". Its mapping table, which this RTL follows, keeps ±2 in the
  sum digit, so the bound used here is |is| ≤ 2.
