# 8-bit barrel shifter from 2:1 multiplexers

A barrel shifter rotates a data word by any number of places in a single
pass of combinational logic. It does not move one place per clock. This
design builds an 8-bit rotate-right barrel shifter from nothing but 2:1
multiplexers. It uses three cascaded columns of eight muxes, 24 in all, or
n·log2(n) for an n-bit word. Each column either passes its input straight
through or rotates it right by a fixed power of two. Together the three
columns can produce any rotation from 0 to 7 places. The path from input to
output is always three muxes deep, whatever the rotate amount.

A second datapath sits beside it: a shift/rotate unit with a 3-bit operation
code. It performs logical and arithmetic shifts and rotations, to the right
and to the left. It is built around the same multiplexer rotator.

## The multiplexer cascade

```
 d[7:0] ──► stage 1: rotate right 1 ──► stage 2: rotate right 2 ──► stage 3: rotate right 4 ──► q[7:0]
              enabled by S2 = s[2]        enabled by S1 = s[1]        enabled by S0 = s[0]
```

Each stage is a `rotate_stage`: a row of `mux2` cells sharing one select.
Cell `i` of a stage with distance `k` has two inputs:

* pin `a`: input bit `i`, selected when the select is low;
* pin `b`: input bit `(i + k) mod 8`, selected when the select is high.

Stage 1 therefore wires each mux to its next-lower neighbour. Stage 2 skips
one bit and stage 3 skips three. The bit leaving the LSB end wraps around to
the MSB end, so no bit is lost. The stages act independently, so the
rotations add up:

**rotate amount = 4·S0 + 2·S1 + S2**

For example, S2 and S0 together rotate by 5.

### Select-line order

The select lines are numbered the opposite way to their weights, and this is
the easiest thing to get wrong:

| port bit | name | stage  | rotates by |
|----------|------|--------|------------|
| `s[0]`   | S0   | third  | 4          |
| `s[1]`   | S1   | second | 2          |
| `s[2]`   | S2   | first  | 1          |

So `s` is the rotate amount with its bits in reverse order. With
`d = 00001111` the shifter gives:

| S0 S1 S2 | `s[2:0]` | q          | rotation |
|----------|----------|------------|----------|
| 0 0 0    | 000      | `00001111` | 0        |
| 0 0 1    | 100      | `10000111` | 1        |
| 0 1 0    | 010      | `11000011` | 2        |
| 0 1 1    | 110      | `11100001` | 3        |
| 1 0 0    | 001      | `11110000` | 4        |
| 1 0 1    | 101      | `01111000` | 5        |
| 1 1 0    | 011      | `00111100` | 6        |
| 1 1 1    | 111      | `00011110` | 7        |

This table, and the rule that S0 weighs 4 and S2 weighs 1, is the reference
behaviour. One common block-diagram drawing of this shifter places the 4-bit
stage first and enables it with `Select[2]`. This design does not follow
that drawing. The order of the stages has no effect on the result; only the
select weights matter.

### The 2:1 multiplexer

`mux2` gives `y = a` when `s = 0` and `y = b` when `s = 1`. It is written at
gate level as `(a & ~s) | (b & s)`: two ANDs, one OR and one inverter.

## Shift/rotate unit

`shift_unit` takes a binary amount `amt` (0 to 7) and an operation code
`op = {left, rotate, arith}` (type `shifter_pkg::shift_op_t`):

| left | rotate | arith | operation              | result for amt = 3, d = d0 d1 … d7 (d0 = MSB) |
|------|--------|-------|------------------------|-----------------------------------------------|
| 0    | 0      | 0     | shift right logical    | 0 0 0 d0 d1 d2 d3 d4                          |
| 0    | 0      | 1     | shift right arithmetic | d0 d0 d0 d0 d1 d2 d3 d4                       |
| 0    | 1      | x     | rotate right           | d5 d6 d7 d0 d1 d2 d3 d4                       |
| 1    | 0      | 0     | shift left logical     | d3 d4 d5 d6 d7 0 0 0                          |
| 1    | 0      | 1     | shift left arithmetic  | d0 d4 d5 d6 d7 0 0 0                          |
| 1    | 1      | x     | rotate left            | d3 d4 d5 d6 d7 d0 d1 d2                       |

Shift left arithmetic keeps the sign bit in place. The other bits shift left
and zeros fill in from the right. This is not the same as a plain logical
left shift.

The operations and their results are the specification. How the unit
produces them is this design's own choice:

1. For a left operation, the word is bit-reversed, which turns every
   operation into a right one.
2. `amt` is reordered into the rotator's select order (`s[2-b] = amt[b]`),
   and a `barrel_shifter` rotates the word right.
3. For a shift, the `amt` bits that wrapped into the top of the word are
   replaced by the fill bit. The fill bit is the sign bit for an arithmetic
   right shift and 0 otherwise.
4. A left result is reversed back. For shift left arithmetic, the MSB is then
   set to the input's sign bit.

## Modules

| file                      | module             | role |
|---------------------------|--------------------|------|
| `rtl/shifter_pkg.sv`      | package            | `shift_op_t`, the `{left, rotate, arith}` opcode struct |
| `rtl/mux2.sv`             | `mux2`             | gate-level 2:1 mux |
| `rtl/rotate_stage.sv`     | `rotate_stage`     | `WIDTH` muxes, conditional rotate right by `DIST` |
| `rtl/barrel_shifter.sv`   | `barrel_shifter`   | `log2(WIDTH)` cascaded stages; ports `d`, `s`, `q` |
| `rtl/shift_unit.sv`       | `shift_unit`       | six shift/rotate operations around a `barrel_shifter` |
| `rtl/barrel_shifter_top.sv` | `barrel_shifter_top` | top level: the rotator (`d`, `s`, `q`) and the shift unit (`su_d`, `su_amt`, `su_op`, `su_q`) side by side |

Everything is combinational. There is no clock, no reset and no register. A
"shift in one clock cycle" means the shifter settles within one cycle of the
surrounding logic. If you need a registered version, put flip-flops around
`barrel_shifter_top`. The two datapaths in the top share no signals.

## Parameters and other sizes

`WIDTH` (default 8) sets the word size. `barrel_shifter` derives
`STAGES = $clog2(WIDTH)`, and `WIDTH` must be a power of two. At other widths
the select order keeps the same pattern: `s[STAGES-1-j]` enables the stage
that rotates by 2^j, so `s` is always the amount with its bits reversed. The
usual word sizes need these mux counts:

| word    | stages | 2:1 muxes |
|---------|--------|-----------|
| 8 bits  | 3      | 24        |
| 16 bits | 4      | 64        |
| 32 bits | 5      | 160       |
| 64 bits | 6      | 384       |

Only the 8-bit default is the reference design. The other widths are a
straightforward extension and are simulated too (see below). `shift_unit`
has its own `WIDTH` parameter and is tested at 8 and 16 bits.

## Verification

Each testbench checks its block against values computed independently, and
ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_mux2.sv` | all 8 rows of the mux truth table |
| `tb/tb_rotate_stage.sv` | all 256 words × select, distances 1, 2, 4 (8-bit) and 8 (16-bit) |
| `tb/tb_barrel_shifter.sv` | the select table above, the point s=011 → `00111100`, all 256 words × 8 selects, and a random 16-bit run |
| `tb/tb_barrel_shifter_sizes.sv` | 8-, 16-, 32- and 64-bit instances with random data |
| `tb/tb_shift_unit.sv` | the six 3-place examples above built bit by bit, every word × amount × opcode, and a random 16-bit run |
| `tb/tb_barrel_shifter_top.sv` | top level at default parameters: exhaustive on both datapaths; checks that pass-through, each single select, all selects, and each of the six operations occurred |

To run one of them with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/shifter_pkg.sv tb/tb_barrel_shifter_top.sv --top-module tb_barrel_shifter_top
./obj_dir/Vtb_barrel_shifter_top
```

Every testbench finishes in well under a second.

## Departures and open points

* Which pin of each mux takes the straight bit and which the rotated bit is
  this design's choice. The result is the same either way, provided the
  select polarity matches.
* Only rotate right is built as a bare mux network. The left and shift
  operations live in `shift_unit`, which adds reversal and fill logic around
  the network. This extra logic is not part of the reference circuit.
* On an FPGA, synthesis inserts input and output buffers. They are not part
  of this RTL.
* No timing or power figures are given here. The constant depth of three mux
  levels is a structural property, not a measured result.
