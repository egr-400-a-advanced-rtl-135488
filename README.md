# Multifunction barrel shifter for an FPGA starter board

A barrel shifter moves a word by any number of bit positions in one step of
combinational logic, with no clock and no iteration. This design is a
*multifunction* barrel shifter: it rotates an 8-bit word either left or right,
chosen by one control input, by 0 to 7 positions. It is sized for a small FPGA
board: the word comes from four slide switches, the amount from three push
buttons, the direction from one more input, and the result goes to eight LEDs.

The design is deliberately built from separate parts: one rotate-left
circuit, one rotate-right circuit and one 2-to-1 multiplexer that picks the
result for the chosen direction. It does not use a single shifter that
handles both directions.

## How a logarithmic rotator works

A rotation by any amount `n` from 0 to 7 breaks into rotations by 1, 2 and 4,
one for each bit of `n`. Each rotator (`barrel_shifter_left`,
`barrel_shifter_right`) is therefore a chain of three stages:

```
 a ──► [stage 0: rotate by 1 if amt[0]] ──► [stage 1: by 2 if amt[1]] ──► [stage 2: by 4 if amt[2]] ──► y
```

Each stage is a row of eight 2-to-1 multiplexers. One input is the stage
input unchanged. The other is the same bits rewired into a rotation. The
rewiring costs no logic, so an N-bit rotator needs N·log2(N) multiplexers and
has a delay of log2(N) multiplexers. A design that picks one of eight results
per output bit needs more of both. Bits that leave one end of the word come
back in at the other end: this is a *rotation*, and no bit is lost.

For stage `k`, which rotates by `2**k` positions:

| direction | stage output when its amount bit is 1 |
|-----------|---------------------------------------|
| right     | `{s[2**k-1:0], s[W-1:2**k]}`           |
| left      | `{s[W-2**k-1:0], s[W-1:W-2**k]}`       |

Stage 2 of an 8-bit rotator rotates by half the word. That stage gives the
same result in both directions.

Both rotators take a `WIDTH` parameter (default 8) and build
`$clog2(WIDTH)` stages. When `WIDTH` is not a power of two, the amount still
has `$clog2(WIDTH)` bits, and amounts of `WIDTH` or more wrap modulo `WIDTH`.
For example, a 5-bit rotator with amount 6 rotates by 1.

## Choosing the direction

`multifunctional_shifter_fpga` feeds the same word and the same amount to both
rotators at once. `mux2` then passes one of the two results to the LEDs:

| `lr` | `led` shows                 |
|------|-----------------------------|
| 0    | the word rotated **left**   |
| 1    | the word rotated **right**  |

`barrel_pkg` defines this encoding as `dir_e` (`DIR_LEFT`, `DIR_RIGHT`).

## Board mapping and what the LEDs show

| port  | width | board meaning                                  |
|-------|-------|------------------------------------------------|
| `sw`  | 4     | slide switches, the low four bits of the word  |
| `btn` | 3     | push buttons: `btn[0]` = 1, `btn[1]` = 2, `btn[2]` = 4 positions |
| `lr`  | 1     | direction (1 = right)                          |
| `led` | 8     | the rotated word                               |

The board has only four switches, so the word is `{4'b0000, sw}`: the upper
four bits are always zero. The LEDs therefore show the switch pattern moving
around a ring of eight positions. With all four switches on:

| amount | left (`lr`=0) | right (`lr`=1) |
|--------|---------------|----------------|
| 0      | `0000_1111`   | `0000_1111`    |
| 1      | `0001_1110`   | `1000_0111`    |
| 2      | `0011_1100`   | `1100_0011`    |
| 3      | `0111_1000`   | `1110_0001`    |
| 4      | `1111_0000`   | `1111_0000`    |
| 5      | `1110_0001`   | `0111_1000`    |
| 6      | `1100_0011`   | `0011_1100`    |
| 7      | `1000_0111`   | `0001_1110`    |

The top takes two parameters: `DATA_W` (default 8, the LED count) and `SW_W`
(default 4, the switch count). The button count is `$clog2(DATA_W)`.

The design has no clock and no reset. An input change reaches `led` after
three multiplexer levels in a rotator plus one in `mux2`. The pin assignment
for a particular board is not part of this RTL. The top's four ports are the
signals that pin assignment connects.

## Size

The ports use 3 + 4 + 1 + 8 = 16 pins. Before optimisation the logic is 56
two-input multiplexer bits: 2 rotators × 3 stages × 8 bits, plus 8 in the
output mux. The zero upper half of the word makes many of them constant, so a
synthesis tool removes them. On a Spartan-3E class device, a build of this
circuit used 36 four-input LUTs and 16 I/O pins. That is about 1% of the
9,312 LUTs of the board's device.

## Where this RTL makes its own choices

- The three parts are written as three modules. The 2-to-1 multiplexer is a
  module of its own (`mux2`), not an inline conditional.
- The word width is a parameter, and so is the number of switches, with the
  8-bit, 4-switch board as the default. The original circuit is 8 bits only.
  The generalisation to other widths, including widths that are not a power
  of two, is this design's own. The testbenches check it at 5 and 16 bits.
- The direction input has a named enum type inside the top. The port itself
  is a plain 1-bit `lr`.
- Elaboration-time `$error` checks reject `WIDTH < 2` and `SW_W > DATA_W`.

The behaviour at the default sizes is the same as the original board design.
That covers the rotation direction of each stage, the direction sense of
`lr`, the zero-extension of the switches and the button weights.

## Files

| file | contents |
|------|----------|
| `rtl/barrel_pkg.sv` | `dir_e`, the encoding of the direction input |
| `rtl/barrel_shifter_right.sv` | logarithmic rotate-right |
| `rtl/barrel_shifter_left.sv` | logarithmic rotate-left |
| `rtl/mux2.sv` | 2-to-1 multiplexer |
| `rtl/multifunctional_shifter_fpga.sv` | top: switches → two rotators → mux → LEDs |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the design with a reference model. The reference
works bit by bit (`y[i] = a[(i+n) mod W]` for a right rotation) and shares
none of the staged structure. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs and counts
it as a failure.

- `tb_barrel_shifter_right`, `tb_barrel_shifter_left`: check all 256 words ×
  8 amounts at 8 bits and every input at 5 bits. At 16 bits they check random
  words with every amount. A single set bit must land in the right place.
- `tb_mux2`: checks corner patterns and random data on both inputs, with both
  select values, at widths 8 and 3.
- `tb_multifunctional_shifter_fpga`: tests the top at its default sizes. It
  first replays the board test sequence of the table above, one vector every
  50 ns, against values written out by hand. Then it sweeps all 256
  combinations of switches, buttons and direction. It counts left rotations,
  right rotations, zero amounts, use of each of the three stages, and
  wrap-around (a lit switch bit crossing the end of the word). It fails if any
  of these never happens.

Each testbench was also run against a deliberately broken copy of its
module, and each of those runs failed. The broken copies were: a skipped
stage, a stage with the wrong rotation distance, a wrong multiplexer output,
and upper word bits that were not zero.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_multifunctional_shifter_fpga \
    rtl/barrel_pkg.sv tb/tb_multifunctional_shifter_fpga.sv
./obj_dir/Vtb_multifunctional_shifter_fpga
```

To run another testbench, replace the testbench name in both places.
