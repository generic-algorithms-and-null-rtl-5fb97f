# Quad-rail NULL Convention Logic multiplier and multiply-accumulate unit

Delay-insensitive asynchronous circuits need no clock. Each signal carries its own validity, and
each stage waits until its whole input is valid before it answers. NULL Convention Logic (NCL) does
this with 1-of-n codes. Most NCL arithmetic uses *dual-rail* signals: two wires per bit. A *quad-rail*
signal also spends two wires per bit, but it encodes a base-4 digit: four wires, at most one of them
high. Each digit transition therefore switches one wire instead of two.

This library builds multiplication directly on base-4 digits, in two designs:

* **an unsigned multiply-and-accumulate unit** (MAC): `acc <= acc + y * x`, with an overflow flag;
* **a 2's complement multiplier** (`p = y * x`), built on a quad-rail form of the modified
  Baugh-Wooley algorithm.

Both designs are generic in their operand widths. Both are arrays: partial-product generators,
carry-save levels of multi-operand digit adders, and a ripple-carry adder at the bottom. The top
level, `ncl_quad_arith_top`, places a 24+8x8 MAC and an 8x8 signed multiplier side by side.
"24+8x8" means a 24-bit accumulator and 8-bit by 8-bit operands.

## Signals and the DATA/NULL cycle

| type   | wires | legal states                                      |
|--------|-------|---------------------------------------------------|
| `qr_t` | 4     | NULL (0000), DATA0..DATA3 (rail k high = value k) |
| `tr_t` | 3     | NULL, values 0..2 (carries of multi-operand adds) |
| `dr_t` | 2     | NULL, two values (usually 0/1)                    |

All of these are defined in `ncl_pkg`. Some dual-rail signals in the signed multiplier stand for other
value pairs: 0/2 in `lslrpp` and `q3d02add`, 2/3 in `mslrpp` and `q2dd23add`. Every module that uses
such a signal says which pair.

A stage always sees a full DATA wavefront, then a full NULL wavefront, and so on. Registers
(`ncl_reg`) pass a wavefront only when the next stage asks for it:

* **Ki/Ko = 1** means *request for data* (rfd).
* **Ki/Ko = 0** means *request for NULL* (rfn).

A register is one TH22 C-element per rail, gated by Ki. Its Ko is the NOR of its output rails. A stage
of many registers merges their Ko lines in a tree of TH44 gates (`ncl_completion`).

The combinational blocks are *input-complete*. Some outputs may go DATA early, but not all of them can
before every input is DATA. The same holds in the other direction for NULL. The testbenches check this
by holding back one input digit.

## How the model is timed

The threshold gates are state-holding. A gate sets when its threshold function holds, clears only once
all of its inputs are 0, and holds in between. That hysteresis is what makes NCL work.

Simulating real asynchronous gates would need combinational loops. Instead, **every gate here is a
flip-flop on a common `clk`**, updated at each edge with the set/clear/hold rule. So:

* one `clk` cycle is one gate delay;
* `rst` (synchronous, active high) puts every gate at its reset value;
* the handshake still runs exactly as in the asynchronous circuit, because no block relies on the clock
  for correctness, only for time to pass.

Latencies below are in gate delays (cycles). This model is this library's choice. The source design is
clockless; a real implementation maps each `ncl_gate` onto an NCL threshold-gate cell.

## Building blocks

* **`ncl_gate`**: any of the 27 fundamental NCL gates (TH12 … TH54W322, THxor0, THand0, TH24comp),
  with hysteresis. The gate is chosen by the `gate_e` parameter.
* **`ncl_reg`, `ncl_completion`**: the register and completion tree described above. `ncl_reg` can
  reset to DATA0, which the MAC's feedback path needs.
* **`q33mul`**: multiplies two quad-rail digits into a PPL (low digit, quad-rail) and a PPH (high
  digit, three-rail, since 3·3 = 9 = 2·4 + 1). It is the thesis's threshold-gate circuit, gate by gate.
  * PPH is ready after 1 gate delay and may assert before both inputs are DATA, which the weak
    conditions allow.
  * PPL is ready after at most 2 gate delays.
* **Digit adders** (`q33add` … `q3332add`, 19 modules). The name lists the operands: Q quad-rail,
  3 three-rail, 2 or D dual-rail. They output a quad-rail sum and a dual- or three-rail carry. Some add
  a constant 1 or 2 (the Baugh-Wooley correction bits). **Their insides are not the thesis's optimised
  gate networks.** Each is the generic input-complete form built by `ncl_dims`:
  * one C-element per complete combination of input rails;
  * one OR per output rail;
  * 2 gate delays for every adder.
  Function and interface match the thesis; gate count and delay do not.
* **Signed partial-product generators** (`ncl_dims` cores, 2 gate delays):

  | module   | digit position                   | what it produces                                                            |
  |----------|----------------------------------|-----------------------------------------------------------------------------|
  | `mspp`   | most significant, upper rows     | y0·x0 + 2·¬(y1·x0) + 2·y0·x1 + 4·¬(y1·x1) (the complemented MSB of a row pair) |
  | `lrpp`   | last row                         | digits whose bits are complemented, except the MSB                          |
  | `mslrpp` | most significant, last row       | PPL = y0x0 + 2·¬(y1x0); PPH = 2 + y1x1                                       |
  | `lslrpp` | least significant, last row      | the carry-like term 2·¬(x1·y0)                                               |

## Unsigned array multiplier (`qr_umul`)

The array has C = M_W/2 multiplicand digits and R = N_W/2 multiplier digits. Row i holds the C `q33mul`
products of digit x_i. Carry-save level i adds four things in column j:

1. its own PPL;
2. the sum from the level above, one column to the left (`s[i-1][j+1]`);
3. the PPH of its own row, one column to the right;
4. the carry from the level above.

That takes a Q3322 adder inside the array, and cheaper cells at the edges:

* column 0: Q332;
* top column: Q322 on level 1, Q322D on level 2, Q3222 below that.

Product digit i is `s[i][0]`. The remaining C digits come from a ripple-carry adder: Q32 in its first
cell, then Q32D, and a final Q2DD (R = 2) or Q22D cell. Its carry out is provably 0. The thesis names
these adder types; **the placement above is this design's own**, derived so that every column sum stays
inside the adders' ranges. Exhaustive and random tests confirm it at several shapes.

Latency of the 8x8 array is at most 18 gate delays from the last input digit.

## Multiply-and-accumulate unit (`qr_mac`, `qr_accumulator`)

```
 y,x --> [input reg] --> qr_umul --> qr_accumulator --> [output reg] --> acc, ov
                                           ^                  |
                                           +-- [fb2] <- [fb1] <+
```

* **The accumulator** is a ripple of digit adders: Q33 at digit 0, Q33D up to the product width, Q3D
  above it. The last carry is the overflow flag `ov` (dual-rail: DATA1 when the sum wrapped past
  2^A_W). The thesis only says that OV asserts when the accumulator exceeds its maximum. Reading it as
  the carry of this addition is an interpretation.
* **Feedback** needs two registers in the loop. NCL needs at least three registers in a ring so that a
  DATA and a NULL wavefront can be in it at once.
  * `fb1` resets to NULL; `fb2` resets to DATA0, so the first result is just `y*x`.
  * fb1's Ki is fb2's Ko; fb2's Ki and the input register's Ki are the output register's Ko.
  * The output register's Ki is a TH22 of the consumer's `ki` and fb1's Ko. The result therefore
    cannot be replaced before fb1 has copied it.
* Latency at 24+8x8: at most 31 gate delays from DATA at the inputs to a complete accumulator value.

## 2's complement multiplier (`qr_smul_array`, `qr_smul`)

Modified Baugh-Wooley, in binary:

* complement the MSB of every partial-product row but the last;
* complement every bit of the last row except its MSB;
* add a 1 at bit positions M_W-1, N_W-1 and M_W+N_W-1 (counted from 0). When M_W = N_W, the first two
  become a single 1 at bit M_W.

In quad-rail, two binary rows form one digit row, so the complemented bits fall in the most significant
digit of each row and across the whole last row. The generators in the table above produce those
digits.

The summation is the unsigned array, with three differences:

* The last carry-save level uses Q332, Q3332 and Q332/Q332D/Q3322 cells, because the last row carries
  extra terms.
* The constant 1s enter the ripple-carry adder through its special cells:
  * Q3D02add (M_W = N_W) or Q3D02Cadd in the first cell;
  * Q32D01add at digit M_W/2 when M_W = N_W;
  * Q32D02add at digit M_W/2-1 when M_W > N_W, whose three-rail carry feeds a Q322 cell;
  * Q2DD23add at the top.
* The carry out of the top digit is dropped: the product is taken modulo 2^(M_W+N_W).

M_W ≥ N_W is required, as in the source. As with the unsigned array, the cell placement is this
design's own.

`qr_smul` wraps the array between an input register and an output register. The input register's Ki is
the output stage's completion. Latency at 8x8: at most 23 gate delays.

## Top level (`ncl_quad_arith_top`)

| port                      | dir | meaning                                                  |
|---------------------------|-----|----------------------------------------------------------|
| `clk`, `rst`              | in  | gate-delay clock, synchronous reset                      |
| `mac_y[3:0][3:0]`         | in  | multiplicand, 4 quad-rail digits, LS digit first         |
| `mac_x[3:0][3:0]`         | in  | multiplier                                               |
| `mac_ko` / `mac_ki`       | out/in | request to producer / from consumer (1 rfd, 0 rfn)    |
| `mac_acc[11:0][3:0]`      | out | accumulator, 12 digits                                   |
| `mac_ov[1:0]`             | out | overflow, dual-rail                                      |
| `mul_y`, `mul_x [3:0][3:0]` | in | signed operands                                         |
| `mul_ko` / `mul_ki`       | out/in | handshake of the multiplier                           |
| `mul_p[7:0][3:0]`         | out | 16-bit signed product                                    |

Parameters are `MAC_A_W=24`, `MAC_M_W=8`, `MAC_N_W=8`, `MUL_M_W=8` and `MUL_N_W=8`.

Driving a unit, one operation:

1. Wait for `ko = 1`, then apply DATA.
2. Wait until every output digit is DATA, then set `ki = 0`.
3. Wait for `ko = 0`, then apply NULL.
4. Wait until the outputs are all NULL, then set `ki = 1`.

The consumer may hold `ki` as long as it likes; the result holds.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`, that compares against integer
arithmetic computed in the testbench:

| what is tested | how |
|---|---|
| the 27 gates | against threshold/weight definitions, cycle by cycle |
| register and completion tree | against a rail-level model |
| every digit adder and generator | exhaustively, with staggered input arrival and exact 2-cycle latency |
| `qr_umul`, `qr_smul_array` | exhaustively at 4x4 and 6x4; randomly at 8x8 and at 12x6 and 8x10 (unsigned) or 12x6 and 10x8 (signed) |
| `qr_mac` | at 12+6x4 (including the worked example 2879 + 43·9 = 3266), 8+4x4, 24+8x8, 22+10x8 and 16+8x8; overflow and consumer stalls must occur |
| `qr_smul` | exhaustively at 6x4 (including 27 × −7 = −189) and 4x4; randomly at 8x8 and 10x8 |
| `tb_ncl_quad_arith_top` | both units at the default sizes, running concurrently |

The top-level testbench counts overflow, accumulation, stalls of both consumers, negative products, and
waiting DATA held off by a consumer that still requests NULL. Each of these must occur at least once.

The source also evaluated a 72+44x24 MAC and a 44x24 multiplier. The RTL accepts those parameters, but
they were not simulated: the simulator build at that size is very long. The largest simulated sizes
are 24+8x8 (MAC) and 12x6 / 10x8 (arrays).

Running one testbench with plain Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/ncl_pkg.sv tb/tb_qr_mac.sv --top-module tb_qr_mac
obj_dir/Vtb_qr_mac +verilator+rand+reset+2
```

Each prints `TB_RESULT checks=N failures=M`.

## Where this departs from the source, and how far to trust it

* **Timing model**: clocked unit-delay gates instead of asynchronous gates (see above). Cycle counts are
  gate-delay counts of this model. They are not the nanosecond timings of the original transistor-level
  simulations.
* **Adder and partial-product-generator insides**: generic input-complete logic instead of optimised
  threshold-gate networks. The functions are exact (tested exhaustively). Gate counts and delays are
  larger than optimised cells would give.
* **Array cell placement** in both multipliers is derived here. The adder types are the source's.
* **Overflow flag**: the carry out of the accumulator's top digit.
* **Carry out of the signed product**: dropped (modulo result).
