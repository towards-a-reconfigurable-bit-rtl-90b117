# VRAM: vector arithmetic inside an SRAM sub-array

A vector unit normally needs a register file with many ports to keep its ALUs
fed. A *vector RAM* (VRAM) removes that file: the vector registers are the rows
of an ordinary 6T SRAM sub-array, and the ALUs sit in the column periphery,
right under the sense amplifiers. Arithmetic is done by reading rows,
combining them in the periphery and writing the result back into another row,
one micro-operation per clock cycle.

The starting point is *bit-line compute*. If two word lines are raised at
once, a column's true bit line stays high only when both cells hold 1 (AND),
and its complement bit line stays high only when both hold 0 (NOR). All other
two-input functions, and an adder, follow from those two values with a little
logic per column.

This RTL implements the two flavours of VRAM described in the publication
"Towards a Reconfigurable Bit-Serial/Bit-Parallel Vector Accelerator Using
In-Situ Processing-In-SRAM" (Al-Hawaj, Afuye, Agwa, Apsel, Batten):

| | BS-VRAM (bit-serial) | BP-VRAM (bit-parallel) |
|---|---|---|
| ALU | 1 bit per column, 256 per sub-array | 32 bits per 32 columns, 8 per sub-array |
| operand layout | transposed: bit *k* of an element in row *base+k*, one element per column | one 32-bit element per 32 columns of one row |
| 32-bit add | 64 cycles, 256 elements | 2 cycles, 8 elements |
| precision | any (set by a loop count) | 32 bits |

The trade-off is latency against throughput. Bit-serial takes more cycles per
operation but runs 32 times as many operations at once. The two flavours share
most of their column logic.

## Structure

```
vram_top
 ├─ g_vram[0]  (bit-serial)                g_vram[1]  (bit-parallel)
 │   ├─ uop_sequencer   micro-program store, loop counters, host pass-through
 │   └─ vram_subarray #(FLAVOR_BS)         vram_subarray #(FLAVOR_BP)
 │        ├─ row_decoder  u_dec_a, u_dec_b   (two word lines per cycle)
 │        ├─ bitcell_array                   128 x 256 cells
 │        ├─ bitline_logic                   latching sense amplifiers
 │        └─ 256 x bscl_column               8 x bpcl_element (32 columns each)
 │              └─ bus_logic                       └─ 32 x bus_logic
```

`vram_pkg` holds the shared types: micro-op fields, micro-program word, start
command and the default geometry (128 rows x 256 columns, 32-bit elements).

The sub-array size, 128 x 256 (4 kB), follows from the published macro size
and throughput figures. The publication states the 4 kB macro. The 256
columns are inferred from its numbers: a 32-bit bit-serial add at 900 MHz
takes 64 cycles, and 3.6 GOPS then means 256 parallel adds.

## Column logic

Every column has a distributed **bus**. One of these drives it per cycle: AND
and NOR straight from the sense amplifiers, their complements NAND and OR,
XNOR (= NAND(NAND, OR)), XOR (its inverse), the adder's sum, or `data_in`.
`bus_logic` implements this and is the same in both flavours. The bus is
what gets written back to the array and what `data_out` shows.

**Bit-serial column (`bscl_column`).** Generate is AND, propagate is XOR.
The carry-in comes from the column's *XRegister*, a single flip-flop. On
each add write-back the flip-flop takes the carry-out, so it carries from
one bit position to the next. The carry is initialised to 0 for add and 1
for subtract. A *mask latch* holds the column's write mask. It is loaded
either from the bus (so a computed value can predicate later writes) or
from `mask_in`. A conventional write loads `mask_in` through it in the same
cycle.

**Bit-parallel element (`bpcl_element`).** This replaces the last three
blocks. The adder is a ripple (Manchester) carry chain across 32 columns,
with `cin` into bit 0; the carry out of bit 31 is dropped. The XRegister
becomes one flip-flop per column. It loads from the bus, from `mask_in`, or
from its more significant neighbour (a logical shift right, 0 into the
MSB). Each column's write mask is chosen by the micro-op's `cond`: its
`mask_in` bit, its own XRegister bit, the element's LSB bit, or its MSB
bit. Multiplication predicates on the LSB while shifting the multiplier
right; comparisons and division predicate on the MSB.

## Micro-operations

One per cycle (`array_uop_t`):

| op | effect |
|---|---|
| `OP_RD r` | sense row r (AND = value, NOR = complement); latched until the next sense |
| `OP_BLC ra, rb` | bit-line compute: sense AND and NOR of rows ra and rb |
| `OP_WR r` | write `data_in` to row r under the write mask (BS: `mask_in` via the latch; BP: per `cond`, normally `COND_IN`) |
| `OP_WB r` + `src` | write the bus source (`SRC_ADD`, `SRC_XOR`, ...) to row r. BS: masked by the mask latch, and an add clocks the carry. BP: masked per `cond`. |
| `OP_WR_MASK` + `src` | load the mask state from the bus (BS latch / BP XRegisters), or from `mask_in` with `SRC_MASK_IN` |
| `srl` flag | BP: shift the XRegisters right; the micro-op in the same cycle sees the old value |
| `init_cin`, `cin` | BS: load every carry flip-flop with `cin`. BP: `cin` is the carry into each element. |

The sense amplifiers hold their values, so one `OP_BLC` can feed several
write-backs or a mask load. For example, `OP_RD t; OP_WB t, SRC_ADD`
writes `2t + cin`, because AND = t and XOR = 0. Bit-parallel programs
use this as a one-bit left shift. Two write-backs of the same sensed
value, one unconditional with carry-in 0 and one MSB-conditioned with
carry-in 1, shift a data-dependent bit in.

## Micro-programs and the controller

Macro-operations are short loops of micro-ops. `uop_sequencer` holds up to 32
words (`uprog_word_t`). Each word carries one array micro-op and, as
*mini-ops* in the same cycle, an optional `set_cin`, an optional `srl` and
an optional jump.

* **Two loop counters.** A `start_cmd_t` sets trip counts `trip0`/`trip1`,
  for example the bit width. `CTL_JND0`/`CTL_JND1` ("jump if not done")
  works like this: if the counter is zero, it is reloaded and execution
  falls through. Otherwise it is decremented and execution jumps to
  `target`. A loop of N trips runs its body N times.
* **Row stepping.** Each row field of a word can be offset by the loop-0
  index `i0`, the loop-1 index `i1`, or `i0 + i1`. That is how a
  bit-serial loop walks through the bit rows of its operands.
* **Shrinking inner loop** (`cmd.tri_inner`). Counter 1 runs `trip0 - i0`
  trips in outer iteration `i0`. A truncated bit-serial multiply needs this:
  partial product *i* only touches result bits *i..N-1*.
* **Start and end.** The start cycle loads the carry from `cmd.cin`. The
  first word issues the next cycle. The program ends when a word with
  `last` falls through; `done` then pulses and `uop_count` holds the cycles
  used. While idle, host micro-ops pass straight to the array, which is how
  data is loaded and read.

While a program runs, `data_in` is the word's `imm` bit on every column and
`mask_in` is all ones. Bit-serial write-backs use the mask latch as left by
the last conventional write or mask load.

Programs used by the testbench (rows: a, b, c, temporary t):

```
BS add  (trip0 = bit width)          BP add
 0: blc  a+i0, b+i0                   0: blc a, b
 1: wb.add c+i0 ; jnd0 -> 0 ; last    1: wb.add c ; last

BS mul  (trip0 = width, tri_inner)   BP mul  (trip0 = 32)
 6: wr_mask.din <(1)                  6: wr c <(0)
 7: wr c+i0 <(0) ; jnd0 -> 7          7: rd a
 8: rd b+i0                           8: wb.and t             t = a
 9: wr_mask.and ; set_cin 0           9: rd b
10: blc c+i0+i1, a+i1                10: wr_mask.and          XRegister = b
11: wb.add c+i0+i1 ; jnd1 -> 10      11: blc c, t
12: jnd0 -> 8 ; last                 12: wb.add c, cond=LSB ; srl
                                     13: rd t
                                     14: wb.add t ; jnd0 -> 11 ; last   t = 2t
```

Multiply-accumulate (`c += a*b`) starts the same programs after the
clearing of `c` (BS word 8, BP word 7). Subtract writes `~b` into `c` with
`wb.nor`, adds `a` with carry-in 1 and needs no temporary row.

## Cycle counts

Measured by the end-to-end testbench. The reference column gives the
published counts.

| macro-op | BS measured | BS reference | BP measured | BP reference |
|---|---|---|---|---|
| add 32b | 64 | 64 | 2 | 2 |
| sub 32b | 128 | 128 | 4 | 4 |
| xor 32b | 64 | 64 | 2 | 2 |
| mul 32b | 1185 | 1185 | 133 | 133 |
| mac 32b | 1152 | 1153 | 132 | 132 |
| and, nand, or, nor, xnor 32b | 64 | 64 | 2 | 2 |
| slt, sgt 32b | 161 | 162 | 13 | 6 |
| sle, sge 32b | 161 | 162 | 14 | 6 |
| seq 32b | 128 | 96 | 12 | 11 |
| udiv 32b | – | 1712 | 773 | 519 |
| rem 32b | – | 1680 | 741 | 390 |
| add 8b | 16 | 16 (17.8 ns at 900 MHz) | – | – |
| mul 8b | 105 | 105 (116.7 ns at 900 MHz) | – | – |
| mul 8b (BP: 8-bit operands) | – | – | 37 | 37 (57.4 ns at 645 MHz) |
| mac 8b | 96 | 97 (from 76.0 GOPS) | 36 | 37 (from 4.5 GOPS) |

The 8-bit mac references come from published chip throughputs. The
formula is lanes x clock / cycles. The bit-serial chip has 32 sub-arrays x
256 columns at 900 MHz; the bit-parallel chip has 32 x 8 elements at
645 MHz. The same formula turns the published 32-bit mac throughput of the
bit-serial chip (6.4 GOPS) into exactly 1152 cycles. The bit-parallel 8-bit
mac keeps 8-bit operands in 32-bit elements and runs 8 multiplier steps.

## Where this RTL departs from, or adds to, the published design

* **Two flavours side by side.** The publication treats a single
  sub-array that switches between bit-serial and bit-parallel as future
  work. `vram_top` therefore holds one sub-array of each, run
  independently.
* **One sub-array.** The 128 kB, 32-sub-array chip is only an area and
  throughput extrapolation in the publication and is not built. How
  sub-arrays would be tied together is not described.
* **Controller.** Only the two loop counters and their semantics are
  published. The following are choices of this design: the program store,
  the word format, the row-offset scheme, the shrinking inner loop, carry
  initialisation in the start cycle, and the host pass-through.
* **Carry init in the start cycle.** This makes bit-serial add 64 cycles as
  published. Bit-serial mac is 1152 cycles against a published 1153; the
  published mac program is not given.
* **Comparisons are this design's own programs.** The publication gives
  cycle counts for the comparisons but not their micro-programs.
  * Bit-serial signed compare inverts the sign bits and keeps only the
    final carry of `X + ~Y (+1)`, using one temporary row. This takes 161
    cycles against a published 162.
  * Bit-serial `seq` clears the result wherever any bit differs, using the
    XOR as a write mask. This takes 96 cycles plus 32 to initialise the
    32-bit 0/1 result.
  * Bit-parallel compares are fully correct for signed overflow. They
    subtract, replace the sign of the difference by the sign of `a` where
    the operand signs differ, then turn the sign into 0/1 with
    MSB-conditioned writes. That takes 13–14 cycles against a published 6.
    The published count presumably uses a shorter sequence that is not
    described.
  * Bit-parallel `seq` tests the MSB of `t | -t` with `t = a ^ b`, using two
    temporary rows. This takes 12 cycles against a published 11.
* **Bit-parallel division is this design's own restoring division.** It
  is described in the header of `tb/tb_vram_divide.sv`. It handles the
  full unsigned range, including divisors above 2^31 and division by zero.
  A partial remainder that has overflowed into a 33rd bit is tracked in
  its own row, and the 32-bit compare is rebuilt from the sum and two
  logic results. Each step therefore takes 24 cycles (23 for rem), which
  gives 773 / 741 cycles against a published 519 / 390. The published
  program is not described.
* **Fixed-point operations are not given programs.** The fixed-point
  format is not published. Fixed-point add and sub are the integer
  programs; mulfx and udivfx would need a scaling that is not described.
* **Not implemented as programs:** bit-serial udiv and rem. Their
  micro-programs are not published. A bit-serial restoring division would
  also need row offsets that count downwards, which this controller does
  not have.
* **Circuit-level details not modelled:**
  * the reconfigurable single-ended/differential sense amplifier;
  * the inverting buffers in the bit-parallel carry chain;
  * the pass-transistor bus.

  Each is reduced to its logic function. The mask latch is a register with a
  transparent bypass, so the design is fully edge-triggered. The SRAM cells
  are a register array with no reset.
* **Shift-in value.** The bit-parallel shift fills the element MSB with 0;
  the value shifted in at an element boundary is not published.
* **Write mask choices.** The bit-parallel mask select offers both "own
  XRegister bit" and "`mask_in` bit". The published description mentions
  each in a different place.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vram_pkg.sv tb/vram_tb_pkg.sv tb/tb_vram_top.sv --top-module tb_vram_top
./obj_dir/Vtb_vram_top
```

| testbench | covers |
|---|---|
| `tb_vram_top` | full size. Both flavours run add, sub, xor, mul, mac at 32 bits, bit-serial add, mul and mac at 8 bits, and bit-parallel mul and mac with 8-bit operands. It checks every result element, the cycle count of each run, and that every mechanism (carry init, both jumps, shrinking loop, masked write-back, shift, LSB-conditioned write, host read/write) occurred. |
| `tb_vram_cmp_logic` | full size. Signed slt/sle/sgt/sge and seq on both flavours, with sign-boundary and equal operands, and all six logic ops on both flavours, each with its cycle count. |
| `tb_vram_divide` | full size. Bit-parallel udiv and rem on random operands, with small, large (above 2^31), equal and zero divisors, each with its cycle count. |
| `tb_vram_subarray` | hand-issued micro-ops on both flavours (add, sub, predicated writes) |
| `tb_uop_sequencer` | micro-op stream of nested loops against an independent model |
| `tb_bscl_column`, `tb_bpcl_element`, `tb_bus_logic`, `tb_bitline_logic`, `tb_bitcell_array`, `tb_row_decoder` | unit tests |

`tb/vram_tb_pkg.sv` has helpers: `uw(...)` builds a micro-program word and
`au(...)` a single micro-op. These are the easiest way to write new
programs.

To change the geometry, override `ROWS`, `COLS` and `EB` on `vram_top`. Row
fields in micro-ops are 7 bits wide (`ROW_W` in `vram_pkg`), so more than
128 rows also needs `ROW_W` raised. `COLS` must be a multiple of `EB`.
