# Quaternary memory-based magnitude comparator

This RTL describes a 4-bit magnitude comparator whose core works in quaternary
(four-level) logic rather than in binary gates. Each quaternary signal is one wire
that carries one of four levels. It therefore stands for two binary bits, so the two
4-bit words become two 2-digit words. The core does no logic-gate arithmetic. It is
built from *driver-array circuits*: small 4x4 look-up structures in which two input
digits pick a row and a column, and the output is a level that is hard-wired into the
selected cell. Three such circuits compare two 2-digit words. A converter at the
output turns the four-level result back into the three binary flags L (A < B),
E (A = B) and G (A > B), so the comparator can replace a binary one inside an
otherwise binary embedded system.

The RTL is purely combinational: there is no clock, no reset and no state.

## Quaternary signals in this RTL

A synthesizable model cannot carry analog levels, so every quaternary wire is a
two-bit code `quat_t` (in `quat_pkg`) holding the digit value of its level:

| level | code | as a data digit | as a comparator status |
|-------|------|-----------------|------------------------|
| 0     | 00   | 0               | error / don't care     |
| 1     | 01   | 1               | L, A < B               |
| 2     | 10   | 2               | E, A = B               |
| 3     | 11   | 3               | G, A > B               |

The comparator's result is a single quaternary wire. Three of its levels are the
three outcomes, and level 0 is never produced for valid inputs. The code of a level is
the same as the binary pair it stands for. As a result, the binary-to-quaternary
conversion at the input is a plain wire in this model (see *Departures* below).

## The driver-array circuit

`quat_processor` is the one building block that the whole comparator repeats. It has
three parts:

* **Two drivers (`quat_driver`).** Each driver decodes one input digit into four
  select lines `sel[k]` (high when the input is at level k) and their complements
  `sel_n[k]`. The first driver's lines pick a row of the array; the second driver's
  lines pick a column.
* **The array (`quat_array`).** It holds sixteen cells, each tied to a fixed level,
  and selects in two stages. The row selects put the four cells of one row onto the
  intermediate lines `lines[0..3]`. The column selects then pass one of those lines
  to the output `q`. A cell passes only when its select line is high *and* its
  complement is low, which models the complementary pass gates of the CMOS array. A
  line that no gate drives reads as level 0. A broken select therefore shows up as
  the error status, not as a plausible wrong answer.
* **The cell map.** It is the parameter `CELLS`, of type `cell_map_t`, indexed
  `[row][column]`. Any two-input quaternary truth table can be loaded through it. The
  testbench loads a digit-wise AND (1 AND 3 = 1) to show this.

So `q = CELLS[a][b]`: one driver stage plus one array stage.

## Comparing one digit

The default map, `CMP_CELLS`, compares one digit pair. Row = a_i, column = b_i. The
map is printed with row 0 at the bottom, as the arrays are usually drawn:

```
row 3:  3 3 3 2
row 2:  3 3 2 1
row 1:  3 2 1 1
row 0:  2 1 1 1
        c0 c1 c2 c3
```

## Cascading digits

`quat_comparator` compares the digits of the two words in parallel, one driver-array
per digit, and then merges the results with a second map, `CASCADE_CELLS`. In this map
the row is the status of the less significant part and the column is the status of
the next more significant digit:

```
row 3:  0 1 3 3
row 2:  0 1 2 3
row 1:  0 1 1 3
row 0:  0 0 0 0
        c0 c1 c2 c3
```

If the upper digit says L or G, that decides the result. If it says E, the lower
status passes through. A 0 on either side gives 0. With `DIGITS = 2` this makes three
driver-arrays in total (six drivers and three arrays). The two digit comparators work
side by side and the cascade array follows them, so the input-to-status path is two
driver-array stages for every input pair. Both per-digit statuses are visible on
`digit_leg`.

The 2-digit arrangement is the reference design. For `DIGITS > 2` this RTL adds one
digit comparator and one cascade array per extra digit, in a chain. The chain is this
implementation's own extension. It is tested exhaustively at 3 digits.

## The hybrid binary interface

`hybrid_comparator` is the top. It takes binary words `a` and `b` of `2*DIGITS` bits
(4 bits by default). Bit pair `{a[2i+1], a[2i]}` is quaternary digit i. The top feeds
the quaternary comparator and converts its status with `qb_converter` into the
one-hot binary flags `l`, `e`, `g`. The quaternary status is also brought out as
`leg_q`, for use by a system that stays in quaternary. A deferred assertion checks
that exactly one of `l`, `e`, `g` is high.

| port    | dir | width      | meaning                             |
|---------|-----|------------|-------------------------------------|
| `a`     | in  | 2*DIGITS   | binary word A                       |
| `b`     | in  | 2*DIGITS   | binary word B                       |
| `l`     | out | 1          | A < B                               |
| `e`     | out | 1          | A = B                               |
| `g`     | out | 1          | A > B                               |
| `leg_q` | out | 2 (`quat_t`) | quaternary status: 1 L, 2 E, 3 G |

Reference figures for the circuit as a silicon design (a 65 nm estimate at about
1 ns per stage) were about 6 ns and 14.7 uW with the converters, and 4 ns and
11.6 uW without them. This RTL models none of these delays or powers. It models only
the logic function and the stage structure.

## Departures and limits

What follows the reference design:
* the decode-then-select driver-array structure;
* the row/column convention;
* both cell maps;
* the three-array arrangement for two digits;
* the status level encoding;
* the binary-in, binary-out hybrid arrangement.

Choices of this RTL:
* **Levels as digit codes.** The reference levels V0..V3 that the cells are tied to
  are analog. Here they are the constants 0..3.
* **No binary-to-quaternary converters.** Converting a binary pair to a level is only
  level generation. In the digit-code model it is a wire, so the two input converters
  of the reference design have no module.
* **Simplest internals.** The driver is a plain decoder and the output converter is a
  plain decoder. The original internals (sense amplifiers and pass structures) and the
  converter circuits are not specified in enough detail to model.
* **Floating lines read as level 0.** A line that nothing drives reads as 0; the
  error level (0) leaves `l`, `e`, `g` all low.
* **Words longer than two digits.** They use the chained cascade described above.

Not included:
* the analog-to-binary and analog-to-quaternary front ends, which are only named;
* the binary gate-level comparators (AND/OR/NOT, NAND-only, and a commercial 4-bit
  part), which serve only as baselines for comparison;
* the cascadable one-digit cell with an incoming L/E/G status, which was only
  suggested as an alternative.

## Files

| file | content |
|------|---------|
| `rtl/quat_pkg.sv` | `quat_t`, `leg_t`, `cell_map_t`, `CMP_CELLS`, `CASCADE_CELLS` |
| `rtl/quat_driver.sv` | input driver: digit to one-hot select lines and complements |
| `rtl/quat_array.sv` | 4x4 cell array with two-stage row/column selection |
| `rtl/quat_processor.sv` | driver-array circuit: two drivers and one array |
| `rtl/quat_comparator.sv` | quaternary word comparator (digit arrays and cascade) |
| `rtl/qb_converter.sv` | quaternary status to binary L/E/G |
| `rtl/hybrid_comparator.sv` | top: binary words in, binary flags and quaternary status out |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each
one also has a watchdog that fails the run if it hangs. To run one, for example the
end-to-end test of the top:

```
verilator --binary --timing --assert -Irtl rtl/quat_pkg.sv tb/tb_hybrid_comparator.sv \
          --top-module tb_hybrid_comparator -Mdir obj_tb
./obj_tb/Vtb_hybrid_comparator
```

What each testbench covers:
* `tb_hybrid_comparator` runs the top at its default size on all 256 pairs of 4-bit
  words. It checks `l`, `e`, `g` and `leg_q` against integer comparison. It also
  counts each path: each of the three outcomes, results decided by the upper digit
  and results passed on from the lower digit.
* `tb_quat_comparator` is exhaustive at 2 and 3 digits.
* `tb_quat_array` also checks unselected rows and columns and broken complementary
  selects.

To implement a different two-input quaternary function, give `quat_processor` or
`quat_array` a new `CELLS` map. To compare longer words, set `DIGITS` on
`hybrid_comparator` or `quat_comparator`.
