# Tolerance comparator: checking redundant units without a subtractor

Redundant units that compute the same value at the same time rarely agree
bit for bit. They are not clocked in step, and their analog parts drift. A
plain bit-by-bit compare of their outputs is too strict. It can even report
a large mismatch for values one unit apart, because a single carry flips
many bits: `0111` and `1000` differ in all four bits but only by 1.

A **tolerance comparator** reports a discrepancy ("non-compare") only when
the two values differ by more than one unit. It needs no subtraction. It
uses a simple property of binary counting instead, which takes a few gates
per bit.

This RTL holds the comparator in two forms:

* `parallel_tolerance_comparator`: combinational, for two words presented
  side by side (four bits by default, any width by parameter);
* `serial_tolerance_comparator`: for two words arriving bit by bit, high-order
  bit first, on two synchronous serial lines, of any length.

`tolerance_compare_top` places both side by side. It also holds two
optional shift registers (`word_shift_register`) that gather the serial
words.

Result encoding (package `tolcmp_pkg`, enum `cmp_result_e`):
`0 = COMPARE` (within tolerance), `1 = NON_COMPARE`.

## The MARK property

Add one to a binary number. Every trailing 1 becomes 0, the lowest 0 becomes
1, and every bit above stays as it was. So if two words `A > B` differ by
exactly one:

* they agree in every bit above the highest bit where they differ (the
  **MARK** position);
* `A` has a 1 at MARK and **zeros** in every lower bit;
* `B` has a 0 at MARK and **ones** in every lower bit.

Conversely, any pair shaped like this differs by exactly one. The comparator
therefore checks:

1. Find MARK, the highest bit where the words disagree. The word with the 1
   there is the larger. If there is no MARK, the words are equal and
   compare.
2. Below MARK, the larger word must be all 0 and the smaller word all 1.
   Any other bit below MARK means non-compare. If MARK is the lowest bit,
   there is nothing below it, and the words are one apart.

Example: `1000` vs `0110`. MARK is bit 3, and `1000` is larger. Below MARK,
the larger word is `000`, which is fine. The smaller word is `110`, and its
bit 0 is 0. Result: non-compare (difference 2).

## Parallel comparator

`parallel_tolerance_comparator #(WIDTH, IGNORE_LSBS)` builds the check from
AND, OR and inverter gates, one column per bit:

| Stage | Per bit `i` (`i >= 1`) | Meaning |
|---|---|---|
| XOR | `dis[i] = a[i] ^ b[i]` | bits disagree |
| MARK AND (one per word) | `mark1[i] = dis[i] & (no dis above i) & a[i]` | MARK is at `i` and word 1 is larger |
| OR chain (one per word) | `viol1[i] = viol1[i-1] \| a[i] \| ~dis[i]` | assuming word 1 is larger, something at or below `i` breaks the pattern |
| final AND (one per word) | `fire1[i] = mark1[i] & viol1[i-1]` | word 1 is larger and the bits below MARK are wrong |
| output OR | `non_compare = OR of all fire` | |

Bit 0 needs no XOR, because a difference only in the lowest bit is always
within tolerance. Its OR gate is `viol1[0] = a[0] | ~b[0]`: either the
would-be-larger word has a 1 there or the other word has a 0. The word 2
gates are the mirror image. At most one MARK AND can be 1, which an
immediate assertion checks. So at most one final AND can fire, and the
output OR only gathers them.

Why the OR chain has these three terms: below MARK, assuming word 1 is
larger, a bit is wrong if word 1 has a 1 there. It is also wrong if both
bits are equal. Equal bits are either both 1 (word 1 wrong) or both 0
(word 2 wrong). The only acceptable pair is `a=0, b=1`, the one case where
all three terms are 0.

The four-bit circuit has 3 XORs, 6 MARK ANDs, 6 OR gates, 6 final ANDs, the
output gate and the inverters. `WIDTH = 4` gives exactly that structure; other
widths repeat the column.

### Wider tolerance

`IGNORE_LSBS = k` compares only the top `WIDTH-k` bits. The comparator then
reports non-compare only when the words differ by **more than `2**k`**
units (2, 4, 8, ... for k = 1, 2, 3). This is a one-sided guarantee. A
difference a little above `2**k` can still read as "compare" when it does
not cross a boundary of the ignored bits. Exactly, the result is
non-compare iff `|(a >> k) - (b >> k)| > 1`. The default is `k = 0`.

## Serial comparator

When the words come in on two serial lines, high-order bit first, the check
becomes a small state machine. MARK is simply the first bit pair that
disagrees.

```
 word1_bit ─┬──────────── XOR ──── dis
 word2_bit ─┘
 set1 = dis & word1_bit & neither latch set    -> MARK latch 1 (word 1 larger)
 set2 = dis & word2_bit & neither latch set    -> MARK latch 2 (word 2 larger)

 or_out =  (latch1 & word1_bit)           larger word has a 1
         | (latch2 & word2_bit)           larger word has a 1
         | ((latch1 | latch2) & ~dis)     bits agree: smaller word has a 0
 or_out -> modulo 2 counter -> carry sets the sticky discompare flag
```

**Why a modulo 2 counter.** The latch that is set at the MARK bit already
shows as set in that same bit, as a transparent latch would. The larger
word has a 1 at MARK, so the "larger word has a 1" term always fires once
there. That pulse is correct behaviour, not an error, and the counter
swallows it. The counter is a single toggle flip-flop. Its carry (a pulse
arriving while the count is 1) marks the second pulse and every second
one after it. The carry sets a sticky flag, and the flag becomes the
result at the end of the word. Equal words never set a latch and give no
pulse. Words one apart give exactly the one MARK pulse. Every other pair
gives at least two.

Only one latch can be set per word. Each set gate is blocked once either
latch is set, so later disagreements (which are expected below MARK) do not
set the other latch. A concurrent assertion checks that the two latches
are never set together.

### Framing and timing

| Signal | Direction | Meaning |
|---|---|---|
| `bit_valid` | in | `word1_bit`/`word2_bit` carry a bit pair this clock |
| `word_first` | in | this is the high-order bit (clears latches, counter, flag) |
| `word_last` | in | this is the low-order bit |
| `result_valid` | out | 1-clock pulse, the clock after the `word_last` bit |
| `non_compare` | out | result, held until the next `result_valid` |
| `word1_larger` / `word2_larger` | out | stored MARK latches |

`word_first` and `word_last` may both be set for a one-bit word. Idle
clocks (`bit_valid = 0`) may appear anywhere, and a new word may start the
clock after the last bit of the previous one. Throughput is one bit pair
per clock. The source only asks for two words of any length sent in step
on two lines. The strobes, the one-clock latency and the sticky flag are
this implementation's own.

### Shift registers

`word_shift_register #(WIDTH=4)` gathers the last `WIDTH` bits of a serial
line into a parallel word. Bits enter at bit 0 and move up, so after a
`WIDTH`-bit word the register holds it in order. The comparator does not
need these registers. They are there for logic that uses the compared
words afterwards. In the top, both shift on every valid bit.

## Top level

`tolerance_compare_top #(WIDTH=4, IGNORE_LSBS=0, SR_WIDTH=4)`

* `p_word1`, `p_word2` -> `p_non_compare`: the parallel comparator
  (combinational);
* `clk`, `rst_n`, `s_bit_valid`, `s_word_first`, `s_word_last`,
  `s_word1_bit`, `s_word2_bit` -> `s_result_valid`, `s_non_compare`,
  `s_word1_larger`, `s_word2_larger`, `s_word1`, `s_word2`: the serial
  comparator and its two shift registers.

The two halves share nothing. They are two uses of the same rule: one for
parallel buses and one for serial links. `rst_n` is asynchronous and active
low. It clears the latches, the counter, the result and the shift registers.

## What follows the source circuits and what is added

Follows the source circuits:
* the MARK rule, the four-bit gate structure and its output encoding;
* the wider-tolerance rule (compare only the high-order bits);
* the serial structure: XOR, two MARK latches, three ANDs into an OR, and
  a modulo 2 counter that hides the first OR pulse; the optional shift
  registers.

This implementation's own choices:
* generalising the parallel network to any `WIDTH`;
* in the parallel circuit, which gate of each printed pair serves word 1 and
  which serves word 2 (function is unaffected);
* serial latches built as flip-flops, transparent in the bit that sets
  them, and the inhibit that allows only one latch per word;
* the inside of the modulo 2 counter (toggle flip-flop with carry);
* serial framing strobes, the result register, the one-clock latency and
  reset behaviour;
* shift register length 4 (the source gives none).

## Verification

Every testbench is self-checking. It computes the expected result
arithmetically (`|w1 - w2| > 1`, or the shifted form for wider tolerance)
and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_parallel_tolerance_comparator` | all 256 four-bit pairs (210 must be non-compare), all 65536 eight-bit pairs, all six-bit pairs with `IGNORE_LSBS` 1 and 2, and the `> 2**k` guarantee |
| `tb_mod2_counter` | random pulse/clear sequences against a reference count |
| `tb_serial_tolerance_comparator` | 3000 random word pairs of 1-40 bits (equal, ±1, +2, random) with idle gaps; result timing, larger-word latches |
| `tb_word_shift_register` | random shifting with gaps, widths 4 and 1 |
| `tb_tolerance_compare_top` | full design at default sizes. All 256 pairs through both comparators, which must agree; 600 random serial words of 1-24 bits; shift register contents. It counts every situation: MARK at each bit for each word, equal words, all-bits-flipped-but-close, counter swallow and carry, idle clocks, back-to-back words. One that never occurs fails the test. |

## Simulating

With Verilator 5 (two-state, so all state is reset), from the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/tolcmp_pkg.sv rtl/*.sv \
    tb/tb_tolerance_compare_top.sv --top-module tb_tolerance_compare_top
./obj_dir/Vtb_tolerance_compare_top
```

Replace the testbench name to run another one. Each testbench has a
watchdog that counts a failure and stops the run if it hangs.

## Files

* `rtl/tolcmp_pkg.sv`: result enum
* `rtl/parallel_tolerance_comparator.sv`: parallel comparator
* `rtl/serial_tolerance_comparator.sv`: serial comparator
* `rtl/mod2_counter.sv`: modulo 2 counter used by the serial comparator
* `rtl/word_shift_register.sv`: serial-to-parallel word register
* `rtl/tolerance_compare_top.sv`: top level
* `tb/tb_*.sv`: one self-checking testbench per module
