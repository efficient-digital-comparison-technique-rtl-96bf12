// Bit-serial tolerance comparator.
//
// Compares two words of any length that arrive together on two serial
// lines, high-order bit first, one bit pair per clock. It reports
// NON_COMPARE when the words differ by more than one unit of their last
// bit. The rule is the same as in the parallel comparator. The first bit
// where the words disagree is the MARK position. The larger word must then
// be all zeros below MARK, and the smaller word all ones.
//
// Structure, after the two-latch serial circuit:
//   * an XOR compares the current bit pair;
//   * two MARK latches, one per word. At the first discompare an AND gate
//     sets the latch of the word that has the 1, which is the larger word.
//     Each latch is set only while neither latch is set, so just one is set
//     per word pair;
//   * three ANDs feed a final OR. One fires when word 1's latch is set and
//     word 1 has a 1 bit. One fires when word 2's latch is set and word 2
//     has a 1 bit. The middle one fires when either latch is set and the
//     XOR gives 0, meaning the smaller word has a 0 bit;
//   * a modulo 2 counter (mod2_counter) counts the OR pulses. The MARK bit
//     always gives exactly one pulse, because the latch setting in that bit
//     meets the larger word's 1. The counter swallows that pulse, and any
//     further pulse is reported as a discompare.
//
// This design's choices, where the description is silent: the latches
// are flip-flops and are "transparent" in the bit that sets them (the
// set condition is ORed with the stored state). That timing is what makes
// the MARK bit give the pulse the counter swallows. A discompare is kept
// in a sticky flag until the end of the word. Words are framed by
// word_first/word_last strobes that clear the latches, the counter and the
// flag.
//
// Interface: bit_valid qualifies word1_bit/word2_bit; word_first marks the
// high-order bit and word_last the low-order bit (both may be set together
// for a one-bit word). Timing: one bit pair per clock; result_valid pulses
// for one clock, the clock after the last bit is accepted, with
// non_compare. non_compare then holds until the next result.
// word1_larger/word2_larger show the stored MARK latches.
module serial_tolerance_comparator
  import tolcmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,        // asynchronous, active low
  input  logic        bit_valid,
  input  logic        word_first,
  input  logic        word_last,
  input  logic        word1_bit,
  input  logic        word2_bit,
  output logic        result_valid,
  output cmp_result_e non_compare,
  output logic        word1_larger,
  output logic        word2_larger
);

  logic latch1_q, latch2_q;     // stored MARK latches
  logic latch1, latch2;         // latch outputs seen in this bit time
  logic hold1, hold2;           // stored state, cleared at a word start
  logic dis;                    // XOR of the bit pair
  logic set1, set2;             // latch set gates
  logic and1, and2, and_mid;    // the three ANDs before the final OR
  logic or_out;                 // final OR, into the modulo 2 counter
  logic start;                  // first bit of a word this clock
  logic cnt_count, cnt_carry;
  logic flag_q, flag;           // sticky discompare of the current word

  assign start = bit_valid & word_first;
  assign hold1 = latch1_q & ~start;
  assign hold2 = latch2_q & ~start;

  assign dis  = word1_bit ^ word2_bit;
  assign set1 = bit_valid & dis & word1_bit & ~hold1 & ~hold2;
  assign set2 = bit_valid & dis & word2_bit & ~hold1 & ~hold2;

  assign latch1 = hold1 | set1;
  assign latch2 = hold2 | set2;

  assign and1    = latch1 & word1_bit;
  assign and2    = latch2 & word2_bit;
  assign and_mid = (latch1 | latch2) & ~dis;
  assign or_out  = bit_valid & (and1 | and2 | and_mid);

  mod2_counter u_mod2 (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start),
    .inc   (or_out),
    .count (cnt_count),
    .carry (cnt_carry)
  );

  assign flag = (flag_q & ~start) | cnt_carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch1_q     <= 1'b0;
      latch2_q     <= 1'b0;
      flag_q       <= 1'b0;
      result_valid <= 1'b0;
      non_compare  <= COMPARE;
    end else begin
      result_valid <= bit_valid & word_last;
      if (bit_valid) begin
        latch1_q <= latch1;
        latch2_q <= latch2;
        flag_q   <= flag;
        if (word_last) non_compare <= cmp_result_e'(flag);
      end
    end
  end

  assign word1_larger = latch1_q;
  assign word2_larger = latch2_q;

  // The two MARK latches exclude each other.
  a_one_latch: assert property (@(posedge clk) disable iff (!rst_n)
    !(latch1_q && latch2_q))
    else $error("both MARK latches set");

  // Frame strobes only come with a valid bit.
  a_framing: assert property (@(posedge clk) disable iff (!rst_n)
    (word_first || word_last) |-> bit_valid)
    else $error("word_first/word_last without bit_valid");

endmodule
