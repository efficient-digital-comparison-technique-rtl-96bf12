// Parallel tolerance comparator (purely combinational).
//
// Reports NON_COMPARE when two WIDTH-bit words differ by more than one unit
// of the lowest compared bit, COMPARE otherwise. It does no arithmetic. It
// uses a property of binary counting instead. Two words that differ by
// exactly one unit share every bit above the highest bit where they
// disagree (the MARK position). Below MARK the larger word is all zeros
// and the smaller word is all ones.
//
// The gate network follows the four-bit AND/OR/INVERT comparator and
// generalises it to any width:
//   * one XOR per compared bit except the lowest (the lowest bit never
//     needs comparing);
//   * per bit and per word, an AND that fires when that bit is the MARK
//     position and that word is the larger one: XOR is 1, all higher XORs
//     are 0, and the word's own bit is 1;
//   * per bit and per word, an OR chain that flags a violation at or below
//     that bit, assuming that word is the larger. It is 1 if a lower OR is
//     1, if the word's own bit is 1, or if the two bits agree. The lowest
//     bit has no XOR, so its OR takes the word's own bit and the inverted
//     bit of the other word;
//   * per bit and per word, an AND of the MARK gate with the OR chain of
//     the bits below. The final OR of those ANDs is the result.
// At most one MARK gate can be 1, so at most one final AND can fire.
//
// Wider tolerance: with IGNORE_LSBS = k only the top WIDTH-k bits are
// compared. Then NON_COMPARE is reported only when the words differ by more
// than 2**k units. These are the compare-fewer-bits rule and its tolerances.
// IGNORE_LSBS = 0 gives the one-unit comparator of the four-bit circuit.
//
// Interface: word1, word2 (bit WIDTH-1 is the high-order bit); non_compare.
// Timing: no clock; the result is valid one gate-network delay after the
// inputs settle.
module parallel_tolerance_comparator
  import tolcmp_pkg::*;
#(
  parameter int unsigned WIDTH       = 4,  // word length of the four-bit circuit
  parameter int unsigned IGNORE_LSBS = 0   // low-order bits left out of the compare
) (
  input  logic [WIDTH-1:0] word1,
  input  logic [WIDTH-1:0] word2,
  output cmp_result_e      non_compare
);

  localparam int unsigned C = WIDTH - IGNORE_LSBS;  // compared bits

  if (WIDTH < 1 || IGNORE_LSBS >= WIDTH) begin : g_bad_params
    $error("parallel_tolerance_comparator: need 1 <= WIDTH and IGNORE_LSBS < WIDTH");
  end

  logic [C-1:0] a, b;         // compared slices of word 1 and word 2
  logic [C-1:0] dis;          // bit discompare (XOR); bit 0 unused
  logic [C-1:0] agree_above;  // every higher compared bit agrees
  logic [C-1:0] mark1, mark2; // MARK at this bit, word 1 / word 2 larger
  logic [C-1:0] viol1, viol2; // OR chains: violation at or below this bit
  logic [C-1:0] fire1, fire2; // final ANDs

  assign a = word1[WIDTH-1:IGNORE_LSBS];
  assign b = word2[WIDTH-1:IGNORE_LSBS];

  // Lowest compared bit: no XOR; its OR gates look at the bit values alone.
  assign dis[0]   = 1'b0;
  assign mark1[0] = 1'b0;
  assign mark2[0] = 1'b0;
  assign fire1[0] = 1'b0;
  assign fire2[0] = 1'b0;
  assign viol1[0] = a[0] | ~b[0];
  assign viol2[0] = b[0] | ~a[0];

  assign agree_above[C-1] = 1'b1;

  for (genvar i = 1; i < C; i++) begin : g_bit
    assign dis[i]           = a[i] ^ b[i];
    assign agree_above[i-1] = agree_above[i] & ~dis[i];
    assign mark1[i]         = dis[i] & agree_above[i] & a[i];
    assign mark2[i]         = dis[i] & agree_above[i] & b[i];
    assign viol1[i]         = viol1[i-1] | a[i] | ~dis[i];
    assign viol2[i]         = viol2[i-1] | b[i] | ~dis[i];
    assign fire1[i]         = mark1[i] & viol1[i-1];
    assign fire2[i]         = mark2[i] & viol2[i-1];
  end

  assign non_compare = cmp_result_e'(|{fire1, fire2});

  // Only one MARK gate may be active (one-hot or none).
  always_comb begin
    assert ($countones({mark1, mark2}) <= 1)
      else $error("more than one MARK gate active");
  end

endmodule
