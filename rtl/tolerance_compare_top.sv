// Tolerance compare: both organisations side by side.
//
// Redundant units that run at the same time seldom give bit-identical
// outputs, because they are not in step and their analog parts vary.
// Comparing their outputs bit by bit then flags mismatches that are
// numerically tiny, since one carry can flip many bits (0111 vs 1000).
// A tolerance comparator flags a discrepancy only when the two values
// differ by more than one unit. It needs no subtractor; it checks the
// MARK property of binary counting instead (see
// parallel_tolerance_comparator).
//
// This top holds the two forms of the comparator. Each has its own ports,
// since they serve different systems:
//   * p_*: the parallel comparator for WIDTH-bit words (default four bits,
//     one-unit tolerance), purely combinational;
//   * s_*: the serial comparator for two synchronous serial lines, high-
//     order bit first, together with the two optional shift registers
//     that gather the last SR_WIDTH bits of each line.
// Timing: p_non_compare is combinational. s_result_valid pulses, with
// s_non_compare, one clock after the bit marked s_word_last. s_word1 and
// s_word2 are registered and update on every valid bit.
module tolerance_compare_top
  import tolcmp_pkg::*;
#(
  parameter int unsigned WIDTH       = 4,  // parallel word length
  parameter int unsigned IGNORE_LSBS = 0,  // parallel: low bits left out
  parameter int unsigned SR_WIDTH    = 4   // serial: shift register length
) (
  // parallel comparator
  input  logic [WIDTH-1:0]    p_word1,
  input  logic [WIDTH-1:0]    p_word2,
  output cmp_result_e         p_non_compare,
  // serial comparator
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_bit_valid,
  input  logic                s_word_first,
  input  logic                s_word_last,
  input  logic                s_word1_bit,
  input  logic                s_word2_bit,
  output logic                s_result_valid,
  output cmp_result_e         s_non_compare,
  output logic                s_word1_larger,
  output logic                s_word2_larger,
  output logic [SR_WIDTH-1:0] s_word1,
  output logic [SR_WIDTH-1:0] s_word2
);

  parallel_tolerance_comparator #(
    .WIDTH       (WIDTH),
    .IGNORE_LSBS (IGNORE_LSBS)
  ) u_parallel (
    .word1       (p_word1),
    .word2       (p_word2),
    .non_compare (p_non_compare)
  );

  serial_tolerance_comparator u_serial (
    .clk          (clk),
    .rst_n        (rst_n),
    .bit_valid    (s_bit_valid),
    .word_first   (s_word_first),
    .word_last    (s_word_last),
    .word1_bit    (s_word1_bit),
    .word2_bit    (s_word2_bit),
    .result_valid (s_result_valid),
    .non_compare  (s_non_compare),
    .word1_larger (s_word1_larger),
    .word2_larger (s_word2_larger)
  );

  word_shift_register #(.WIDTH(SR_WIDTH)) u_sr_word1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (s_bit_valid),
    .serial_in (s_word1_bit),
    .word      (s_word1)
  );

  word_shift_register #(.WIDTH(SR_WIDTH)) u_sr_word2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (s_bit_valid),
    .serial_in (s_word2_bit),
    .word      (s_word2)
  );

endmodule
