// Self-checking testbench for parallel_tolerance_comparator.
//
// Applies every pair of input words to four instances: the default
// four-bit, one-unit comparator; an eight-bit one; and six-bit ones that
// leave out one and two low-order bits. The expected result is computed
// arithmetically: with k bits left out, NON_COMPARE exactly when
// |(w1 >> k) - (w2 >> k)| > 1. The test also checks the promised
// tolerance: a NON_COMPARE must mean |w1 - w2| > 2**k. A watchdog ends the
// run if it hangs.
module tb_parallel_tolerance_comparator;
  import tolcmp_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] a8, b8;
  logic [5:0] a6, b6;
  cmp_result_e r4, r8, r6k1, r6k2;

  parallel_tolerance_comparator dut4 (.word1(a4), .word2(b4), .non_compare(r4));
  parallel_tolerance_comparator #(.WIDTH(8)) dut8 (.word1(a8), .word2(b8), .non_compare(r8));
  parallel_tolerance_comparator #(.WIDTH(6), .IGNORE_LSBS(1)) dut6k1
    (.word1(a6), .word2(b6), .non_compare(r6k1));
  parallel_tolerance_comparator #(.WIDTH(6), .IGNORE_LSBS(2)) dut6k2
    (.word1(a6), .word2(b6), .non_compare(r6k2));

  function automatic logic expect_nc(int unsigned x, int unsigned y, int unsigned k);
    int d;
    d = int'(x >> k) - int'(y >> k);
    return (d > 1) || (d < -1);
  endfunction

  function automatic int unsigned absdiff(int unsigned x, int unsigned y);
    return (x > y) ? x - y : y - x;
  endfunction

  task automatic check(string tag, logic got, logic exp, int unsigned x, int unsigned y);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s w1=%0d w2=%0d got=%0b exp=%0b", tag, x, y, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_nc4 = 0;  // four-bit pairs reported NON_COMPARE

  initial begin
    // Four-bit default: all 256 pairs; known cases from the rule.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        check("w4", r4, expect_nc(x, y, 0), x, y);
        if (r4 == NON_COMPARE) n_nc4++;
      end
    // 256 pairs minus 16 equal pairs minus 30 pairs one apart.
    checks++;
    if (n_nc4 != 210) begin
      failures++;
      $display("FAIL four-bit non-compare count %0d, expected 210", n_nc4);
    end
    // Hand-picked four-bit cases: 0111 vs 1000 differ in every bit but are 1 apart.
    a4 = 4'b0111; b4 = 4'b1000; #1; check("w4 hand", r4, 1'b0, 7, 8);
    a4 = 4'b1000; b4 = 4'b0110; #1; check("w4 hand", r4, 1'b1, 8, 6);
    a4 = 4'b0101; b4 = 4'b0101; #1; check("w4 hand", r4, 1'b0, 5, 5);
    a4 = 4'b1111; b4 = 4'b0000; #1; check("w4 hand", r4, 1'b1, 15, 0);

    // Eight bits: all 65536 pairs.
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        check("w8", r8, expect_nc(x, y, 0), x, y);
      end

    // Six bits with one and two low-order bits left out.
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        #1;
        check("w6k1", r6k1, expect_nc(x, y, 1), x, y);
        check("w6k2", r6k2, expect_nc(x, y, 2), x, y);
        // Promised tolerance: discompare only when difference > 2**k.
        check("w6k1 bound", (r6k1 == NON_COMPARE) && absdiff(x, y) <= 2, 1'b0, x, y);
        check("w6k2 bound", (r6k2 == NON_COMPARE) && absdiff(x, y) <= 4, 1'b0, x, y);
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
