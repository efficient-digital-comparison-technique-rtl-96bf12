// End-to-end testbench for tolerance_compare_top at its default sizes.
//
// Parallel side: every pair of four-bit words. Serial side: the same 256
// pairs streamed as four-bit words, high-order bit first. Then random
// pairs of 1 to 24 bits with idle clocks. Each result is checked against
// arithmetic (NON_COMPARE exactly when |w1 - w2| > 1). For four-bit words
// the two comparators must also agree, and the gathered shift register
// words must equal the words sent. Each situation the design handles is
// counted, and one that never occurred counts as a failure. The situations
// are: MARK at each bit position for each word, equal words, a one-unit
// difference with every bit flipped, MARK at the low-order bit, the mod 2
// counter swallowing the MARK pulse, its carry reporting a discompare,
// idle clocks inside a word, and back-to-back words.
module tb_tolerance_compare_top;
  import tolcmp_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [3:0] p_word1 = '0, p_word2 = '0;
  cmp_result_e p_non_compare, s_non_compare;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_bit_valid = 1'b0, s_word_first = 1'b0, s_word_last = 1'b0;
  logic s_word1_bit = 1'b0, s_word2_bit = 1'b0;
  logic s_result_valid, s_word1_larger, s_word2_larger;
  logic [3:0] s_word1, s_word2;

  tolerance_compare_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // situation counters
  int n_mark1[4], n_mark2[4];   // MARK position per larger word (parallel)
  int n_equal = 0, n_all_flip = 0, n_p_nc = 0, n_p_c = 0;
  int n_swallow = 0, n_carry = 0, n_idle_in_word = 0, n_back_to_back = 0;
  int n_s_w1 = 0, n_s_w2 = 0;

  task automatic check(string tag, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%0b exp=%0b at %0t", tag, got, exp, $time);
    end
  endtask

  function automatic logic ref_nc(longint unsigned a, longint unsigned b);
    return (a > b) ? (a - b > 1) : (b - a > 1);
  endfunction

  function automatic int top_diff_bit(longint unsigned x);
    for (int i = 63; i >= 0; i--) if (x[i]) return i;
    return -1;
  endfunction

  logic prev_last = 1'b0;  // previous clock carried a last bit

  task automatic send(longint unsigned a, longint unsigned b, int unsigned len, bit gaps);
    logic exp_nc;
    exp_nc = ref_nc(a, b);
    for (int i = int'(len) - 1; i >= 0; i--) begin
      if (gaps && i != int'(len) - 1)
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          s_bit_valid = 1'b0; s_word_first = 1'b0; s_word_last = 1'b0;
          @(posedge clk); #1;
          check("idle result_valid", s_result_valid, 1'b0);
          n_idle_in_word++;
        end
      @(negedge clk);
      if (i == int'(len) - 1 && s_bit_valid && prev_last) n_back_to_back++;
      s_bit_valid  = 1'b1;
      s_word_first = (i == int'(len) - 1);
      s_word_last  = (i == 0);
      s_word1_bit  = a[i];
      s_word2_bit  = b[i];
      prev_last    = (i == 0);
      @(posedge clk); #1;
      check("result_valid timing", s_result_valid, i == 0);
    end
    check("serial non_compare", s_non_compare == NON_COMPARE, exp_nc);
    check("serial larger word 1", s_word1_larger, a > b);
    check("serial larger word 2", s_word2_larger, b > a);
    if (len >= 4) begin
      check("shift register word 1", s_word1 == 4'(a), 1'b1);
      check("shift register word 2", s_word2 == 4'(b), 1'b1);
    end
    if (a > b) n_s_w1++;
    if (b > a) n_s_w2++;
    if (a != b && !exp_nc) n_swallow++;
    if (exp_nc) n_carry++;
  endtask

  initial begin
    int d;
    longint unsigned a, b;
    int unsigned len;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Parallel comparator, all 256 pairs.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        p_word1 = 4'(x); p_word2 = 4'(y);
        #1;
        check("parallel non_compare", p_non_compare == NON_COMPARE, ref_nc(x, y));
        d = top_diff_bit(longint'(x ^ y));
        if (d < 0) n_equal++;
        else if (x > y) n_mark1[d]++;
        else n_mark2[d]++;
        if ((x ^ y) == 15 && !ref_nc(x, y)) n_all_flip++;
        if (p_non_compare == NON_COMPARE) n_p_nc++; else n_p_c++;
      end

    // Serial comparator on the same pairs, back to back, checked against
    // the parallel comparator as well.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        p_word1 = 4'(x); p_word2 = 4'(y);
        send(longint'(x), longint'(y), 4, 1'b0);
        check("serial equals parallel", s_non_compare, p_non_compare);
      end

    // Longer words with idle clocks, near and far pairs.
    for (int n = 0; n < 600; n++) begin
      len = $urandom_range(1, 24);
      a = longint'($urandom) & ((64'd1 << len) - 1);
      case ($urandom_range(0, 2))
        0: b = a + 1;
        1: b = a - 1;
        default: b = longint'($urandom);
      endcase
      b &= (64'd1 << len) - 1;
      if ($urandom_range(0, 1) == 1) send(a, b, len, 1'b1);
      else                           send(b, a, len, 1'b1);
      if ($urandom_range(0, 1) == 1) begin
        @(negedge clk);
        s_bit_valid = 1'b0; s_word_first = 1'b0; s_word_last = 1'b0;
        prev_last = 1'b0;
        @(posedge clk); #1;
      end
    end

    $display("situations: equal=%0d all_bits_flipped_but_close=%0d parallel nc=%0d c=%0d",
             n_equal, n_all_flip, n_p_nc, n_p_c);
    $display("  MARK word1 larger [bit0..3]=%0d %0d %0d %0d, word2 larger=%0d %0d %0d %0d",
             n_mark1[0], n_mark1[1], n_mark1[2], n_mark1[3],
             n_mark2[0], n_mark2[1], n_mark2[2], n_mark2[3]);
    $display("  serial: latch1=%0d latch2=%0d swallowed=%0d carry=%0d idle=%0d back_to_back=%0d",
             n_s_w1, n_s_w2, n_swallow, n_carry, n_idle_in_word, n_back_to_back);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_mark1[i] == 0) begin failures++; $display("FAIL never MARK word1 bit %0d", i); end
      if (n_mark2[i] == 0) begin failures++; $display("FAIL never MARK word2 bit %0d", i); end
    end
    checks++;
    if (n_equal == 0 || n_all_flip == 0 || n_p_nc == 0 || n_p_c == 0 || n_s_w1 == 0 ||
        n_s_w2 == 0 || n_swallow == 0 || n_carry == 0 || n_idle_in_word == 0 ||
        n_back_to_back == 0) begin
      failures++;
      $display("FAIL a situation never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
