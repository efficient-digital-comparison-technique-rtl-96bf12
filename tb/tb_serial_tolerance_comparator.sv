// Self-checking testbench for serial_tolerance_comparator.
//
// Streams word pairs of 1 to 40 bits, high-order bit first, with random
// idle clocks between bits and between words, and sometimes back to back.
// The pairs are equal, one unit apart, two units apart, or random. The
// expected result is computed arithmetically: NON_COMPARE exactly when
// |w1 - w2| > 1. The MARK latch of the larger word must be set at the
// end of the word. result_valid must come exactly one clock after the last
// bit, and at no other time. A watchdog ends the run if it hangs.
module tb_serial_tolerance_comparator;
  import tolcmp_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_valid = 1'b0, word_first = 1'b0, word_last = 1'b0;
  logic word1_bit = 1'b0, word2_bit = 1'b0;
  logic result_valid, word1_larger, word2_larger;
  cmp_result_e non_compare;

  serial_tolerance_comparator dut (
    .clk, .rst_n, .bit_valid, .word_first, .word_last, .word1_bit, .word2_bit,
    .result_valid, .non_compare, .word1_larger, .word2_larger
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts of the situations the comparator has to handle.
  int n_equal = 0, n_one_apart = 0, n_nc = 0, n_w1_larger = 0, n_w2_larger = 0;
  int n_mark_last = 0;

  function automatic longint unsigned rand_word(int unsigned len);
    longint unsigned w;
    w = {$urandom, $urandom};
    return (len >= 64) ? w : (w & ((64'd1 << len) - 1));
  endfunction

  task automatic check(string tag, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%0b exp=%0b at %0t", tag, got, exp, $time);
    end
  endtask

  // Drive one word pair and check the result the clock after its last bit.
  task automatic send(longint unsigned a, longint unsigned b, int unsigned len);
    logic exp_nc;
    longint unsigned mask;
    mask   = (64'd1 << len) - 1;
    a &= mask;
    b &= mask;
    exp_nc = (a > b) ? (a - b > 1) : (b - a > 1);
    for (int i = int'(len) - 1; i >= 0; i--) begin
      // random idle clocks between bits
      while ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        bit_valid = 1'b0; word_first = 1'b0; word_last = 1'b0;
        word1_bit = 1'($urandom); word2_bit = 1'($urandom);
        @(posedge clk); #1;
        check("idle result_valid", result_valid, 1'b0);
      end
      @(negedge clk);
      bit_valid  = 1'b1;
      word_first = (i == int'(len) - 1);
      word_last  = (i == 0);
      word1_bit  = a[i];
      word2_bit  = b[i];
      @(posedge clk); #1;
      if (i == 0) begin
        check("result_valid", result_valid, 1'b1);
        check("non_compare", non_compare == NON_COMPARE, exp_nc);
        check("word1_larger", word1_larger, a > b);
        check("word2_larger", word2_larger, b > a);
      end else begin
        check("early result_valid", result_valid, 1'b0);
      end
    end
    if (a == b) n_equal++;
    if (a == b + 1 || b == a + 1) n_one_apart++;
    if (exp_nc) n_nc++;
    if (a > b) n_w1_larger++;
    if (b > a) n_w2_larger++;
    if ((a ^ b) == 1) n_mark_last++;
    // drop the strobes unless the next word follows back to back
    if ($urandom_range(0, 1) == 0) begin
      @(negedge clk);
      bit_valid = 1'b0; word_first = 1'b0; word_last = 1'b0;
      @(posedge clk); #1;
      check("post result_valid", result_valid, 1'b0);
    end
  endtask

  initial begin
    int unsigned len;
    longint unsigned a, b;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Hand-picked four-bit cases.
    send(64'b0111, 64'b1000, 4);   // differ in every bit, one apart
    send(64'b1000, 64'b0110, 4);   // two apart
    send(64'b0101, 64'b0101, 4);   // equal
    send(64'b0100, 64'b0101, 4);   // MARK at the last bit
    send(64'b1100, 64'b1011, 4);   // one apart, word 1 larger
    send(64'b1, 64'b0, 1);         // one-bit words
    for (int n = 0; n < 3000; n++) begin
      len = $urandom_range(1, 40);
      a = rand_word(len);
      case ($urandom_range(0, 3))
        0: b = a;
        1: b = a + 1;
        2: b = a - 1;
        3: b = ($urandom_range(0, 1) == 1) ? a + 2 : rand_word(len);
      endcase
      if ($urandom_range(0, 1) == 1) send(a, b, len);
      else                           send(b, a, len);
    end
    checks++;
    if (n_equal == 0 || n_one_apart == 0 || n_nc == 0 || n_w1_larger == 0 ||
        n_w2_larger == 0 || n_mark_last == 0) begin
      failures++;
      $display("FAIL coverage: equal=%0d one_apart=%0d nc=%0d w1>w2=%0d w2>w1=%0d mark_last=%0d",
               n_equal, n_one_apart, n_nc, n_w1_larger, n_w2_larger, n_mark_last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
