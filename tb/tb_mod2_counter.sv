// Self-checking testbench for mod2_counter.
//
// Drives random inc/clear sequences and compares count and carry, every
// clock, with a reference counter kept in the testbench. carry must be 1
// exactly for a pulse arriving while the count (or 0 after a clear) is 1.
// A watchdog ends the run if it hangs.
module tb_mod2_counter;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic inc = 1'b0;
  logic count, carry;
  int unsigned ref_pulses = 0;   // pulses since the last clear

  mod2_counter dut (.clk, .rst_n, .clear, .inc, .count, .carry);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_carry;
    logic exp_carry;
    n_carry = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 4) == 0);
      inc   = $urandom_range(0, 1) == 1;
      if (clear) ref_pulses = 0;
      #1;
      exp_carry = inc && (ref_pulses % 2 == 1);
      checks++;
      if (carry !== exp_carry) begin
        failures++;
        $display("FAIL cycle %0d carry=%0b exp=%0b", i, carry, exp_carry);
      end
      if (carry) n_carry++;
      if (inc) ref_pulses++;
      @(posedge clk);
      #1;
      checks++;
      if (count !== 1'(ref_pulses % 2)) begin
        failures++;
        $display("FAIL cycle %0d count=%0b exp=%0b", i, count, ref_pulses % 2);
      end
    end
    checks++;
    if (n_carry == 0) begin
      failures++;
      $display("FAIL carry never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
