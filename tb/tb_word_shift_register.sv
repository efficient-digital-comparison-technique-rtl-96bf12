// Self-checking testbench for word_shift_register.
//
// Shifts random bits in, high-order first, with random gaps (shift_en low),
// into a 4-bit and a 1-bit register. After every clock the parallel word
// must equal the last WIDTH bits shifted in, kept in a reference queue.
// A watchdog ends the run if it hangs.
module tb_word_shift_register;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0;
  logic serial_in = 1'b0;
  logic [3:0] word4;
  logic [0:0] word1;
  logic [3:0] ref4 = '0;

  word_shift_register dut4 (.clk, .rst_n, .shift_en, .serial_in, .word(word4));
  word_shift_register #(.WIDTH(1)) dut1 (.clk, .rst_n, .shift_en, .serial_in, .word(word1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (word4 !== 4'b0) begin failures++; $display("FAIL reset value %b", word4); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      shift_en  = ($urandom_range(0, 3) != 0);
      serial_in = $urandom_range(0, 1) == 1;
      if (shift_en) ref4 = {ref4[2:0], serial_in};
      @(posedge clk);
      #1;
      checks += 2;
      if (word4 !== ref4) begin
        failures++;
        $display("FAIL cycle %0d word4=%b exp=%b", i, word4, ref4);
      end
      if (word1 !== ref4[0]) begin
        failures++;
        $display("FAIL cycle %0d word1=%b exp=%b", i, word1, ref4[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
