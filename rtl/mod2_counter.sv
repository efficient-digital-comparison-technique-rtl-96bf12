// Modulo 2 counter for the serial tolerance comparator.
//
// The serial comparator's final OR gate gives exactly one pulse at the MARK
// bit of any pair of words that differ. That pulse is expected and must
// not be reported. A second pulse means the words differ by more than one
// unit. This counter counts the pulses modulo 2, and its wrap-around
// (carry) from 1 back to 0 marks the second pulse.
//
// Only the counter's job comes from the source description. How it is
// built is this design's choice: a single toggle flip-flop. `clear`
// (asserted with the first bit of a word) makes the counter behave as if
// it held 0 in that same cycle, so a pulse on the first bit is counted.
//
// Interface: inc is one OR-gate pulse per bit time. carry is
// combinational, inc AND count: it is 1 when this pulse wraps the counter.
// count is the stored state after the previous bit.
// Timing: one bit per clock; the state updates on the rising edge.
module mod2_counter (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic clear,   // start of a new word: count from 0 this cycle
  input  logic inc,     // pulse from the final OR gate
  output logic count,   // stored count (0 or 1)
  output logic carry    // this pulse wraps 1 -> 0
);

  logic cur;

  assign cur   = clear ? 1'b0 : count;
  assign carry = inc & cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= 1'b0;
    else        count <= cur ^ inc;
  end

endmodule
