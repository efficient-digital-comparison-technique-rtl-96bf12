// Word shift register for a serial data line.
//
// Gathers a word that arrives one bit per clock, high-order bit first.
// Each enabled clock shifts the register one place toward the high-order
// end and puts the new bit in bit 0. After WIDTH enabled clocks, `word`
// holds the last WIDTH bits received, in their proper order. The
// comparator does not need these registers; they keep the compared words
// for whatever uses them next.
//
// WIDTH is not fixed by the source; the default of 4 matches the four-bit
// parallel comparator. The shift direction follows from the high-order-
// first bit order; reset to zero is this design's choice.
//
// Interface: serial_in is sampled on the rising edge when shift_en is 1.
// word is registered.
module word_shift_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous, active low
  input  logic             shift_en,
  input  logic             serial_in,
  output logic [WIDTH-1:0] word
);

  if (WIDTH < 1) begin : g_bad_params
    $error("word_shift_register: WIDTH must be at least 1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        word <= '0;
    // Keep the low WIDTH bits of {word, serial_in}: the old top bit drops out.
    else if (shift_en) word <= WIDTH'({word, serial_in});
  end

endmodule
