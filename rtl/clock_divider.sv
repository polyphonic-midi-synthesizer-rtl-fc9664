// clock_divider: divides the 20 MHz board clock by 2**BITS.
//
// A free-running BITS-bit counter increments on every fast clock edge and its
// most significant bit is the slow clock: with the default BITS = 8 the
// 20 MHz clock becomes the 78.125 kHz sample clock, high for 128 fast cycles
// and low for 128. The slow clock rises when the counter steps from
// 2**(BITS-1)-1 to 2**(BITS-1). Reset (asynchronous, active high) clears the
// counter, holding the slow clock low. The divide-by-256 counter with its MSB
// as the clock follows the original design; the asynchronous reset is this
// design's choice.
module clock_divider #(
  parameter int unsigned BITS = 8
) (
  input  logic fast_clk,
  input  logic reset,
  output logic slow_clk
);
  logic [BITS-1:0] count;

  always_ff @(posedge fast_clk or posedge reset)
    if (reset) count <= '0;
    else       count <= count + 1'b1;

  assign slow_clk = count[BITS-1];
endmodule
