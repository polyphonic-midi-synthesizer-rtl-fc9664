// edge_detector: turns the microcontroller's enable level into a pulse.
//
// The enable line from the microcontroller rises once a note message and its
// key, velocity, on/off and select bits are on the pins. Two flip-flops in
// series sample it on the sample clock; the output is high for exactly one
// clock when the newer sample is 1 and the older is 0. The first flop also
// serves as a synchronizer for the asynchronous input. Latency: the pulse
// appears in the clock cycle after the first clock edge that samples the input
// high. Two flops and the "newer and not older" rule follow the original
// design; the asynchronous active-high reset is this design's choice.
module edge_detector (
  input  logic clk,
  input  logic reset,
  input  logic level,
  output logic pulse
);
  logic newer, older;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      newer <= 1'b0;
      older <= 1'b0;
    end else begin
      newer <= level;
      older <= newer;
    end

  assign pulse = newer & ~older;
endmodule
