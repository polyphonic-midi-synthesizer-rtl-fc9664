// note_timer: samples elapsed since the current note started.
//
// On a load enable that carries note-on, the timer is cleared; otherwise it
// counts up by one per sample clock through a saturating adder, so after
// 2**BITS - 1 samples (13.4 s at 78.125 kHz for BITS = 20) it stays at its
// maximum rather than wrapping back into the attack phase. A note-off load
// does not clear it. Reset (asynchronous, active high) clears it. Follows the
// original design, reset style excepted.
module note_timer
  import synth_pkg::*;
#(
  parameter int unsigned BITS = TIME_W
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            en,      // one-cycle load enable for this voice
  input  logic            on,      // note on (1) / off (0) at the load
  output logic [BITS-1:0] time_count
);
  logic [BITS-1:0] next_time;

  sat_adder #(.WIDTH(BITS + 1)) u_inc (
    .a({1'b0, time_count}),
    .b((BITS + 1)'(1)),
    .y(next_time)
  );

  always_ff @(posedge clk or posedge reset)
    if (reset)          time_count <= '0;
    else if (en && on)  time_count <= '0;
    else                time_count <= next_time;
endmodule
