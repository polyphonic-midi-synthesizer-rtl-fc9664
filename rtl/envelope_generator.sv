// envelope_generator: ADSR loudness envelope for one note generator.
//
// A note time register counts samples since the last note-on. A flag register
// holds whether the note is on; both update only on this voice's one-cycle load
// enable. Every sample clock the envelope increment (attack, decay, zero for
// sustain, or release) chosen from the time and the flag is added to the
// 16-bit envelope register through a saturating adder, so the envelope stops
// at 16'hFFFF going up and at 0 going down. A note-on load clears the envelope
// and the time, so each note starts its attack from silence. The release
// slope applies from the sample after the note-off load. The constants come in
// as one env_cfg_t bundle. Timing: one register stage; the envelope is valid
// after each sample clock edge. Structure follows the original design; the
// asynchronous reset and the phase output are this design's choices.
module envelope_generator
  import synth_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  env_cfg_t   cfg,
  input  logic       on,       // note on/off, sampled on en
  input  logic       en,       // one-cycle load enable for this voice
  output env_t       envelope,
  output env_phase_t phase
);
  logic [TIME_W-1:0] time_count;
  logic              on_q;
  env_inc_t          increment;
  env_t              next_env;

  note_timer #(.BITS(TIME_W)) u_timer (
    .clk, .reset, .en, .on, .time_count
  );

  always_ff @(posedge clk or posedge reset)
    if (reset)   on_q <= 1'b0;
    else if (en) on_q <= on;

  envelope_increment u_inc (
    .cfg, .time_count, .on(on_q), .increment, .phase
  );

  sat_adder #(.WIDTH(INC_W)) u_add (
    .a(increment), .b({1'b0, envelope}), .y(next_env)
  );

  always_ff @(posedge clk or posedge reset)
    if (reset)         envelope <= '0;
    else if (en && on) envelope <= '0;
    else               envelope <= next_env;
endmodule
