// envelope_increment: picks the envelope slope for the current sample.
//
// After note-off the release increment applies. While the note is on, the
// attack increment applies while the note time is below atime, the decay
// increment while it is below dtime, and zero after that (sustain: the
// envelope holds). Combinational; also reports the phase it chose. The
// selection rule follows the original design; the phase output is this
// design's addition.
module envelope_increment
  import synth_pkg::*;
(
  input  env_cfg_t          cfg,
  input  logic [TIME_W-1:0] time_count,
  input  logic              on,
  output env_inc_t          increment,
  output env_phase_t        phase
);
  always_comb begin
    if (!on) begin
      phase     = ENV_PH_RELEASE;
      increment = cfg.rel;
    end else if (time_count < cfg.atime) begin
      phase     = ENV_PH_ATTACK;
      increment = cfg.attack;
    end else if (time_count < cfg.dtime) begin
      phase     = ENV_PH_DECAY;
      increment = cfg.decay;
    end else begin
      phase     = ENV_PH_SUSTAIN;
      increment = '0;
    end
  end
endmodule
