// note_generator: the audio for one note (one voice of eight).
//
// On its one-cycle load enable the generator registers the key, the velocity
// and the note on/off flag. The key selects a phase increment; the phase
// accumulator adds it every sample and its top 10 bits address the shared
// sine ROM (through the eight-port ROM, which returns the word before the
// next sample clock edge). The sample, centred on 16'h7FFF, is moved to a
// signed value about zero, multiplied by the 16-bit envelope and shifted right
// 16, multiplied by the 7-bit velocity and shifted right 7, and moved back up
// by 16'h7FFF; a final register holds the result so that glitches of the
// multipliers never reach the output. Full envelope and velocity give
// (2**16-1)/2**16 * 127/128 of full amplitude; zero envelope or velocity gives
// exactly 16'h7FFF.
// Timing, all on the 78.125 kHz sample clock: the ROM address changes at edge
// n, the ROM word is back before edge n+1, and audio_out shows the scaled
// sample from edge n+1. Arithmetic order (envelope first, then velocity),
// shifts and widths follow the original design; the asynchronous reset is this
// design's choice, and the envelope constants are a parameter. The low bits
// of the two products (dropped by the shifts), their top sign-extension bit
// and the carry of the final add are unused by design; lint reports them.
module note_generator
  import synth_pkg::*;
#(
  parameter env_cfg_t ENV_CFG = ENV_DEFAULT
) (
  input  logic       clk,        // sample clock
  input  logic       reset,
  input  key_t       key,
  input  vel_t       velocity,
  input  logic       on,
  input  logic       en,         // one-cycle load enable for this voice
  output rom_addr_t  rom_addr,   // to the eight-port ROM
  input  sample_t    rom_data,   // from the eight-port ROM
  output sample_t    audio_out,
  output env_t       envelope,
  output env_phase_t env_phase
);
  key_t   key_q;
  vel_t   vel_q;
  phase_t increment;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      key_q <= '0;
      vel_q <= '0;
    end else if (en) begin
      key_q <= key;
      vel_q <= velocity;
    end

  key_increment_lut u_lut (.key(key_q), .increment);

  phase_accumulator u_phase (.clk, .reset, .increment, .addr(rom_addr));

  envelope_generator u_env (
    .clk, .reset, .cfg(ENV_CFG), .on, .en, .envelope, .phase(env_phase)
  );

  // Scaling about the midpoint.
  logic signed [SAMPLE_W:0]            centred;    // 17 bits
  logic signed [2*(SAMPLE_W+1)-1:0]    env_prod;   // 34 bits
  logic signed [SAMPLE_W:0]            env_scaled; // 17 bits
  logic signed [SAMPLE_W+1+VEL_W:0]    vel_prod;   // 25 bits
  logic signed [SAMPLE_W:0]            vel_scaled; // 17 bits
  logic        [SAMPLE_W:0]            restored;
  sample_t                             audio_d;

  always_comb begin
    centred    = $signed({1'b0, rom_data}) - $signed({1'b0, MIDPOINT});
    env_prod   = centred * $signed({1'b0, envelope});
    env_scaled = env_prod[ENV_W +: SAMPLE_W+1];
    vel_prod   = env_scaled * $signed({1'b0, vel_q});
    vel_scaled = vel_prod[VEL_W +: SAMPLE_W+1];
    restored   = vel_scaled + {1'b0, MIDPOINT};
    audio_d    = restored[SAMPLE_W-1:0];
  end

  always_ff @(posedge clk or posedge reset)
    if (reset) audio_out <= MIDPOINT;
    else       audio_out <= audio_d;
endmodule
