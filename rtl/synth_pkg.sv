// synth_pkg: types, sizes and constants shared by the polyphonic synthesizer.
//
// The synthesizer runs eight identical note generators at a 78.125 kHz sample
// rate (a 20 MHz clock divided by 256). Each generator steps a 24-bit phase
// accumulator through a shared 1024-word sine ROM and scales the sample by an
// ADSR envelope and the key velocity. The sizes below (7-bit key and velocity,
// 3-bit select, 16-bit samples, 24-bit phase with a 10-bit ROM address, 20-bit
// note timer, 17-bit two's complement envelope increments) and the envelope
// constants are the ones of the original design. The envelope phase enum is
// this design's own addition, used to make the phase visible to testbenches.
package synth_pkg;

  localparam int unsigned NUM_VOICES  = 8;      // note generators
  localparam int unsigned SEL_W       = 3;      // select width, log2(NUM_VOICES)
  localparam int unsigned KEY_W       = 7;      // MIDI key number
  localparam int unsigned VEL_W       = 7;      // MIDI velocity
  localparam int unsigned SAMPLE_W    = 16;     // audio sample width
  localparam int unsigned ROM_ADDR_W  = 10;     // waveform ROM address width
  localparam int unsigned PHASE_W     = 24;     // phase accumulator width
  localparam int unsigned FRAC_W      = PHASE_W - ROM_ADDR_W; // 14 fractional bits
  localparam int unsigned WAVE_PERIOD = 128;    // ROM samples per sine period
  localparam int unsigned CLK_DIV_BITS = 8;     // 20 MHz / 2**8 = 78.125 kHz
  localparam int unsigned TIME_W      = 20;     // note timer width (13.4 s)
  localparam int unsigned ENV_W       = 16;     // envelope width (unsigned)
  localparam int unsigned INC_W       = ENV_W + 1; // signed envelope increment

  localparam real F_SAMPLE_HZ = 78125.0;        // note generator clock

  localparam logic [SAMPLE_W-1:0] MIDPOINT = 16'h7FFF; // silence level

  // Envelope constants: attack +2 per sample for 32767 samples (about 419 ms),
  // decay -1 per sample until sample 65535 (to about half level), then hold;
  // release -4 per sample (about 105 ms from full scale/2).
  localparam logic signed [INC_W-1:0]  ENV_ATTACK  = 17'sh00002;
  localparam logic signed [INC_W-1:0]  ENV_DECAY   = -17'sd1;
  localparam logic signed [INC_W-1:0]  ENV_RELEASE = -17'sd4;
  localparam logic [TIME_W-1:0]        ENV_ATIME   = 20'h07FFF;
  localparam logic [TIME_W-1:0]        ENV_DTIME   = 20'h0FFFF;

  typedef logic [KEY_W-1:0]      key_t;
  typedef logic [VEL_W-1:0]      vel_t;
  typedef logic [SEL_W-1:0]      sel_t;
  typedef logic [SAMPLE_W-1:0]   sample_t;
  typedef logic [ROM_ADDR_W-1:0] rom_addr_t;
  typedef logic [PHASE_W-1:0]    phase_t;
  typedef logic [ENV_W-1:0]      env_t;
  typedef logic signed [INC_W-1:0] env_inc_t;

  // Envelope constants as one bundle, as they enter the envelope generator.
  typedef struct packed {
    env_inc_t          attack;   // increment while time < atime (positive)
    env_inc_t          decay;    // increment while atime <= time < dtime
    env_inc_t          rel;  // increment after note-off (negative)
    logic [TIME_W-1:0] atime;    // end of attack, in samples
    logic [TIME_W-1:0] dtime;    // end of decay, in samples
  } env_cfg_t;

  localparam env_cfg_t ENV_DEFAULT = '{
    attack: ENV_ATTACK, decay: ENV_DECAY, rel: ENV_RELEASE,
    atime: ENV_ATIME, dtime: ENV_DTIME};

  typedef enum logic [1:0] {
    ENV_PH_ATTACK  = 2'd0,
    ENV_PH_DECAY   = 2'd1,
    ENV_PH_SUSTAIN = 2'd2,
    ENV_PH_RELEASE = 2'd3
  } env_phase_t;

  // Phase increment for MIDI key k, Equation:
  //   inc = floor( f(k) / F_SAMPLE * WAVE_PERIOD * 2**FRAC_W ),
  //   f(k) = 440 Hz * 2**((k - 69) / 12)   (equal temperament, A4 = key 69).
  function automatic phase_t key_increment(input int unsigned k);
    real f;
    f = 440.0 * (2.0 ** ((real'(k) - 69.0) / 12.0));
    return phase_t'(longint'($floor(f / F_SAMPLE_HZ * real'(WAVE_PERIOD)
                                     * real'(longint'(1) << FRAC_W))));
  endfunction

  // Waveform ROM word i: a full-scale sine with WAVE_PERIOD samples per
  // period, centred on 16'h7FFF and rounded to nearest:
  //   w(i) = round( 32767 + 32767 * sin(2*pi*i / WAVE_PERIOD) ).
  function automatic sample_t sine_word(input int unsigned i);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(i) / real'(WAVE_PERIOD);
    return sample_t'(longint'($floor(32767.0 + 32767.0 * $sin(a) + 0.5)));
  endfunction

endpackage
