// key_increment_lut: MIDI key number to waveform address increment.
//
// The note generator steps through the sine ROM by adding this increment to
// its 24-bit phase accumulator once per sample. With 128 ROM samples per sine
// period, a 78.125 kHz sample rate and 14 fractional phase bits, the increment
// for key k is
//   inc(k) = floor( f(k) / 78125 * 128 * 2**14 ),  f(k) = 440 * 2**((k-69)/12)
// so key 0 (8.18 Hz) gives 219 and key 127 (12.54 kHz) gives 336721. The
// table is computed at elaboration by synth_pkg::key_increment and read
// combinationally (a 128 x 24 ROM). The formula and the printed end values are
// the original design's; computing the table in place of a generated listing
// is this design's choice.
module key_increment_lut
  import synth_pkg::*;
(
  input  key_t   key,
  output phase_t increment
);
  localparam int unsigned DEPTH = 1 << KEY_W;
  typedef phase_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned k = 0; k < DEPTH; k++) t[k] = key_increment(k);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign increment = TABLE[key];
endmodule
