// waveform_rom: the single stored waveform, a sine wave.
//
// 2**ADDR_W words of 16 bits; word i is
//   round( 32767 + 32767 * sin(2*pi*i / 128) ),
// a full-scale sine of 128 samples per period centred on 16'h7FFF, repeated
// through the whole address space (eight periods in 1024 words), so the 10-bit
// address from the phase accumulator wraps without a discontinuity. Read is
// combinational (asynchronous), as in the original design; the contents are
// computed at elaboration by synth_pkg::sine_word.
module waveform_rom
  import synth_pkg::*;
#(
  parameter int unsigned ADDR_W = ROM_ADDR_W
) (
  input  logic [ADDR_W-1:0] addr,
  output sample_t           data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  typedef sample_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++) t[i] = sine_word(i);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
