// phase_accumulator: the note generator's waveform address register.
//
// A 24-bit register adds the key's increment on every sample clock and wraps
// modulo 2**24. Its top ROM_ADDR_W bits ([23:14]) are the waveform ROM address;
// the 14 bits below keep the fractional position so that low notes, which
// advance less than one ROM word per sample, still have accurate pitch. The
// address is a register output and changes only on the sample clock edge.
// Reset (asynchronous, active high) clears it. Width, slicing and the free
// running accumulate follow the original design; the accumulator is not
// cleared on a new note, as in the original.
module phase_accumulator
  import synth_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  phase_t    increment,
  output rom_addr_t addr
);
  phase_t phase;

  always_ff @(posedge clk or posedge reset)
    if (reset) phase <= '0;
    else       phase <= phase + increment;

  assign addr = phase[PHASE_W-1 -: ROM_ADDR_W];
endmodule
