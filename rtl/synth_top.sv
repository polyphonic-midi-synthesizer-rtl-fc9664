// synth_top: eight-voice sample-playback synthesizer for one FPGA.
//
// A microcontroller decodes MIDI note-on/off messages and presents, for each,
// a 7-bit key, a 7-bit velocity, an on/off bit and the 3-bit number of the
// note generator it chose, then raises `en`. This module divides the 20 MHz
// clock by 256 to the 78.125 kHz sample clock, turns the rising edge of `en`
// into a one-sample pulse, and routes that pulse to the selected note
// generator, which loads the message. The eight generators share one sine
// ROM through the eight-port ROM on the 20 MHz clock. Their 16-bit outputs
// are added and divided by eight (bits [18:3] of the 19-bit sum) to give
// audio_out, a 16-bit unsigned sample centred on 16'h7FFF that changes once
// per sample clock; dac_data, its top 8 bits, drives an external 8-bit DAC.
// Interface timing: key, velocity, keyon and sel must be stable from before
// `en` rises until two sample clocks (about 26 us) after. Structure and sizes
// follow the original design; the asynchronous reset and the extra sample_clk
// output are this design's choices. Each voice's envelope and envelope phase
// are kept as named signals in g_voice[v] for observation in simulation; no
// logic reads them.
module synth_top
  import synth_pkg::*;
(
  input  logic    clk,        // 20 MHz
  input  logic    reset,      // asynchronous, active high
  input  key_t    key,
  input  vel_t    velocity,
  input  logic    keyon,      // 1 = note on, 0 = note off
  input  logic    en,         // rises once per message
  input  sel_t    sel,        // note generator for this message
  output sample_t audio_out,
  output logic [7:0] dac_data,
  output logic    sample_clk
);
  logic                  en_pulse;
  logic [NUM_VOICES-1:0] voice_en;
  rom_addr_t             rom_addr  [NUM_VOICES];
  sample_t               rom_data  [NUM_VOICES];
  sample_t               voice_out [NUM_VOICES];
  logic [SAMPLE_W+SEL_W-1:0] sum;

  clock_divider #(.BITS(CLK_DIV_BITS)) u_div (
    .fast_clk(clk), .reset, .slow_clk(sample_clk)
  );

  edge_detector u_edge (
    .clk(sample_clk), .reset, .level(en), .pulse(en_pulse)
  );

  voice_decoder u_dec (.sel, .en_pulse, .voice_en);

  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_voice
    env_t       envelope;
    env_phase_t env_phase;
    note_generator u_gen (
      .clk(sample_clk), .reset, .key, .velocity, .on(keyon), .en(voice_en[v]),
      .rom_addr(rom_addr[v]), .rom_data(rom_data[v]),
      .audio_out(voice_out[v]), .envelope, .env_phase
    );
  end

  eight_port_rom #(.PORTS(NUM_VOICES), .ADDR_W(ROM_ADDR_W)) u_rom (
    .fast_clk(clk), .reset, .addr(rom_addr), .data(rom_data)
  );

  always_comb begin
    sum = '0;
    for (int v = 0; v < NUM_VOICES; v++) sum += (SAMPLE_W+SEL_W)'(voice_out[v]);
  end

  assign audio_out = sum[SAMPLE_W+SEL_W-1 -: SAMPLE_W];
  assign dac_data  = audio_out[SAMPLE_W-1 -: 8];
endmodule
