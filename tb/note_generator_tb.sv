// note_generator_tb: one note generator with a fast envelope (set through its
// ENV_CFG parameter), a sine ROM model answering its address, and an
// independent model of the phase accumulator and the output scaling:
//   out = 16'h7FFF + floor( floor((w - 16'h7FFF) * env / 2**16) * vel / 2**7 )
// where w is the ROM word for the address of the previous sample. Checks the
// ROM address and the output after every sample clock for several keys and
// velocities, note-on and note-off, and that a load for another voice (en low)
// changes nothing.
module note_generator_tb;
  import synth_pkg::*;
  localparam env_cfg_t CFG = '{attack: 17'sd4000, decay: -17'sd300, rel: -17'sd500,
                               atime: 20'd20, dtime: 20'd60};
  logic clk = 0, reset = 1, on = 0, en = 0;
  key_t key = '0;
  vel_t velocity = '0;
  rom_addr_t rom_addr;
  sample_t rom_data, audio_out;
  env_t envelope;
  env_phase_t env_phase;
  int checks = 0, failures = 0;
  longint m_phase = 0;
  int m_key = 0, m_vel = 0, m_out = 32767;
  int nonmid = 0;

  note_generator #(.ENV_CFG(CFG)) dut (
    .clk, .reset, .key, .velocity, .on, .en, .rom_addr, .rom_data,
    .audio_out, .envelope, .env_phase);

  always #5 clk = ~clk;

  function automatic int sine_ref(input int i);
    return int'($floor(32767.0 + 32767.0 * $sin(6.283185307179586 * (i % 128) / 128.0) + 0.5));
  endfunction

  function automatic longint inc_ref(input int k);
    real f;
    f = 440.0 * (2.0 ** ((k - 69) / 12.0));
    return longint'($floor(f / 78125.0 * 128.0 * 16384.0));
  endfunction

  function automatic int floordiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return int'(q);
  endfunction

  assign rom_data = sample_t'(sine_ref(int'(rom_addr)));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit load, input bit note_on, input int k, input int v);
    int w, e, t;
    @(negedge clk);
    en = load; on = note_on; key = key_t'(k); velocity = vel_t'(v);
    w = sine_ref(int'(m_phase >> 14));
    e = int'(envelope);
    @(posedge clk);
    t = floordiv(longint'(w - 32767) * longint'(e), 65536);
    m_out = 32767 + floordiv(longint'(t) * longint'(m_vel), 128);
    m_phase = (m_phase + inc_ref(m_key)) % (longint'(1) << 24);
    if (load) begin m_key = k; m_vel = v; end
    #1;
    checks += 2;
    if (int'(audio_out) != m_out) begin
      failures++;
      if (failures < 10) $display("FAIL out=%h exp=%h (w=%h env=%0d vel=%0d)", audio_out, m_out, w, e, m_vel);
    end
    if (longint'(rom_addr) != (m_phase >> 14)) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%0d exp=%0d", rom_addr, m_phase >> 14);
    end
    if (audio_out != 16'h7FFF) nonmid++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (audio_out != 16'h7FFF) begin failures++; $display("FAIL reset output"); end
    @(posedge clk);
    #1 reset = 0;
    repeat (5) step(0, 0, 0, 0);
    checks++; if (audio_out != 16'h7FFF) begin failures++; $display("FAIL silent before note"); end
    step(1, 1, 69, 127);                // A4, full velocity
    repeat (300) step(0, 0, 0, 0);
    step(0, 1, 100, 10);                // another voice's message: ignored
    repeat (20) step(0, 0, 0, 0);
    step(1, 0, 69, 127);                // note off
    repeat (200) step(0, 0, 0, 0);
    checks++; if (audio_out != 16'h7FFF) begin failures++; $display("FAIL not silent after release"); end
    step(1, 1, 127, 64);                // top key, half velocity
    repeat (200) step(0, 0, 0, 0);
    step(1, 1, 0, 1);                   // bottom key, lowest velocity
    repeat (200) step(0, 0, 0, 0);
    for (int i = 0; i < 2000; i++)
      step(($urandom % 60) == 0, 1'($urandom), $urandom % 128, $urandom % 128);
    checks++; if (nonmid < 500) begin failures++; $display("FAIL output mostly silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
