// synth_ref_model: sample-by-sample reference model of the synthesizer, for
// testbenches (not synthesizable).
//
// Written from the behaviour, not from the RTL: on each rising edge of the
// sample clock it takes the `en` level into a two-stage edge model and, for
// each of the eight voices, computes the registered output from the previous
// sample's phase, envelope and velocity
//   out = 32767 + floor(floor((sine(phase>>14) - 32767) * env / 2^16) * vel / 2^7)
// then advances the 24-bit phase by floor(f(key)/78125*128*2^14), the ADSR
// envelope (+2 below 32767 samples, -1 below 65535, 0 after, -4 after
// note-off, clamped to 0..65535) and the 20-bit saturating note time, and
// loads key, velocity and on/off for the voice a pulse selects. `expected`
// is the sum of the eight outputs divided by 8, valid from the first fast
// clock falling edge after the sample edge. It also counts how often each
// envelope phase, the release clamp and eight sounding voices occurred.
module synth_ref_model (
  input  logic        clk,
  input  logic        sample_clk,
  input  logic        run,
  input  logic [6:0]  key,
  input  logic [6:0]  velocity,
  input  logic        keyon,
  input  logic        en,
  input  logic [2:0]  sel,
  output int          expected,
  output int          sounding
);
  int m_key [8], m_vel [8], m_on [8], m_time [8], m_env [8], m_out [8];
  longint m_phase [8];
  bit m_newer = 0, m_older = 0;
  int c_load_on = 0, c_load_off = 0, c_clamp0 = 0, c_all8 = 0;
  int c_phase [4] = '{0, 0, 0, 0};
  int samples = 0;

  function automatic int sine_ref(input longint i);
    return int'($floor(32767.0 + 32767.0 * $sin(6.283185307179586 * (i % 128) / 128.0) + 0.5));
  endfunction

  function automatic longint inc_ref(input int k);
    real f;
    f = 440.0 * (2.0 ** ((k - 69) / 12.0));
    return longint'($floor(f / 78125.0 * 128.0 * 16384.0));
  endfunction

  function automatic longint floordiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  initial begin
    expected = 32767;
    sounding = 0;
    for (int v = 0; v < 8; v++) begin
      m_key[v] = 0; m_vel[v] = 0; m_on[v] = 0; m_time[v] = 0; m_env[v] = 0;
      m_phase[v] = 0; m_out[v] = 32767;
    end
  end

  always @(posedge sample_clk) if (run) begin
    bit pulse;
    int sum, nsound;
    pulse = m_newer & ~m_older;
    sum = 0;
    nsound = 0;
    for (int v = 0; v < 8; v++) begin
      int inc, nxt, w;
      bit ld;
      ld = pulse && (int'(sel) == v);
      w = sine_ref(m_phase[v] >> 14);
      m_out[v] = 32767 + int'(floordiv(floordiv(longint'(w - 32767) * m_env[v], 65536) * m_vel[v], 128));
      if (!m_on[v])               begin inc = -4; c_phase[3]++; end
      else if (m_time[v] < 32767) begin inc = 2;  c_phase[0]++; end
      else if (m_time[v] < 65535) begin inc = -1; c_phase[1]++; end
      else                        begin inc = 0;  c_phase[2]++; end
      nxt = m_env[v] + inc;
      if (nxt < 0) begin nxt = 0; if (m_env[v] > 0) c_clamp0++; end
      if (nxt > 65535) nxt = 65535;
      m_phase[v] = (m_phase[v] + inc_ref(m_key[v])) % (longint'(1) << 24);
      if (ld && keyon) begin m_env[v] = 0; m_time[v] = 0; end
      else begin m_env[v] = nxt; if (m_time[v] < (1 << 20) - 1) m_time[v]++; end
      if (ld) begin
        m_key[v] = int'(key); m_vel[v] = int'(velocity); m_on[v] = keyon;
        if (keyon) c_load_on++; else c_load_off++;
      end
      sum += m_out[v];
      if (m_out[v] != 32767) nsound++;
    end
    if (nsound == 8) c_all8++;
    m_older = m_newer;
    m_newer = en;
    samples++;
    @(negedge clk);
    expected = sum >> 3;
    sounding = nsound;
  end
endmodule
