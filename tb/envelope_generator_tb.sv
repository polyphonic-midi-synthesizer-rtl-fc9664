// envelope_generator_tb: checks the envelope after every sample clock against
// a model of the ADSR rule. First with the default constants through one whole
// note: 32767 samples of attack (+2) to 65534, decay (-1) to 32766 at sample
// 65535, sustain, then release (-4) down to 0 after note-off. Then with steep
// constants that drive the envelope into both saturation limits, with note-off
// during attack and a new note-on during release (which restarts from 0).
module envelope_generator_tb;
  import synth_pkg::*;
  logic clk = 0, reset = 1, on = 0, en = 0;
  env_cfg_t cfg;
  env_t envelope;
  env_phase_t phase;
  int checks = 0, failures = 0;
  // model
  int m_env = 0, m_time = 0;
  bit m_on = 0;
  int hit_top = 0, hit_zero = 0;
  int seen [4] = '{0, 0, 0, 0};

  envelope_generator dut (.clk, .reset, .cfg, .on, .en, .envelope, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sample clock with the given load; update and compare the model
  task automatic step(input bit load, input bit note_on);
    int inc, nxt;
    @(negedge clk);
    en = load; on = note_on;
    @(posedge clk);
    if (!m_on)                         inc = int'(cfg.rel);
    else if (m_time < int'(cfg.atime)) inc = int'(cfg.attack);
    else if (m_time < int'(cfg.dtime)) inc = int'(cfg.decay);
    else                               inc = 0;
    nxt = m_env + inc;
    if (nxt > 65535) begin nxt = 65535; hit_top++; end
    if (nxt < 0)     begin nxt = 0;     hit_zero++; end
    if (load && note_on) begin m_env = 0; m_time = 0; end
    else begin m_env = nxt; if (m_time < (1 << TIME_W) - 1) m_time++; end
    if (load) m_on = note_on;
    #1;
    checks++;
    seen[phase]++;
    if (int'(envelope) != m_env) begin
      failures++;
      if (failures < 10) $display("FAIL env=%0d exp=%0d time=%0d", envelope, m_env, m_time);
    end
  endtask

  task automatic expect_env(input int v, input string msg);
    checks++;
    if (int'(envelope) != v) begin failures++; $display("FAIL %s: %0d vs %0d", msg, envelope, v); end
  endtask

  initial begin
    cfg = ENV_DEFAULT;
    repeat (2) @(negedge clk);
    reset = 0;
    step(1, 1);                                  // note on
    repeat (32767) step(0, 0);
    expect_env(65534, "end of attack");
    repeat (32768) step(0, 0);
    expect_env(32766, "end of decay");
    repeat (100) step(0, 0);
    expect_env(32766, "sustain holds");
    step(1, 0);                                  // note off
    repeat (8192) step(0, 0);
    expect_env(0, "released to 0");
    // steep constants: saturate at the top and the bottom
    cfg.attack = 17'sd3000; cfg.decay = -17'sd500; cfg.rel = -17'sd700;
    cfg.atime = 20'd30;     cfg.dtime = 20'd60;
    step(1, 1);
    repeat (100) step(0, 0);
    step(1, 0);
    repeat (150) step(0, 0);
    step(1, 1);                                  // new note
    repeat (10) step(0, 0);
    step(1, 0);                                  // released during attack
    repeat (5) step(0, 0);
    step(1, 1);                                  // retrigger during release
    repeat (40) step(0, 0);
    for (int i = 0; i < 3000; i++) step(($urandom % 50) == 0, 1'($urandom));
    checks++;
    if (hit_top == 0 || hit_zero == 0 || seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) begin
      failures++; $display("FAIL coverage top=%0d zero=%0d", hit_top, hit_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
