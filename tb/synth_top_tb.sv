// synth_top_tb: end-to-end test of the synthesizer at its default size and
// envelope constants, driven through the microcontroller model by MIDI bytes.
//
// A 20 MHz clock runs the design. The test plays nine note-ons (the ninth
// steals note generator 7), holds them through attack and decay into sustain
// (65535 samples), sends note-offs (one for the stolen key, which is dropped),
// lets them release to silence, re-strikes a note during its release and
// sends a byte that is not a note message. An independent sample-by-sample
// model of the whole synthesizer (synth_ref_model: edge detection of `en`,
// per-voice key, velocity, phase, note time and envelope, sine table,
// scaling, sum / 8) predicts audio_out after every sample clock, and dac_data is checked to be
// its top byte. The sample period (256 clocks) is checked too. It also counts
// each mechanism: loads, voice stealing, dropped note-off, each envelope
// phase, the release clamp at zero, all eight voices sounding at once.
// About 22 million clock cycles.
module synth_top_tb;
  logic clk = 0, reset = 0;
  logic [6:0] key, velocity;
  logic keyon, en;
  logic [2:0] sel;
  logic [15:0] audio_out;
  logic [7:0] dac_data;
  logic sample_clk;
  int checks = 0, failures = 0;

  synth_top dut (.clk, .reset, .key, .velocity, .keyon, .en, .sel,
                 .audio_out, .dac_data, .sample_clk);

  pic_model #(.BYTE_CYCLES(1736)) pic (.clk, .key, .velocity, .onoff(keyon), .en, .sel);

  always #25 clk = ~clk;   // 20 MHz with a 1 ns unit

  // ---------------- reference model ----------------
  logic model_run = 0;
  int m_audio, m_sounding;
  int sample_n = 0;

  synth_ref_model ref_model (.clk, .sample_clk, .run(model_run), .key, .velocity,
                             .keyon, .en, .sel, .expected(m_audio), .sounding(m_sounding));

  always @(posedge sample_clk) if (model_run) begin
    sample_n++;
    @(negedge clk);
    #1;
    checks++;
    if (int'(audio_out) != m_audio || dac_data != audio_out[15:8]) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample %0d audio=%h exp=%h dac=%h", sample_n, audio_out, m_audio, dac_data);
    end
  end

  // sample period
  realtime t_last = 0;
  int n_period = 0;
  always @(posedge sample_clk) begin
    if (t_last != 0) begin
      checks++;
      n_period++;
      if ($realtime - t_last != 256 * 50) begin
        failures++;
        $display("FAIL sample period %0t", $realtime - t_last);
      end
    end
    t_last = $realtime;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_samples(input int n);
    repeat (n) @(posedge sample_clk);
  endtask

  task automatic expect_count(input string name, input int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    #1 reset = 1;                       // an edge, so that every flop sees it
    repeat (4) @(negedge clk);
    reset = 0;
    model_run = 1;
    wait_samples(10);
    checks++;
    if (audio_out != 16'h7FFF) begin failures++; $display("FAIL not silent after reset"); end
    // nine notes: the ninth steals generator 7
    for (int i = 0; i < 9; i++) pic.send_note(1'b1, 7'(60 + 2*i), 7'(127 - 9*i));
    pic.rx_byte(8'hB0);                 // not a note message: ignored
    wait_samples(66000);                // through attack and decay into sustain
    pic.send_note(1'b0, 7'd74, 7'd0);   // key of the stolen note: no generator holds it
    for (int i = 0; i < 8; i++) if (i != 7) pic.send_note(1'b0, 7'(60 + 2*i), 7'd64);
    wait_samples(3000);
    pic.send_note(1'b1, 7'd60, 7'd100); // re-strike during release
    wait_samples(6000);
    pic.send_note(1'b0, 7'd76, 7'd64);  // the stealing note
    pic.send_note(1'b0, 7'd60, 7'd64);
    wait_samples(8400);                 // everything released to silence
    checks++;
    if (audio_out != 16'h7FFF) begin failures++; $display("FAIL not silent at the end"); end
    $display("mechanisms:");
    expect_count("note-on loads", ref_model.c_load_on);
    expect_count("note-off loads", ref_model.c_load_off);
    expect_count("voice stolen", pic.n_steal);
    expect_count("note-off dropped", pic.n_dropped);
    expect_count("attack samples", ref_model.c_phase[0]);
    expect_count("decay samples", ref_model.c_phase[1]);
    expect_count("sustain samples", ref_model.c_phase[2]);
    expect_count("release samples", ref_model.c_phase[3]);
    expect_count("release clamped at 0", ref_model.c_clamp0);
    expect_count("eight voices sounding", ref_model.c_all8);
    expect_count("sample periods checked", n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
