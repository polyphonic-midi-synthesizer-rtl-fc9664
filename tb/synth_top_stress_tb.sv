// synth_top_stress_tb: many keys pressed and released in rapid succession.
//
// Sends 300 random note-on and note-off messages back to back at the full
// 115.2 kbaud byte rate through the microcontroller model (12 different keys,
// random velocities, more than eight keys often held so that voices are
// stolen), then releases every key the model still holds. The reference
// model checks audio_out after every sample. At the end, after the longest
// release (a full-scale envelope at -4 per sample needs 16384 samples), every
// note generator must have an envelope of zero and the output must be
// silent: no note is stuck on. Runs the design at its default size.
module synth_top_stress_tb;
  logic clk = 0, reset = 0;
  logic [6:0] key, velocity;
  logic keyon, en;
  logic [2:0] sel;
  logic [15:0] audio_out;
  logic [7:0] dac_data;
  logic sample_clk;
  logic model_run = 0;
  int m_audio, m_sounding;
  int checks = 0, failures = 0, max_sounding = 0;

  synth_top dut (.clk, .reset, .key, .velocity, .keyon, .en, .sel,
                 .audio_out, .dac_data, .sample_clk);

  pic_model #(.BYTE_CYCLES(1736)) pic (.clk, .key, .velocity, .onoff(keyon), .en, .sel);

  synth_ref_model ref_model (.clk, .sample_clk, .run(model_run), .key, .velocity,
                             .keyon, .en, .sel, .expected(m_audio), .sounding(m_sounding));

  always #25 clk = ~clk;

  always @(posedge sample_clk) if (model_run) begin
    @(negedge clk);
    #1;
    checks++;
    if (m_sounding > max_sounding) max_sounding = m_sounding;
    if (int'(audio_out) != m_audio) begin
      failures++;
      if (failures < 10) $display("FAIL audio=%h exp=%h", audio_out, m_audio);
    end
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] k;
    #1 reset = 1;
    repeat (4) @(negedge clk);
    reset = 0;
    model_run = 1;
    for (int i = 0; i < 300; i++) begin
      k = 7'(40 + 3 * ($urandom % 12));
      pic.send_note(1'($urandom % 3 != 0), k, 7'(1 + $urandom % 127));
    end
    for (int i = 0; i < 8; i++)
      if (pic.held[i] != 7'd0) pic.send_note(1'b0, pic.held[i], 7'd64);
    repeat (16500) @(posedge sample_clk);
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (pic.held[v] != 7'd0) begin failures++; $display("FAIL model still holds voice %0d", v); end
    end
    checks++;
    if (dut.g_voice[0].envelope != 0 || dut.g_voice[1].envelope != 0 ||
        dut.g_voice[2].envelope != 0 || dut.g_voice[3].envelope != 0 ||
        dut.g_voice[4].envelope != 0 || dut.g_voice[5].envelope != 0 ||
        dut.g_voice[6].envelope != 0 || dut.g_voice[7].envelope != 0) begin
      failures++; $display("FAIL a note is stuck on");
    end
    checks++;
    if (audio_out != 16'h7FFF) begin failures++; $display("FAIL output not silent"); end
    checks++;
    if (pic.n_steal == 0) begin failures++; $display("FAIL no voice was stolen"); end
    $display("messages: on %0d off %0d stolen %0d dropped %0d, most voices sounding %0d",
             pic.n_on, pic.n_off, pic.n_steal, pic.n_dropped, max_sounding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
