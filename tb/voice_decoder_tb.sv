// voice_decoder_tb: exhaustive check of the select decoder with the enable
// pulse low (no voice enabled) and high (exactly the selected voice enabled).
module voice_decoder_tb;
  import synth_pkg::*;
  sel_t sel;
  logic en_pulse;
  logic [NUM_VOICES-1:0] voice_en;
  int checks = 0, failures = 0;

  voice_decoder dut (.sel, .en_pulse, .voice_en);

  initial begin
    #10000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < NUM_VOICES; s++) begin
        sel = sel_t'(s); en_pulse = e[0];
        #1;
        checks++;
        if (voice_en !== (e ? (8'b1 << s) : 8'b0)) begin
          failures++;
          $display("FAIL sel=%0d en=%0d voice_en=%b", s, e, voice_en);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
