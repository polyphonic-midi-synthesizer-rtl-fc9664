// waveform_rom_tb: checks known words of the sine table (start and end of the
// address space, the peaks), then every word against an independent
// evaluation of round(32767 + 32767*sin(2*pi*i/128)) and the 128-word period.
module waveform_rom_tb;
  import synth_pkg::*;
  rom_addr_t addr;
  sample_t data;
  int checks = 0, failures = 0;

  waveform_rom dut (.addr, .data);

  task automatic expect_word(input int i, input int exp);
    addr = rom_addr_t'(i);
    #1;
    checks++;
    if (int'(data) != exp) begin
      failures++;
      $display("FAIL addr=%0d data=%h exp=%h", i, data, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t first [128];
    expect_word(0,    16'h7FFF);
    expect_word(1,    16'h8647);
    expect_word(2,    16'h8C8B);
    expect_word(3,    16'h92C7);
    expect_word(4,    16'h98F8);
    expect_word(1020, 16'h6706);
    expect_word(1021, 16'h6D37);
    expect_word(1022, 16'h7373);
    expect_word(1023, 16'h79B7);
    expect_word(32,   16'hFFFE);
    expect_word(96,   16'h0000);
    for (int i = 0; i < 1024; i++) begin
      real s;
      s = 32767.0 + 32767.0 * $sin(6.283185307179586 * (i % 128) / 128.0);
      expect_word(i, int'($floor(s + 0.5)));
      if (i < 128) first[i] = data;
      else begin
        checks++;
        if (data != first[i % 128]) begin failures++; $display("FAIL period at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
