// key_increment_lut_tb: checks the key-to-increment table against increments
// worked out by hand from f(k) = 440 * 2**((k-69)/12), 128 samples per period,
// a 78.125 kHz sample rate and 14 fractional bits (rounded down), at both ends
// of the keyboard and at A4; then checks for every key that the increment
// rises with the key and that one octave up doubles it (to within 1 LSB).
module key_increment_lut_tb;
  import synth_pkg::*;
  key_t key;
  phase_t increment;
  int checks = 0, failures = 0;

  key_increment_lut dut (.key, .increment);

  task automatic expect_inc(input int k, input int exp);
    key = key_t'(k);
    #1;
    checks++;
    if (int'(increment) != exp) begin
      failures++;
      $display("FAIL key=%0d inc=%0d exp=%0d", k, increment, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, cur, lo;
    expect_inc(0,   24'h0000DB);
    expect_inc(1,   24'h0000E8);
    expect_inc(2,   24'h0000F6);
    expect_inc(3,   24'h000104);
    expect_inc(69,  11811);          // 440 Hz: 440/78125*128*16384 = 11811.2
    expect_inc(123, 24'h0413F8);
    expect_inc(124, 24'h04520B);
    expect_inc(125, 24'h0493D0);
    expect_inc(126, 24'h04D97E);
    expect_inc(127, 24'h052351);
    key = 0; #1; prev = int'(increment);
    for (int k = 1; k < 128; k++) begin
      key = key_t'(k); #1; cur = int'(increment);
      checks++;
      if (cur <= prev) begin failures++; $display("FAIL not rising at %0d", k); end
      prev = cur;
    end
    for (int k = 0; k < 116; k++) begin
      key = key_t'(k); #1; lo = int'(increment);
      key = key_t'(k + 12); #1; cur = int'(increment);
      checks++;
      if (cur < 2*lo || cur > 2*lo + 1) begin
        failures++; $display("FAIL octave %0d: %0d vs %0d", k, lo, cur);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
