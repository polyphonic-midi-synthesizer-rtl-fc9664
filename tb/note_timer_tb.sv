// note_timer_tb: with a 4-bit timer (to reach saturation quickly), checks the
// count after every clock against a model: cleared by a note-on load, not by a
// note-off load, incremented otherwise and held at 15 once it gets there.
module note_timer_tb;
  localparam int B = 4;
  logic clk = 0, reset = 1, en = 0, on = 0;
  logic [B-1:0] time_count;
  int model = 0;
  int checks = 0, failures = 0, sats = 0, clears = 0;

  note_timer #(.BITS(B)) dut (.clk, .reset, .en, .on, .time_count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = (($urandom % 40) == 0);
      on = $urandom;
      @(posedge clk);
      if (en && on) begin model = 0; clears++; end
      else if (model == (1 << B) - 1) sats++;
      else model++;
      #1;
      checks++;
      if (int'(time_count) != model) begin
        failures++;
        $display("FAIL i=%0d time=%0d exp=%0d", i, time_count, model);
      end
    end
    checks++; if (sats == 0 || clears == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
