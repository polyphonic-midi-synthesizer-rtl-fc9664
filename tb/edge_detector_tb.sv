// edge_detector_tb: drives a random level (including long runs and single
// cycle blips) and checks that the pulse is high for exactly the one clock
// after each 0 -> 1 transition as seen by the two sampling flops.
module edge_detector_tb;
  logic clk = 0, reset = 1, level = 0, pulse;
  logic m_newer = 0, m_older = 0;
  int checks = 0, failures = 0, pulses = 0;

  edge_detector dut (.clk, .reset, .level, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    level = 1;                       // high during reset: no pulse
    repeat (3) @(negedge clk);
    checks++; if (pulse) begin failures++; $display("FAIL pulse in reset"); end
    reset = 0;
    level = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // model: state after the last posedge
      checks++;
      if (pulse !== (m_newer & ~m_older)) begin
        failures++;
        $display("FAIL i=%0d pulse=%b newer=%b older=%b", i, pulse, m_newer, m_older);
      end
      if (pulse) pulses++;
      if (($urandom % 4) == 0) level = ~level;
      @(posedge clk);
      m_older = m_newer;
      m_newer = level;
    end
    checks++; if (pulses < 50) begin failures++; $display("FAIL too few pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
