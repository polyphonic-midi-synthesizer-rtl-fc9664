// phase_accumulator_tb: runs the accumulator with several increments
// (including the largest, and a change mid-run) and checks the 10-bit address
// after every clock against a 24-bit model of the running sum, wrap included.
module phase_accumulator_tb;
  import synth_pkg::*;
  logic clk = 0, reset = 1;
  phase_t increment = '0;
  rom_addr_t addr;
  longint model = 0;
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator dut (.clk, .reset, .increment, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input phase_t inc, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      increment = inc;
      @(posedge clk);
      model = model + longint'(inc);
      if (model >= (longint'(1) << 24)) begin model -= (longint'(1) << 24); wraps++; end
      #1;
      checks++;
      if (longint'(addr) != (model >> 14)) begin
        failures++;
        $display("FAIL addr=%0d exp=%0d", addr, model >> 14);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (addr != 0) begin failures++; $display("FAIL reset"); end
    reset = 0;
    run(24'h0000DB, 300);    // key 0
    run(24'h052351, 300);    // key 127
    run(24'h002E23, 3000);   // key 69
    for (int j = 0; j < 20; j++) run(phase_t'($urandom), 50);
    checks++; if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
