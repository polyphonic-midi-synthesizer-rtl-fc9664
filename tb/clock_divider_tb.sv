// clock_divider_tb: checks that the sample clock is the fast clock divided by
// 256 (period 256 fast cycles, high for 128), that it stays low in reset and
// that its first rising edge comes 128 fast cycles after reset is released.
module clock_divider_tb;
  logic fast_clk = 0, reset = 1, slow_clk;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, high_cnt = 0, rises = 0;

  clock_divider #(.BITS(8)) dut (.fast_clk, .reset, .slow_clk);

  always #5 fast_clk = ~fast_clk;

  task automatic expect_true(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge fast_clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge fast_clk);
    expect_true(slow_clk == 1'b0, "slow clock low in reset");
    reset = 0;
    // cyc counts fast rising edges after reset release
    fork
      forever @(posedge fast_clk) begin
        cyc++;
        #1;
        if (slow_clk) high_cnt++;
      end
    join_none
    @(posedge slow_clk);
    expect_true(cyc == 128, "first rising edge after 128 fast cycles");
    last_rise = cyc;
    repeat (10) begin
      high_cnt = 0;
      @(posedge slow_clk);
      rises++;
      expect_true(cyc - last_rise == 256, "period of 256 fast cycles");
      expect_true(high_cnt == 128, "high for 128 fast cycles");
      last_rise = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
