// eight_port_rom_tb: drives the eight address ports with new random addresses
// once every 256 fast clocks (as the sample clock does) and checks that each
// data port holds the sine word of its own address 2 + 8 fast cycles later and
// still holds it just before the next address change. Also checks that the
// data does not arrive before the two synchronizer stages have passed.
module eight_port_rom_tb;
  import synth_pkg::*;
  localparam int P = 8;
  logic fast_clk = 0, reset = 1;
  rom_addr_t addr [P];
  sample_t data [P];
  int checks = 0, failures = 0;

  eight_port_rom dut (.fast_clk, .reset, .addr, .data);

  always #5 fast_clk = ~fast_clk;

  function automatic int sine_ref(input int i);
    return int'($floor(32767.0 + 32767.0 * $sin(6.283185307179586 * (i % 128) / 128.0) + 0.5));
  endfunction

  task automatic check_all(input string when_);
    for (int p = 0; p < P; p++) begin
      checks++;
      if (int'(data[p]) != sine_ref(int'(addr[p]))) begin
        failures++;
        $display("FAIL %s port %0d addr=%0d data=%h exp=%h", when_, p, addr[p], data[p],
                 sine_ref(int'(addr[p])));
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge fast_clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int early;
    for (int p = 0; p < P; p++) addr[p] = '0;
    repeat (3) @(negedge fast_clk);
    reset = 0;
    for (int round = 0; round < 200; round++) begin
      @(negedge fast_clk);
      for (int p = 0; p < P; p++) begin
        // keep the new word different from the old one so arrival is visible
        rom_addr_t na;
        do na = rom_addr_t'($urandom); while (sine_ref(int'(na)) == sine_ref(int'(addr[p])));
        addr[p] = na;
      end
      // after two fast edges the addresses are only through the synchronizer
      repeat (2) @(negedge fast_clk);
      early = 0;
      for (int p = 0; p < P; p++) if (int'(data[p]) == sine_ref(int'(addr[p]))) early++;
      checks++;
      if (early != 0) begin failures++; $display("FAIL %0d ports updated too early", early); end
      repeat (8) @(negedge fast_clk);
      check_all("after 10");
      repeat (245) @(negedge fast_clk);
      check_all("before next");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
