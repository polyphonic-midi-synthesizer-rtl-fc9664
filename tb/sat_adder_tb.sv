// sat_adder_tb: checks the saturating adder at its default width (17 bits)
// against an integer model: the true sum of the two signed operands, clamped
// to the range 0 .. 2**16-1. Corner cases (largest positive sums, sums just
// below zero, both kinds of overflow) are driven first, then random operands.
module sat_adder_tb;
  localparam int W = 17;
  logic [W-1:0] a, b;
  logic [W-2:0] y;
  int checks = 0, failures = 0;

  sat_adder #(.WIDTH(W)) dut (.a, .b, .y);

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    longint sa, sb, s, exp;
    a = ta; b = tb_;
    #1;
    sa = longint'($signed(ta)); sb = longint'($signed(tb_));
    s = sa + sb;
    exp = (s < 0) ? 0 : (s > (2**(W-1) - 1)) ? (2**(W-1) - 1) : s;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h exp=%h", ta, tb_, y, exp);
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
    check_one(17'h0FFFF, 17'h00002);   // envelope past 16'hFFFF
    check_one(17'h0FFFE, 17'h00001);   // lands exactly on full scale
    check_one(17'h00003, 17'h1FFFC);   // 3 - 4 -> clamp to 0
    check_one(17'h00004, 17'h1FFFC);   // exactly 0
    check_one(17'h0FFFF, 17'h0FFFF);   // positive overflow
    check_one(17'h10000, 17'h10000);   // negative overflow
    check_one(17'h00000, 17'h00000);
    for (int i = 0; i < 20000; i++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
