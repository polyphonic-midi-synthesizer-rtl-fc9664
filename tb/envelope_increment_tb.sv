// envelope_increment_tb: checks the increment and phase chosen for the
// default constants at the phase boundaries, then for random constants,
// times and on/off states against a model of the attack/decay/sustain/release
// rule.
module envelope_increment_tb;
  import synth_pkg::*;
  env_cfg_t cfg;
  logic [TIME_W-1:0] time_count;
  logic on;
  env_inc_t increment;
  env_phase_t phase;
  int checks = 0, failures = 0;

  envelope_increment dut (.cfg, .time_count, .on, .increment, .phase);

  task automatic check_one(input int t, input bit o);
    env_inc_t ei; env_phase_t ep;
    time_count = TIME_W'(t); on = o;
    #1;
    if (!o)                    begin ei = cfg.rel;    ep = ENV_PH_RELEASE; end
    else if (t < int'(cfg.atime)) begin ei = cfg.attack; ep = ENV_PH_ATTACK;  end
    else if (t < int'(cfg.dtime)) begin ei = cfg.decay;  ep = ENV_PH_DECAY;   end
    else                       begin ei = '0;         ep = ENV_PH_SUSTAIN; end
    checks++;
    if (increment !== ei || phase !== ep) begin
      failures++;
      $display("FAIL t=%0d on=%0d inc=%0d phase=%0d exp %0d %0d", t, o, increment, phase, ei, ep);
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
    cfg = ENV_DEFAULT;
    // hand values for the default constants
    time_count = 0; on = 1; #1;
    checks++; if (increment != 17'sd2) begin failures++; $display("FAIL attack=2"); end
    time_count = 20'h07FFF; #1;
    checks++; if (increment != -17'sd1) begin failures++; $display("FAIL decay=-1"); end
    time_count = 20'h0FFFF; #1;
    checks++; if (increment != 17'sd0) begin failures++; $display("FAIL sustain=0"); end
    on = 0; #1;
    checks++; if (increment != -17'sd4) begin failures++; $display("FAIL release=-4"); end
    for (int t = 32764; t < 32770; t++) begin check_one(t, 1); check_one(t, 0); end
    for (int t = 65532; t < 65538; t++) check_one(t, 1);
    for (int i = 0; i < 5000; i++) begin
      cfg.attack = env_inc_t'($urandom);
      cfg.decay  = env_inc_t'($urandom);
      cfg.rel    = env_inc_t'($urandom);
      cfg.atime  = TIME_W'($urandom % 4096);
      cfg.dtime  = TIME_W'($urandom % 8192);
      check_one($urandom % 10000, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
