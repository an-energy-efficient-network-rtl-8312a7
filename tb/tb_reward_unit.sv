// tb_reward_unit: Eq 3 against a real-number model of the same power
// estimates (static savings from gated-off time and lower voltage, dynamic
// savings ~ 1 - V^2 per flit, wake-up cost), within 4/4096, over random
// inputs at all three levels, plus the -1 penalty on a latency violation.
`timescale 1ns/1ps
module tb_reward_unit;
  import noc_pkg::*;
  localparam int unsigned E = 10000, WC = 4;
  cnt_t off_cycles, flits, wakeups;
  level_t level;
  logic lat_exceeded;
  qval_t reward;
  logic clk = 0;

  reward_unit #(.EPOCH_CYCLES(E), .WAKE_COST(WC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic real model(int off, int fl, int wk, int lvl);
    real v, o, u;
    v = (lvl == 0) ? 1.0 : (lvl == 1) ? 0.8 : 0.6;
    o = real'(off) / E;
    u = real'(fl) / E;
    return o + (1.0 - o) * (1.0 - v) + u * (1.0 - v * v) - wk * WC / 4096.0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lat_exceeded = 0;
    // worked example: half the epoch off at 0.6 V, 5000 flits, 10 wake-ups
    off_cycles = 5000; flits = 5000; wakeups = 10; level = 2;
    #1;
    check(reward > 4130 && reward < 4142, $sformatf("example reward %0d", reward));  // 0.5+0.2+0.32-0.0098 = 1.0102
    for (int k = 0; k < 3000; k++) begin
      real m;
      off_cycles = cnt_t'($urandom_range(0, E));
      flits      = cnt_t'($urandom_range(0, 3 * E));
      wakeups    = cnt_t'($urandom_range(0, 200));
      level      = level_t'($urandom_range(0, 2));
      #1;
      m = model(off_cycles, flits, wakeups, level) * 4096.0;
      check((real'(reward) - m) < 4.0 + 0.0005 * m && (m - real'(reward)) < 4.0 + 0.0005 * m,
            $sformatf("reward %0d vs model %f", reward, m));
    end
    lat_exceeded = 1;
    #1;
    check(reward == -4096, "latency penalty -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
