// tb_dvfs_controller: clock-enable duty for the three V/F levels (4/4, 3/4,
// 2/4 of the 2 GHz base clock, i.e. 2, 1.5, 1 GHz), and the order and
// 100 ns (200-cycle) timing of voltage and frequency changes when slowing
// down and speeding up.
`timescale 1ns/1ps
module tb_dvfs_controller;
  import noc_pkg::*;
  localparam int unsigned T = 200;
  logic clk = 0, rst_n = 0, action_valid = 0;
  level_t action = '0, vsel, fsel;
  logic clk_en, in_transition, switch_evt;

  dvfs_controller #(.TRANS_CYCLES(T)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic duty(input int expect_of_400, input string name);
    int n;
    n = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      if (clk_en) n++;
    end
    check(n == expect_of_400, $sformatf("%s: %0d enables in 400 cycles", name, n));
  endtask

  task automatic request(input level_t a);
    @(negedge clk);
    action = a; action_valid = 1;
    @(negedge clk);
    action_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    duty(400, "2 GHz");
    // slow down to 1 GHz: frequency first, voltage after T cycles
    request(2'd2);
    check(fsel == 2 && vsel == 0 && in_transition, "slow-down: frequency first");
    repeat (T - 2) @(negedge clk);
    check(vsel == 0, "voltage not yet lowered");
    repeat (2) @(negedge clk);
    check(vsel == 2 && !in_transition, "voltage lowered after 100 ns");
    duty(200, "1 GHz");
    // speed up to 1.5 GHz: voltage first
    request(2'd1);
    check(vsel == 1 && fsel == 2, "speed-up: voltage first");
    request(2'd0);                       // ignored during transition
    repeat (T - 3) @(negedge clk);
    check(fsel == 2, "frequency not yet raised");
    repeat (2) @(negedge clk);
    check(fsel == 1 && vsel == 1, "frequency raised after 100 ns");
    duty(300, "1.5 GHz");
    request(2'd1);
    check(!in_transition, "same level ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
