// tb_pg_controller: power gating after exactly IDLE_DETECT (4) consecutive
// idle cycles, reset of the idle count by a busy cycle, wake-up on a wake
// request, WAKEUP_CYCLES latency back to power_on, and the off_cycle /
// wakeup_evt outputs.
`timescale 1ns/1ps
module tb_pg_controller;
  localparam int unsigned WK = 8;
  logic clk = 0, rst_n = 0, router_idle = 0, wake = 0;
  logic power_on, sleep, off_cycle, wakeup_evt;

  pg_controller #(.IDLE_DETECT(4), .WAKEUP_CYCLES(WK)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, wk_pulses = 0, offs = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(posedge clk) begin
    if (wakeup_evt) wk_pulses++;
    if (off_cycle) offs++;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(power_on && !sleep, "on after reset");
    // three idle cycles, then busy: must stay on
    router_idle = 1;
    repeat (3) @(negedge clk);
    check(power_on, "on after 3 idle cycles");
    router_idle = 0;
    @(negedge clk);
    router_idle = 1;
    repeat (3) @(negedge clk);
    check(power_on, "idle count restarted after busy cycle");
    @(negedge clk);
    check(!power_on && sleep && off_cycle, "off after 4 consecutive idle cycles");
    repeat (10) @(negedge clk);
    check(sleep, "stays off while idle");
    check(offs == 11, $sformatf("off cycles counted %0d", offs));
    // wake request
    wake = 1;
    @(negedge clk);
    wake = 0;
    check(!sleep && !power_on, "switch closed, router not yet ready");
    check(wk_pulses == 1, "one wake-up event");
    repeat (WK - 1) @(negedge clk);
    check(!power_on, "not on before wake-up latency");
    @(negedge clk);
    check(power_on, "on after wake-up latency");
    // wake held high: must not gate
    router_idle = 1; wake = 1;
    repeat (8) @(negedge clk);
    check(power_on, "no gating while a flit is arriving");
    wake = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
