// tb_mshr_latency_monitor: overlapping read misses with known latencies on
// several MSHR entries; checks the per-epoch latency sum and count and the
// threshold decision (average above LAT_THRESH = 300) in two epochs, one
// fast and one slow.
`timescale 1ns/1ps
module tb_mshr_latency_monitor;
  logic clk = 0, rst_n = 0;
  logic issue_valid = 0, done_valid = 0, epoch_end = 0;
  logic [3:0] issue_id = '0, done_id = '0;
  logic exceeded;
  logic [31:0] snap_sum;
  logic [15:0] snap_count;

  mshr_latency_monitor #(.NUM_MSHR(16), .LAT_THRESH(300)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int issue_at [16];
  int due      [16];
  int sum_ref, cnt_ref;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one epoch of `len` cycles; each miss takes lat_lo..lat_hi cycles
  task automatic run_epoch(input int len, input int lat_lo, input int lat_hi);
    sum_ref = 0; cnt_ref = 0;
    for (int i = 0; i < 16; i++) due[i] = -1;
    for (int c = 0; c < len; c++) begin
      issue_valid = 0; done_valid = 0;
      // complete at most one per cycle
      for (int i = 0; i < 16; i++)
        if (!done_valid && due[i] >= 0 && due[i] <= cyc) begin
          done_valid = 1; done_id = 4'(i);
          sum_ref += cyc - issue_at[i]; cnt_ref++;
          due[i] = -1;
        end
      if (c < len - lat_hi - 20 && $urandom_range(0, 3) == 0) begin
        for (int i = 0; i < 16; i++)
          if (!issue_valid && due[i] < 0 && !(done_valid && int'(done_id) == i)) begin
            issue_valid = 1; issue_id = 4'(i);
            issue_at[i] = cyc; due[i] = cyc + $urandom_range(lat_lo, lat_hi);
          end
      end
      epoch_end = (c == len - 1);
      @(negedge clk);
      cyc++;
    end
    issue_valid = 0; done_valid = 0; epoch_end = 0;
    #1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_epoch(3000, 100, 250);
    check(int'(snap_count) == cnt_ref && cnt_ref > 20, $sformatf("count %0d vs %0d", snap_count, cnt_ref));
    check(int'(snap_sum) == sum_ref, $sformatf("sum %0d vs %0d", snap_sum, sum_ref));
    check(exceeded == 0, "fast epoch below threshold");
    run_epoch(3000, 320, 600);
    check(int'(snap_count) == cnt_ref && cnt_ref > 5, "count slow epoch");
    check(int'(snap_sum) == sum_ref, "sum slow epoch");
    check(exceeded == 1, "slow epoch above threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
