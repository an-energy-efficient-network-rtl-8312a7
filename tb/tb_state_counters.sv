// tb_state_counters: random events over three epochs of random length;
// the snapshot at each epoch end must equal counts kept by the testbench
// (including the events of the epoch-end cycle), in Fig 3 order.
`timescale 1ns/1ps
module tb_state_counters;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, epoch_end = 0, l1d_miss = 0, l1i_miss = 0, l2_miss = 0, pg_off = 0, wake_evt = 0;
  logic rx_valid [NUM_PORTS];
  logic rx_vn    [NUM_PORTS];
  attr_cnt_t snap;
  cnt_t      snap_wakeups;
  logic      snap_valid;

  state_counters dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ref_c [NUM_ATTR];
  int ref_wk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin rx_valid[p] = 0; rx_vn[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 3; e++) begin
      int len;
      len = $urandom_range(300, 900);
      for (int a = 0; a < NUM_ATTR; a++) ref_c[a] = 0;
      ref_wk = 0;
      for (int c = 0; c < len; c++) begin
        l1d_miss = ($urandom_range(0, 9) == 0);
        l1i_miss = ($urandom_range(0, 19) == 0);
        l2_miss  = ($urandom_range(0, 29) == 0);
        pg_off   = ($urandom_range(0, 1) == 0);
        wake_evt = ($urandom_range(0, 49) == 0);
        for (int p = 0; p < NUM_PORTS; p++) begin
          rx_valid[p] = ($urandom_range(0, 3) == 0);
          rx_vn[p]    = 1'($urandom_range(0, 1));
        end
        epoch_end = (c == len - 1);
        ref_c[0] += l1d_miss; ref_c[1] += l1i_miss; ref_c[2] += l2_miss;
        ref_c[3] += rx_valid[1]; ref_c[4] += rx_valid[2]; ref_c[5] += rx_valid[3];
        ref_c[6] += rx_valid[4]; ref_c[7] += rx_valid[0];
        for (int p = 0; p < NUM_PORTS; p++) begin
          ref_c[8]  += rx_valid[p];
          ref_c[9]  += rx_valid[p] && rx_vn[p];
          ref_c[10] += rx_valid[p] && !rx_vn[p];
        end
        ref_c[11] += pg_off;
        ref_wk    += wake_evt;
        @(negedge clk);
      end
      epoch_end = 0;
      check(snap_valid == 1, "snap_valid after epoch end");
      for (int a = 0; a < NUM_ATTR; a++)
        check(int'(snap[a]) == ref_c[a], $sformatf("epoch %0d attr %0d: %0d vs %0d", e, a + 1, snap[a], ref_c[a]));
      check(int'(snap_wakeups) == ref_wk, "wake-up count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
