// tb_q_update_unit: Eq 2 with alpha = 0.1, gamma = 0.95 against a real-
// number model, within 2/4096 plus rounding of the constants, for random
// Q-values and rewards (including the -1 penalty), and the max over a'.
`timescale 1ns/1ps
module tb_q_update_unit;
  import noc_pkg::*;
  qval_t q_old, reward, q_max, q_new;
  qval_t q_next [NUM_LEVELS];
  logic clk = 0;

  q_update_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      real m, mx, tol;
      int  imx;
      q_old  = qval_t'($urandom_range(0, 40000));
      reward = ($urandom_range(0, 5) == 0) ? -4096 : qval_t'($urandom_range(0, 8192));
      for (int a = 0; a < NUM_LEVELS; a++) q_next[a] = qval_t'($urandom_range(0, 40000));
      #1;
      imx = q_next[0];
      for (int a = 1; a < NUM_LEVELS; a++) if (q_next[a] > imx) imx = q_next[a];
      check(q_max == imx, "max over actions");
      mx = real'(imx) / 4096.0;
      m  = (real'(q_old) / 4096.0 + 0.1 * (real'(reward) / 4096.0 + 0.95 * mx - real'(q_old) / 4096.0)) * 4096.0;
      tol = 3.0 + 0.0003 * (real'(imx) + real'(q_old));
      check((real'(q_new) - m) < tol && (m - real'(q_new)) < tol, $sformatf("q_new %0d vs %f", q_new, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
