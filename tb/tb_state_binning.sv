// tb_state_binning: the document's example (5000 gated-off cycles of a
// 10K-cycle epoch -> bin 2), bin edges, and 2000 random count vectors
// checked against min(4, floor(5*count/FS)) computed by division.
`timescale 1ns/1ps
module tb_state_binning;
  import noc_pkg::*;
  localparam int unsigned E = 10000, M = 1000;
  attr_cnt_t  counts;
  state_vec_t state;
  logic clk = 0;

  state_binning #(.EPOCH_CYCLES(E), .MISS_FS(M)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic int ref_bin(int c, int fs);
    int b;
    b = (5 * c) / fs;
    return (b > 4) ? 4 : b;
  endfunction
  task automatic check_all();
    #1;
    for (int a = 0; a < NUM_ATTR; a++)
      check(int'(state[a]) == ref_bin(int'(counts[a]), (a < 3) ? M : E),
            $sformatf("attr %0d count %0d bin %0d", a, counts[a], state[a]));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    counts = '0;
    counts[A_PG_OFF] = 16'd5000;
    #1;
    check(state[A_PG_OFF] == 3'd2, "PG efficiency 0.5 -> bin 2");
    check_all();
    counts[A_PG_OFF] = 16'd1999; counts[A_THRU] = 16'd4000; counts[A_L1D_MISS] = 16'd799;
    counts[A_L2_MISS] = 16'd800; counts[A_RESP] = 16'd65535;
    #1;
    check(state[A_PG_OFF] == 0 && state[A_THRU] == 2 && state[A_L1D_MISS] == 3 && state[A_L2_MISS] == 4 && state[A_RESP] == 4, "bin edges");
    for (int k = 0; k < 2000; k++) begin
      for (int a = 0; a < NUM_ATTR; a++)
        counts[a] = (a < 3) ? cnt_t'($urandom_range(0, 1300)) : cnt_t'($urandom_range(0, 12000));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
