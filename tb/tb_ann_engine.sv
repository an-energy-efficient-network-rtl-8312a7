// tb_ann_engine: 12-20-3 network with random 20-bit weights and random
// binned inputs. Each pass is checked against a fixed-point model of the
// network written in the testbench (same Q.12 rules: product shifted back
// before accumulation, piecewise-linear sigmoid on the hidden layer, ReLU on
// the output), and against the pass latency of 301 enabled cycles
// (300 weights, one multiply-accumulate each, plus the SRAM read). Runs
// with the enable always on and with it on every other cycle.
`timescale 1ns/1ps
module tb_ann_engine;
  import noc_pkg::*;
  localparam int NI = 12, NH = 20, NO = 3, NW = NI * NH + NH * NO;

  logic clk = 0, rst_n = 0, en = 1, start = 0, busy, done;
  logic [ACT_W-1:0] x [NI];
  qval_t q [NO];
  logic w_we = 0;
  logic [8:0] w_addr = '0;
  weight_t w_data = '0;

  ann_engine dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, half = 0;
  int wts [NW];
  always @(posedge clk) begin
    cyc++;
    if (half) en <= ~en; else en <= 1'b1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic int plan(longint a);
    longint ax, y;
    ax = (a < 0) ? -a : a;
    if (ax >= 5 * 4096)          y = 4096;
    else if (ax >= 2.375 * 4096) y = ax / 32 + 3456;
    else if (ax >= 4096)         y = ax / 8 + 2560;
    else                         y = ax / 4 + 2048;
    return int'((a < 0) ? 4096 - y : y);
  endfunction

  task automatic ref_net(output int qr [NO]);
    int hid [NH];
    longint acc;
    for (int h = 0; h < NH; h++) begin
      acc = 0;
      for (int i = 0; i < NI; i++) acc += (longint'(wts[h * NI + i]) * longint'(x[i])) >>> 12;
      hid[h] = plan(acc);
    end
    for (int o = 0; o < NO; o++) begin
      acc = 0;
      for (int h = 0; h < NH; h++) acc += (longint'(wts[NI * NH + o * NH + h]) * longint'(hid[h])) >>> 12;
      qr[o] = (acc < 0) ? 0 : int'(acc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 12; pass++) begin
      int qr [NO];
      int t0, lat;
      half = (pass >= 8);
      if (pass % 4 == 0) begin
        // load a new weight set, range -4.0 .. 4.0
        for (int a = 0; a < NW; a++) begin
          @(negedge clk);
          wts[a] = $urandom_range(0, 32768) - 16384;
          w_we = 1; w_addr = 9'(a); w_data = weight_t'(wts[a]);
        end
        @(negedge clk); w_we = 0;
      end
      for (int i = 0; i < NI; i++) x[i] = ACT_W'($urandom_range(0, 4) * 1024);
      // hold start until an enabled edge takes it
      @(negedge clk);
      while (!en) @(negedge clk);
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done && cyc < t0 + 2000) @(negedge clk);
      lat = cyc - t0 - 1;   // edges after the one that takes start
      check(lat == (half ? 2 * (NW + 1) : NW + 1), $sformatf("latency %0d cycles (half=%0d)", lat, half));
      ref_net(qr);
      for (int o = 0; o < NO; o++)
        check(q[o] == qval_t'(qr[o]), $sformatf("pass %0d Q%0d = %0d, model %0d", pass, o, q[o], qr[o]));
      @(negedge clk);
      check(!busy, "idle after pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
