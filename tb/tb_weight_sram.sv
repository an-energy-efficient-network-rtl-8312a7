// tb_weight_sram: writes 300 random 20-bit weights, reads them back in
// random order with the one-cycle read latency, and checks that rdata holds
// while ren is low.
`timescale 1ns/1ps
module tb_weight_sram;
  logic clk = 0, we = 0, ren = 0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [19:0] wdata = '0, rdata;
  weight_sram #(.DEPTH(300), .WIDTH(20)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [19:0] ref_m [300];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 300; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = 20'($urandom); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 600; k++) begin
      int a;
      a = $urandom_range(0, 299);
      ren = 1; raddr = 9'(a);
      @(negedge clk);
      check(rdata == ref_m[a], $sformatf("addr %0d", a));
      ren = 0; raddr = 9'($urandom_range(0, 299));
      @(negedge clk);
      check(rdata == ref_m[a], "rdata held while ren low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
