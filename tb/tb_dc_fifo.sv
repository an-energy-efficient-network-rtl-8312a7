// tb_dc_fifo: dual-clock FIFO with unrelated write (10 ns) and read (14 ns)
// clocks. Fills the FIFO with the reader stopped and checks `wfull` after
// exactly 2**AW writes, then streams 500 random words with random enables
// on both sides and checks every word arrives once, in order.
`timescale 1ns/1ps
module tb_dc_fifo;
  localparam int unsigned WIDTH = 8, AW = 2;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen = 0, ren = 0, wfull, rempty;
  logic [WIDTH-1:0] wdata = '0, rdata;

  dc_fifo #(.WIDTH(WIDTH), .AW(AW)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] sb [$];
  int nwr = 0, nrd = 0;
  bit stream = 0, rd_on = 0, fill = 0;
  int nfill = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // writer
  always @(negedge wclk) begin
    wen = 0;
    if (fill && nfill < (1 << AW)) begin
      check(wfull == 0, "full too early");
      wdata = 8'(nfill + 1); wen = 1; sb.push_back(wdata); nfill++;
    end
    if (stream && nwr < 500 && !wfull && $urandom_range(0, 2) != 0) begin
      wdata = 8'($urandom);
      wen = 1;
      sb.push_back(wdata);
      nwr++;
    end
  end
  // reader
  always @(negedge rclk) begin
    ren = 0;
    if (rd_on && !rempty && $urandom_range(0, 2) != 0) begin
      check(sb.size() > 0, "read with empty scoreboard");
      if (sb.size() > 0) check(rdata == sb.pop_front(), "data mismatch");
      ren = 1;
      nrd++;
    end
  end

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(rempty == 1, "empty after reset");
    check(wfull == 0, "not full after reset");
    // fill with the reader stopped
    fill = 1;
    wait (nfill == (1 << AW));
    repeat (2) @(negedge wclk);
    check(wfull == 1, "full after 2**AW writes");
    repeat (4) @(posedge rclk);
    check(rempty == 0, "not empty once filled");
    rd_on = 1;
    wait (sb.size() == 0);
    stream = 1;
    wait (nwr == 500);
    wait (sb.size() == 0);
    repeat (6) @(posedge rclk);
    check(rempty == 1, "empty at end");
    check(nrd == 500 + (1 << AW), "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
