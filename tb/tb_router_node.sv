// tb_router_node: one tile at (1,1) with a 2000-cycle epoch and a 50-cycle
// regulator transition. Checks that the idle router gates itself off after
// 4 cycles, that a neighbour's wake request and an arriving flit both wake
// it, that packets sent by a neighbour holding back while the router is off
// arrive intact on the XY output, that it gates off again when idle, and
// that the agent's epoch decision (weights that make action 1 greedy) moves
// the router to 1.5 GHz: frequency first, voltage 50 cycles later, clock
// enable 3 cycles in 4.
`timescale 1ns/1ps
module tb_router_node;
  import noc_pkg::*;
  localparam int unsigned E = 2000, T = 50;

  logic clk = 0, rst_n = 0;
  link_t   in_link    [NUM_PORTS];
  credit_t out_credit [NUM_PORTS];
  link_t   out_link   [NUM_PORTS];
  credit_t in_credit  [NUM_PORTS];
  logic    nbr_on     [NUM_PORTS];
  logic    wake_in    [NUM_PORTS];
  logic    wake_out   [NUM_PORTS];
  logic    power_on, sleep, clk_en;
  logic    l1d_miss = 0, l1i_miss = 0, l2_miss = 0;
  logic    mshr_issue_valid = 0, mshr_done_valid = 0;
  logic [3:0] mshr_issue_id = '0, mshr_done_id = '0;
  logic    w_we = 0;
  logic [WADDR_W-1:0] w_addr = '0;
  weight_t w_data = '0;
  level_t  vsel, fsel, action;
  logic    action_valid, explored, penalized, dvfs_switch, wakeup;
  sample_t sample;

  router_node #(.X(1), .Y(1), .EPOCH_CYCLES(E), .TRANS_CYCLES(T), .EPS_Q10(0)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, rx_flits = 0, wakeups = 0, en_cnt = 0;
  int seq_expect = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    // sink on +X, credits back at once
    in_credit[P_XP] = '0;
    if (out_link[P_XP].valid) begin
      check(out_link[P_XP].flit.payload[31:0] == 32'(seq_expect), "flit order/payload on +X");
      seq_expect++;
      rx_flits++;
      in_credit[P_XP] = '{valid: 1'b1, vc: out_link[P_XP].flit.vc};
    end
    for (int o = 0; o < NUM_PORTS; o++)
      if (o != int'(P_XP)) check(!out_link[o].valid, "flit on unexpected port");
    if (wakeup) wakeups++;
    if (clk_en) en_cnt++;
  end

  int cred_xm [NUM_VC];
  always @(negedge clk) for (int v = 0; v < NUM_VC; v++)
    if (out_credit[P_XM].valid && out_credit[P_XM].vc == VC_W'(v)) cred_xm[v]++;

  // neighbour on -X sends a 5-flit response packet to (2,1) on VC 2,
  // holding back (and requesting wake-up) while this router is off
  int next_seq = 0;
  task automatic send_packet(input bit use_wake);
    for (int k = 0; k < 5; k++) begin
      flit_t f;
      @(negedge clk);
      in_link[P_XM] = '0;
      wake_in[P_XM] = use_wake;
      while (!(power_on || !use_wake) || cred_xm[2] == 0) begin
        @(negedge clk);
        in_link[P_XM] = '0;
      end
      f = '0;
      f.ftype = (k == 0) ? FT_HEAD : (k == 4) ? FT_TAIL : FT_BODY;
      f.vc = 2'd2; f.dst_x = 3'd2; f.dst_y = 3'd1;
      f.payload = 128'(next_seq);
      next_seq++;
      in_link[P_XM] = '{valid: 1'b1, flit: f};
      cred_xm[2]--;
    end
    @(negedge clk);
    in_link[P_XM] = '0;
    wake_in[P_XM] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_link[p] = '0; in_credit[p] = '0; nbr_on[p] = 1'b1; wake_in[p] = 1'b0;
    end
    for (int v = 0; v < NUM_VC; v++) cred_xm[v] = int'(vc_depth(v));
    // weights: hidden all 0 (outputs 0.5); Q1 <- 0.5 per hidden neuron, Q0/Q2 <- 0
    for (int a = 0; a < int'(ANN_WEIGHTS); a++) begin
      @(negedge clk);
      w_we = 1; w_addr = WADDR_W'(a);
      w_data = (a >= 240 + 20 && a < 240 + 40) ? weight_t'(2048) : '0;
    end
    @(negedge clk); w_we = 0;
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(power_on == 1, "on right after reset");
    repeat (5) @(negedge clk);
    check(power_on == 0 && sleep == 1, "gated off after idle cycles");

    // wake by request, then send
    send_packet(1);
    check(wakeups == 1, "one wake-up by request");
    repeat (40) @(negedge clk);
    check(rx_flits == 5, $sformatf("first packet delivered (%0d flits)", rx_flits));
    check(sleep == 1, "gated off again after the packet");

    // a flit that arrives while off (upstream ignoring power status) wakes it
    send_packet(0);
    repeat (40) @(negedge clk);
    check(wakeups == 2, "woken by an arriving flit");
    check(rx_flits == 10, "second packet delivered");

    // epoch decision: greedy action 1
    while (!action_valid) @(negedge clk);
    check(action == 1, "agent chose action 1");
    @(negedge clk);
    check(fsel == 1 && vsel == 0, "frequency lowered first");
    repeat (T) @(negedge clk);
    check(vsel == 1, "voltage lowered after transition");
    // measure the enable duty while the router is powered
    wake_in[P_LOCAL] = 1;
    repeat (20) @(negedge clk);
    en_cnt = 0;
    repeat (400) @(negedge clk);
    check(en_cnt == 300, $sformatf("1.5 GHz enable duty %0d/400", en_cnt));
    wake_in[P_LOCAL] = 0;
    send_packet(1);
    repeat (60) @(negedge clk);
    check(rx_flits == 15, "packet delivered at 1.5 GHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
