// tb_noc_router: self-checking test of one router at mesh position (1,1).
//
// The testbench plays all five neighbours. Each upstream model sends
// packets one at a time on its input port: 1-flit request packets on VN0 and
// 5-flit response packets (head + four 16-byte data flits) on VN1, to
// random destinations in a 3x3 mesh, obeying the credit protocol. Each
// downstream model checks that every flit leaves on the XY-route port of its
// destination, that the flits of a packet arrive in order on one VC without
// interleaving, that no VC buffer is ever over-filled, and returns credits
// after a random delay. The router's clock enable and the downstream power
// status are toggled at random. At the end every packet must have arrived.
// Also checks the pipeline latency of an unloaded head flit.
`timescale 1ns/1ps
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned RX = 1, RY = 1;
  localparam int unsigned PKTS_PER_PORT = 60;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en;
  link_t   in_link    [NUM_PORTS];
  credit_t out_credit [NUM_PORTS];
  link_t   out_link   [NUM_PORTS];
  credit_t in_credit  [NUM_PORTS];
  logic    out_on     [NUM_PORTS];
  logic    wake_out   [NUM_PORTS];
  logic    idle;

  noc_router #(.X(RX), .Y(RY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int sent_pkts = 0, recv_pkts = 0, credit_stalls = 0, off_stalls = 0;
  bit random_mode = 0;
  bit done_sending = 0;
  bit    man_valid = 0;
  flit_t man_flit;
  int    man_t = 0;
  int    man_rx_t = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  function automatic port_e ref_route(input int dx, input int dy);
    if (dx > RX) return P_XP;
    if (dx < RX) return P_XM;
    if (dy > RY) return P_YP;
    if (dy < RY) return P_YM;
    return P_LOCAL;
  endfunction

  // ---------------- upstream models ----------------
  int up_cred [NUM_PORTS][NUM_VC];
  int up_seq  [NUM_PORTS];
  int up_idx  [NUM_PORTS];
  int up_len  [NUM_PORTS];
  int up_vc   [NUM_PORTS];
  int up_dx   [NUM_PORTS];
  int up_dy   [NUM_PORTS];

  // ---------------- downstream models ----------------
  int dn_occ  [NUM_PORTS][NUM_VC];      // flits held in the modelled buffer
  int dn_src  [NUM_PORTS][NUM_VC];
  int dn_seq  [NUM_PORTS][NUM_VC];
  int dn_next [NUM_PORTS][NUM_VC];      // -1: no packet open
  int dn_len  [NUM_PORTS][NUM_VC];
  int cred_q_t  [$];                    // credit return time
  int cred_q_p  [$];
  int cred_q_v  [$];

  function automatic flit_t mk_flit(int p);
    flit_t f;
    f.ftype = (up_len[p] == 1) ? FT_HEADTAIL :
              (up_idx[p] == 0) ? FT_HEAD :
              (up_idx[p] == up_len[p]-1) ? FT_TAIL : FT_BODY;
    f.vc      = VC_W'(up_vc[p]);
    f.dst_x   = COORD_W'(up_dx[p]);
    f.dst_y   = COORD_W'(up_dy[p]);
    f.payload = {8'(p), 16'(up_seq[p]), 8'(up_idx[p]), 8'(up_len[p]), 88'(up_seq[p] * 7919 + up_idx[p])};
    return f;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // ---- downstream: receive and check ----
      for (int o = 0; o < NUM_PORTS; o++) begin
        in_credit[o] = '0;
        if (out_link[o].valid) begin
          flit_t f;
          int v, src, seq, idx, len;
          f   = out_link[o].flit;
          v   = int'(f.vc);
          src = int'(f.payload[127:120]);
          seq = int'(f.payload[119:104]);
          idx = int'(f.payload[103:96]);
          len = int'(f.payload[95:88]);
          check(ref_route(int'(f.dst_x), int'(f.dst_y)) == port_e'(o), $sformatf("flit on wrong port %0d", o));
          check((v / VCS_PER_VN) == ((len == 1) ? 0 : 1), "flit on wrong virtual network");
          check(f.payload[87:0] == 88'(seq * 7919 + idx), "payload corrupted");
          if (seq == 999) man_rx_t = cycle;
          dn_occ[o][v]++;
          check(dn_occ[o][v] <= int'(vc_depth(v)), "downstream VC over-filled");
          if (is_head(f.ftype)) begin
            check(dn_next[o][v] == -1 && idx == 0, "head while packet open on VC");
            dn_src[o][v] = src; dn_seq[o][v] = seq; dn_len[o][v] = len; dn_next[o][v] = 1;
          end else begin
            check(dn_next[o][v] == idx && dn_src[o][v] == src && dn_seq[o][v] == seq, "flit out of order / interleaved");
            dn_next[o][v] = idx + 1;
          end
          if (is_tail(f.ftype)) begin
            check(idx == len - 1, "tail at wrong index");
            dn_next[o][v] = -1;
            recv_pkts++;
          end
          cred_q_t.push_back(cycle + (random_mode ? $urandom_range(0, 4) : 0));
          cred_q_p.push_back(o);
          cred_q_v.push_back(v);
        end
      end
      // credit returns, at most one per output port per cycle
      begin
        bit used [NUM_PORTS];
        for (int o = 0; o < NUM_PORTS; o++) used[o] = 0;
        for (int k = 0; k < cred_q_t.size(); k++) begin
          if (cred_q_t[k] <= cycle && !used[cred_q_p[k]]) begin
            used[cred_q_p[k]] = 1;
            in_credit[cred_q_p[k]] = '{valid: 1'b1, vc: VC_W'(cred_q_v[k])};
            dn_occ[cred_q_p[k]][cred_q_v[k]]--;
            cred_q_t.delete(k); cred_q_p.delete(k); cred_q_v.delete(k);
            k--;
          end
        end
      end
      // ---- upstream: credits back and new flits ----
      for (int p = 0; p < NUM_PORTS; p++)
        if (out_credit[p].valid) up_cred[p][out_credit[p].vc]++;
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_link[p] = '0;
        if (p == int'(P_XM) && man_valid) begin
          in_link[p] = '{valid: 1'b1, flit: man_flit};
          man_valid = 0;
          man_t = cycle;
        end
        if (random_mode && !done_sending) begin
          if (up_idx[p] == -1 && up_seq[p] < PKTS_PER_PORT && $urandom_range(0, 3) == 0) begin
            int vn;
            vn = $urandom_range(0, 1);
            up_len[p] = (vn == 0) ? 1 : 5;
            up_vc[p]  = vn * VCS_PER_VN + $urandom_range(0, 1);
            up_dx[p]  = $urandom_range(0, 2);
            up_dy[p]  = $urandom_range(0, 2);
            up_idx[p] = 0;
          end
          if (up_idx[p] >= 0) begin
            if (up_cred[p][up_vc[p]] > 0) begin
              in_link[p] = '{valid: 1'b1, flit: mk_flit(p)};
              up_cred[p][up_vc[p]]--;
              up_idx[p]++;
              if (up_idx[p] == up_len[p]) begin
                up_idx[p] = -1;
                up_seq[p]++;
                sent_pkts++;
              end
            end else credit_stalls++;
          end
        end
      end
      if (random_mode) begin
        en = ($urandom_range(0, 3) != 0);
        for (int o = 0; o < NUM_PORTS; o++) begin
          out_on[o] = ($urandom_range(0, 9) != 0);
        end
        for (int o = 0; o < NUM_PORTS; o++) if (!out_on[o]) off_stalls++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_link[p] = '0; in_credit[p] = '0; out_on[p] = 1'b1;
      up_seq[p] = 0; up_idx[p] = -1;
      for (int v = 0; v < NUM_VC; v++) begin
        up_cred[p][v] = int'(vc_depth(v));
        dn_occ[p][v] = 0; dn_next[p][v] = -1;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(idle === 1'b1, "router idle after reset");

    // ---- latency of a single head-tail flit from -X to +X ----
    begin
      int t0, t1;
      flit_t f;
      f = '0;
      f.ftype = FT_HEADTAIL; f.vc = '0; f.dst_x = 3'd2; f.dst_y = 3'd1;
      f.payload = {8'(P_XM), 16'(999), 8'(0), 8'(1), 88'(999 * 7919)};
      @(negedge clk);
      man_flit = f;
      man_valid = 1;
      up_cred[P_XM][0]--;
      @(negedge clk);
      while (man_rx_t == 0 && cycle < 100) @(negedge clk);
      t0 = man_t;
      t1 = man_rx_t;
      // edge 1 buffer write, 2-3 synchronizer, 4 RC, 5 VA, 6 SA + ST register
      check(t1 - t0 == 6, $sformatf("unloaded router latency %0d, expected 6", t1 - t0));
      $display("unloaded latency (link in to link out) = %0d cycles", t1 - t0);
      repeat (10) @(negedge clk);
      check(idle === 1'b1, "router idle after single flit");
      check(recv_pkts == 1, "single flit delivered");
      recv_pkts = 0;
    end

    // ---- random traffic ----
    random_mode = 1;
    wait (sent_pkts == NUM_PORTS * PKTS_PER_PORT);
    done_sending = 1;
    repeat (400) @(negedge clk);
    random_mode = 0;
    en = 1'b1;
    for (int o = 0; o < NUM_PORTS; o++) out_on[o] = 1'b1;
    repeat (100) @(negedge clk);
    check(recv_pkts == sent_pkts, $sformatf("delivered %0d of %0d packets", recv_pkts, sent_pkts));
    check(idle === 1'b1, "router idle at end");
    check(credit_stalls > 0, "credit stall never happened");
    check(off_stalls > 0, "powered-off neighbour never seen");
    $display("packets %0d, credit stalls %0d", recv_pkts, credit_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
