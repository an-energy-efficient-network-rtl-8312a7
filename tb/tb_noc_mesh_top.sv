// tb_noc_mesh_top: end-to-end test of the mesh with a network-interface
// model at every node.
//
// Each interface injects request packets (1 flit, VN0) and response packets
// (head + 4 data flits, VN1) to random destinations, obeying credits and the
// router's power status (raising inj_wake when the router is gated), and
// checks every ejected flit: right destination, packet order, no
// interleaving on a VC, intact payload. Cache misses and MSHR read misses
// are generated too; node 0 sees slow read misses in one epoch. All ANN
// weights are broadcast first: Q(a0) falls with the PG-efficiency attribute
// and Q(a2) is constant, so lightly loaded routers choose 1 GHz. The test
// runs several epochs of varying load, drains the network, and requires
// every packet delivered and every mechanism seen at least once: power-off,
// wake-up, credit stall, hold-off for a gated router, V/F switch,
// epsilon exploration, latency penalty, Q-update sample.
`timescale 1ns/1ps
module tb_noc_mesh_top;
  import noc_pkg::*;
  localparam int unsigned MX = 3, MY = 3, N = MX * MY;
  localparam int unsigned E = 1500;
  localparam int unsigned EPOCHS = 5;
  localparam int unsigned DRAIN = 600;
  localparam int unsigned WATCHDOG = E * EPOCHS + 5000;

  logic clk = 0, rst_n = 0;
  link_t   inj_link   [N];
  credit_t inj_credit [N];
  logic    inj_wake   [N];
  logic    node_on    [N];
  link_t   ej_link    [N];
  credit_t ej_credit  [N];
  logic    l1d_miss [N], l1i_miss [N], l2_miss [N];
  logic    mshr_issue_valid [N], mshr_done_valid [N];
  logic [3:0] mshr_issue_id [N], mshr_done_id [N];
  logic    cfg_we = 0, cfg_bcast = 0;
  logic [$clog2(N)-1:0] cfg_node = '0;
  logic [WADDR_W-1:0]   cfg_addr = '0;
  weight_t cfg_data = '0;
  level_t  vsel [N], fsel [N], action [N];
  logic    sleep [N], clk_en [N], action_valid [N], explored [N], penalized [N];
  logic    dvfs_switch [N], wakeup [N];
  sample_t sample [N];

  noc_mesh_top #(.MESH_X(MX), .MESH_Y(MY), .EPOCH_CYCLES(E), .TRANS_CYCLES(50)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, recv = 0;
  int n_off = 0, n_wake = 0, n_cstall = 0, n_hold = 0, n_switch = 0, n_expl = 0, n_pen = 0, n_samp = 0, n_dec = 0;
  bit inject = 0;
  int rate = 8;                        // inject when $urandom_range(0, rate) == 0
  bit prev_sleep [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // ---------------- network interface state ----------------
  int cred   [N][NUM_VC];
  int p_idx  [N], p_len [N], p_vc [N], p_dst [N], p_seq [N];
  int r_next [N][NUM_VC], r_src [N][NUM_VC], r_seq [N][NUM_VC];
  int m_due  [N][16];

  function automatic flit_t mk(int n);
    flit_t f;
    f.ftype = (p_len[n] == 1) ? FT_HEADTAIL : (p_idx[n] == 0) ? FT_HEAD :
              (p_idx[n] == p_len[n] - 1) ? FT_TAIL : FT_BODY;
    f.vc = VC_W'(p_vc[n]);
    f.dst_x = COORD_W'(p_dst[n] % MX);
    f.dst_y = COORD_W'(p_dst[n] / MX);
    f.payload = {16'(n), 16'(p_seq[n]), 8'(p_idx[n]), 8'(p_len[n]), 80'(p_seq[n] * 31 + p_idx[n] + n * 1000)};
    return f;
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      // ---- ejection ----
      ej_credit[n] = '0;
      if (ej_link[n].valid) begin
        flit_t f;
        int v, src, seq, idx, len;
        f = ej_link[n].flit;
        v = int'(f.vc);
        src = int'(f.payload[127:112]); seq = int'(f.payload[111:96]);
        idx = int'(f.payload[95:88]);   len = int'(f.payload[87:80]);
        check(int'(f.dst_x) == n % MX && int'(f.dst_y) == n / MX, "ejected at wrong node");
        check(f.payload[79:0] == 80'(seq * 31 + idx + src * 1000), "payload corrupted");
        if (is_head(f.ftype)) begin
          check(r_next[n][v] == -1 && idx == 0, "head while packet open");
          r_next[n][v] = 1; r_src[n][v] = src; r_seq[n][v] = seq;
        end else begin
          check(r_next[n][v] == idx && r_src[n][v] == src && r_seq[n][v] == seq, "flit order / interleaving");
          r_next[n][v] = idx + 1;
        end
        if (is_tail(f.ftype)) begin
          check(idx == len - 1, "tail index");
          r_next[n][v] = -1;
          recv++;
        end
        ej_credit[n] = '{valid: 1'b1, vc: f.vc};
      end
      // ---- injection ----
      if (inj_credit[n].valid) cred[n][inj_credit[n].vc]++;
      inj_link[n] = '0;
      if (p_idx[n] < 0 && inject && $urandom_range(0, rate) == 0) begin
        int vn;
        vn = $urandom_range(0, 1);
        p_len[n] = vn ? 5 : 1;
        p_vc[n]  = vn * VCS_PER_VN + $urandom_range(0, 1);
        p_dst[n] = $urandom_range(0, N - 1);
        p_idx[n] = 0;
      end
      inj_wake[n] = (p_idx[n] >= 0) && !node_on[n];
      if (p_idx[n] >= 0) begin
        if (!node_on[n]) n_hold++;
        else if (cred[n][p_vc[n]] == 0) n_cstall++;
        else begin
          inj_link[n] = '{valid: 1'b1, flit: mk(n)};
          cred[n][p_vc[n]]--;
          p_idx[n]++;
          if (p_idx[n] == p_len[n]) begin p_idx[n] = -1; p_seq[n]++; sent++; end
        end
      end
      // ---- cache and MSHR events ----
      l1d_miss[n] = ($urandom_range(0, 40) == 0);
      l1i_miss[n] = ($urandom_range(0, 80) == 0);
      l2_miss[n]  = ($urandom_range(0, 120) == 0);
      mshr_issue_valid[n] = 0; mshr_done_valid[n] = 0;
      for (int i = 0; i < 16; i++)
        if (!mshr_done_valid[n] && m_due[n][i] >= 0 && m_due[n][i] <= cyc) begin
          mshr_done_valid[n] = 1; mshr_done_id[n] = 4'(i); m_due[n][i] = -1;
        end
      if ($urandom_range(0, 30) == 0)
        for (int i = 0; i < 16; i++)
          if (!mshr_issue_valid[n] && m_due[n][i] < 0 && !(mshr_done_valid[n] && int'(mshr_done_id[n]) == i)) begin
            mshr_issue_valid[n] = 1; mshr_issue_id[n] = 4'(i);
            // node 0 has slow read misses during the second epoch
            m_due[n][i] = cyc + ((n == 0 && cyc >= E && cyc < 2 * E - 700) ? 500 : $urandom_range(130, 200));
          end
      // ---- mechanism counters ----
      if (sleep[n] && !prev_sleep[n]) n_off++;
      prev_sleep[n] = sleep[n];
      if (wakeup[n]) n_wake++;
      if (dvfs_switch[n]) n_switch++;
      if (action_valid[n]) begin
        n_dec++;
        if (explored[n]) n_expl++;
        if (penalized[n]) n_pen++;
      end
      if (sample[n].valid) n_samp++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      inj_link[n] = '0; ej_credit[n] = '0; inj_wake[n] = 0;
      l1d_miss[n] = 0; l1i_miss[n] = 0; l2_miss[n] = 0;
      mshr_issue_valid[n] = 0; mshr_done_valid[n] = 0; mshr_issue_id[n] = '0; mshr_done_id[n] = '0;
      p_idx[n] = -1; p_seq[n] = 0; prev_sleep[n] = 0;
      for (int v = 0; v < NUM_VC; v++) begin cred[n][v] = int'(vc_depth(v)); r_next[n][v] = -1; end
      for (int i = 0; i < 16; i++) m_due[n][i] = -1;
    end
    // broadcast the weight set while in reset
    for (int a = 0; a < int'(ANN_WEIGHTS); a++) begin
      int w;
      w = 0;
      if (a == 11)                            w = -8 * 4096;   // h0 <- PG efficiency
      if (a == 240)                           w = 4 * 4096;    // Q0 <- h0
      if (a >= 240 + 2 * 20 + 1 && a < 300)  w = 614;         // Q2 <- h1..h19
      @(negedge clk);
      cfg_we = 1; cfg_bcast = 1; cfg_addr = WADDR_W'(a); cfg_data = weight_t'(w);
    end
    @(negedge clk); cfg_we = 0; cfg_bcast = 0;
    rst_n = 1;
    inject = 1;
    for (int e = 0; e < int'(EPOCHS); e++) begin
      rate = (e % 2 == 0) ? 4 : 40;
      repeat (E) @(negedge clk);
    end
    inject = 0;
    repeat (DRAIN) @(negedge clk);
    for (int n = 0; n < N; n++) check(p_idx[n] < 0, "interface finished its packet");
    check(sent > 0 && recv == sent, $sformatf("delivered %0d of %0d packets", recv, sent));
    check(n_dec == N * int'(EPOCHS - 1) || n_dec == N * int'(EPOCHS), $sformatf("%0d decisions", n_dec));
    check(n_off  > 0, "power-off never happened");
    check(n_wake > 0, "wake-up never happened");
    check(n_cstall > 0, "credit stall never happened");
    check(n_hold > 0, "hold-off for a gated router never happened");
    check(n_switch > 0, "V/F switch never happened");
    check(n_expl > 0, "exploration never happened");
    check(n_pen > 0, "latency penalty never happened");
    check(n_samp > 0, "Q-update sample never produced");
    $display("packets %0d, power-offs %0d, wake-ups %0d, credit stalls %0d, hold-offs %0d",
             recv, n_off, n_wake, n_cstall, n_hold);
    $display("decisions %0d, V/F switches %0d, explorations %0d, penalties %0d, samples %0d",
             n_dec, n_switch, n_expl, n_pen, n_samp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
