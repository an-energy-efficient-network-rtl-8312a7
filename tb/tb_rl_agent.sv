// tb_rl_agent: the agent with a 1000-cycle epoch and a hand-built weight
// set whose greedy choice depends on the PG-efficiency attribute: hidden
// neuron 0 has weight -8 on it and feeds Q(a0) with weight 4; every other
// hidden neuron feeds Q(a2) with weight 0.15. Router never gated -> action 0;
// gated the whole epoch -> action 2. Checks the state vector, the chosen
// action, the decision time within the epoch, the Q-update sample (against
// a real-number Eq 2), and the -1 reward when read misses are slow. A
// second agent with epsilon = 0.5 must explore on some epochs, not all.
`timescale 1ns/1ps
module tb_rl_agent;
  import noc_pkg::*;
  localparam int unsigned E = 1000;

  logic clk = 0, rst_n = 0;
  logic l1d_miss = 0, l1i_miss = 0, l2_miss = 0, pg_off = 0, wake_evt = 0;
  logic rx_valid [NUM_PORTS];
  logic rx_vn    [NUM_PORTS];
  logic mshr_issue_valid = 0, mshr_done_valid = 0;
  logic [3:0] mshr_issue_id = '0, mshr_done_id = '0;
  logic w_we = 0;
  logic [WADDR_W-1:0] w_addr = '0;
  weight_t w_data = '0;

  level_t     action [2];
  logic       action_valid [2], explored [2], penalized [2];
  state_vec_t state [2];
  qval_t      q0 [NUM_LEVELS];
  qval_t      q1 [NUM_LEVELS];
  sample_t    sample [2];

  rl_agent #(.EPOCH_CYCLES(E), .ANN_DIV(1), .EPS_Q10(0)) dut (
    .clk, .rst_n, .l1d_miss, .l1i_miss, .l2_miss, .rx_valid, .rx_vn, .pg_off, .wake_evt,
    .mshr_issue_valid, .mshr_issue_id, .mshr_done_valid, .mshr_done_id, .cur_level(2'd0),
    .w_we, .w_addr, .w_data, .action(action[0]), .action_valid(action_valid[0]),
    .explored(explored[0]), .penalized(penalized[0]), .state(state[0]), .q(q0), .sample(sample[0]));

  rl_agent #(.EPOCH_CYCLES(E), .ANN_DIV(2), .EPS_Q10(512), .LFSR_SEED(16'h1D2B)) dut_eps (
    .clk, .rst_n, .l1d_miss, .l1i_miss, .l2_miss, .rx_valid, .rx_vn, .pg_off, .wake_evt,
    .mshr_issue_valid, .mshr_issue_id, .mshr_done_valid, .mshr_done_id, .cur_level(2'd0),
    .w_we, .w_addr, .w_data, .action(action[1]), .action_valid(action_valid[1]),
    .explored(explored[1]), .penalized(penalized[1]), .state(state[1]), .q(q1), .sample(sample[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int dec_cnt = 0, dec_at = -1, eps_dec = 0, eps_expl = 0, samples = 0;
  level_t last_action = '0;
  sample_t last_sample;
  state_vec_t last_state;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (action_valid[0]) begin dec_cnt++; dec_at = cyc % E; last_action = action[0]; last_state = state[0]; end
    if (sample[0].valid) begin samples++; last_sample = sample[0]; end
    if (action_valid[1]) begin
      eps_dec++;
      if (explored[1]) eps_expl++;
      check(int'(action[1]) < 3, "explored action in range");
    end
  end

  task automatic wait_decision(input int n);
    while (dec_cnt < n) @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qval_t q_prev;
    for (int p = 0; p < NUM_PORTS; p++) begin rx_valid[p] = 0; rx_vn[p] = 0; end
    // weights are loaded while in reset
    for (int a = 0; a < int'(ANN_WEIGHTS); a++) begin
      int w;
      w = 0;
      if (a == 0 * 12 + 11)                w = -8 * 4096;        // h0 <- PG efficiency
      if (a == 240 + 0 * 20 + 0)           w = 4 * 4096;         // Q0 <- h0
      if (a >= 240 + 2 * 20 + 1 && a < 300) w = 614;             // Q2 <- h1..h19 (0.15)
      @(negedge clk);
      w_we = 1; w_addr = WADDR_W'(a); w_data = weight_t'(w);
    end
    @(negedge clk); w_we = 0;
    rst_n = 1;

    // epoch 1: router never off, light traffic on +X
    fork
      begin
        for (int c = 0; c < E; c++) begin
          rx_valid[P_XP] = (c % 4 == 0); rx_vn[P_XP] = 1'b1;
          @(negedge clk);
        end
        rx_valid[P_XP] = 0;
      end
    join_none
    wait_decision(1);
    // +X got 250 flits: bin floor(5*250/1000) = 1; throughput 1; responses 1
    check(last_state[A_XP_FLITS] == 1 && last_state[A_THRU] == 1 && last_state[A_RESP] == 1 &&
          last_state[A_REQ] == 0 && last_state[A_PG_OFF] == 0, "state of epoch 1");
    check(last_action == 0, "greedy action 0 when never gated");
    // decision 306 cycles after the epoch boundary (ANN_DIV = 1)
    check(dec_at == 306, $sformatf("decision at cycle %0d of the epoch", dec_at));
    check(samples == 0, "no sample after the first epoch");
    q_prev = q0[0];
    check(q_prev == 8192, $sformatf("Q(s1,a0) = %0d, expected 2.0", q_prev));
    // the quiet epoch that follows decides again (action 0)
    wait_decision(2);
    check(last_action == 0 && samples == 1, "second decision");

    // epoch 3: router gated off the whole epoch
    while (cyc % E != 0) @(negedge clk);
    pg_off = 1;
    repeat (E) @(negedge clk);
    pg_off = 0;
    wait_decision(dec_cnt + 1);
    check(last_state[A_PG_OFF] == 4, "PG efficiency bin 4");
    check(last_action == 2, "greedy action 2 when gated all epoch");
    check(samples == dec_cnt - 1, "one sample per decision after the first");
    begin
      real r, qn, mx;
      r  = real'(last_sample.reward) / 4096.0;
      mx = real'(q0[2] > q0[0] ? q0[2] : q0[0]) / 4096.0;
      qn = (2.0 + 0.1 * (r + 0.95 * mx - 2.0)) * 4096.0;
      check(last_sample.reward > 4080 && last_sample.reward <= 4096, $sformatf("reward %0d ~ 1.0", last_sample.reward));
      check(last_sample.action == 0 && last_sample.state[A_PG_OFF] == 0, "sample holds previous state-action");
      check((real'(last_sample.q_target) - qn) < 4.0 && (qn - real'(last_sample.q_target)) < 4.0,
            $sformatf("Q target %0d vs %f", last_sample.q_target, qn));
    end

    // epoch 4: slow read misses (400 cycles each) -> penalty
    while (cyc % E != 0) @(negedge clk);
    for (int c = 0; c < E; c++) begin
      mshr_issue_valid = (c % 100 == 0) && c < 500;
      mshr_issue_id    = 4'(c / 100);
      mshr_done_valid  = (c % 100 == 0) && c >= 400 && c < 900;
      mshr_done_id     = 4'((c - 400) / 100);
      @(negedge clk);
    end
    mshr_issue_valid = 0; mshr_done_valid = 0;
    wait_decision(dec_cnt + 1);
    check(penalized[0] == 1, "latency penalty flagged");
    check(last_sample.reward == -4096, "reward -1 under penalty");

    // run on for the exploring agent
    while (eps_dec < 20) @(negedge clk);
    check(eps_expl > 2 && eps_expl < 18, $sformatf("explored %0d of %0d decisions", eps_expl, eps_dec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
