// rl_agent: the per-router reinforcement-learning agent (Sec 2.2, Fig 2,
// Fig 4, Fig 5).
//
// Every EPOCH_CYCLES base cycles (10K, from the document) the agent:
//   1. snapshots its event counters (state_counters) and the MSHR latency
//      monitor, and computes the reward of the epoch just ended (reward_unit,
//      Eq 3, or -1 if the read-miss latency exceeded its threshold);
//   2. bins the counts into the 12-attribute state s' (state_binning);
//   3. runs the ANN on s' to get Q(s',a) for the three V/F actions;
//   4. picks the action with the largest Q-value, or with probability
//      epsilon = 0.1 a random one (epsilon-greedy, 16-bit LFSR);
//   5. applies Eq 2 (q_update_unit) to the previous state-action pair with
//      this reward and max_a Q(s',a), and presents the result on `sample`
//      as a training sample for the offline-trained ANN;
//   6. pulses `action_valid` with the chosen action for the DVFS controller.
// The ANN runs on a clock enable that divides the base clock by ANN_DIV
// (2: a 1 GHz agent clock, so one pass takes about 300 ns, close to the
// document's 299 ns). The decision is ready about 610 base cycles into the
// next epoch, which the 10K-cycle epoch hides.
//
// The document replaces the state-action table by the offline-trained ANN
// and does not say where online Q updates go once it does; here they are
// exported as samples (this design's reading), and the ANN weights are
// loaded through `w_we/w_addr/w_data`. Epsilon is compared as
// lfsr[9:0] < EPS_Q10 (102/1024); the random action is (lfsr[15:12]*3)>>4.
module rl_agent
  import noc_pkg::*;
#(
  parameter int unsigned EPOCH_CYCLES = 10000,
  parameter int unsigned ANN_DIV      = 2,
  parameter int unsigned EPS_Q10      = 102,
  parameter int unsigned MISS_FS      = 1000,
  parameter int unsigned NUM_MSHR     = 16,
  parameter int unsigned LAT_THRESH   = 300,
  parameter int unsigned WAKE_COST    = 4,
  parameter logic [15:0] LFSR_SEED    = 16'hACE1,
  parameter int unsigned MSHR_ID_W    = (NUM_MSHR > 1) ? $clog2(NUM_MSHR) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // environment observations
  input  logic                 l1d_miss,
  input  logic                 l1i_miss,
  input  logic                 l2_miss,
  input  logic                 rx_valid [NUM_PORTS],
  input  logic                 rx_vn    [NUM_PORTS],
  input  logic                 pg_off,
  input  logic                 wake_evt,
  input  logic                 mshr_issue_valid,
  input  logic [MSHR_ID_W-1:0] mshr_issue_id,
  input  logic                 mshr_done_valid,
  input  logic [MSHR_ID_W-1:0] mshr_done_id,
  input  level_t               cur_level,
  // ANN weight loading
  input  logic                 w_we,
  input  logic [WADDR_W-1:0]   w_addr,
  input  weight_t              w_data,
  // decisions
  output level_t               action,
  output logic                 action_valid,
  output logic                 explored,
  output logic                 penalized,
  output state_vec_t           state,
  output qval_t                q [NUM_LEVELS],
  output sample_t              sample
);
  typedef enum logic [1:0] {AG_WAIT, AG_SNAP, AG_ANN, AG_DECIDE} ag_state_e;

  localparam int unsigned EW = $clog2(EPOCH_CYCLES);
  localparam int unsigned DW = (ANN_DIV > 1) ? $clog2(ANN_DIV) : 1;

  ag_state_e     ag;
  logic [EW-1:0] ecnt;
  logic          epoch_end;
  logic [DW-1:0] dcnt;
  logic          ann_en;
  logic [15:0]   lfsr;

  // ---- epoch timer and agent clock enable ----
  assign epoch_end = (int'(ecnt) == EPOCH_CYCLES - 1);
  assign ann_en    = (dcnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ecnt <= '0;
      dcnt <= '0;
      lfsr <= LFSR_SEED;
    end else begin
      ecnt <= epoch_end ? '0 : ecnt + 1'b1;
      dcnt <= (int'(dcnt) == ANN_DIV - 1) ? '0 : dcnt + 1'b1;
      lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
    end
  end

  // ---- observation ----
  attr_cnt_t snap;
  cnt_t      snap_wk;
  logic      snap_valid;
  logic      lat_exc;
  logic [31:0] lat_sum_unused;
  logic [15:0] lat_cnt_unused;
  state_vec_t  s_new;
  qval_t       r_new;
  level_t      level_at_end;

  state_counters u_cnt (
    .clk(clk), .rst_n(rst_n), .epoch_end(epoch_end),
    .l1d_miss(l1d_miss), .l1i_miss(l1i_miss), .l2_miss(l2_miss),
    .rx_valid(rx_valid), .rx_vn(rx_vn), .pg_off(pg_off), .wake_evt(wake_evt),
    .snap(snap), .snap_wakeups(snap_wk), .snap_valid(snap_valid));

  mshr_latency_monitor #(.NUM_MSHR(NUM_MSHR), .LAT_THRESH(LAT_THRESH), .ID_W(MSHR_ID_W)) u_mshr (
    .clk(clk), .rst_n(rst_n),
    .issue_valid(mshr_issue_valid), .issue_id(mshr_issue_id),
    .done_valid(mshr_done_valid), .done_id(mshr_done_id),
    .epoch_end(epoch_end), .exceeded(lat_exc),
    .snap_sum(lat_sum_unused), .snap_count(lat_cnt_unused));

  state_binning #(.EPOCH_CYCLES(EPOCH_CYCLES), .MISS_FS(MISS_FS)) u_bin (
    .counts(snap), .state(s_new));

  reward_unit #(.EPOCH_CYCLES(EPOCH_CYCLES), .WAKE_COST(WAKE_COST)) u_rew (
    .off_cycles(snap[A_PG_OFF]), .flits(snap[A_THRU]), .wakeups(snap_wk),
    .level(level_at_end), .lat_exceeded(lat_exc), .reward(r_new));

  // ---- ANN ----
  logic [ACT_W-1:0] x [ANN_IN];
  logic             ann_start, ann_busy, ann_done;
  qval_t            q_ann [NUM_LEVELS];

  always_comb
    for (int unsigned a = 0; a < ANN_IN; a++)
      x[a] = ACT_W'(state[a]) << (FRAC - 2);    // bin/4: 0, .25, .5, .75, 1.0

  ann_engine u_ann (
    .clk(clk), .rst_n(rst_n), .en(ann_en), .start(ann_start), .x(x),
    .busy(ann_busy), .done(ann_done), .q(q_ann),
    .w_we(w_we), .w_addr(w_addr), .w_data(w_data));

  // ---- action selection and Q update ----
  level_t     greedy, rnd;
  qval_t      q_max, q_new;
  logic       have_prev;
  state_vec_t prev_state;
  level_t     prev_action;
  qval_t      prev_q;
  qval_t      reward_r;

  always_comb begin
    greedy = '0;
    for (int unsigned a = 1; a < NUM_LEVELS; a++)
      if (q[a] > q[greedy]) greedy = level_t'(a);
    rnd = level_t'((int'(lfsr[15:12]) * NUM_LEVELS) >> 4);
  end

  q_update_unit u_qu (.q_old(prev_q), .reward(reward_r), .q_next(q),
                      .q_max(q_max), .q_new(q_new));

  logic   explore;
  level_t chosen;
  assign explore   = (int'(lfsr[9:0]) < EPS_Q10);
  assign chosen    = explore ? rnd : greedy;
  assign ann_start = (ag == AG_ANN) && !ann_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ag           <= AG_WAIT;
      state        <= '0;
      reward_r     <= '0;
      level_at_end <= '0;
      action       <= '0;
      action_valid <= 1'b0;
      explored     <= 1'b0;
      penalized    <= 1'b0;
      have_prev    <= 1'b0;
      prev_state   <= '0;
      prev_action  <= '0;
      prev_q       <= '0;
      sample       <= '0;
      for (int unsigned a = 0; a < NUM_LEVELS; a++) q[a] <= '0;
    end else begin
      action_valid <= 1'b0;
      sample.valid <= 1'b0;
      if (epoch_end) level_at_end <= cur_level;
      unique case (ag)
        AG_WAIT: if (snap_valid) ag <= AG_SNAP;
        AG_SNAP: begin
          state     <= s_new;
          reward_r  <= r_new;
          penalized <= lat_exc;
          ag        <= AG_ANN;
        end
        AG_ANN: if (ann_done) begin
          for (int unsigned a = 0; a < NUM_LEVELS; a++) q[a] <= q_ann[a];
          ag <= AG_DECIDE;
        end
        AG_DECIDE: begin
          explored     <= explore;
          action       <= chosen;
          action_valid <= 1'b1;
          if (have_prev) begin
            sample.valid    <= 1'b1;
            sample.state    <= prev_state;
            sample.action   <= prev_action;
            sample.q_target <= q_new;
            sample.reward   <= reward_r;
          end
          have_prev   <= 1'b1;
          prev_state  <= state;
          prev_action <= chosen;
          prev_q      <= q[chosen];
          ag          <= AG_WAIT;
        end
        default: ag <= AG_WAIT;
      endcase
    end
  end
endmodule
