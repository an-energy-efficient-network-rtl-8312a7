// router_node: one tile's router with its RL agent and power controller,
// the unit drawn in Fig 1(a).
//
// noc_router moves flits; pg_controller gates it off after 4 idle cycles and
// wakes it when a flit or wake request arrives; dvfs_controller turns the RL
// agent's per-epoch action into a voltage select and a clock enable; the
// rl_agent observes the router (flits per port, request/response flits,
// gated-off cycles, wake-ups), the core's cache misses and MSHR latencies.
// The router advances only on base-clock edges where the DVFS enable is set
// and the power controller reports it on.
//
// Neighbour handshake (this design's choice; the document says only that an
// incoming flit wakes the router): `power_on` tells the neighbours and the
// core's network interface whether they may send; a neighbour holding a
// packet for this router raises its `wake_out` towards it, which arrives
// here on `wake_in`. A flit already on the link when the router is gated is
// still written into the input buffer and also wakes it.
module router_node
  import noc_pkg::*;
#(
  parameter int unsigned X             = 0,
  parameter int unsigned Y             = 0,
  parameter int unsigned EPOCH_CYCLES  = 10000,
  parameter int unsigned TRANS_CYCLES  = 200,
  parameter int unsigned IDLE_DETECT   = 4,
  parameter int unsigned WAKEUP_CYCLES = 8,
  parameter int unsigned ANN_DIV       = 2,
  parameter int unsigned EPS_Q10       = 102,
  parameter int unsigned MISS_FS       = 1000,
  parameter int unsigned NUM_MSHR      = 16,
  parameter int unsigned LAT_THRESH    = 300,
  parameter int unsigned MSHR_ID_W     = (NUM_MSHR > 1) ? $clog2(NUM_MSHR) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // links, indexed by noc_pkg::port_e
  input  link_t                in_link    [NUM_PORTS],
  output credit_t              out_credit [NUM_PORTS],
  output link_t                out_link   [NUM_PORTS],
  input  credit_t              in_credit  [NUM_PORTS],
  input  logic                 nbr_on     [NUM_PORTS],
  input  logic                 wake_in    [NUM_PORTS],
  output logic                 wake_out   [NUM_PORTS],
  output logic                 power_on,
  // core and cache observations
  input  logic                 l1d_miss,
  input  logic                 l1i_miss,
  input  logic                 l2_miss,
  input  logic                 mshr_issue_valid,
  input  logic [MSHR_ID_W-1:0] mshr_issue_id,
  input  logic                 mshr_done_valid,
  input  logic [MSHR_ID_W-1:0] mshr_done_id,
  // ANN weight loading
  input  logic                 w_we,
  input  logic [WADDR_W-1:0]   w_addr,
  input  weight_t              w_data,
  // power management outputs
  output level_t               vsel,
  output level_t               fsel,
  output logic                 sleep,
  output logic                 clk_en,
  // observation of the agent
  output level_t               action,
  output logic                 action_valid,
  output logic                 explored,
  output logic                 penalized,
  output logic                 dvfs_switch,
  output logic                 wakeup,
  output sample_t              sample
);
  logic r_idle, pg_wake, pg_off, pg_wake_evt, dvfs_en, in_trans;
  logic rx_valid [NUM_PORTS];
  logic rx_vn    [NUM_PORTS];
  state_vec_t state_unused;
  qval_t      q_unused [NUM_LEVELS];

  assign clk_en = dvfs_en && power_on;

  noc_router #(.X(X), .Y(Y)) u_router (
    .clk(clk), .rst_n(rst_n), .en(clk_en),
    .in_link(in_link), .out_credit(out_credit),
    .out_link(out_link), .in_credit(in_credit),
    .out_on(nbr_on), .wake_out(wake_out), .idle(r_idle));

  always_comb begin
    pg_wake = 1'b0;
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      pg_wake     = pg_wake || wake_in[p] || in_link[p].valid;
      rx_valid[p] = in_link[p].valid;
      rx_vn[p]    = in_link[p].flit.vc[VC_W-1];
    end
  end

  pg_controller #(.IDLE_DETECT(IDLE_DETECT), .WAKEUP_CYCLES(WAKEUP_CYCLES)) u_pg (
    .clk(clk), .rst_n(rst_n), .router_idle(r_idle), .wake(pg_wake),
    .power_on(power_on), .sleep(sleep), .off_cycle(pg_off), .wakeup_evt(pg_wake_evt));

  dvfs_controller #(.TRANS_CYCLES(TRANS_CYCLES)) u_dvfs (
    .clk(clk), .rst_n(rst_n), .action(action), .action_valid(action_valid),
    .vsel(vsel), .fsel(fsel), .clk_en(dvfs_en), .in_transition(in_trans),
    .switch_evt(dvfs_switch));

  rl_agent #(
    .EPOCH_CYCLES(EPOCH_CYCLES), .ANN_DIV(ANN_DIV), .EPS_Q10(EPS_Q10),
    .MISS_FS(MISS_FS), .NUM_MSHR(NUM_MSHR), .LAT_THRESH(LAT_THRESH),
    .LFSR_SEED(16'hACE1 ^ 16'((Y << 8) | X) ^ 16'h5A00), .MSHR_ID_W(MSHR_ID_W)
  ) u_agent (
    .clk(clk), .rst_n(rst_n),
    .l1d_miss(l1d_miss), .l1i_miss(l1i_miss), .l2_miss(l2_miss),
    .rx_valid(rx_valid), .rx_vn(rx_vn), .pg_off(pg_off), .wake_evt(pg_wake_evt),
    .mshr_issue_valid(mshr_issue_valid), .mshr_issue_id(mshr_issue_id),
    .mshr_done_valid(mshr_done_valid), .mshr_done_id(mshr_done_id),
    .cur_level(fsel),
    .w_we(w_we), .w_addr(w_addr), .w_data(w_data),
    .action(action), .action_valid(action_valid), .explored(explored),
    .penalized(penalized), .state(state_unused), .q(q_unused), .sample(sample));

  assign wakeup = pg_wake_evt;
endmodule
