// noc_mesh_top: the RL-controlled energy-efficient NoC, a MESH_X x MESH_Y
// mesh (8x8 in the document) of router_node tiles with XY routing.
//
// Node n = y*MESH_X + x. Output +X of node n feeds input -X of node n+1, and
// so on; credits, power status and wake requests run the opposite way. Mesh
// edges are tied off (XY routing never sends a flit off the mesh). The
// processing cores, caches and network interfaces are outside: each node's
// local port, its cache-miss and MSHR events, and its power-management
// outputs (regulator voltage select, header-switch sleep, clock enable) are
// ports of this module. A network interface may send a flit on inj_link
// only while node_on is high and it holds a credit for the target VC
// (credits come back on inj_credit); it raises inj_wake to wake a gated
// router. Ejected flits leave on ej_link; the interface returns one credit
// per flit on ej_credit. ANN weights are written through the cfg_* port,
// to one node or, with cfg_bcast, to all.
module noc_mesh_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X        = 8,
  parameter int unsigned MESH_Y        = 8,
  parameter int unsigned EPOCH_CYCLES  = 10000,
  parameter int unsigned TRANS_CYCLES  = 200,
  parameter int unsigned IDLE_DETECT   = 4,
  parameter int unsigned WAKEUP_CYCLES = 8,
  parameter int unsigned ANN_DIV       = 2,
  parameter int unsigned EPS_Q10       = 102,
  parameter int unsigned MISS_FS       = 1000,
  parameter int unsigned NUM_MSHR      = 16,
  parameter int unsigned LAT_THRESH    = 300,
  parameter int unsigned N             = MESH_X * MESH_Y,
  parameter int unsigned NODE_W        = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned MSHR_ID_W     = (NUM_MSHR > 1) ? $clog2(NUM_MSHR) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // network interfaces
  input  link_t                inj_link   [N],
  output credit_t              inj_credit [N],
  input  logic                 inj_wake   [N],
  output logic                 node_on    [N],
  output link_t                ej_link    [N],
  input  credit_t              ej_credit  [N],
  // core and cache events
  input  logic                 l1d_miss   [N],
  input  logic                 l1i_miss   [N],
  input  logic                 l2_miss    [N],
  input  logic                 mshr_issue_valid [N],
  input  logic [MSHR_ID_W-1:0] mshr_issue_id    [N],
  input  logic                 mshr_done_valid  [N],
  input  logic [MSHR_ID_W-1:0] mshr_done_id     [N],
  // ANN weight configuration
  input  logic                 cfg_we,
  input  logic                 cfg_bcast,
  input  logic [NODE_W-1:0]    cfg_node,
  input  logic [WADDR_W-1:0]   cfg_addr,
  input  weight_t              cfg_data,
  // power management
  output level_t               vsel   [N],
  output level_t               fsel   [N],
  output logic                 sleep  [N],
  output logic                 clk_en [N],
  // agent observation
  output level_t               action       [N],
  output logic                 action_valid [N],
  output logic                 explored     [N],
  output logic                 penalized    [N],
  output logic                 dvfs_switch  [N],
  output logic                 wakeup       [N],
  output sample_t              sample       [N]
);
  link_t   in_l  [N][NUM_PORTS];
  link_t   out_l [N][NUM_PORTS];
  credit_t in_c  [N][NUM_PORTS];
  credit_t out_c [N][NUM_PORTS];
  logic    n_on  [N][NUM_PORTS];
  logic    wk_in [N][NUM_PORTS];
  logic    wk_out[N][NUM_PORTS];
  logic    pwr   [N];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      // local port
      assign in_l [n][P_LOCAL] = inj_link[n];
      assign in_c [n][P_LOCAL] = ej_credit[n];
      assign n_on [n][P_LOCAL] = 1'b1;
      assign wk_in[n][P_LOCAL] = inj_wake[n];
      assign inj_credit[n]     = out_c[n][P_LOCAL];
      assign ej_link[n]        = out_l[n][P_LOCAL];
      assign node_on[n]        = pwr[n];

      // +X neighbour
      if (x < MESH_X - 1) begin : g_xp
        assign in_l [n][P_XP] = out_l [n+1][P_XM];
        assign in_c [n][P_XP] = out_c [n+1][P_XM];
        assign n_on [n][P_XP] = pwr[n+1];
        assign wk_in[n][P_XP] = wk_out[n+1][P_XM];
      end else begin : g_xp_edge
        assign in_l [n][P_XP] = '0;
        assign in_c [n][P_XP] = '0;
        assign n_on [n][P_XP] = 1'b1;
        assign wk_in[n][P_XP] = 1'b0;
      end
      // -X neighbour
      if (x > 0) begin : g_xm
        assign in_l [n][P_XM] = out_l [n-1][P_XP];
        assign in_c [n][P_XM] = out_c [n-1][P_XP];
        assign n_on [n][P_XM] = pwr[n-1];
        assign wk_in[n][P_XM] = wk_out[n-1][P_XP];
      end else begin : g_xm_edge
        assign in_l [n][P_XM] = '0;
        assign in_c [n][P_XM] = '0;
        assign n_on [n][P_XM] = 1'b1;
        assign wk_in[n][P_XM] = 1'b0;
      end
      // +Y neighbour
      if (y < MESH_Y - 1) begin : g_yp
        assign in_l [n][P_YP] = out_l [n+MESH_X][P_YM];
        assign in_c [n][P_YP] = out_c [n+MESH_X][P_YM];
        assign n_on [n][P_YP] = pwr[n+MESH_X];
        assign wk_in[n][P_YP] = wk_out[n+MESH_X][P_YM];
      end else begin : g_yp_edge
        assign in_l [n][P_YP] = '0;
        assign in_c [n][P_YP] = '0;
        assign n_on [n][P_YP] = 1'b1;
        assign wk_in[n][P_YP] = 1'b0;
      end
      // -Y neighbour
      if (y > 0) begin : g_ym
        assign in_l [n][P_YM] = out_l [n-MESH_X][P_YP];
        assign in_c [n][P_YM] = out_c [n-MESH_X][P_YP];
        assign n_on [n][P_YM] = pwr[n-MESH_X];
        assign wk_in[n][P_YM] = wk_out[n-MESH_X][P_YP];
      end else begin : g_ym_edge
        assign in_l [n][P_YM] = '0;
        assign in_c [n][P_YM] = '0;
        assign n_on [n][P_YM] = 1'b1;
        assign wk_in[n][P_YM] = 1'b0;
      end

      router_node #(
        .X(x), .Y(y), .EPOCH_CYCLES(EPOCH_CYCLES), .TRANS_CYCLES(TRANS_CYCLES),
        .IDLE_DETECT(IDLE_DETECT), .WAKEUP_CYCLES(WAKEUP_CYCLES), .ANN_DIV(ANN_DIV),
        .EPS_Q10(EPS_Q10), .MISS_FS(MISS_FS), .NUM_MSHR(NUM_MSHR),
        .LAT_THRESH(LAT_THRESH), .MSHR_ID_W(MSHR_ID_W)
      ) u_node (
        .clk(clk), .rst_n(rst_n),
        .in_link(in_l[n]), .out_credit(out_c[n]), .out_link(out_l[n]), .in_credit(in_c[n]),
        .nbr_on(n_on[n]), .wake_in(wk_in[n]), .wake_out(wk_out[n]), .power_on(pwr[n]),
        .l1d_miss(l1d_miss[n]), .l1i_miss(l1i_miss[n]), .l2_miss(l2_miss[n]),
        .mshr_issue_valid(mshr_issue_valid[n]), .mshr_issue_id(mshr_issue_id[n]),
        .mshr_done_valid(mshr_done_valid[n]), .mshr_done_id(mshr_done_id[n]),
        .w_we(cfg_we && (cfg_bcast || cfg_node == NODE_W'(n))), .w_addr(cfg_addr), .w_data(cfg_data),
        .vsel(vsel[n]), .fsel(fsel[n]), .sleep(sleep[n]), .clk_en(clk_en[n]),
        .action(action[n]), .action_valid(action_valid[n]), .explored(explored[n]),
        .penalized(penalized[n]), .dvfs_switch(dvfs_switch[n]), .wakeup(wakeup[n]),
        .sample(sample[n]));
    end
  end
endmodule
