// noc_router: five-port, four-stage wormhole virtual-channel router with
// deterministic XY routing (Fig 1(a), Sec 2.1).
//
// Stages: (1) buffer write into the input VC, (2) route computation (RC) on
// the head flit, (3) virtual-channel allocation (VA) of a downstream VC in
// the same virtual network, (4) switch allocation (SA); the winning flit then
// crosses the crossbar into the output register (switch traversal) and is on
// the link the next cycle. Flow control is credit based: one credit per
// downstream buffer slot, returned when the downstream router reads the slot.
//
// Each input VC buffer is a dual-clock FIFO (dc_fifo): it is written in the
// upstream router's domain and read in this one. In the mesh all routers
// share one base clock and each runs on a clock enable `en` that encodes its
// DVFS frequency and its power-gating state; the buffer write side, the
// credit counters and the link registers are updated on every base-clock
// edge so that one-cycle link pulses are never lost, while RC, VA, SA and
// buffer reads advance only on enabled edges.
//
// Allocation is separable round-robin: VA grants one input VC per output
// port per cycle; SA first picks one ready VC per input port and then one
// input per output port. These arbiter choices, the two-VN VC organisation
// and the flit format are this design's own; the document gives the stage
// list, XY routing, 2 VCs per virtual network and the 1-flit control /
// 3-flit data buffer sizes (Table 1).
//
// Interface (index = port, see noc_pkg::port_e):
//   in_link/out_credit  : flits arriving on input p; credits returned upstream
//   out_link/in_credit  : flits leaving on output p; credits from downstream
//   out_on[p]           : downstream of output p is powered and may receive
//   wake_out[p]         : a packet here is waiting for output p (wakes it)
//   idle                : nothing buffered, nothing in flight, all credits home
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  link_t   in_link    [NUM_PORTS],
  output credit_t out_credit [NUM_PORTS],
  output link_t   out_link   [NUM_PORTS],
  input  credit_t in_credit  [NUM_PORTS],
  input  logic    out_on     [NUM_PORTS],
  output logic    wake_out   [NUM_PORTS],
  output logic    idle
);
  localparam int unsigned NIV = NUM_PORTS * NUM_VC;

  typedef enum logic [1:0] {VS_IDLE, VS_VA, VS_ACTIVE} vstate_e;

  // ---------------------------------------------------------------------
  // Input VC buffers
  // ---------------------------------------------------------------------
  flit_t      head  [NIV];
  logic       empty [NIV];
  logic       pop   [NIV];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      // Credits cap the occupancy at the Table 1 depth; the extra physical
      // slots cover the read pointer's synchronizer lag on the write side.
      localparam int unsigned AWV = (v / VCS_PER_VN == 0) ? 2 : 3;
      logic wfull_unused;
      logic [$bits(flit_t)-1:0] rd;
      dc_fifo #(.WIDTH($bits(flit_t)), .AW(AWV)) u_buf (
        .wclk   (clk),
        .wrst_n (rst_n),
        .wen    (in_link[i].valid && (in_link[i].flit.vc == VC_W'(v))),
        .wdata  (in_link[i].flit),
        .wfull  (wfull_unused),
        .rclk   (clk),
        .rrst_n (rst_n),
        .ren    (en && pop[i*NUM_VC+v]),
        .rdata  (rd),
        .rempty (empty[i*NUM_VC+v])
      );
      assign head[i*NUM_VC+v] = flit_t'(rd);
    end
  end

  // ---------------------------------------------------------------------
  // Per input VC state: RC result and allocated output VC
  // ---------------------------------------------------------------------
  vstate_e         vstate  [NIV];
  port_e           vport   [NIV];
  logic [VC_W-1:0] vovc    [NIV];

  function automatic port_e xy_route(input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy);
    if      (dx > COORD_W'(X)) return P_XP;
    else if (dx < COORD_W'(X)) return P_XM;
    else if (dy > COORD_W'(Y)) return P_YP;
    else if (dy < COORD_W'(Y)) return P_YM;
    else                       return P_LOCAL;
  endfunction

  // ---------------------------------------------------------------------
  // VC allocation: per output port, one winner per cycle
  // ---------------------------------------------------------------------
  logic [NUM_VC-1:0] ovc_busy [NUM_PORTS];
  logic [NIV-1:0]    va_req   [NUM_PORTS];
  logic [NIV-1:0]    va_gnt   [NUM_PORTS];
  logic              va_gv    [NUM_PORTS];
  logic [$clog2(NIV)-1:0] va_gi [NUM_PORTS];

  // lowest free output VC of virtual network vn at output o
  function automatic logic [VC_W:0] free_vc(input logic [NUM_VC-1:0] busy, input int unsigned vn);
    for (int unsigned k = 0; k < VCS_PER_VN; k++)
      if (!busy[vn*VCS_PER_VN+k]) return {1'b1, VC_W'(vn*VCS_PER_VN+k)};
    return '0;
  endfunction

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      for (int unsigned iv = 0; iv < NIV; iv++) begin
        logic [VC_W:0] fv;
        fv = free_vc(ovc_busy[o], (iv % NUM_VC) / VCS_PER_VN);
        va_req[o][iv] = (vstate[iv] == VS_VA) && (vport[iv] == port_e'(o)) && fv[VC_W];
      end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_va
    rr_arbiter #(.N(NIV)) u_va_arb (
      .clk(clk), .rst_n(rst_n), .en(en), .req(va_req[o]), .advance(1'b1),
      .grant(va_gnt[o]), .gnt_valid(va_gv[o]), .gnt_idx(va_gi[o]));
  end

  // ---------------------------------------------------------------------
  // Switch allocation
  // ---------------------------------------------------------------------
  logic [CREDIT_W-1:0] credits [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]   sa1_req [NUM_PORTS];
  logic [NUM_VC-1:0]   sa1_gnt [NUM_PORTS];
  logic                sa1_gv  [NUM_PORTS];
  logic [VC_W-1:0]     sa1_gi  [NUM_PORTS];
  logic [NUM_PORTS-1:0] sa2_req [NUM_PORTS];
  logic [NUM_PORTS-1:0] sa2_gnt [NUM_PORTS];
  logic                sa2_gv  [NUM_PORTS];
  logic [PORT_W-1:0]   sa2_gi  [NUM_PORTS];
  logic                in_won  [NUM_PORTS];

  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++)
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        int unsigned iv;
        iv = i*NUM_VC + v;
        sa1_req[i][v] = (vstate[iv] == VS_ACTIVE) && !empty[iv]
                        && (credits[vport[iv]][vovc[iv]] != '0) && out_on[vport[iv]];
      end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_sa1
    rr_arbiter #(.N(NUM_VC)) u_sa1_arb (
      .clk(clk), .rst_n(rst_n), .en(en), .req(sa1_req[i]), .advance(in_won[i]),
      .grant(sa1_gnt[i]), .gnt_valid(sa1_gv[i]), .gnt_idx(sa1_gi[i]));
  end

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      for (int unsigned i = 0; i < NUM_PORTS; i++)
        sa2_req[o][i] = sa1_gv[i] && (vport[i*NUM_VC + sa1_gi[i]] == port_e'(o));
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_sa2
    rr_arbiter #(.N(NUM_PORTS)) u_sa2_arb (
      .clk(clk), .rst_n(rst_n), .en(en), .req(sa2_req[o]), .advance(1'b1),
      .grant(sa2_gnt[o]), .gnt_valid(sa2_gv[o]), .gnt_idx(sa2_gi[o]));
  end

  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      in_won[i] = 1'b0;
      for (int unsigned o = 0; o < NUM_PORTS; o++)
        if (sa2_gnt[o][i]) in_won[i] = 1'b1;
    end
    for (int unsigned iv = 0; iv < NIV; iv++)
      pop[iv] = in_won[iv / NUM_VC] && (sa1_gi[iv / NUM_VC] == VC_W'(iv % NUM_VC));
  end

  // Per output port: the VC granted by VA, and the flit that won SA.
  logic [VC_W-1:0] va_ovc  [NUM_PORTS];
  logic [VC_W-1:0] sa_ovc  [NUM_PORTS];
  flit_t           sa_flit [NUM_PORTS];
  logic            sa_tail [NUM_PORTS];

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      logic [VC_W:0] fv;
      int unsigned   wiv;
      fv         = free_vc(ovc_busy[o], (int'(va_gi[o]) % NUM_VC) / VCS_PER_VN);
      va_ovc[o]  = fv[VC_W-1:0];
      wiv        = int'(sa2_gi[o]) * NUM_VC + int'(sa1_gi[sa2_gi[o]]);
      sa_ovc[o]  = vovc[wiv];
      sa_flit[o] = head[wiv];
      sa_tail[o] = is_tail(head[wiv].ftype);
    end
  end

  // ---------------------------------------------------------------------
  // Sequential state: VC state machines, output VC ownership, credits,
  // output and credit registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned iv = 0; iv < NIV; iv++) begin
        vstate[iv] <= VS_IDLE;
        vport[iv]  <= P_LOCAL;
        vovc[iv]   <= '0;
      end
      for (int unsigned o = 0; o < NUM_PORTS; o++) ovc_busy[o] <= '0;
    end else if (en) begin
      for (int unsigned iv = 0; iv < NIV; iv++) begin
        unique case (vstate[iv])
          VS_IDLE: if (!empty[iv] && is_head(head[iv].ftype)) begin   // RC
            vport[iv]  <= xy_route(head[iv].dst_x, head[iv].dst_y);
            vstate[iv] <= VS_VA;
          end
          VS_VA: if (va_gv[vport[iv]] && (int'(va_gi[vport[iv]]) == int'(iv))) begin
            vovc[iv]   <= va_ovc[vport[iv]];
            vstate[iv] <= VS_ACTIVE;
          end
          VS_ACTIVE: if (pop[iv] && is_tail(head[iv].ftype)) vstate[iv] <= VS_IDLE;
          default: vstate[iv] <= VS_IDLE;
        endcase
      end
      for (int unsigned o = 0; o < NUM_PORTS; o++)
        for (int unsigned ov = 0; ov < NUM_VC; ov++) begin
          if (va_gv[o] && va_ovc[o] == VC_W'(ov))                          ovc_busy[o][ov] <= 1'b1;
          else if (sa2_gv[o] && sa_ovc[o] == VC_W'(ov) && sa_tail[o])      ovc_busy[o][ov] <= 1'b0;
        end
    end
  end

  // Credits and link registers run on every base-clock edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < NUM_PORTS; o++) begin
        for (int unsigned ov = 0; ov < NUM_VC; ov++) credits[o][ov] <= vc_depth(ov);
        out_link[o]   <= '0;
        out_credit[o] <= '0;
      end
    end else begin
      for (int unsigned o = 0; o < NUM_PORTS; o++) begin
        for (int unsigned ov = 0; ov < NUM_VC; ov++)
          credits[o][ov] <= credits[o][ov]
                            + CREDIT_W'(in_credit[o].valid && (in_credit[o].vc == VC_W'(ov)))
                            - CREDIT_W'(en && sa2_gv[o] && (sa_ovc[o] == VC_W'(ov)));
        out_link[o].valid <= en && sa2_gv[o];
        if (en && sa2_gv[o]) begin
          out_link[o].flit    <= sa_flit[o];
          out_link[o].flit.vc <= sa_ovc[o];
        end
      end
      for (int unsigned i = 0; i < NUM_PORTS; i++) begin
        out_credit[i].valid <= en && in_won[i];
        out_credit[i].vc    <= sa1_gi[i];
      end
    end
  end

  // ---------------------------------------------------------------------
  // Status towards the power controller and the neighbours
  // ---------------------------------------------------------------------
  always_comb begin
    idle = 1'b1;
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      wake_out[o] = 1'b0;
      if (in_link[o].valid || out_link[o].valid || out_credit[o].valid || in_credit[o].valid) idle = 1'b0;
      for (int unsigned ov = 0; ov < NUM_VC; ov++)
        if (credits[o][ov] != vc_depth(ov)) idle = 1'b0;
    end
    for (int unsigned iv = 0; iv < NIV; iv++) begin
      if (!empty[iv] || vstate[iv] != VS_IDLE) idle = 1'b0;
      if (vstate[iv] != VS_IDLE) wake_out[vport[iv]] = 1'b1;
    end
  end

  // A VC never receives more flits than it has slots (credit protocol).
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_credit[o].valid && credits[o][in_credit[o].vc] == vc_depth(in_credit[o].vc)))
      else $error("noc_router: credit returned beyond buffer depth");
  end
endmodule
