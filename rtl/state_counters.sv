// state_counters: the per-router event counters that feed the RL state
// (Sec 2.1 "a set of counters", Fig 3).
//
// Twelve saturating CNT_W-bit counters, in the attribute order of Fig 3:
// L1D, L1I and L2 misses; flits received on the +X, -X, +Y, -Y and local
// input ports; all flits received (router throughput); response flits
// (VN1); request flits (VN0); and cycles the router spent power-gated off.
// A thirteenth counter holds the wake-ups of the epoch (for the reward's PG
// overhead term). On `epoch_end` the totals, including that cycle's events,
// are copied to `snap` and `snap_wakeups` (`snap_valid` pulses the cycle
// after) and the counters restart from zero. Attributes 4-8 count received
// flits per port, as Sec 2.1 and 2.2.2 say; Fig 3 calls them "buffer
// utilization", and received flits are taken as that measure.
module state_counters
  import noc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      epoch_end,
  input  logic      l1d_miss,
  input  logic      l1i_miss,
  input  logic      l2_miss,
  input  logic      rx_valid [NUM_PORTS],
  input  logic      rx_vn    [NUM_PORTS],   // 1 = response, 0 = request
  input  logic      pg_off,
  input  logic      wake_evt,
  output attr_cnt_t snap,
  output cnt_t      snap_wakeups,
  output logic      snap_valid
);
  attr_cnt_t cnt, inc, nxt;
  cnt_t      wk, wk_nxt;

  function automatic cnt_t sat_add(input cnt_t a, input cnt_t b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_comb begin
    inc = '0;
    inc[A_L1D_MISS]  = cnt_t'(l1d_miss);
    inc[A_L1I_MISS]  = cnt_t'(l1i_miss);
    inc[A_L2_MISS]   = cnt_t'(l2_miss);
    inc[A_XP_FLITS]  = cnt_t'(rx_valid[P_XP]);
    inc[A_XM_FLITS]  = cnt_t'(rx_valid[P_XM]);
    inc[A_YP_FLITS]  = cnt_t'(rx_valid[P_YP]);
    inc[A_YM_FLITS]  = cnt_t'(rx_valid[P_YM]);
    inc[A_LOC_FLITS] = cnt_t'(rx_valid[P_LOCAL]);
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      inc[A_THRU] = inc[A_THRU] + cnt_t'(rx_valid[p]);
      inc[A_RESP] = inc[A_RESP] + cnt_t'(rx_valid[p] &&  rx_vn[p]);
      inc[A_REQ]  = inc[A_REQ]  + cnt_t'(rx_valid[p] && !rx_vn[p]);
    end
    inc[A_PG_OFF] = cnt_t'(pg_off);
    for (int unsigned a = 0; a < NUM_ATTR; a++) nxt[a] = sat_add(cnt[a], inc[a]);
    wk_nxt = sat_add(wk, cnt_t'(wake_evt));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      wk           <= '0;
      snap         <= '0;
      snap_wakeups <= '0;
      snap_valid   <= 1'b0;
    end else begin
      snap_valid <= epoch_end;
      if (epoch_end) begin
        snap         <= nxt;
        snap_wakeups <= wk_nxt;
        cnt          <= '0;
        wk           <= '0;
      end else begin
        cnt <= nxt;
        wk  <= wk_nxt;
      end
    end
  end
endmodule
