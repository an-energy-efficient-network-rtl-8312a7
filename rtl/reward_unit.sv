// reward_unit: the reward of one epoch (Sec 2.2.2, Eq 3).
//
//   Reward = P_static + P_dynamic - P_pg_overhead   (power savings, Q.12)
//   Reward = PENALTY (-1.0)   when the average read-miss latency exceeded
//                             its threshold in the epoch
//
// The document names the three terms; how they are estimated from counters
// is this design's choice, normalised to the router's power at 2 GHz / 1 V:
//   off      = off_cycles / EPOCH_CYCLES                (time gated off)
//   P_static = off + (1 - off) * (1 - V)                 (leakage ~ V)
//   P_dyn    = (flits / EPOCH_CYCLES) * (1 - V^2)        (energy/flit ~ V^2)
//   P_pg     = wakeups * WAKE_COST
// with V = 1.0, 0.8, 0.6 for levels 0, 1, 2. 1 / EPOCH_CYCLES is a constant
// computed at elaboration, so no divider is built. Combinational.
module reward_unit
  import noc_pkg::*;
#(
  parameter int unsigned EPOCH_CYCLES = 10000,
  parameter int unsigned WAKE_COST    = 4,       // Q.12 per wake-up
  parameter int signed   PENALTY      = -4096    // -1.0
) (
  input  cnt_t   off_cycles,
  input  cnt_t   flits,
  input  cnt_t   wakeups,
  input  level_t level,
  input  logic   lat_exceeded,
  output qval_t  reward
);
  localparam longint unsigned INV_EPOCH = (64'd4096 << 16) / 64'(EPOCH_CYCLES);

  logic [63:0] off_q, util_q, one_minus_v, one_minus_v2, stat_q, dyn_q, pg_q;

  always_comb begin
    unique case (level)
      2'd0:    begin one_minus_v = 64'd0;    one_minus_v2 = 64'd0;    end
      2'd1:    begin one_minus_v = 64'd819;  one_minus_v2 = 64'd1475; end  // 0.2, 0.36
      default: begin one_minus_v = 64'd1638; one_minus_v2 = 64'd2621; end  // 0.4, 0.64
    endcase
    off_q  = (64'(off_cycles) * INV_EPOCH) >> 16;
    if (off_q > 64'd4096) off_q = 64'd4096;
    util_q = (64'(flits) * INV_EPOCH) >> 16;
    stat_q = off_q + (((64'd4096 - off_q) * one_minus_v) >> FRAC);
    dyn_q  = (util_q * one_minus_v2) >> FRAC;
    pg_q   = 64'(wakeups) * 64'(WAKE_COST);
    if (lat_exceeded) reward = qval_t'(PENALTY);
    else              reward = qval_t'($signed(stat_q + dyn_q) - $signed(pg_q));
  end
endmodule
