// q_update_unit: the Q-learning rule of Eq 2 in fixed point (Q.12):
//
//   Q(s,a) <- Q(s,a) + alpha * (r + gamma * max_a' Q(s',a') - Q(s,a))
//
// alpha = 0.1 and gamma = 0.95 are the document's values (410/4096 and
// 3891/4096 after rounding). The max over a' is taken here from the
// NUM_LEVELS Q-values of the new state. Combinational; products are formed
// at 64 bits and scaled back with an arithmetic shift.
module q_update_unit
  import noc_pkg::*;
#(
  parameter int signed ALPHA_Q = 410,
  parameter int signed GAMMA_Q = 3891
) (
  input  qval_t q_old,
  input  qval_t reward,
  input  qval_t q_next [NUM_LEVELS],
  output qval_t q_max,
  output qval_t q_new
);
  logic signed [63:0] td, target;

  always_comb begin
    q_max = q_next[0];
    for (int unsigned a = 1; a < NUM_LEVELS; a++)
      if (q_next[a] > q_max) q_max = q_next[a];
    target = 64'(reward) + ((64'(GAMMA_Q) * 64'(q_max)) >>> FRAC);
    td     = target - 64'(q_old);
    q_new  = qval_t'(64'(q_old) + ((64'(ALPHA_Q) * td) >>> FRAC));
  end
endmodule
