// state_binning: discretizes the twelve epoch counts into the state vector
// (Sec 2.2.2, "State-Action Table").
//
// Each attribute falls into one of five bins {0..4}: bin = min(4,
// floor(5 * count / FS)), where FS is the attribute's full scale. The
// document fixes the five bins and one example, PG efficiency 0.5 (5000 of
// 10K cycles off) -> bin 2, which this rule reproduces with FS = epoch
// length. The other full scales are this design's choice: the epoch length
// for every flit count (one flit per cycle), and MISS_FS misses per epoch for
// the three cache-miss counts. Purely combinational, comparisons only: bin =
// number of k in 1..4 with 5 * count >= k * FS.
module state_binning
  import noc_pkg::*;
#(
  parameter int unsigned EPOCH_CYCLES = 10000,
  parameter int unsigned MISS_FS      = 1000
) (
  input  attr_cnt_t  counts,
  output state_vec_t state
);
  function automatic bin_t to_bin(input cnt_t c, input int unsigned fs);
    logic [47:0] c5;
    bin_t        b;
    c5 = 48'(c) * 48'd5;
    b  = '0;
    for (int unsigned k = 1; k < NUM_BINS; k++)
      if (c5 >= 48'(k) * 48'(fs)) b = bin_t'(k);
    return b;
  endfunction

  always_comb begin
    for (int unsigned a = 0; a < NUM_ATTR; a++)
      state[a] = to_bin(counts[a], (a <= A_L2_MISS) ? MISS_FS : EPOCH_CYCLES);
  end
endmodule
