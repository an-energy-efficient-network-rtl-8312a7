// rr_arbiter: round-robin arbiter used by the router's VC and switch
// allocators. Combinational grant of the first requester at or after the
// rotating priority pointer; the pointer moves past the winner when
// `advance` is high on a clock edge with `en` set. One-hot grant, valid
// flag and binary index are given. The allocator structure is this design's
// choice: the document names the allocation stages but not their arbiters.
module rr_arbiter #(
  parameter int unsigned N   = 4,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [N-1:0]     req,
  input  logic             advance,
  output logic [N-1:0]     grant,
  output logic             gnt_valid,
  output logic [IDX_W-1:0] gnt_idx
);
  logic [IDX_W-1:0] ptr;

  always_comb begin
    grant     = '0;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (!gnt_valid && req[(int'(ptr) + k) % N]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IDX_W'((int'(ptr) + k) % N);
        grant[(int'(ptr) + k) % N] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           ptr <= '0;
    else if (en && advance && gnt_valid)  ptr <= (int'(gnt_idx) == N-1) ? '0 : gnt_idx + 1'b1;
  end
endmodule
