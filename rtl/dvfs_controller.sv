// dvfs_controller: applies the RL agent's V/F decision to one router
// (Sec 2.1, Sec 2.2.2).
//
// Three levels: 0 = 2 GHz / 1.0 V, 1 = 1.5 GHz / 0.8 V, 2 = 1 GHz / 0.6 V.
// The router's clock is modelled as an enable on a 2 GHz base clock: level 0
// enables every cycle, level 1 three cycles in four, level 2 every other
// cycle. `vsel` drives the voltage regulator of Fig 1(b).
//
// A new action arrives with `action_valid` once per epoch. The regulator
// needs TRANS_CYCLES base cycles (100 ns = 200 cycles at 2 GHz, from the
// document) to settle. The ordering is this design's choice, so the router
// never runs faster than its supply allows: when speeding up, the voltage is
// raised first and the frequency follows after the transition; when slowing
// down, the frequency drops at once and the voltage follows. An action that
// arrives during a transition, or equals the current level, is ignored.
module dvfs_controller
  import noc_pkg::*;
#(
  parameter int unsigned TRANS_CYCLES = 200
) (
  input  logic   clk,
  input  logic   rst_n,
  input  level_t action,
  input  logic   action_valid,
  output level_t vsel,
  output level_t fsel,
  output logic   clk_en,
  output logic   in_transition,
  output logic   switch_evt
);
  localparam int unsigned TW = $clog2(TRANS_CYCLES + 1);

  logic [1:0]    phase;
  logic [TW-1:0] timer;
  level_t        target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase         <= '0;
      vsel          <= '0;
      fsel          <= '0;
      target        <= '0;
      timer         <= '0;
      in_transition <= 1'b0;
      switch_evt    <= 1'b0;
    end else begin
      phase      <= phase + 1'b1;
      switch_evt <= 1'b0;
      if (in_transition) begin
        if (int'(timer) == 1) begin
          in_transition <= 1'b0;
          vsel          <= target;
          fsel          <= target;
        end
        timer <= timer - 1'b1;
      end else if (action_valid && action != fsel && int'(action) < NUM_LEVELS) begin
        target        <= action;
        timer         <= TW'(TRANS_CYCLES);
        in_transition <= 1'b1;
        switch_evt    <= 1'b1;
        if (action < fsel) vsel <= action;   // faster: raise voltage first
        else               fsel <= action;   // slower: lower frequency first
      end
    end
  end

  always_comb begin
    unique case (fsel)
      2'd0:    clk_en = 1'b1;
      2'd1:    clk_en = (phase != 2'd3);
      default: clk_en = ~phase[0];
    endcase
  end
endmodule
