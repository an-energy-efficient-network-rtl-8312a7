// pg_controller: power-gating controller of one router (Sec 2.1, Fig 1(b)).
//
// While the router reports itself idle (nothing buffered or in flight) and
// no flit or wake request is arriving, a counter runs; after IDLE_DETECT
// consecutive idle cycles (4, as in the document) the controller turns the
// header switch off (`sleep` high) and cuts the router from Vdd. Any
// incoming flit or wake request on any port starts the wake-up: the switch
// is closed at once and the router resumes after WAKEUP_CYCLES, a latency
// the document does not give (8 is this design's choice). Neighbours see
// `power_on` and hold their flits while it is low.
//
// The controller sits in the always-on domain and counts base-clock cycles.
// `off_cycle` is high in every cycle the router is gated off (for the PG
// efficiency attribute, T_power-off / T_epoch); `wakeup_evt` pulses once per
// wake-up (for the PG overhead term of the reward).
module pg_controller #(
  parameter int unsigned IDLE_DETECT   = 4,
  parameter int unsigned WAKEUP_CYCLES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic router_idle,
  input  logic wake,
  output logic power_on,
  output logic sleep,
  output logic off_cycle,
  output logic wakeup_evt
);
  typedef enum logic [1:0] {PG_ON, PG_OFF, PG_WAKING} pg_state_e;
  localparam int unsigned CW = $clog2(IDLE_DETECT + WAKEUP_CYCLES + 1);

  pg_state_e      state;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= PG_ON;
      cnt        <= '0;
      wakeup_evt <= 1'b0;
    end else begin
      wakeup_evt <= 1'b0;
      unique case (state)
        PG_ON: begin
          if (router_idle && !wake) begin
            if (int'(cnt) == IDLE_DETECT - 1) begin
              state <= PG_OFF;
              cnt   <= '0;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end else begin
            cnt <= '0;
          end
        end
        PG_OFF: if (wake) begin
          state      <= PG_WAKING;
          cnt        <= '0;
          wakeup_evt <= 1'b1;
        end
        PG_WAKING: begin
          if (int'(cnt) == WAKEUP_CYCLES - 1) begin
            state <= PG_ON;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= PG_ON;
      endcase
    end
  end

  assign power_on  = (state == PG_ON);
  assign sleep     = (state == PG_OFF);
  assign off_cycle = (state == PG_OFF);
endmodule
