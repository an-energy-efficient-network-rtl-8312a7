// mshr_latency_monitor: average read-miss latency of one tile (Sec 2.2.2,
// "Reward Function").
//
// Each MSHR entry records a time stamp when a read miss is issued; when the
// miss completes, the difference is added to a per-epoch sum and a count is
// incremented. At `epoch_end` the monitor reports whether the average
// latency of the epoch exceeded LAT_THRESH, tested without a divider as
// sum > LAT_THRESH * count, and restarts the sums. The document gives the
// method but neither the number of MSHR entries nor the threshold: 16
// entries and 300 cycles are this design's choice. Time stamps are TS_W-bit
// and wrap; latencies above 2**TS_W - 1 cycles are not measured correctly.
module mshr_latency_monitor #(
  parameter int unsigned NUM_MSHR   = 16,
  parameter int unsigned LAT_THRESH = 300,
  parameter int unsigned TS_W       = 16,
  parameter int unsigned ID_W       = (NUM_MSHR > 1) ? $clog2(NUM_MSHR) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            issue_valid,
  input  logic [ID_W-1:0] issue_id,
  input  logic            done_valid,
  input  logic [ID_W-1:0] done_id,
  input  logic            epoch_end,
  output logic            exceeded,
  output logic [31:0]     snap_sum,
  output logic [15:0]     snap_count
);
  logic [TS_W-1:0] now;
  logic [TS_W-1:0] ts [NUM_MSHR];
  logic [31:0]     sum, sum_nxt;
  logic [15:0]     count, count_nxt;
  logic [TS_W-1:0] lat;

  assign lat       = now - ts[done_id];
  assign sum_nxt   = sum + (done_valid ? 32'(lat) : 32'd0);
  assign count_nxt = count + 16'(done_valid);

  always_ff @(posedge clk) begin
    if (issue_valid) ts[issue_id] <= now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      sum        <= '0;
      count      <= '0;
      exceeded   <= 1'b0;
      snap_sum   <= '0;
      snap_count <= '0;
    end else begin
      now <= now + 1'b1;
      if (epoch_end) begin
        exceeded   <= (48'(sum_nxt) > 48'(LAT_THRESH) * 48'(count_nxt));
        snap_sum   <= sum_nxt;
        snap_count <= count_nxt;
        sum        <= '0;
        count      <= '0;
      end else begin
        sum   <= sum_nxt;
        count <= count_nxt;
      end
    end
  end
endmodule
