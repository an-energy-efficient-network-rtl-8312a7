// dc_fifo: dual-clock FIFO synchronizer for router-to-router links.
//
// Routers run at different V/F levels, so each input virtual channel buffer
// is a dual-clock FIFO: the upstream router writes it in its own clock
// domain and the local router reads it in its own. Write and read pointers
// are kept in Gray code and cross the domains through two-flop
// synchronizers, the usual construction; the document names the FIFO but
// not its insides. Depth is 2**AW entries.
//
// Interface: write side (wclk) wen/wdata, wfull; read side (rclk) ren,
// rdata (first-word fall-through: rdata shows the oldest entry while
// !rempty), rempty. A write shows on the read side two or three rclk edges
// later; a read frees its slot for the writer equally late. Writing when
// full or reading when empty is a protocol error, caught by assertions.
module dc_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain ----
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wen && !wfull);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // Full when the Gray pointers differ in exactly the top two bits.
  if (AW == 1) begin : g_full1
    assign wfull = (wgray == ~rgray_w2);
  end else begin : g_fulln
    assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  end

  // ---- read domain ----
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + (AW+1)'(ren && !rempty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  // ---- protocol checks ----
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) wen |-> !wfull)
    else $error("dc_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) ren |-> !rempty)
    else $error("dc_fifo: read while empty");
endmodule
