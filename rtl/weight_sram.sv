// weight_sram: storage for the offline-trained ANN weights (Sec 3.4.2).
//
// DEPTH words of WIDTH bits: 300 weights of 20 bits (12x20 input-to-hidden
// plus 20x3 hidden-to-output), as the document sizes it. One synchronous
// write port, used to load trained weights, and one synchronous read port
// with a one-cycle latency: `rdata` holds the word addressed in the last
// cycle with `ren` high. Written as an array so that synthesis can map it to
// an SRAM macro. The word layout is given in ann_engine.
module weight_sram #(
  parameter int unsigned DEPTH  = 300,
  parameter int unsigned WIDTH  = 20,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              ren,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (ren) rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
