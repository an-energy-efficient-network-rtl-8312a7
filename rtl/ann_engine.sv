// ann_engine: the offline-trained neural network that replaces the RL
// state-action table (Sec 2.3, Fig 5, Sec 3.4).
//
// Three layers: N_IN inputs (the state vector, normalised to 0..1), N_HID
// sigmoid hidden neurons and N_OUT ReLU output neurons, one Q-value per V/F
// action. Sizes 12-20-3 and the use of one multiplier and one adder follow
// the document; there are no bias terms, matching its count of 300 weights.
//
// The engine is a single multiply-accumulate unit stepping through the
// weight SRAM in address order, one weight per enabled cycle:
//   address h*N_IN + i                 : input i  -> hidden neuron h
//   address N_IN*N_HID + o*N_HID + h   : hidden h -> output neuron o
// The SRAM read is pipelined one cycle ahead of the MAC, so a full pass takes
// N_IN*N_HID + N_HID*N_OUT + 1 enabled cycles from `start` to `done`
// (301 for 12-20-3). At the paper's 299 ns this matches a 1 GHz agent clock;
// the engine runs on the clock enable `en`.
//
// Arithmetic (this design's choice): 20-bit signed weights with 12 fraction
// bits, unsigned 13-bit Q.12 activations, a 32-bit accumulator; the product
// is shifted back to Q.12 before it is added. `start` is taken on an enabled
// edge while idle; `done` pulses for one base-clock cycle; `q` holds the
// results until the next pass. Weights are loaded through the write port.
module ann_engine
  import noc_pkg::*;
#(
  parameter int unsigned N_IN  = ANN_IN,
  parameter int unsigned N_HID = ANN_HID,
  parameter int unsigned N_OUT = ANN_OUT,
  parameter int unsigned NW    = N_IN * N_HID + N_HID * N_OUT,
  parameter int unsigned AW    = $clog2(NW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  logic [ACT_W-1:0] x [N_IN],
  output logic             busy,
  output logic             done,
  output qval_t            q [N_OUT],
  input  logic             w_we,
  input  logic [AW-1:0]    w_addr,
  input  weight_t          w_data
);
  localparam int unsigned NI_W = $clog2(N_IN + 1);
  localparam int unsigned NH_W = $clog2(N_HID + 1);
  localparam int unsigned NO_W = $clog2(N_OUT + 1);
  localparam int unsigned NN_W = (NH_W > NO_W) ? NH_W : NO_W;

  // issue side
  logic            issuing;
  logic [AW-1:0]   raddr;
  logic            i_lay;                  // 0: hidden layer, 1: output layer
  logic [NN_W-1:0] i_neu;                  // neuron index in the layer
  logic [NH_W-1:0] i_src;                  // source index (input or hidden)
  // MAC side (one cycle behind)
  logic            m_v, m_lay;
  logic [NN_W-1:0] m_neu;
  logic [NH_W-1:0] m_src;
  logic            m_last_pass;

  weight_t            w;
  logic [ACT_W-1:0]   hid [N_HID];
  logic [ACT_W-1:0]   act;
  logic signed [QV_W+ACT_W:0] prod;
  qval_t              acc, sum;
  logic [ACT_W-1:0]   sig;
  logic [NH_W-1:0]    src_last;

  weight_sram #(.DEPTH(NW), .WIDTH(WEIGHT_W), .ADDR_W(AW)) u_wmem (
    .clk(clk), .we(w_we), .waddr(w_addr), .wdata(w_data),
    .ren(en && issuing), .raddr(raddr), .rdata(w));

  // one multiplier, one adder
  always_comb begin
    act  = m_lay ? hid[m_src] : x[m_src];
    prod = (QV_W+ACT_W+1)'(w) * $signed({1'b0, act});
    sum  = (m_src == '0) ? qval_t'(prod >>> FRAC) : acc + qval_t'(prod >>> FRAC);
  end

  sigmoid_plan u_sig (.x(sum), .y(sig));

  assign src_last = i_lay ? NH_W'(N_HID - 1) : NH_W'(N_IN - 1);
  assign busy     = issuing || m_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing     <= 1'b0;
      raddr       <= '0;
      i_lay       <= 1'b0;
      i_neu       <= '0;
      i_src       <= '0;
      m_v         <= 1'b0;
      m_lay       <= 1'b0;
      m_neu       <= '0;
      m_src       <= '0;
      m_last_pass <= 1'b0;
      acc         <= '0;
      done        <= 1'b0;
      for (int unsigned h = 0; h < N_HID; h++) hid[h] <= '0;
      for (int unsigned o = 0; o < N_OUT; o++) q[o] <= '0;
    end else begin
      done <= 1'b0;
      if (en) begin
        // ---- issue a weight read ----
        if (!busy && start) begin
          issuing <= 1'b1;
          raddr   <= '0;
          i_lay   <= 1'b0;
          i_neu   <= '0;
          i_src   <= '0;
        end else if (issuing) begin
          raddr <= raddr + 1'b1;
          if (i_src == src_last) begin
            i_src <= '0;
            if (!i_lay && int'(i_neu) == N_HID - 1) begin
              i_lay <= 1'b1;
              i_neu <= '0;
            end else if (i_lay && int'(i_neu) == N_OUT - 1) begin
              issuing <= 1'b0;
            end else begin
              i_neu <= i_neu + 1'b1;
            end
          end else begin
            i_src <= i_src + 1'b1;
          end
        end
        m_v         <= issuing;
        m_lay       <= i_lay;
        m_neu       <= i_neu;
        m_src       <= i_src;
        m_last_pass <= issuing && (int'(raddr) == NW - 1);
        // ---- multiply-accumulate ----
        if (m_v) begin
          acc <= sum;
          if (!m_lay && int'(m_src) == N_IN - 1)  hid[m_neu] <= sig;
          if ( m_lay && int'(m_src) == N_HID - 1) q[m_neu]   <= sum[QV_W-1] ? '0 : sum;  // ReLU
          if (m_last_pass) done <= 1'b1;
        end
      end
    end
  end
endmodule
