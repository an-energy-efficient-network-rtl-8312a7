// noc_pkg: types and constants shared by the RL-controlled mesh NoC.
//
// Flits travel on five-port routers (local, +X, -X, +Y, -Y) with two virtual
// networks: VN0 carries request (control) messages, VN1 carries response
// (data) messages, each with two virtual channels (Table 1: "2 VCs/VN").
// Buffer depths follow Table 1: one flit per control VC, three per data VC.
// Three V/F levels follow the paper's action set: a0 = 2 GHz / 1.0 V,
// a1 = 1.5 GHz / 0.8 V, a2 = 1 GHz / 0.6 V. The flit payload width, the
// coordinate width and the fixed-point formats are this design's own choices.
package noc_pkg;

  // ---- topology ----------------------------------------------------------
  localparam int unsigned NUM_PORTS   = 5;
  localparam int unsigned PORT_W      = 3;
  localparam int unsigned COORD_W     = 3;   // up to 8 routers per dimension

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_XP    = 3'd1,   // +X (east)
    P_XM    = 3'd2,   // -X (west)
    P_YP    = 3'd3,   // +Y (north)
    P_YM    = 3'd4    // -Y (south)
  } port_e;

  // ---- virtual channels --------------------------------------------------
  localparam int unsigned NUM_VN      = 2;
  localparam int unsigned VCS_PER_VN  = 2;
  localparam int unsigned NUM_VC      = NUM_VN * VCS_PER_VN;
  localparam int unsigned VC_W        = 2;
  localparam int unsigned CTRL_DEPTH  = 1;   // Table 1: 1-flit control buffer
  localparam int unsigned DATA_DEPTH  = 3;   // Table 1: 3-flit data buffer
  localparam int unsigned CREDIT_W    = 2;

  // Credits (buffer slots) of a VC: VN0 = control, VN1 = data.
  function automatic logic [CREDIT_W-1:0] vc_depth(input int unsigned vc);
    return (vc / VCS_PER_VN == 0) ? CREDIT_W'(CTRL_DEPTH) : CREDIT_W'(DATA_DEPTH);
  endfunction

  // ---- flits -------------------------------------------------------------
  localparam int unsigned PAYLOAD_W   = 128; // 16-byte flits: a 64-byte block is 4 flits

  typedef enum logic [1:0] {
    FT_HEAD     = 2'd0,
    FT_BODY     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e           ftype;
    logic [VC_W-1:0]      vc;      // VC at the receiving input port; vc[1] is the VN
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  function automatic logic is_head(input flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction
  function automatic logic is_tail(input flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  // ---- V/F levels --------------------------------------------------------
  localparam int unsigned NUM_LEVELS  = 3;
  typedef logic [1:0] level_t;        // 0: 2GHz/1V, 1: 1.5GHz/0.8V, 2: 1GHz/0.6V

  // ---- RL state ----------------------------------------------------------
  localparam int unsigned NUM_ATTR    = 12;  // Fig 3
  localparam int unsigned NUM_BINS    = 5;   // bins {0..4}
  localparam int unsigned BIN_W       = 3;
  localparam int unsigned CNT_W       = 16;  // epoch counter width
  typedef logic [BIN_W-1:0] bin_t;
  typedef bin_t [NUM_ATTR-1:0] state_vec_t;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef cnt_t [NUM_ATTR-1:0] attr_cnt_t;

  // Attribute order of Fig 3 (index = attribute number - 1).
  localparam int unsigned A_L1D_MISS  = 0;
  localparam int unsigned A_L1I_MISS  = 1;
  localparam int unsigned A_L2_MISS   = 2;
  localparam int unsigned A_XP_FLITS  = 3;
  localparam int unsigned A_XM_FLITS  = 4;
  localparam int unsigned A_YP_FLITS  = 5;
  localparam int unsigned A_YM_FLITS  = 6;
  localparam int unsigned A_LOC_FLITS = 7;
  localparam int unsigned A_THRU      = 8;
  localparam int unsigned A_RESP      = 9;
  localparam int unsigned A_REQ       = 10;
  localparam int unsigned A_PG_OFF    = 11;

  // ---- fixed point -------------------------------------------------------
  // Activations and rewards are Q.12 (4096 = 1.0). Weights are 20-bit signed
  // (Sec 3.4.2) with 12 fraction bits.
  localparam int unsigned FRAC        = 12;
  localparam int unsigned WEIGHT_W    = 20;
  localparam int unsigned ACT_W       = 13;  // unsigned activation, 0..4096
  localparam int unsigned QV_W        = 32;  // signed Q-value / accumulator
  localparam int signed   ONE_Q       = 4096;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [QV_W-1:0]     qval_t;

  // ANN geometry (Sec 3.4.1): 12 inputs, 20 hidden, 3 outputs, 300 weights.
  localparam int unsigned ANN_IN      = NUM_ATTR;
  localparam int unsigned ANN_HID     = 20;
  localparam int unsigned ANN_OUT     = NUM_LEVELS;
  localparam int unsigned ANN_WEIGHTS = ANN_IN * ANN_HID + ANN_HID * ANN_OUT;
  localparam int unsigned WADDR_W     = 9;

  // Training sample produced by the Q-learning update each epoch.
  typedef struct packed {
    logic       valid;
    state_vec_t state;
    level_t     action;
    qval_t      q_target;
    qval_t      reward;
  } sample_t;

endpackage
