// adlif_pkg: types and constants shared by the adLIF TDM accelerator.
//
// Number formats follow the design description: weights and neuron
// parameters are 8-bit two's complement with 5 fractional bits, the states
// (synaptic current I, membrane potential u, adaptation current w) are
// 12-bit with the same 5 fractional bits, giving a state range of
// [-64, 63.96875]. SRAM lines are 48 bits wide with a 15-bit line address;
// four weights and four currents are packed per line, one parameter per line.
//
// The on-chip bus is a single shared AHB-Lite style bus with an address phase
// and a one-cycle data phase. Masters talk to it through a small req/gnt
// port (bus_req_t / bus_rsp_t); slaves see the AHB-Lite slave signals
// (ahb_slv_req_t / ahb_slv_rsp_t). All slaves are zero-wait-state. The global
// address map (word addresses) places the register file, SRAM, output FIFO,
// input FIFO and debug registers in 64K-word regions selected by addr[18:16].
package adlif_pkg;

  // ---- numeric formats -------------------------------------------------
  localparam int unsigned W_BITS = 8;   // weight width
  localparam int unsigned P_BITS = 8;   // neuron parameter width
  localparam int unsigned S_BITS = 12;  // state width (I, u, w)
  localparam int unsigned FRAC   = 5;   // fractional bits of every format

  typedef logic signed [W_BITS-1:0] weight_t;
  typedef logic signed [P_BITS-1:0] param_t;
  typedef logic signed [S_BITS-1:0] state_t;

  // ---- memory organisation ---------------------------------------------
  localparam int unsigned SRAM_DW = 48;
  localparam int unsigned SRAM_AW = 15;
  localparam int unsigned WPL     = 4;  // weights per line
  localparam int unsigned IPL     = 4;  // currents per line
  localparam int unsigned WPL_LG  = 2;  // log2(WPL), offsets use shifts
  localparam int unsigned IPL_LG  = 2;  // log2(IPL)
  localparam int unsigned NRN_LINES = 7; // u, w, alpha, beta, theta, a, b

  // order of the parameter lines inside a neuron record
  typedef enum logic [2:0] {
    PL_U = 3'd0, PL_W = 3'd1, PL_ALPHA = 3'd2, PL_BETA = 3'd3,
    PL_TH = 3'd4, PL_A = 3'd5, PL_B = 3'd6
  } par_line_e;

  localparam int unsigned NCNT_W = 16;  // neuron count / spike address width
  typedef logic [SRAM_AW-1:0] line_addr_t;
  typedef logic [SRAM_DW-1:0] line_t;

  // ---- FIFOs and AER -----------------------------------------------------
  localparam int unsigned FIFO_DW     = 16;
  localparam int unsigned IN_FIFO_AW  = 8;
  localparam int unsigned OUT_FIFO_AW = 4;
  localparam int unsigned AER_W       = 12;

  // ---- bus -------------------------------------------------------------
  localparam int unsigned BUS_AW = 27;
  localparam int unsigned BUS_DW = SRAM_DW;
  typedef logic [BUS_AW-1:0] bus_addr_t;
  typedef logic [BUS_DW-1:0] bus_data_t;

  localparam logic [2:0] REG_REGION  = 3'd0;
  localparam logic [2:0] SRAM_REGION = 3'd1;
  localparam logic [2:0] OFIFO_REGION = 3'd2;
  localparam logic [2:0] IFIFO_REGION = 3'd3;
  localparam logic [2:0] DBG_REGION  = 3'd4;
  localparam int unsigned N_SLAVES = 5;

  localparam bus_addr_t SRAM_BASE = bus_addr_t'(32'h1_0000);

  // master side: request held until gnt; read data returns with rvalid
  // exactly one cycle after the granted cycle
  typedef struct packed {
    logic      req;
    logic      we;
    bus_addr_t addr;
    bus_data_t wdata;
  } bus_req_t;

  typedef struct packed {
    logic      gnt;
    logic      rvalid;
    bus_data_t rdata;
  } bus_rsp_t;

  // AHB-Lite slave side (HTRANS reduced to its NONSEQ bit, HSIZE fixed)
  typedef struct packed {
    logic      hsel;
    logic      htrans;   // 1 = NONSEQ, 0 = IDLE
    logic      hwrite;
    bus_addr_t haddr;    // address phase
    bus_data_t hwdata;   // data phase
  } ahb_slv_req_t;

  typedef struct packed {
    logic      hreadyout;
    bus_data_t hrdata;   // data phase
  } ahb_slv_rsp_t;

  // ---- register file offsets (word addresses inside REG_REGION) ------------
  typedef enum logic [4:0] {
    R_IN_SPK_NUM = 5'h00, R_IN_SPK_ADDR = 5'h01, R_START_TICK_GEN = 5'h02,
    R_TICK_COUNTER = 5'h03, R_L1_ADDR = 5'h04, R_L2_ADDR = 5'h05,
    R_L1_NRN_NUM = 5'h06, R_L2_NRN_NUM = 5'h07, R_START_SNN = 5'h08,
    R_OUT_FIFO_FULL = 5'h09, R_OUT_FIFO_EMPTY = 5'h0A, R_SPIKE_RDY = 5'h0B,
    R_END_OF_TS = 5'h0C, R_RUNNING = 5'h0D, R_DEB_REG = 5'h0E, R_RSTN = 5'h0F,
    R_BS_VERSION = 5'h10, R_IN_FIFO_FULL = 5'h11, R_IN_FIFO_EMPTY = 5'h12
  } reg_off_e;

  // configuration handed from the register file to the core
  typedef struct packed {
    logic [NCNT_W-1:0]  in_spk_num;
    line_addr_t         in_spk_addr;
    logic               tick_en;
    logic [31:0]        tick_period;
    line_addr_t         l1_addr;
    line_addr_t         l2_addr;
    logic [NCNT_W-1:0]  l1_nrn;
    logic [NCNT_W-1:0]  l2_nrn;
  } core_cfg_t;

  // PE-internal values made visible through the debug registers
  typedef struct packed {
    state_t adapted_i;   // I - w
    state_t one_alpha;   // 1 - alpha
    state_t one_beta;    // 1 - beta
    state_t scaled_i;    // (1-alpha)(I-w)
    state_t alpha_u;     // alpha*u
    state_t u_bar;       // alpha*u + scaled_i
    state_t beta_w;      // beta*w
    state_t a_ubar;      // a*u_hat
    state_t new_u;       // u after soft reset
    state_t beta_scaled; // (1-beta)*(a*u_hat [+ b])
    state_t new_w;       // beta*w + beta_scaled
    state_t au_p_b;      // a*u_hat + b
  } nrn_dbg_t;

  typedef struct packed {
    logic [7:0]  state_adlif;
    logic [7:0]  state_inspk;
    logic [7:0]  state_layer;
    logic [7:0]  state_nrn_load;
    logic [7:0]  state_nrn_update;
    logic [7:0]  state_nrn_write;
    logic [7:0]  state_ps;
    logic [7:0]  state_wload;
    logic [31:0] tot_cc;
    logic [31:0] curr_ts_cc;
    logic [31:0] wstates_cc;
    logic [7:0]  curr_layer;
    logic [NCNT_W-1:0] curr_nrn;
    logic [31:0] curr_ts;
    nrn_dbg_t    nrn;
    logic        end_m_update;
    line_addr_t  nxt_spike_addr;
    state_t      par_i;
    state_t      par_w;
    param_t      par_alpha;
    state_t      par_u;
    param_t      par_th;
    param_t      par_beta;
    param_t      par_a;
    param_t      par_b;
  } pe_dbg_t;

  // saturate a wide signed value to the state width
  function automatic state_t sat_state(input logic signed [31:0] v);
    if (v > 32'sd2047)       return state_t'(12'sh7FF);
    else if (v < -32'sd2048) return state_t'(12'sh800);
    else                     return state_t'(v[S_BITS-1:0]);
  endfunction

endpackage
