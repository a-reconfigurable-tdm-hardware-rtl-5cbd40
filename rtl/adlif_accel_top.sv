// adlif_accel_top: adLIF spiking neural network accelerator.
//
// Event path: AER receiver -> input spike FIFO (frames closed by the tick
// generator with End-of-Frame markers) -> input spike FSM, which writes each
// frame's event addresses into the SRAM spike region and starts the PE.
// Processing: one TDM processing element sweeps every virtual neuron of the
// network stored in SRAM once per time-step and pushes output-layer spikes
// into the output spike FIFO. Configuration and results: a host (the
// UART-to-AHB bridge of a prototype, or a system bus) reaches the register
// file, the SRAM, both FIFOs and the debug registers through the shared bus;
// the host can also write a frame's spike addresses into SRAM itself and
// start the PE through START_SNN, bypassing the AER path.
//
// Ports: clock and active-low reset; the AER request/acknowledge/address
// signals; the host bus master port (req/gnt request, read data one cycle
// after the grant, see adlif_pkg); `end_of_ts` mirrors the END_OF_TS status.
// Bus masters in priority order: PE (priority while it runs), input spike
// FSM, host. Address map (word addresses): 0x0_00xx registers, 0x1_xxxx SRAM
// lines, 0x2_0000 output FIFO (read pops), 0x3_0000 input FIFO (read
// peeks), 0x4_00xx debug registers. The RSTN register resets everything but
// the register file, the bus and the SRAM contents.
module adlif_accel_top
  import adlif_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             aer_req,
  input  logic [AER_W-1:0] aer_data,
  output logic             aer_ack,
  input  bus_req_t         host_req,
  output bus_rsp_t         host_rsp,
  output logic             end_of_ts
);
  // ---- reset of the core (hardware reset and software RSTN register)
  core_cfg_t cfg;
  logic      start_snn, soft_rst_n;
  logic      core_rst_q1, core_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_rst_q1 <= 1'b0;
      core_rst_n  <= 1'b0;
    end else begin
      core_rst_q1 <= soft_rst_n;
      core_rst_n  <= core_rst_q1;
    end
  end

  // ---- bus
  bus_req_t     m_req [3];
  bus_rsp_t     m_rsp [3];
  ahb_slv_req_t s_req [N_SLAVES];
  ahb_slv_rsp_t s_rsp [N_SLAVES];
  logic         pe_prio;

  ahb_interconnect #(.NM(3)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .pe_prio, .s_req, .s_rsp
  );
  assign m_req[2] = host_req;
  assign host_rsp = m_rsp[2];

  // ---- event acquisition
  logic             tick;
  logic             ev_valid, ev_ready;
  logic [AER_W-1:0] ev_addr;
  logic [FIFO_DW-1:0] if_rdata;
  logic             if_full, if_empty, if_rd_fsm, if_rd_bus;
  logic [IN_FIFO_AW:0] if_count;

  tick_gen #(.CNT_W(32)) u_tick (
    .clk, .rst_n(core_rst_n), .en(cfg.tick_en), .period(cfg.tick_period), .tick
  );

  aer_rx u_aer (
    .clk, .rst_n(core_rst_n), .aer_req, .aer_data, .aer_ack,
    .ev_ready, .ev_valid, .ev_addr
  );

  input_spike_fifo #(.AW(IN_FIFO_AW)) u_in_fifo (
    .clk, .rst_n(core_rst_n), .tick, .ev_valid, .ev_addr, .ev_ready,
    .rd_en(if_rd_fsm), .rdata(if_rdata), .full(if_full), .empty(if_empty),
    .count(if_count)
  );

  // ---- input spike FSM
  logic              pe_running, pe_inlayer, pe_eot, pe_spike_rdy;
  logic              fsm_start;
  logic [NCNT_W-1:0] fsm_nspk;
  logic [7:0]        fsm_state;
  logic [15:0]       fsm_err;
  logic [31:0]       fsm_blocked, fsm_postponed, fsm_frames;

  input_spike_fsm u_fsm (
    .clk, .rst_n(core_rst_n),
    .fifo_rdata(if_rdata), .fifo_empty(if_empty), .fifo_rd(if_rd_fsm),
    .spk_addr(cfg.in_spk_addr), .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .pe_running, .pe_inlayer_busy(pe_inlayer),
    .start(fsm_start), .start_nspk(fsm_nspk), .state(fsm_state),
    .err_frames(fsm_err), .blocked_cycles(fsm_blocked),
    .postponed_starts(fsm_postponed), .frames(fsm_frames)
  );

  // ---- processing element
  logic               of_wr, of_full, of_empty, of_rd;
  logic [FIFO_DW-1:0] of_wdata, of_rdata;
  logic [OUT_FIFO_AW:0] of_count;
  pe_dbg_t            pe_dbg, dbg_view;
  logic               pe_start;
  logic [NCNT_W-1:0]  pe_nspk;

  assign pe_start = start_snn || fsm_start;
  assign pe_nspk  = fsm_start ? fsm_nspk : cfg.in_spk_num;

  adlif_pe u_pe (
    .clk, .rst_n(core_rst_n),
    .start(pe_start), .start_nspk(pe_nspk), .spk_addr(cfg.in_spk_addr),
    .l1_addr(cfg.l1_addr), .l1_nrn(cfg.l1_nrn), .l2_addr(cfg.l2_addr), .l2_nrn(cfg.l2_nrn),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]), .pe_prio,
    .out_wr(of_wr), .out_data(of_wdata), .out_full(of_full),
    .running(pe_running), .inlayer_busy(pe_inlayer), .end_of_ts(pe_eot),
    .spike_rdy(pe_spike_rdy), .dbg(pe_dbg)
  );

  sync_fifo #(.DW(FIFO_DW), .AW(OUT_FIFO_AW)) u_out_fifo (
    .clk, .rst_n(core_rst_n), .wr_en(of_wr), .wdata(of_wdata),
    .rd_en(of_rd), .rdata(of_rdata), .full(of_full), .empty(of_empty), .count(of_count)
  );

  // ---- slaves
  reg_file u_regs (
    .clk, .rst_n, .s_req(s_req[REG_REGION]), .s_rsp(s_rsp[REG_REGION]),
    .cfg, .start_snn, .soft_rst_n,
    .out_fifo_full(of_full), .out_fifo_empty(of_empty), .spike_rdy(pe_spike_rdy),
    .end_of_ts(pe_eot), .running(pe_running),
    .in_fifo_full(if_full), .in_fifo_empty(if_empty)
  );

  sram u_sram (
    .clk, .rst_n, .s_req(s_req[SRAM_REGION]), .s_rsp(s_rsp[SRAM_REGION])
  );

  fifo_ahb_port #(.POP(1'b1)) u_of_port (
    .clk, .rst_n(core_rst_n), .s_req(s_req[OFIFO_REGION]), .s_rsp(s_rsp[OFIFO_REGION]),
    .fifo_rdata(of_rdata), .fifo_empty(of_empty), .fifo_rd(of_rd)
  );

  fifo_ahb_port #(.POP(1'b0)) u_if_port (
    .clk, .rst_n(core_rst_n), .s_req(s_req[IFIFO_REGION]), .s_rsp(s_rsp[IFIFO_REGION]),
    .fifo_rdata(if_rdata), .fifo_empty(if_empty), .fifo_rd(if_rd_bus)
  );

  always_comb begin
    dbg_view             = pe_dbg;
    dbg_view.state_inspk = fsm_state;
  end

  debug_regs u_dbg (
    .clk, .rst_n, .s_req(s_req[DBG_REGION]), .s_rsp(s_rsp[DBG_REGION]), .dbg(dbg_view)
  );

  assign end_of_ts = pe_eot;

  logic unused;
  assign unused = ^{if_count, of_count, if_rd_bus, fsm_err, fsm_blocked, fsm_postponed, fsm_frames};
endmodule
