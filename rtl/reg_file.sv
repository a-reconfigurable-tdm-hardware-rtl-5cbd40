// reg_file: control and status registers of the accelerator.
//
// An AHB-Lite slave (zero wait states) holding the registers of the design's
// register map, one register per word address 0x00-0x12:
//   0x00 IN_SPK_NUM, 0x01 IN_SPK_ADDR, 0x02 START_TICK_GEN, 0x03 TICK_COUNTER,
//   0x04 L1_ADDR, 0x05 L2_ADDR, 0x06 L1_NRN_NUM, 0x07 L2_NRN_NUM (read/write);
//   0x08 START_SNN (write: one-cycle start pulse to the PE);
//   0x09 OUT_FIFO_FULL, 0x0A OUT_FIFO_EMPTY, 0x0B SPIKE_RDY, 0x0C END_OF_TS,
//   0x0D RUNNING (read-only status); 0x0E DEB_REG (scratch); 0x0F RSTN
//   (software reset, active low: while it holds 0 the core is in reset);
//   0x10 BS_VERSION (constant); 0x11 IN_FIFO_FULL, 0x12 IN_FIFO_EMPTY.
// L1 and L2 describe the first two non-input layers (base line and neuron
// count); together they let the PE start without reading any layer marker.
// Reset values, the 32-bit register width and RSTN holding its value are
// implementation choices. Unmapped offsets read 0.
module reg_file
  import adlif_pkg::*;
#(
  parameter logic [31:0] VERSION = 32'h0001_0000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_req_t s_req,
  output ahb_slv_rsp_t s_rsp,
  output core_cfg_t    cfg,
  output logic         start_snn,
  output logic         soft_rst_n,
  input  logic         out_fifo_full,
  input  logic         out_fifo_empty,
  input  logic         spike_rdy,
  input  logic         end_of_ts,
  input  logic         running,
  input  logic         in_fifo_full,
  input  logic         in_fifo_empty
);
  logic        wr_pend;
  logic [4:0]  wr_off;
  logic [31:0] rd_q;
  logic [31:0] deb_reg;
  logic        rstn_reg;
  logic [31:0] wd;
  logic [4:0]  a_off;
  logic        a_sel;

  assign wd    = s_req.hwdata[31:0];
  assign a_off = s_req.haddr[4:0];
  assign a_sel = s_req.hsel && s_req.htrans && (s_req.haddr[15:5] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend   <= 1'b0;
      wr_off    <= '0;
      rd_q      <= '0;
      cfg       <= '0;
      deb_reg   <= '0;
      rstn_reg  <= 1'b1;
      start_snn <= 1'b0;
    end else begin
      start_snn <= 1'b0;
      wr_pend   <= a_sel && s_req.hwrite;
      if (a_sel) wr_off <= a_off;
      // data phase of a write
      if (wr_pend) begin
        unique case (reg_off_e'(wr_off))
          R_IN_SPK_NUM:     cfg.in_spk_num  <= wd[NCNT_W-1:0];
          R_IN_SPK_ADDR:    cfg.in_spk_addr <= wd[SRAM_AW-1:0];
          R_START_TICK_GEN: cfg.tick_en     <= wd[0];
          R_TICK_COUNTER:   cfg.tick_period <= wd;
          R_L1_ADDR:        cfg.l1_addr     <= wd[SRAM_AW-1:0];
          R_L2_ADDR:        cfg.l2_addr     <= wd[SRAM_AW-1:0];
          R_L1_NRN_NUM:     cfg.l1_nrn      <= wd[NCNT_W-1:0];
          R_L2_NRN_NUM:     cfg.l2_nrn      <= wd[NCNT_W-1:0];
          R_START_SNN:      start_snn       <= wd[0];
          R_DEB_REG:        deb_reg         <= wd;
          R_RSTN:           rstn_reg        <= wd[0];
          default: ;
        endcase
      end
      // address phase of a read: the value is presented in the data phase
      if (a_sel && !s_req.hwrite) begin
        unique case (reg_off_e'(a_off))
          R_IN_SPK_NUM:     rd_q <= 32'(cfg.in_spk_num);
          R_IN_SPK_ADDR:    rd_q <= 32'(cfg.in_spk_addr);
          R_START_TICK_GEN: rd_q <= 32'(cfg.tick_en);
          R_TICK_COUNTER:   rd_q <= cfg.tick_period;
          R_L1_ADDR:        rd_q <= 32'(cfg.l1_addr);
          R_L2_ADDR:        rd_q <= 32'(cfg.l2_addr);
          R_L1_NRN_NUM:     rd_q <= 32'(cfg.l1_nrn);
          R_L2_NRN_NUM:     rd_q <= 32'(cfg.l2_nrn);
          R_OUT_FIFO_FULL:  rd_q <= 32'(out_fifo_full);
          R_OUT_FIFO_EMPTY: rd_q <= 32'(out_fifo_empty);
          R_SPIKE_RDY:      rd_q <= 32'(spike_rdy);
          R_END_OF_TS:      rd_q <= 32'(end_of_ts);
          R_RUNNING:        rd_q <= 32'(running);
          R_DEB_REG:        rd_q <= deb_reg;
          R_RSTN:           rd_q <= 32'(rstn_reg);
          R_BS_VERSION:     rd_q <= VERSION;
          R_IN_FIFO_FULL:   rd_q <= 32'(in_fifo_full);
          R_IN_FIFO_EMPTY:  rd_q <= 32'(in_fifo_empty);
          default:          rd_q <= '0;
        endcase
      end
    end
  end

  assign soft_rst_n      = rstn_reg;
  assign s_rsp.hreadyout = 1'b1;
  assign s_rsp.hrdata    = BUS_DW'(rd_q);
endmodule
