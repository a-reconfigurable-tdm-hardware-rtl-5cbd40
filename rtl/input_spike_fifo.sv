// input_spike_fifo: input spike FIFO with frame packetization.
//
// Event addresses from the AER receiver are written into a 16-bit FIFO as
// they arrive, MSB 0. On every global tick an End-of-Frame (EoF) marker is
// written instead: MSB 1, the lower 15 bits holding the number of events of
// the frame it closes, so a reader can check that no event was lost (for
// example 0x8004 closes a frame of four events). The word format follows the
// design description. A tick that finds the FIFO full is kept pending (a
// counter, so several ticks during a long stall still give one marker each)
// and its marker written as soon as there is room; while a marker is pending
// `ev_ready` is low so no new event is accepted, and an event already in
// flight from the receiver is written first and counted in the closing frame
// (implementation choices). `ev_ready` drops two entries before the FIFO is
// full because the receiver delivers an event two cycles after checking it.
// The read side is the FIFO's first-word fall-through port.
module input_spike_fifo
  import adlif_pkg::*;
#(
  parameter int unsigned AW = IN_FIFO_AW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               ev_valid,
  input  logic [AER_W-1:0]   ev_addr,
  output logic               ev_ready,
  input  logic               rd_en,
  output logic [FIFO_DW-1:0] rdata,
  output logic               full,
  output logic               empty,
  output logic [AW:0]        count
);
  logic [7:0]           pend_cnt;   // ticks whose marker is not yet written
  logic                 eof_pend;
  logic [FIFO_DW-2:0]   frame_cnt;
  logic                 wr_en;
  logic [FIFO_DW-1:0]   wdata;
  logic                 wr_eof;

  // an event arrives two cycles after the receiver saw ev_ready, so keep room
  // for it and for one marker written in between
  assign eof_pend = (pend_cnt != '0);
  assign wr_eof   = (eof_pend || tick) && !ev_valid && !full;
  assign ev_ready = (count < (AW+1)'(2**AW - 2)) && !eof_pend && !tick;

  always_comb begin
    wr_en = 1'b0;
    wdata = '0;
    if (wr_eof) begin
      wr_en = 1'b1;
      wdata = {1'b1, frame_cnt};
    end else if (ev_valid && !full) begin
      wr_en = 1'b1;
      wdata = {1'b0, (FIFO_DW-1-AER_W)'(0), ev_addr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_cnt  <= '0;
      frame_cnt <= '0;
    end else begin
      if (wr_eof) begin
        pend_cnt  <= pend_cnt + 8'(tick) - 8'd1;   // one marker written
        frame_cnt <= '0;
      end else begin
        if (tick && pend_cnt != '1) pend_cnt <= pend_cnt + 1'b1;
        if (wr_en) frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  sync_fifo #(.DW(FIFO_DW), .AW(AW)) u_fifo (
    .clk, .rst_n, .wr_en, .wdata, .rd_en, .rdata, .full, .empty, .count
  );

  // an offered event is never dropped
  ev_lost: assert property (@(posedge clk) disable iff (!rst_n) ev_valid |-> !full);
endmodule
