// ahb_interconnect: shared on-chip bus with arbiter and address decoder.
//
// Three masters share one AHB-Lite style bus: the PE (index 0), the input
// spike FSM (index 1) and the host bridge (index 2). Each cycle the arbiter
// grants the address phase to one requesting master: the PE whenever it
// raises `pe_prio`, otherwise the requesters in round-robin order. The grant
// is returned combinationally (`gnt`), so a master holds its request until it
// sees it. The address is decoded from addr[18:16] into the five slaves
// (register file, SRAM, output FIFO, input FIFO, debug registers), which see
// the AHB-Lite slave signals; the write data is moved into the data phase
// here. All slaves complete in one data-phase cycle, so `rvalid` (with the
// read data) reaches the granted master exactly one cycle after its grant,
// for reads and writes alike.
// The three-master arbitration with PE privilege follows the design
// description; the round-robin order among the others, the req/gnt master
// port in place of full AHB master signalling and zero-wait slaves are
// implementation choices.
module ahb_interconnect
  import adlif_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bus_req_t     m_req [NM],
  output bus_rsp_t     m_rsp [NM],
  input  logic         pe_prio,
  output ahb_slv_req_t s_req [N_SLAVES],
  input  ahb_slv_rsp_t s_rsp [N_SLAVES]
);
  localparam int unsigned MW = $clog2(NM);

  logic [MW-1:0] last_gnt;      // round-robin pointer
  logic [MW-1:0] win;
  logic          any;
  logic [NM-1:0] reqs;

  // data phase bookkeeping
  logic          dp_valid;
  logic [MW-1:0] dp_owner;
  logic [2:0]    dp_slave;
  bus_data_t     dp_wdata;

  always_comb begin
    for (int m = 0; m < NM; m++) reqs[m] = m_req[m].req;
  end

  logic [MW-1:0] idx;
  always_comb begin
    any = |reqs;
    win = '0;
    idx = '0;
    if (pe_prio && reqs[0]) begin
      win = '0;
    end else begin
      // first requester after the last granted one
      for (int k = NM; k >= 1; k--) begin
        idx = MW'((int'(last_gnt) + k) % NM);
        if (reqs[idx]) win = MW'(idx);
      end
    end
  end

  logic [2:0] a_region;
  assign a_region = m_req[win].addr[18:16];

  always_comb begin
    for (int s = 0; s < N_SLAVES; s++) begin
      s_req[s].hsel   = any && (a_region == 3'(s)) && (m_req[win].addr[BUS_AW-1:19] == '0);
      s_req[s].htrans = any;
      s_req[s].hwrite = m_req[win].we;
      s_req[s].haddr  = m_req[win].addr;
      s_req[s].hwdata = dp_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_gnt <= MW'(NM-1);
      dp_valid <= 1'b0;
      dp_owner <= '0;
      dp_slave <= '0;
      dp_wdata <= '0;
    end else begin
      dp_valid <= any;
      if (any) begin
        last_gnt <= win;
        dp_owner <= win;
        dp_slave <= a_region;
        dp_wdata <= m_req[win].wdata;
      end
    end
  end

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].gnt    = any && (win == MW'(m));
      m_rsp[m].rvalid = dp_valid && (dp_owner == MW'(m));
      m_rsp[m].rdata  = (int'(dp_slave) < N_SLAVES) ? s_rsp[dp_slave].hrdata : '0;
    end
  end

  // every slave of this design answers in one cycle
  slaves_zero_wait: assert property (@(posedge clk) disable iff (!rst_n)
      dp_valid |-> ((int'(dp_slave) >= N_SLAVES) || s_rsp[dp_slave].hreadyout));
endmodule
