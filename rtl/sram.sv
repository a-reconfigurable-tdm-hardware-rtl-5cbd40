// sram: system SRAM holding weights, neuron parameters/states, layer markers
// and input spike addresses.
//
// 2**AW lines of DW bits (default 32768 x 48 bits, 15-bit line address as in
// the design's implementation parameters), behind an AHB-Lite slave port
// with zero wait states. A read's address is registered in the address phase
// and the line appears on hrdata in the data phase, like a synchronous block
// RAM. A write takes its address in the address phase and its data in the
// data phase and lands in the array at the end of the data phase; a read
// issued in that same cycle to the same line gets the new data through a
// bypass, so back-to-back read-modify-write sequences are safe.
module sram
  import adlif_pkg::*;
#(
  parameter int unsigned AW = SRAM_AW,
  parameter int unsigned DW = SRAM_DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_req_t s_req,
  output ahb_slv_rsp_t s_rsp
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] rd_q;
  logic          wr_pend;
  logic [AW-1:0] wr_addr;
  logic [AW-1:0] a_addr;
  logic          a_rd, a_wr;

  assign a_addr = s_req.haddr[AW-1:0];
  assign a_rd   = s_req.hsel && s_req.htrans && !s_req.hwrite;
  assign a_wr   = s_req.hsel && s_req.htrans &&  s_req.hwrite;

  always_ff @(posedge clk) begin
    if (wr_pend) mem[wr_addr] <= s_req.hwdata[DW-1:0];
    if (a_rd)    rd_q <= (wr_pend && wr_addr == a_addr) ? s_req.hwdata[DW-1:0] : mem[a_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      wr_addr <= '0;
    end else begin
      wr_pend <= a_wr;
      if (a_wr) wr_addr <= a_addr;
    end
  end

  assign s_rsp.hreadyout = 1'b1;
  assign s_rsp.hrdata    = BUS_DW'(rd_q);

  logic unused;
  assign unused = ^s_req.haddr[BUS_AW-1:AW];
endmodule
