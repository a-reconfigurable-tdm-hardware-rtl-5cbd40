// fifo_ahb_port: AHB-Lite slave window onto a spike FIFO's read side.
//
// A read in the address phase captures the FIFO's head word for the data
// phase and, when POP is 1, removes it from the FIFO (output spike FIFO:
// the host collects output spikes this way). With POP 0 the head is only
// observed (input spike FIFO). An empty FIFO reads as 0; the host checks the
// EMPTY status registers first. Writes are ignored. Zero wait states.
module fifo_ahb_port
  import adlif_pkg::*;
#(
  parameter bit POP = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ahb_slv_req_t       s_req,
  output ahb_slv_rsp_t       s_rsp,
  input  logic [FIFO_DW-1:0] fifo_rdata,
  input  logic               fifo_empty,
  output logic               fifo_rd
);
  logic [FIFO_DW-1:0] rd_q;
  logic               a_rd;

  assign a_rd    = s_req.hsel && s_req.htrans && !s_req.hwrite;
  assign fifo_rd = POP && a_rd && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= '0;
    else if (a_rd) rd_q <= fifo_empty ? '0 : fifo_rdata;
  end

  assign s_rsp.hreadyout = 1'b1;
  assign s_rsp.hrdata    = BUS_DW'(rd_q);

  logic unused;
  assign unused = ^{s_req.haddr, s_req.hwdata};
endmodule
