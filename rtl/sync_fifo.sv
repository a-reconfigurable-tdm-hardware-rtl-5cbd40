// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the input spike FIFO (16-bit words, 256 entries) and the output
// spike FIFO (16-bit words, 16 entries). A write with `full` high and a read
// with `empty` high are ignored. `rdata` shows the oldest word combinationally
// (first-word fall-through), `count` the number of stored words. The storage
// is a plain array that maps to block or distributed RAM.
module sync_fifo #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wp, rp;
  logic          do_wr, do_rd;

  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty = (wp == rp);
  assign count = wp - rp;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end
endmodule
