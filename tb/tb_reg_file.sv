// tb_reg_file: writes and reads every register of the map over the AHB-Lite
// slave port. Checks read-back of the configuration registers and their
// appearance on the cfg outputs, the one-cycle START_SNN pulse, the held
// software reset, each status input on its own offset, the version constant,
// that unmapped offsets read 0 and that a read right after a write returns
// the new value.
module tb_reg_file;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_slv_req_t s_req;
  ahb_slv_rsp_t s_rsp;
  core_cfg_t cfg;
  logic start_snn, soft_rst_n;
  logic out_fifo_full = 0, out_fifo_empty = 0, spike_rdy = 0, end_of_ts = 0, running = 0,
        in_fifo_full = 0, in_fifo_empty = 0;
  reg_file dut (.*);

  int checks = 0, failures = 0, pulses = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && start_snn) pulses++;

  task automatic wr(input int off, input logic [31:0] d);
    @(negedge clk);
    s_req.hsel = 1; s_req.htrans = 1; s_req.hwrite = 1; s_req.haddr = bus_addr_t'(off);
    @(negedge clk);
    s_req.hsel = 0; s_req.htrans = 0; s_req.hwdata = bus_data_t'(d);
  endtask
  task automatic rd(input int off, output logic [31:0] d);
    @(negedge clk);
    s_req.hsel = 1; s_req.htrans = 1; s_req.hwrite = 0; s_req.haddr = bus_addr_t'(off);
    @(negedge clk);
    s_req.hsel = 0; s_req.htrans = 0;
    d = s_rsp.hrdata[31:0];
  endtask

  initial begin
    logic [31:0] d, vals[8];
    int widths[8];
    widths = '{16, 15, 1, 32, 15, 15, 16, 16};
    s_req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(32'h10, d); check(d == 32'h0001_0000, "BS_VERSION");
    rd(32'h0F, d); check(d == 1 && soft_rst_n, "RSTN after reset");
    for (int r = 0; r < 8; r++) begin
      vals[r] = $urandom & ((widths[r] == 32) ? 32'hFFFF_FFFF : ((32'd1 << widths[r]) - 1));
      wr(r, $urandom);   // overwritten below
      wr(r, vals[r]);
      rd(r, d); check(d == vals[r], $sformatf("read-back offset %0d", r));
    end
    @(negedge clk);
    check(32'(cfg.in_spk_num) == vals[0] && 32'(cfg.in_spk_addr) == vals[1] &&
          32'(cfg.tick_en) == vals[2] && cfg.tick_period == vals[3] &&
          32'(cfg.l1_addr) == vals[4] && 32'(cfg.l2_addr) == vals[5] &&
          32'(cfg.l1_nrn) == vals[6] && 32'(cfg.l2_nrn) == vals[7], "cfg outputs");
    // START_SNN: exactly one pulse per write of 1
    for (int k = 0; k < 5; k++) wr(8, 1);
    wr(8, 0);
    repeat (3) @(negedge clk);
    check(pulses == 5, $sformatf("START_SNN pulses %0d", pulses));
    // status registers, one at a time
    for (int s = 0; s < 7; s++) begin
      int offs[7];
      offs = '{9, 10, 11, 12, 13, 17, 18};
      {in_fifo_empty, in_fifo_full, running, end_of_ts, spike_rdy, out_fifo_empty, out_fifo_full} = 7'(1 << s);
      for (int o = 0; o < 7; o++) begin
        rd(offs[o], d); check(d == 32'(o == s), $sformatf("status offset %0h", offs[o]));
      end
    end
    // DEB_REG scratch and read after write
    wr(14, 32'hCAFE_F00D); rd(14, d); check(d == 32'hCAFE_F00D, "DEB_REG");
    // software reset is held until released
    wr(15, 0); repeat (5) @(negedge clk); check(!soft_rst_n, "soft reset asserted and held");
    rd(15, d); check(d == 0, "RSTN reads 0");
    wr(15, 1); @(negedge clk); check(soft_rst_n, "soft reset released");
    for (int o = 19; o < 32; o++) begin rd(o, d); check(d == 0, "unmapped offset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
