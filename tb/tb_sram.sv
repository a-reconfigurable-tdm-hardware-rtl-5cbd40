// tb_sram: pipelined AHB-Lite traffic (a new address phase every cycle)
// against a reference array at the full 32768 x 48 size. Checks one-cycle read
// latency, write-then-read of the same line in back-to-back cycles (the
// bypass), read-modify-write sequences, and the first and last lines.
module tb_sram;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_slv_req_t s_req;
  ahb_slv_rsp_t s_rsp;
  sram dut (.*);

  int checks = 0, failures = 0, bypasses = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit [47:0] ref_mem [int];
  // data-phase bookkeeping of the previous address phase
  bit dp_v, dp_w; int dp_a; bit [47:0] dp_exp, dp_wd;
  int last_wr = -1;

  // one bus cycle: address phase of (v, w, a, wd) and data phase of the
  // previous one
  task automatic cyc(input bit v, input bit w, input int a, input bit [47:0] wd);
    @(negedge clk);
    if (dp_v && !dp_w) check(s_rsp.hrdata[47:0] == dp_exp, $sformatf("read line %0d", dp_a));
    s_req.hsel = v; s_req.htrans = v; s_req.hwrite = w;
    s_req.haddr = SRAM_BASE + bus_addr_t'(a);
    s_req.hwdata = dp_w ? bus_data_t'(dp_wd) : '0;
    @(posedge clk); #1;
    check(s_rsp.hreadyout, "zero wait");
    if (dp_v && dp_w) ref_mem[dp_a] = dp_wd;
    if (v && !w && dp_v && dp_w && dp_a == a) bypasses++;
    dp_v = v; dp_w = w; dp_a = a; dp_wd = wd;
    dp_exp = ref_mem.exists(a) ? ref_mem[a] : '0;
  endtask

  initial begin
    s_req = '0;
    dp_v = 0; dp_w = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // initialise a window and the extremes
    for (int a = 0; a < 64; a++) cyc(1, 1, a, 48'(a * 7919));
    cyc(1, 1, 32767, 48'hFEDC_BA98_7654);
    cyc(1, 1, 16384, 48'h1234_5678_9ABC);
    cyc(0, 0, 0, 0);
    // a read issued right after a write to the same line sees the new data
    for (int t = 0; t < 20000; t++) begin
      int a; bit w;
      a = (t % 100 == 0) ? 32767 : int'($urandom_range(0, 63));
      w = 1'($urandom_range(0, 1));
      if (w) cyc(1, 1, a, {16'($urandom), 32'($urandom)});
      else   cyc($urandom_range(0, 9) != 0, 0, a, 0);
    end
    // read-modify-write: read, then write the incremented value, then read
    for (int t = 0; t < 200; t++) begin
      int a; bit [47:0] v;
      a = int'($urandom_range(0, 63));
      cyc(1, 0, a, 0);
      cyc(0, 0, 0, 0);
      v = s_rsp.hrdata[47:0];
      cyc(1, 1, a, v + 1);
      cyc(1, 0, a, 0);
      cyc(0, 0, 0, 0);
      check(s_rsp.hrdata[47:0] == v + 1, "read-modify-write");
    end
    cyc(1, 0, 16384, 0); cyc(0, 0, 0, 0);
    check(s_rsp.hrdata[47:0] == 48'h1234_5678_9ABC, "middle line");
    check(bypasses > 100, $sformatf("bypass exercised %0d", bypasses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
