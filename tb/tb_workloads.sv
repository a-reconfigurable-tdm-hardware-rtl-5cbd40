// tb_workloads: the four evaluated network sizes on the full-size
// accelerator (every parameter at its default): 2312x10 (N-MNIST input of
// 34x34 pixels x 2 polarities), 2450x4, 2450x16x4 and 2450x32x4 (PokerDVS).
// Each network gets random weights and parameters, is loaded into SRAM over
// the host port in the accelerator's memory layout (the layout's line count
// is checked against the published footprint of each network), and is run
// with host-injected frames of 0, 15, 40 and 80 input spikes. The output
// spikes of every frame and the final neuron states are compared with the
// reference model. From the cycle counter the bench derives the base cost
// L_base (frame without input) and the cost per input spike gamma, prints
// them next to the published fit, and requires L_base to be within 30% of it.
module tb_workloads;
  import adlif_pkg::*;
  import tb_adlif_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  logic             aer_req = 1'b0;
  logic [AER_W-1:0] aer_data = '0;
  logic             aer_ack;
  bus_req_t         host_req;
  bus_rsp_t         host_rsp;
  logic             end_of_ts;
  adlif_accel_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_xfer(input bit we, input int unsigned addr, input logic [47:0] wd,
                          output logic [47:0] rd);
    @(negedge clk);
    host_req.req = 1'b1; host_req.we = we;
    host_req.addr = bus_addr_t'(addr); host_req.wdata = wd;
    #1;
    while (!host_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    host_req.req = 1'b0;
    rd = host_rsp.rdata;
  endtask
  task automatic wr(input int unsigned addr, input logic [47:0] d);
    logic [47:0] x;
    bus_xfer(1'b1, addr, d, x);
  endtask
  task automatic rd(input int unsigned addr, output logic [47:0] d);
    bus_xfer(1'b0, addr, '0, d);
  endtask
  localparam int unsigned SRAM_A = 32'h1_0000;
  localparam int unsigned OFIFO_A = 32'h2_0000;
  localparam int unsigned DBG_A = 32'h4_0000;

  task automatic run_workload(input string name, input int sizes[], input int lines_exp,
                              input real paper_base, input real paper_gamma);
    net_model net;
    int lines[$], spk[$], o[$], got[$], exp_all[$], hs, sat, spk_line, nn;
    bit [47:0] data[$];
    logic [47:0] d;
    int unsigned cc[4];
    int nspk[4];
    real gamma;
    nspk = '{0, 15, 40, 80};
    hs = 0; sat = 0;
    net = new(sizes, -20, 50, 0);
    check(net.end_line == lines_exp, $sformatf("%s: %0d lines, published %0d", name, net.end_line, lines_exp));
    check(net.end_line + 100 <= 2**SRAM_AW, $sformatf("%s fits in SRAM", name));
    net.image(lines, data);
    foreach (lines[x]) wr(SRAM_A + lines[x], data[x]);
    spk_line = net.end_line;
    wr(int'(R_L1_ADDR), 48'(net.base[1]));
    wr(int'(R_L1_NRN_NUM), 48'(sizes[1]));
    wr(int'(R_L2_ADDR), 48'((sizes.size() > 2) ? net.base[2] : 0));
    wr(int'(R_L2_NRN_NUM), 48'((sizes.size() > 2) ? sizes[2] : 0));
    wr(int'(R_IN_SPK_ADDR), 48'(spk_line));
    nn = 0;
    for (int l = 1; l < sizes.size(); l++) nn += sizes[l];
    for (int f = 0; f < 4; f++) begin
      spk.delete();
      for (int k = 0; k < nspk[f]; k++) begin
        spk.push_back(int'($urandom_range(0, sizes[0] - 1)));
        wr(SRAM_A + spk_line + k, 48'(spk[k]));
      end
      wr(int'(R_IN_SPK_NUM), 48'(nspk[f]));
      wr(int'(R_START_SNN), 48'd1);
      repeat (3) @(negedge clk);
      do rd(int'(R_END_OF_TS), d); while (!d[0]);
      rd(DBG_A + 32'h0A, d);
      cc[f] = d[31:0];
      net.step(spk, o, hs, sat);
      foreach (o[x]) exp_all.push_back(o[x]);
      forever begin
        rd(int'(R_OUT_FIFO_EMPTY), d);
        if (d[0]) break;
        rd(OFIFO_A, d);
        got.push_back(int'(d[15:0]));
      end
    end
    check(got == exp_all, $sformatf("%s: output spikes (%0d)", name, exp_all.size()));
    for (int l = 1; l < sizes.size(); l++)
      for (int j = 0; j < sizes[l]; j += ((sizes[l] > 8) ? 3 : 1)) begin
        rd(SRAM_A + net.nrn_line(l, j), d);
        check(sx(longint'(d[11:0]), 12) == net.pu[l][j], $sformatf("%s: u of L%0d N%0d", name, l, j));
        rd(SRAM_A + net.nrn_line(l, j) + 1, d);
        check(sx(longint'(d[11:0]), 12) == net.pw[l][j], $sformatf("%s: w of L%0d N%0d", name, l, j));
      end
    gamma = real'(int'(cc[3]) - int'(cc[0])) / 80.0;
    $display("%-10s lines %0d | cycles for 0/15/40/80 input spikes: %0d %0d %0d %0d | hidden spikes %0d",
             name, net.end_line, cc[0], cc[1], cc[2], cc[3], hs);
    $display("%-10s L_base %0d (%0.1f per neuron), published %0.1f | gamma %0.1f, published %0.1f",
             name, cc[0], real'(cc[0]) / nn, paper_base, gamma, paper_gamma);
    check(real'(cc[0]) > 0.7 * paper_base && real'(cc[0]) < 1.3 * paper_base,
          $sformatf("%s: base cycles within 30%% of the published fit", name));
    check(cc[3] > cc[1] && cc[1] >= cc[0], $sformatf("%s: cost grows with input activity", name));
  endtask

  initial begin
    host_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    run_workload("2312x10",   '{2312, 10},     7010,  346.46, 26.97);
    run_workload("2450x4",    '{2450, 4},      2480,  141.12, 19.38);
    run_workload("2450x16x4", '{2450, 16, 4},  9963,  809.34, 35.95);
    run_workload("2450x32x4", '{2450, 32, 4},  19895, 1410.13, 67.45);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
