// tb_adlif_pe: the processing element alone, on a bus model that grants at
// random (so every memory access can stall) and answers reads one cycle
// after the grant, with an output FIFO whose full flag toggles at random.
// A four-layer network (40 inputs, 12, 8, 6 neurons; some output neurons with
// a negative threshold so they fire every step) is loaded into the model
// memory and run for 25 time-steps with random input spikes. The output
// spikes of every step and the final states of all neurons are compared with
// the reference model. Also checks: pe_prio and running while busy,
// inlayer_busy only at the start of a step, end_of_ts after the last layer,
// no output write while the FIFO is full, and the cost of a step with an
// always-granting bus and no spikes (30 to 35 cycles per neuron, layer
// overhead included).
module tb_adlif_pe;
  import adlif_pkg::*;
  import tb_adlif_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [NCNT_W-1:0] start_nspk = '0;
  line_addr_t spk_addr, l1_addr, l2_addr;
  logic [NCNT_W-1:0] l1_nrn, l2_nrn;
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  logic pe_prio, out_wr, out_full, running, inlayer_busy, end_of_ts, spike_rdy;
  logic [FIFO_DW-1:0] out_data;
  pe_dbg_t dbg;
  adlif_pe dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- bus model
  bit [47:0] mem [int];
  bit stall_mode = 0, gnt_r, rv;
  bit [47:0] rd;
  int stalls = 0, full_stalls = 0;
  always_comb begin
    m_rsp = '0;
    m_rsp.gnt = m_req.req && (gnt_r || !stall_mode);
    m_rsp.rvalid = rv;
    m_rsp.rdata = bus_data_t'(rd);
  end
  always @(posedge clk) begin
    rv <= 0;
    if (m_req.req && !m_rsp.gnt) stalls++;
    if (m_rsp.gnt) begin
      int a;
      check(m_req.addr[BUS_AW-1:16] == 1, "PE accesses only the SRAM region");
      a = int'(m_req.addr[14:0]);
      if (m_req.we) mem[a] = m_req.wdata;
      else begin rd <= mem.exists(a) ? mem[a] : '0; rv <= 1; end
    end
    gnt_r <= ($urandom_range(0, 99) < 60);
  end

  // ---- output FIFO model: two entries, drained slowly from step 10 on
  int outs[$];
  int fifo_n = 0;
  bit full_mode = 0;
  assign out_full = (fifo_n >= 2);
  always @(posedge clk) begin
    if (rst_n && out_wr) begin
      check(!out_full, "output write while full");
      outs.push_back(int'(out_data));
    end
    if (rst_n && running && out_full) full_stalls++;
    if (fifo_n > 0 && (!full_mode || $urandom_range(0, 99) < 3)) fifo_n--;
    if (out_wr) fifo_n++;
  end

  // ---- checks while running
  int inl_after = 0;
  always @(posedge clk) if (rst_n) begin
    if (running) check(pe_prio, "pe_prio while running");
    if (end_of_ts) check(!running, "end_of_ts only when idle");
  end

  net_model m;
  initial begin
    int lines[$], eouts[$], hs, sat, sizes[];
    bit [47:0] data[$];
    sizes = '{40, 12, 8, 6};
    m = new(sizes, -30, 60, 0);
    for (int j = 0; j < 2; j++) m.pth[3][j] = -4;
    m.image(lines, data);
    foreach (lines[k]) mem[lines[k]] = data[k];
    spk_addr = line_addr_t'(20000);
    l1_addr = line_addr_t'(m.base[1]); l1_nrn = NCNT_W'(sizes[1]);
    l2_addr = line_addr_t'(m.base[2]); l2_nrn = NCNT_W'(sizes[2]);
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    hs = 0; sat = 0;
    for (int ts = 0; ts < 25; ts++) begin
      int spk[$], n, cyc;
      bit saw_inl_end;
      stall_mode = (ts >= 2);
      full_mode = (ts >= 10);
      n = (ts == 0) ? 0 : int'($urandom_range(0, 15));
      spk.delete();
      for (int k = 0; k < n; k++) begin
        spk.push_back(int'($urandom_range(0, 39)));
        mem[20000 + k] = 48'(spk[k]);
      end
      m.step(spk, eouts, hs, sat);
      outs.delete();
      @(negedge clk); start = 1; start_nspk = NCNT_W'(n);
      @(negedge clk); start = 0;
      cyc = 1; saw_inl_end = 0;
      while (!end_of_ts) begin
        if (!inlayer_busy) saw_inl_end = 1;
        else check(!saw_inl_end, "inlayer_busy only at the start of the step");
        check(running, "running during the step");
        @(negedge clk); cyc++;
      end
      if (ts == 0) begin
        int nn;
        nn = sizes[1] + sizes[2] + sizes[3];
        $display("step without spikes, no stalls: %0d cycles for %0d neurons", cyc, nn);
        check(cyc >= 30 * nn && cyc <= 35 * nn, "cycles per neuron");
      end
      check(outs == eouts, $sformatf("step %0d output spikes: %p exp %p", ts, outs, eouts));
      check(spike_rdy == (eouts.size() != 0), "spike_rdy follows the output spikes");
    end
    // final states
    for (int l = 1; l < 4; l++)
      for (int j = 0; j < sizes[l]; j++) begin
        int nb;
        nb = m.nrn_line(l, j);
        check(sx(longint'(mem[nb]), 12) == m.pu[l][j] && sx(longint'(mem[nb + 1]), 12) == m.pw[l][j],
              $sformatf("state of neuron %0d/%0d", l, j));
      end
    $display("hidden spikes %0d, bus stalls %0d, FIFO-full stalls %0d", hs, stalls, full_stalls);
    check(hs > 0 && stalls > 0 && full_stalls > 0, "fan-out, bus stall and FIFO-full stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
