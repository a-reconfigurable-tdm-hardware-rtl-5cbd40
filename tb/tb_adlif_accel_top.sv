// tb_adlif_accel_top: end-to-end test of the accelerator.
//
// A random 96x16x4 network (output neurons 0 and 1 with negative thresholds,
// so they fire every step) is loaded into SRAM over the host port, then:
//  1. host path: frames of spike addresses are written into SRAM and started
//     with START_SNN; output spikes are popped from the output FIFO after
//     every step and compared with the reference model; cycles per step are
//     read from the debug registers and checked against the expected cost;
//  2. AER path: events are sent over the four-phase handshake while the tick
//     generator closes frames; the input spike FSM moves them to SRAM and
//     starts the PE; a short tick period makes the PE overrun (postponed
//     starts, events blocked behind the input layer); output spikes are
//     collected concurrently and compared as one ordered stream;
//  3. output FIFO full: steps run without popping until the PE stalls on a
//     full FIFO, then the FIFO is drained;
//  4. final neuron states in SRAM are compared with the model, debug and
//     status registers are checked, and the software reset is exercised.
// Each mechanism is counted and a mechanism that never occurred is a failure.
module tb_adlif_accel_top;
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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host bus access (driven at the falling edge)
  semaphore bus_lock = new(1);
  task automatic bus_xfer(input bit we, input int unsigned addr, input logic [47:0] wd,
                          output logic [47:0] rd);
    bus_lock.get(1);
    @(negedge clk);
    host_req.req = 1'b1; host_req.we = we;
    host_req.addr = bus_addr_t'(addr); host_req.wdata = wd;
    #1;
    while (!host_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    host_req.req = 1'b0;
    rd = host_rsp.rdata;
    bus_lock.put(1);
  endtask
  task automatic wr(input int unsigned addr, input logic [47:0] d);
    logic [47:0] x;
    bus_xfer(1'b1, addr, d, x);
  endtask
  task automatic rd(input int unsigned addr, output logic [47:0] d);
    bus_xfer(1'b0, addr, '0, d);
  endtask
  function automatic int unsigned reg_a(input reg_off_e r);
    return int'(r);
  endfunction
  localparam int unsigned SRAM_A = 32'h1_0000;
  localparam int unsigned OFIFO_A = 32'h2_0000;
  localparam int unsigned IFIFO_A = 32'h3_0000;
  localparam int unsigned DBG_A = 32'h4_0000;

  net_model net;
  int sizes[] = '{96, 16, 4};
  int spk_line;
  int exp_out[$];      // expected output spikes, in order
  int got_out[$];      // popped output spikes, in order
  int hidden_spk = 0, sat_cnt = 0;

  // mechanism counters
  int m_host_steps = 0, m_aer_frames = 0, m_fanout = 0, m_out_spikes = 0;
  int m_postponed = 0, m_blocked = 0, m_ofifo_stall = 0, m_saturation = 0;
  int m_pe_wait = 0, m_soft_reset = 0, m_eof_checked = 0;

  // ---- monitors
  int frame_q[$];
  int frames[$][$];
  int eof_counts[$];
  always @(posedge clk) begin
    if (rst_n && dut.u_in_fifo.wr_en) begin
      if (dut.u_in_fifo.wdata[15]) begin
        frames.push_back(frame_q);
        eof_counts.push_back(int'(dut.u_in_fifo.wdata[14:0]));
        frame_q.delete();
      end else begin
        frame_q.push_back(int'(dut.u_in_fifo.wdata[11:0]));
      end
    end
    if (rst_n && dut.u_pe.st == dut.u_pe.S_OUT && dut.of_full) m_ofifo_stall++;
    if (rst_n && dut.u_pe.st == dut.u_pe.S_PW) m_fanout++;
    if (rst_n && dut.u_bus.m_req[1].req && !dut.u_bus.m_rsp[1].gnt) m_pe_wait++;
  end

  // ---- AER sender (four-phase handshake)
  task automatic aer_send(input int addr);
    @(negedge clk);
    aer_data = AER_W'(addr);
    #2 aer_req = 1'b1;
    wait (aer_ack == 1'b1);
    #3 aer_req = 1'b0;
    wait (aer_ack == 1'b0);
  endtask

  task automatic pop_all();
    logic [47:0] d;
    forever begin
      rd(reg_a(R_OUT_FIFO_EMPTY), d);
      if (d[0]) break;
      rd(OFIFO_A, d);
      got_out.push_back(int'(d[15:0]));
    end
  endtask

  task automatic model_step(input int spk[$]);
    int o[$];
    net.step(spk, o, hidden_spk, sat_cnt);
    foreach (o[x]) exp_out.push_back(o[x]);
    m_out_spikes += o.size();
  endtask

  task automatic wait_eot();
    logic [47:0] d;
    repeat (3) @(negedge clk);   // the start pulse reaches the PE
    do rd(reg_a(R_END_OF_TS), d); while (!d[0]);
  endtask

  initial begin
    int lines[$];
    bit [47:0] data[$];
    logic [47:0] d;
    int spk[$];
    int n_neurons;
    host_req = '0;
    net = new(sizes, -30, 110, 0);
    net.pth[2][0] = -8;
    net.pth[2][1] = -12;
    n_neurons = sizes[1] + sizes[2];
    spk_line = net.end_line + 8;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- load network image and configuration
    net.image(lines, data);
    foreach (lines[x]) wr(SRAM_A + lines[x], data[x]);
    wr(reg_a(R_L1_ADDR), 48'(net.base[1]));
    wr(reg_a(R_L1_NRN_NUM), 48'(sizes[1]));
    wr(reg_a(R_L2_ADDR), 48'(net.base[2]));
    wr(reg_a(R_L2_NRN_NUM), 48'(sizes[2]));
    wr(reg_a(R_IN_SPK_ADDR), 48'(spk_line));
    wr(reg_a(R_DEB_REG), 48'h0000_1234_5678);
    rd(reg_a(R_DEB_REG), d);
    check(d[31:0] == 32'h1234_5678, "DEB_REG read back");
    rd(reg_a(R_BS_VERSION), d);
    check(d[31:0] == 32'h0001_0000, "BS_VERSION");
    rd(reg_a(R_L1_ADDR), d);
    check(d[31:0] == 32'(net.base[1]), "L1_ADDR read back");

    // ---- phase 1: host-injected frames
    for (int f = 0; f < 8; f++) begin
      int ns;
      int unsigned cc;
      ns = (f == 0) ? 0 : (f == 7) ? 40 : int'($urandom_range(1, 20));
      spk.delete();
      for (int k = 0; k < ns; k++) begin
        spk.push_back((f == 7) ? 5 : int'($urandom_range(0, sizes[0] - 1)));
        wr(SRAM_A + spk_line + k, 48'(spk[k]));
      end
      wr(reg_a(R_IN_SPK_NUM), 48'(ns));
      wr(reg_a(R_START_SNN), 48'd1);
      wait_eot();
      model_step(spk);
      m_host_steps++;
      rd(DBG_A + 32'h0A, d);
      cc = d[31:0];
      $display("host step %0d: %0d input spikes, %0d cycles", f, ns, cc);
      if (f == 0) begin
        // no input: only the state sweep, 30 to 35 cycles per neuron
        check(cc >= 30 * n_neurons && cc <= 35 * n_neurons,
              $sformatf("cycles per neuron %0d/%0d outside 30..35", cc, n_neurons));
      end
      pop_all();
    end
    check(got_out == exp_out, "host path output spikes");
    if (got_out != exp_out) $display("got %p exp %p", got_out, exp_out);
    rd(DBG_A + 32'h0E, d);
    check(d[31:0] == 32'd8, "CURR_TS counts time-steps");
    rd(DBG_A + 32'h23, d);
    check(int'(signed'(d[31:0])) == net.pth[2][3], "N_PAR_TH of last neuron");
    rd(DBG_A + 32'h17, d);
    check(int'(signed'(d[31:0])) == net.pu[2][3], "NEW_U of last neuron");
    rd(DBG_A + 32'h19, d);
    check(int'(signed'(d[31:0])) == net.pw[2][3], "NEW_W of last neuron");

    // ---- phase 2: AER path with the tick generator
    got_out.delete(); exp_out.delete();
    frames.delete(); eof_counts.delete(); frame_q.delete();
    wr(reg_a(R_TICK_COUNTER), 48'd700);
    wr(reg_a(R_START_TICK_GEN), 48'd1);
    fork
      begin
        for (int e = 0; e < 160; e++) begin
          aer_send(int'($urandom_range(0, sizes[0] - 1)));
          if ($urandom_range(0, 9) < 3) repeat ($urandom_range(20, 400)) @(negedge clk);
        end
      end
      begin
        repeat (40) begin
          repeat (500) @(negedge clk);
          pop_all();
        end
      end
    join
    repeat (3000) @(negedge clk);
    wr(reg_a(R_START_TICK_GEN), 48'd0);
    repeat (200) @(negedge clk);
    // let every closed frame be processed
    while (dut.u_fsm.frames != 32'(frames.size()) || dut.pe_running) begin
      repeat (200) @(negedge clk);
      pop_all();
    end
    pop_all();
    foreach (frames[f]) begin
      check(eof_counts[f] == frames[f].size(), "EoF marker count");
      m_eof_checked++;
      model_step(frames[f]);
    end
    m_aer_frames = frames.size();
    check(dut.u_fsm.err_frames == 0, "no frame count mismatch");
    check(got_out == exp_out, "AER path output spikes");
    if (got_out != exp_out) $display("got %0d exp %0d spikes", got_out.size(), exp_out.size());
    m_postponed = int'(dut.u_fsm.postponed_starts);
    m_blocked   = int'(dut.u_fsm.blocked_cycles);

    // ---- phase 3: output FIFO fills and stalls the PE
    got_out.delete(); exp_out.delete();
    wr(reg_a(R_IN_SPK_NUM), 48'd0);
    for (int f = 0; f < 10; f++) begin
      spk.delete();
      wr(reg_a(R_START_SNN), 48'd1);
      model_step(spk);
      repeat (3) @(negedge clk);
      forever begin
        rd(reg_a(R_END_OF_TS), d);
        if (d[0]) break;
        if (dut.u_pe.st == dut.u_pe.S_OUT && dut.of_full) pop_all();
      end
    end
    pop_all();
    check(got_out == exp_out, "output spikes across a full FIFO");

    // ---- phase 4: final states, saturation, soft reset
    for (int l = 1; l < 3; l++)
      for (int j = 0; j < sizes[l]; j++) begin
        int nb;
        nb = net.nrn_line(l, j);
        rd(SRAM_A + nb, d);
        check(sx(longint'(d[11:0]), 12) == net.pu[l][j], $sformatf("u of L%0d N%0d", l, j));
        rd(SRAM_A + nb + 1, d);
        check(sx(longint'(d[11:0]), 12) == net.pw[l][j], $sformatf("w of L%0d N%0d", l, j));
      end
    m_saturation = sat_cnt;
    rd(DBG_A + 32'h09, d);
    check(d[31:0] != 0, "TOT_CC counts");
    wr(reg_a(R_RSTN), 48'd0);
    repeat (4) @(negedge clk);
    rd(DBG_A + 32'h09, d);
    check(d[31:0] == 0, "software reset clears the core counters");
    wr(reg_a(R_RSTN), 48'd1);
    repeat (4) @(negedge clk);
    rd(reg_a(R_RUNNING), d);
    check(d[0] == 1'b0, "idle after software reset");
    m_soft_reset++;

    $display("mechanisms: host_steps=%0d aer_frames=%0d eof_checked=%0d out_spikes=%0d fanout_lines=%0d hidden_spikes=%0d",
             m_host_steps, m_aer_frames, m_eof_checked, m_out_spikes, m_fanout, hidden_spk);
    $display("mechanisms: postponed_starts=%0d blocked_cycles=%0d fsm_bus_waits=%0d ofifo_stall_cycles=%0d saturations=%0d soft_reset=%0d",
             m_postponed, m_blocked, m_pe_wait, m_ofifo_stall, m_saturation, m_soft_reset);
    check(m_host_steps > 0, "host START_SNN path used");
    check(m_aer_frames > 3, "AER frames closed by ticks");
    check(m_eof_checked > 0, "EoF count checked");
    check(m_out_spikes > 0, "output spikes");
    check(m_fanout > 0 && hidden_spk > 0, "hidden-layer fan-out");
    check(m_postponed > 0, "start postponed while PE busy");
    check(m_blocked > 0, "transfer held during PE input layer");
    check(m_pe_wait > 0, "FSM stalled by PE bus priority");
    check(m_ofifo_stall > 0, "PE stalled on full output FIFO");
    check(m_saturation > 0, "saturating current accumulation");
    check(m_soft_reset > 0, "software reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
