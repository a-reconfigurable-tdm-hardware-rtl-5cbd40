// tb_input_spike_fsm: a queue stands in for the input FIFO, a bus model grants
// at random, and a PE model runs for a random time after each start with its
// input-layer phase first. Checks every SRAM write (line spk_addr+k, data =
// event address), the start count of each frame, that start never comes while
// the PE runs and no write is requested in its input-layer phase, that a
// marker with a wrong count is counted in err_frames, and that postponed
// starts and blocked writes both happen.
module tb_input_spike_fsm;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [FIFO_DW-1:0] fifo_rdata;
  logic fifo_empty, fifo_rd;
  line_addr_t spk_addr = line_addr_t'(15'h5000);
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  logic pe_running = 0, pe_inlayer_busy = 0, start;
  logic [NCNT_W-1:0] start_nspk;
  logic [7:0] state;
  logic [15:0] err_frames;
  logic [31:0] blocked_cycles, postponed_starts, frames;
  input_spike_fsm dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int q[$];            // FIFO contents
  int exp_frames[$][$]; // events of each frame in order
  int bad_frame[$];     // 1 where the marker count was corrupted
  int wr_k = 0, n_frames = 0, n_bad = 0, pe_left = 0, in_left = 0;
  bit gnt_rand;
  int cur_frame[$];

  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = (q.size() > 0) ? FIFO_DW'(q[0]) : '0;
  always_comb begin
    m_rsp = '0;
    m_rsp.gnt = m_req.req && gnt_rand;
  end

  always @(posedge clk) if (rst_n) begin
    gnt_rand <= ($urandom_range(0, 3) != 0);
    if (m_rsp.gnt) begin
      check(m_req.we && m_req.addr == SRAM_BASE + bus_addr_t'(spk_addr) + bus_addr_t'(wr_k),
            $sformatf("write line %0h k=%0d", m_req.addr, wr_k));
      check(int'(m_req.wdata) == q[0], "write data");
      cur_frame.push_back(q[0]);
      wr_k++;
    end
    if (fifo_rd) begin check(q.size() > 0, "pop of empty FIFO"); void'(q.pop_front()); end
    if (start) begin
      check(!pe_running, "start while PE running");
      check(int'(start_nspk) == wr_k, $sformatf("start count %0d exp %0d", start_nspk, wr_k));
      check(exp_frames.size() > 0 && cur_frame == exp_frames[0], $sformatf("frame %0d contents", n_frames));
      if (exp_frames.size() > 0) void'(exp_frames.pop_front());
      cur_frame.delete(); wr_k = 0; n_frames++;
      pe_running <= 1; pe_inlayer_busy <= 1;
      in_left = 2 + int'($urandom_range(0, 30)); pe_left = in_left + int'($urandom_range(0, 200));
    end else if (pe_running) begin
      if (in_left > 0) in_left--; else pe_inlayer_busy <= 0;
      if (pe_left > 0) pe_left--; else pe_running <= 0;
    end
  end
  // a write request must not start while the PE reads the spike region
  logic req_d;
  always @(posedge clk) begin
    req_d <= m_req.req;
    if (rst_n && m_req.req && !req_d) check(!pe_inlayer_busy, "write begun during input-layer phase");
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 150; f++) begin
      int n, ev[$];
      bit bad;
      n = (f % 10 == 3) ? 0 : int'($urandom_range(1, 12));
      bad = (f % 37 == 5);
      ev.delete();
      for (int e = 0; e < n; e++) begin
        ev.push_back(int'($urandom_range(0, 4095)));
        repeat ($urandom_range(0, 6)) @(negedge clk);
        q.push_back(ev[e]);
      end
      exp_frames.push_back(ev);
      if (bad) n_bad++;
      q.push_back(32'h8000 | (bad ? n + 1 : n));
      repeat ($urandom_range(0, 60)) @(negedge clk);
    end
    for (int w = 0; w < 60000 && n_frames < 150; w++) @(negedge clk);
    repeat (10) @(negedge clk);
    check(n_frames == 150 && int'(frames) == 150, $sformatf("frames %0d/%0d", n_frames, frames));
    check(int'(err_frames) == n_bad, $sformatf("err_frames %0d exp %0d", err_frames, n_bad));
    check(postponed_starts > 0, "postponed start happened");
    check(blocked_cycles > 0, "write blocked by input-layer phase");
    $display("postponed=%0d blocked=%0d", postponed_starts, blocked_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
