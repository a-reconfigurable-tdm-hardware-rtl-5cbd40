// tb_ahb_interconnect: three random masters against five memory-like
// zero-wait AHB-Lite slave models. A reference memory, updated in grant
// order, predicts every read; the bench checks routing by region, that
// rvalid comes exactly one cycle after each grant and only to that master,
// that at most one master is granted per cycle, that the PE always wins while
// it has priority, and that without priority three always-requesting masters
// are served in strict rotation.
module tb_ahb_interconnect;
  import adlif_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  logic pe_prio = 0;
  ahb_slv_req_t s_req [N_SLAVES];
  ahb_slv_rsp_t s_rsp [N_SLAVES];
  ahb_interconnect #(.NM(NM)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- slave models: memory per slave, data phase one cycle after address
  bit [47:0] smem [N_SLAVES][16];
  bit        sdp_v [N_SLAVES];
  bit        sdp_w [N_SLAVES];
  int        sdp_a [N_SLAVES];
  always_comb
    for (int s = 0; s < N_SLAVES; s++) begin
      s_rsp[s].hreadyout = 1'b1;
      s_rsp[s].hrdata    = (sdp_v[s] && !sdp_w[s]) ? smem[s][sdp_a[s]] : '0;
    end
  always @(posedge clk)
    for (int s = 0; s < N_SLAVES; s++) begin
      if (sdp_v[s] && sdp_w[s]) smem[s][sdp_a[s]] = s_req[s].hwdata;
      sdp_v[s] <= s_req[s].hsel && s_req[s].htrans;
      sdp_w[s] <= s_req[s].hwrite;
      sdp_a[s] <= int'(s_req[s].haddr[3:0]);
    end

  // ---- reference memory and master bookkeeping
  bit [47:0] ref_mem [N_SLAVES][16];
  bit        exp_v [NM];
  bit [47:0] exp_d [NM];
  bit        exp_rd [NM];
  int        grants [NM];
  int        last_win = -1, rot_checks = 0, prio_wins = 0;
  bit        all_req;

  always @(posedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    // data phase of the previous grant
    for (int m = 0; m < NM; m++) begin
      check(m_rsp[m].rvalid == exp_v[m], $sformatf("rvalid of master %0d", m));
      if (exp_v[m] && exp_rd[m]) check(m_rsp[m].rdata == exp_d[m], $sformatf("read data of master %0d", m));
      exp_v[m] = 0;
    end
    all_req = m_req[0].req && m_req[1].req && m_req[2].req;
    for (int m = 0; m < NM; m++)
      if (m_rsp[m].gnt) begin
        int s, a;
        ng++;
        check(m_req[m].req, "grant without request");
        s = int'(m_req[m].addr[18:16]); a = int'(m_req[m].addr[3:0]);
        exp_v[m] = 1; exp_rd[m] = !m_req[m].we;
        if (m_req[m].we) ref_mem[s][a] = m_req[m].wdata;
        else exp_d[m] = ref_mem[s][a];
        if (pe_prio && m_req[0].req) begin check(m == 0, "PE priority"); prio_wins++; end
        if (!pe_prio && all_req && last_win >= 0) begin
          check(m == (last_win + 1) % NM, "round-robin order"); rot_checks++;
        end
        last_win = m;
        grants[m]++;
      end
    check(ng <= 1, "one grant per cycle");
    if ((m_req[0].req || m_req[1].req || m_req[2].req)) check(ng == 1, "a requester is granted");
  end

  // ---- master stimulus: hold a request until granted
  initial begin
    for (int m = 0; m < NM; m++) m_req[m] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      pe_prio = (t / 1000) % 2 == 1;
    end
    $display("grants %0d %0d %0d rotation checks %0d priority wins %0d", grants[0], grants[1], grants[2], rot_checks, prio_wins);
    check(rot_checks > 100 && prio_wins > 100, "rotation and priority exercised");
    check(grants[1] > 100 && grants[2] > 100, "all masters served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // request generator, updated after each edge
  always @(posedge clk) begin
    #1;
    for (int m = 0; m < NM; m++)
      if (!m_req[m].req || m_rsp_gnt_q[m]) begin
        bit go;
        go = ($urandom_range(0, 99) < ((rst_n && ($time / 30000) % 2 == 0) ? 95 : 40));
        m_req[m].req   = go;
        m_req[m].we    = 1'($urandom_range(0, 1));
        m_req[m].addr  = bus_addr_t'({$urandom_range(0, N_SLAVES - 1), 16'($urandom_range(0, 15))});
        m_req[m].wdata = {16'($urandom), 32'($urandom)};
      end
  end
  bit m_rsp_gnt_q [NM];
  always @(posedge clk) for (int m = 0; m < NM; m++) m_rsp_gnt_q[m] <= m_rsp[m].gnt;
endmodule
