// tb_debug_regs: drives random values on every field of the PE debug bundle
// and reads all offsets 0x00-0x3F, comparing with the register map: FSM
// states at 0x00-0x08, counters at 0x09-0x0E, neuron-update intermediates at
// 0x0F-0x1A (sign-extended), END_M_UPDATE and NXT_SPIKE_ADDR at 0x1B-0x1C,
// the neuron operands at 0x1F-0x26, zero elsewhere; writes have no effect.
module tb_debug_regs;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_slv_req_t s_req;
  ahb_slv_rsp_t s_rsp;
  pe_dbg_t dbg;
  debug_regs dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] expect_at(input int o);
    case (o)
      0: return 32'(dbg.state_adlif);   1: return 32'(dbg.state_inspk);
      2: return 32'(dbg.state_layer);   3: return 32'(dbg.state_nrn_load);
      4: return 32'(dbg.state_nrn_update); 5: return 32'(dbg.state_nrn_write);
      7: return 32'(dbg.state_ps);      8: return 32'(dbg.state_wload);
      9: return dbg.tot_cc;  10: return dbg.curr_ts_cc;  11: return dbg.wstates_cc;
      12: return 32'(dbg.curr_layer); 13: return 32'(dbg.curr_nrn); 14: return dbg.curr_ts;
      15: return 32'(sx(dbg.nrn.adapted_i, 12));   16: return 32'(sx(dbg.nrn.one_alpha, 12));
      17: return 32'(sx(dbg.nrn.one_beta, 12));    18: return 32'(sx(dbg.nrn.scaled_i, 12));
      19: return 32'(sx(dbg.nrn.alpha_u, 12));     20: return 32'(sx(dbg.nrn.u_bar, 12));
      21: return 32'(sx(dbg.nrn.beta_w, 12));      22: return 32'(sx(dbg.nrn.a_ubar, 12));
      23: return 32'(sx(dbg.nrn.new_u, 12));       24: return 32'(sx(dbg.nrn.beta_scaled, 12));
      25: return 32'(sx(dbg.nrn.new_w, 12));       26: return 32'(sx(dbg.nrn.au_p_b, 12));
      27: return 32'(dbg.end_m_update);            28: return 32'(dbg.nxt_spike_addr);
      31: return 32'(sx(dbg.par_i, 12));  32: return 32'(sx(dbg.par_w, 12));
      33: return 32'(sx(dbg.par_alpha, 8)); 34: return 32'(sx(dbg.par_u, 12));
      35: return 32'(sx(dbg.par_th, 8));  36: return 32'(sx(dbg.par_beta, 8));
      37: return 32'(sx(dbg.par_a, 8));   38: return 32'(sx(dbg.par_b, 8));
      default: return 0;
    endcase
  endfunction
  function automatic int sx(input longint v, input int bits);
    longint m;
    m = longint'(1) << (bits - 1);
    v = v & ((longint'(1) << bits) - 1);
    return int'((v ^ m) - m);
  endfunction

  initial begin
    logic [31:0] d;
    s_req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int w = 0; w < $bits(pe_dbg_t); w += 32)
        dbg[w +: 32] = $urandom;
      for (int o = 0; o < 64; o++) begin
        if (o % 5 == 0) begin   // a write first: must be ignored
          @(negedge clk);
          s_req.hsel = 1; s_req.htrans = 1; s_req.hwrite = 1; s_req.haddr = bus_addr_t'(32'h4_0000 + o);
          @(negedge clk);
          s_req.hsel = 0; s_req.hwdata = '1;
        end
        @(negedge clk);
        s_req.hsel = 1; s_req.htrans = 1; s_req.hwrite = 0; s_req.haddr = bus_addr_t'(32'h4_0000 + o);
        @(negedge clk);
        s_req.hsel = 0; s_req.htrans = 0;
        d = s_rsp.hrdata[31:0];
        check(d == expect_at(o), $sformatf("offset %0h: %0h exp %0h", o, d, expect_at(o)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
