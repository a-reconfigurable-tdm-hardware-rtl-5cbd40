// debug_regs: read-only window onto the processing element's internals.
//
// An AHB-Lite slave (zero wait states) that maps the PE's FSM states,
// performance counters, loop indices, the intermediate values of the neuron
// update and the operands of the neuron being processed onto word offsets
// 0x00-0x26, following the design's debug register map (for example 0x09
// TOT_CC, 0x0A CURR_TS_CC, 0x0F ADAPTED_I ... 0x1A AU_P_B, 0x1F N_PAR_I ...
// 0x26 N_PAR_B). Signed values are sign-extended to 32 bits. The read value
// is captured in the address phase and presented in the data phase. Writes
// are ignored; unmapped offsets read 0. The design's two tables place b at
// 0x26 and at 0x28; 0x26 is used here.
module debug_regs
  import adlif_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_req_t s_req,
  output ahb_slv_rsp_t s_rsp,
  input  pe_dbg_t      dbg
);
  logic [31:0] rd_q;
  logic [31:0] val;
  logic [5:0]  off;
  logic        a_rd;

  assign off  = s_req.haddr[5:0];
  assign a_rd = s_req.hsel && s_req.htrans && !s_req.hwrite && (s_req.haddr[15:6] == '0);

  function automatic logic [31:0] sx(input state_t v);
    return 32'(signed'(v));
  endfunction
  function automatic logic [31:0] px(input param_t v);
    return 32'(signed'(v));
  endfunction

  always_comb begin
    unique case (off)
      6'h00: val = 32'(dbg.state_adlif);
      6'h01: val = 32'(dbg.state_inspk);
      6'h02: val = 32'(dbg.state_layer);
      6'h03: val = 32'(dbg.state_nrn_load);
      6'h04: val = 32'(dbg.state_nrn_update);
      6'h05: val = 32'(dbg.state_nrn_write);
      6'h07: val = 32'(dbg.state_ps);
      6'h08: val = 32'(dbg.state_wload);
      6'h09: val = dbg.tot_cc;
      6'h0A: val = dbg.curr_ts_cc;
      6'h0B: val = dbg.wstates_cc;
      6'h0C: val = 32'(dbg.curr_layer);
      6'h0D: val = 32'(dbg.curr_nrn);
      6'h0E: val = dbg.curr_ts;
      6'h0F: val = sx(dbg.nrn.adapted_i);
      6'h10: val = sx(dbg.nrn.one_alpha);
      6'h11: val = sx(dbg.nrn.one_beta);
      6'h12: val = sx(dbg.nrn.scaled_i);
      6'h13: val = sx(dbg.nrn.alpha_u);
      6'h14: val = sx(dbg.nrn.u_bar);
      6'h15: val = sx(dbg.nrn.beta_w);
      6'h16: val = sx(dbg.nrn.a_ubar);
      6'h17: val = sx(dbg.nrn.new_u);
      6'h18: val = sx(dbg.nrn.beta_scaled);
      6'h19: val = sx(dbg.nrn.new_w);
      6'h1A: val = sx(dbg.nrn.au_p_b);
      6'h1B: val = 32'(dbg.end_m_update);
      6'h1C: val = 32'(dbg.nxt_spike_addr);
      6'h1F: val = sx(dbg.par_i);
      6'h20: val = sx(dbg.par_w);
      6'h21: val = px(dbg.par_alpha);
      6'h22: val = sx(dbg.par_u);
      6'h23: val = px(dbg.par_th);
      6'h24: val = px(dbg.par_beta);
      6'h25: val = px(dbg.par_a);
      6'h26: val = px(dbg.par_b);
      default: val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= '0;
    else if (a_rd) rd_q <= val;
  end

  assign s_rsp.hreadyout = 1'b1;
  assign s_rsp.hrdata    = BUS_DW'(rd_q);

  logic unused;
  assign unused = ^s_req.hwdata;
endmodule
