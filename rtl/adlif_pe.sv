// adlif_pe: time-division-multiplexed adLIF processing element.
//
// One physical neuron datapath updates every virtual neuron of the network in
// turn, once per time-step, with all network state in the system SRAM. On
// `start` (from the START_SNN register or from the input spike FSM) a
// time-step runs in three phases:
//  1. Input layer (event driven): for each of the n_spk input spike addresses
//     stored from line `spk_addr` on, the weight row of that input neuron is
//     fetched and added, four weights per line, to the packed synaptic
//     currents of the first non-input layer (read-modify-write, saturating).
//     Only active input neurons cost memory traffic. `inlayer_busy` is high
//     during this phase; the input spike FSM may refill the spike region once
//     it falls.
//  2. For every non-input layer L: read the layer marker (neuron count of
//     L+2) into the look-ahead buffer, then for each neuron j read its current
//     line (once per four neurons), its seven parameter/state lines, run the
//     adLIF update, write u and w back and clear the consumed current line.
//  3. On a spike the neuron's weight lines are added into the currents of
//     layer L+1 (fan-out); in the output layer the neuron index is pushed into
//     the output spike FIFO instead (fan-out bypassed).
// After the last layer `end_of_ts` is set (it clears on the next start).
//
// Memory access goes through one bus master port: a state that needs memory
// raises the request until granted; a read's data returns the next cycle, so
// a read costs two cycles and a write one. The seven parameter lines of a
// neuron are read back to back instead (one request per cycle, eight cycles
// in all). `pe_prio` asks the arbiter for priority while the PE runs. A
// neuron update takes about 31 cycles plus the fan-out of its spike (five
// cycles per weight line: read weights, read currents, write currents).
//
// The three phases, the memory layout, the output-layer bypass and the
// register/debug visibility follow the design description. Simplifications
// of this implementation: the sub-units (input spike loader, weight loader,
// postsynaptic update, neuron parameter loader) are states of one sequencer,
// so the next neuron's parameters are not prefetched while the current one
// computes (pipelining the parameter reads keeps the cost per neuron within
// the 30 to 35 cycles the original design reaches); a full output FIFO stalls
// the PE.
module adlif_pe
  import adlif_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // start of a time-step
  input  logic              start,
  input  logic [NCNT_W-1:0] start_nspk,
  input  line_addr_t        spk_addr,
  input  line_addr_t        l1_addr,
  input  logic [NCNT_W-1:0] l1_nrn,
  input  line_addr_t        l2_addr,
  input  logic [NCNT_W-1:0] l2_nrn,
  // bus master port
  output bus_req_t          m_req,
  input  bus_rsp_t          m_rsp,
  output logic              pe_prio,
  // output spike FIFO
  output logic              out_wr,
  output logic [FIFO_DW-1:0] out_data,
  input  logic              out_full,
  // status
  output logic              running,
  output logic              inlayer_busy,
  output logic              end_of_ts,
  output logic              spike_rdy,
  output pe_dbg_t           dbg
);

  typedef enum logic [4:0] {
    S_IDLE, S_IN_SPK, S_IN_W, S_IN_C, S_IN_CW, S_IN_DONE,
    S_MK, S_NC, S_NP, S_CALC, S_WU, S_WW, S_CLR, S_SPK, S_OUT,
    S_PW, S_PC, S_PCW, S_NEXT, S_DONE
  } pe_state_e;

  pe_state_e st;

  // loop counters and captured values
  logic [NCNT_W-1:0] k, nspk, r, j, in_nrn;
  logic [2:0]        p, pi;
  logic              np_pend;
  line_addr_t        spk_base;
  line_t             wline, cline, nline;
  logic              rd_wait, calc_started;
  state_t            n_i, n_u, n_w;
  param_t            n_alpha, n_beta, n_th, n_a, n_b;

  // ---- look-ahead buffer and address arithmetic
  logic              lac_init, lac_set_nn, lac_advance;
  line_addr_t        cur_addr, nxt_addr, nrn_addr, cur_iline, nxt_iline, in_waddr, next2_addr;
  logic [NCNT_W-1:0] cur_n, nxt_n, nn, wrows;
  logic [7:0]        layer_idx;
  logic              is_output;

  layer_addr_ctrl u_lac (
    .clk, .rst_n,
    .init(lac_init), .l1_addr, .l1_nrn, .l2_addr, .l2_nrn,
    .set_nn(lac_set_nn), .nn_in(m_rsp.rdata[NCNT_W-1:0]), .advance(lac_advance),
    .nrn_idx(j), .in_idx(in_nrn),
    .cur_addr, .cur_n, .nxt_addr, .nxt_n, .nn, .layer_idx, .is_output,
    .wrows, .nrn_addr, .cur_iline, .nxt_iline, .in_waddr, .next2_addr
  );

  // ---- neuron datapath
  logic     nl_start, nl_busy, nl_done, nl_spike;
  state_t   nl_u, nl_w;
  nrn_dbg_t nl_dbg;

  adlif_neuron_logic u_nl (
    .clk, .rst_n, .start(nl_start),
    .i_in(n_i), .u_in(n_u), .w_in(n_w),
    .alpha(n_alpha), .beta(n_beta), .theta(n_th), .a(n_a), .b(n_b),
    .busy(nl_busy), .done(nl_done), .u_new(nl_u), .w_new(nl_w),
    .spike(nl_spike), .dbg(nl_dbg)
  );

  // ---- packed saturating add of four weights to four currents
  function automatic line_t add_weights(input line_t cur, input line_t w);
    line_t res;
    res = '0;
    for (int e = 0; e < int'(IPL); e++) begin
      state_t  c;
      weight_t x;
      c = state_t'(cur[e*S_BITS +: S_BITS]);
      x = weight_t'(w[e*W_BITS +: W_BITS]);
      res[e*S_BITS +: S_BITS] = sat_state(32'(c) + 32'(x));
    end
    return res;
  endfunction

  // current of neuron j inside its packed line
  state_t cur_of_j;
  always_comb begin
    cur_of_j = '0;
    for (int e = 0; e < int'(IPL); e++)
      if (j[IPL_LG-1:0] == IPL_LG'(e)) cur_of_j = state_t'(nline[e*S_BITS +: S_BITS]);
  end

  logic last_in_line;
  assign last_in_line = (j[IPL_LG-1:0] == IPL_LG'(IPL-1)) || (j + 1'b1 == cur_n);

  // ---- memory access requested by the current state
  logic       acc_v, acc_we;
  line_addr_t acc_line;
  line_t      acc_wdata;

  always_comb begin
    acc_v = 1'b0; acc_we = 1'b0; acc_line = '0; acc_wdata = '0;
    unique case (st)
      S_IN_SPK: begin acc_v = (k != nspk); acc_line = spk_base + line_addr_t'(k); end
      S_IN_W:   begin acc_v = 1'b1; acc_line = in_waddr + line_addr_t'(r); end
      S_IN_C:   begin acc_v = 1'b1; acc_line = cur_iline + line_addr_t'(r); end
      S_IN_CW:  begin acc_v = 1'b1; acc_we = 1'b1; acc_line = cur_iline + line_addr_t'(r);
                      acc_wdata = add_weights(cline, wline); end
      S_MK:     begin acc_v = (cur_n != '0); acc_line = cur_addr; end
      S_NC:     begin acc_v = (j[IPL_LG-1:0] == '0);
                      acc_line = cur_iline + line_addr_t'(j >> IPL_LG); end
      S_NP:     begin acc_v = (pi != 3'(NRN_LINES)); acc_line = nrn_addr + line_addr_t'(pi); end
      S_WU:     begin acc_v = 1'b1; acc_we = 1'b1; acc_line = nrn_addr + line_addr_t'(PL_U);
                      acc_wdata = line_t'(nl_u); end
      S_WW:     begin acc_v = 1'b1; acc_we = 1'b1; acc_line = nrn_addr + line_addr_t'(PL_W);
                      acc_wdata = line_t'(nl_w); end
      S_CLR:    begin acc_v = 1'b1; acc_we = 1'b1;
                      acc_line = cur_iline + line_addr_t'(j >> IPL_LG); end
      S_PW:     begin acc_v = 1'b1; acc_line = nrn_addr + line_addr_t'(NRN_LINES) + line_addr_t'(r); end
      S_PC:     begin acc_v = 1'b1; acc_line = nxt_iline + line_addr_t'(r); end
      S_PCW:    begin acc_v = 1'b1; acc_we = 1'b1; acc_line = nxt_iline + line_addr_t'(r);
                      acc_wdata = add_weights(cline, wline); end
      default: ;
    endcase
  end

  assign m_req.req   = acc_v && (!rd_wait || st == S_NP);
  assign m_req.we    = acc_we;
  assign m_req.addr  = SRAM_BASE + bus_addr_t'(acc_line);
  assign m_req.wdata = acc_wdata;
  assign pe_prio     = running;

  logic rd_done, wr_done;
  assign rd_done = rd_wait && m_rsp.rvalid;
  assign wr_done = acc_v && acc_we && m_rsp.gnt;

  assign lac_init    = (st == S_IDLE) && start;
  assign lac_set_nn  = (st == S_MK) && rd_done;
  assign lac_advance = (st == S_NEXT) && (j + 1'b1 >= cur_n) && !is_output;
  assign nl_start    = (st == S_CALC) && !calc_started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      k <= '0; nspk <= '0; r <= '0; j <= '0; in_nrn <= '0; p <= '0; pi <= '0; np_pend <= 1'b0;
      spk_base <= '0; wline <= '0; cline <= '0; nline <= '0;
      rd_wait <= 1'b0; calc_started <= 1'b0;
      n_i <= '0; n_u <= '0; n_w <= '0;
      n_alpha <= '0; n_beta <= '0; n_th <= '0; n_a <= '0; n_b <= '0;
      running <= 1'b0; inlayer_busy <= 1'b0; end_of_ts <= 1'b0; spike_rdy <= 1'b0;
      out_wr <= 1'b0; out_data <= '0;
    end else begin
      out_wr <= 1'b0;
      // a granted read waits for its data; the parameter reads are pipelined
      // instead, one request per cycle, each answered on the following cycle
      if (acc_v && !acc_we && m_rsp.gnt && st != S_NP) rd_wait <= 1'b1;
      np_pend <= (st == S_NP) && acc_v && m_rsp.gnt;
      if ((st == S_NP) && acc_v && m_rsp.gnt) pi <= pi + 1'b1;
      if (rd_done) rd_wait <= 1'b0;

      unique case (st)
        S_IDLE: if (start) begin
          nspk <= start_nspk; spk_base <= spk_addr; k <= '0; r <= '0; j <= '0;
          running <= 1'b1; inlayer_busy <= 1'b1; end_of_ts <= 1'b0; spike_rdy <= 1'b0;
          st <= S_IN_SPK;
        end
        // ---- phase 1: input layer
        S_IN_SPK: begin
          if (k == nspk) st <= S_IN_DONE;
          else if (rd_done) begin
            in_nrn <= m_rsp.rdata[NCNT_W-1:0];
            r <= '0;
            st <= (cur_n == '0) ? S_IN_SPK : S_IN_W;
            if (cur_n == '0) k <= k + 1'b1;
          end
        end
        S_IN_W:  if (rd_done) begin wline <= m_rsp.rdata; st <= S_IN_C; end
        S_IN_C:  if (rd_done) begin cline <= m_rsp.rdata; st <= S_IN_CW; end
        S_IN_CW: if (wr_done) begin
          if (r + 1'b1 == (cur_n + NCNT_W'(WPL-1)) >> WPL_LG) begin
            k <= k + 1'b1; st <= S_IN_SPK;
          end else begin
            r <= r + 1'b1; st <= S_IN_W;
          end
        end
        S_IN_DONE: begin inlayer_busy <= 1'b0; st <= S_MK; end
        // ---- phase 2: neuron sweep of the current layer
        S_MK: begin
          if (cur_n == '0) st <= S_DONE;
          else if (rd_done) begin j <= '0; st <= S_NC; end
        end
        S_NC: begin
          if (j[IPL_LG-1:0] != '0) begin p <= '0; pi <= '0; st <= S_NP; end
          else if (rd_done) begin nline <= m_rsp.rdata; p <= '0; pi <= '0; st <= S_NP; end
        end
        S_NP: if (np_pend && m_rsp.rvalid) begin
          unique case (par_line_e'(p))
            PL_U:     n_u     <= state_t'(m_rsp.rdata[S_BITS-1:0]);
            PL_W:     n_w     <= state_t'(m_rsp.rdata[S_BITS-1:0]);
            PL_ALPHA: n_alpha <= param_t'(m_rsp.rdata[P_BITS-1:0]);
            PL_BETA:  n_beta  <= param_t'(m_rsp.rdata[P_BITS-1:0]);
            PL_TH:    n_th    <= param_t'(m_rsp.rdata[P_BITS-1:0]);
            PL_A:     n_a     <= param_t'(m_rsp.rdata[P_BITS-1:0]);
            default:  n_b     <= param_t'(m_rsp.rdata[P_BITS-1:0]);
          endcase
          n_i <= cur_of_j;
          if (p == 3'(NRN_LINES-1)) begin calc_started <= 1'b0; st <= S_CALC; end
          else p <= p + 1'b1;
        end
        S_CALC: begin
          calc_started <= 1'b1;
          if (nl_done) st <= S_WU;
        end
        S_WU: if (wr_done) st <= S_WW;
        S_WW: if (wr_done) st <= last_in_line ? S_CLR : S_SPK;
        S_CLR: if (wr_done) st <= S_SPK;
        // ---- phase 3: spike handling
        S_SPK: begin
          if (!nl_spike)      st <= S_NEXT;
          else if (is_output) st <= S_OUT;
          else begin r <= '0; st <= S_PW; end
          if (nl_spike && is_output) spike_rdy <= 1'b1;
        end
        S_OUT: if (!out_full) begin
          out_wr <= 1'b1; out_data <= FIFO_DW'(j); st <= S_NEXT;
        end
        S_PW:  if (rd_done) begin wline <= m_rsp.rdata; st <= S_PC; end
        S_PC:  if (rd_done) begin cline <= m_rsp.rdata; st <= S_PCW; end
        S_PCW: if (wr_done) begin
          if (r + 1'b1 == wrows) st <= S_NEXT;
          else begin r <= r + 1'b1; st <= S_PW; end
        end
        S_NEXT: begin
          if (j + 1'b1 >= cur_n) begin
            j  <= '0;
            st <= is_output ? S_DONE : S_MK;
          end else begin
            j  <= j + 1'b1;
            st <= S_NC;
          end
        end
        S_DONE: begin
          running <= 1'b0; inlayer_busy <= 1'b0; end_of_ts <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---- performance counters
  logic [31:0] tot_cc, ts_cc, wst_cc, ts_num;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tot_cc <= '0; ts_cc <= '0; wst_cc <= '0; ts_num <= '0;
    end else begin
      if (running) tot_cc <= tot_cc + 1'b1;
      if (st == S_IDLE && start) begin
        ts_cc  <= '0;
        ts_num <= ts_num + 1'b1;
      end else if (running) begin
        ts_cc <= ts_cc + 1'b1;
      end
      if (m_req.req && !m_rsp.gnt) wst_cc <= wst_cc + 1'b1;
    end
  end

  // ---- debug view
  always_comb begin
    dbg = '0;
    dbg.state_adlif      = 8'(st);
    dbg.state_layer      = (st == S_MK || st == S_NEXT) ? 8'(st) : 8'd0;
    dbg.state_nrn_load   = (st == S_NC || st == S_NP) ? 8'(p) + 8'd1 : 8'd0;
    dbg.state_nrn_update = (st == S_CALC) ? 8'd1 : 8'd0;
    dbg.state_nrn_write  = (st == S_WU || st == S_WW || st == S_CLR) ? 8'(st) : 8'd0;
    dbg.state_ps         = (st == S_PC || st == S_PCW || st == S_IN_C || st == S_IN_CW) ? 8'(st) : 8'd0;
    dbg.state_wload      = (st == S_PW || st == S_IN_W) ? 8'(st) : 8'd0;
    dbg.tot_cc           = tot_cc;
    dbg.curr_ts_cc       = ts_cc;
    dbg.wstates_cc       = wst_cc;
    dbg.curr_layer       = inlayer_busy ? 8'd0 : layer_idx;
    dbg.curr_nrn         = j;
    dbg.curr_ts          = ts_num;
    dbg.nrn              = nl_dbg;
    dbg.end_m_update     = (st == S_SPK);
    dbg.nxt_spike_addr   = spk_base + line_addr_t'(k);
    dbg.par_i            = n_i;
    dbg.par_w            = n_w;
    dbg.par_alpha        = n_alpha;
    dbg.par_u            = n_u;
    dbg.par_th           = n_th;
    dbg.par_beta         = n_beta;
    dbg.par_a            = n_a;
    dbg.par_b            = n_b;
  end

  // a read is never left without its data phase
  rd_follows_gnt: assert property (@(posedge clk) disable iff (!rst_n)
      (m_req.req && !m_req.we && m_rsp.gnt) |=> m_rsp.rvalid);

  logic unused;
  assign unused = ^{nl_busy, nn, next2_addr, nxt_n, nxt_addr};
endmodule
