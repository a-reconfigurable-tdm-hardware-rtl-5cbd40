// input_spike_fsm: moves AER frames from the input spike FIFO into SRAM and
// starts the PE.
//
// A bus master. Whenever the FIFO holds an event address it writes it to the
// next line of the input spike region (from line `spk_addr` on) and pops it.
// When it pops an End-of-Frame marker it compares the marker's event count
// with the number of events it wrote (a mismatch increments `err_frames`),
// then waits until the PE is idle and pulses `start` with that count.
// Writing the next frame may begin while the PE is still busy, but not while
// the PE is reading the spike region (its input-layer phase,
// `pe_inlayer_busy`); the PE also has bus priority, so the FSM stalls while
// the PE uses the bus. If the PE is still busy when a frame is complete the
// start is postponed and later events simply wait in the FIFO (back-pressure).
// Counters: `blocked_cycles` (an event waiting for the PE's input layer to
// finish) and `postponed_starts` (frames whose start had to wait for the PE).
// The flow follows the design description; the counters and the count check
// acting only as an error counter are implementation choices.
module input_spike_fsm
  import adlif_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FIFO_DW-1:0] fifo_rdata,
  input  logic               fifo_empty,
  output logic               fifo_rd,
  input  line_addr_t         spk_addr,
  output bus_req_t           m_req,
  input  bus_rsp_t           m_rsp,
  input  logic               pe_running,
  input  logic               pe_inlayer_busy,
  output logic               start,
  output logic [NCNT_W-1:0]  start_nspk,
  output logic [7:0]         state,
  output logic [15:0]        err_frames,
  output logic [31:0]        blocked_cycles,
  output logic [31:0]        postponed_starts,
  output logic [31:0]        frames
);
  typedef enum logic [1:0] {F_IDLE, F_WRITE, F_START} fsm_state_e;
  fsm_state_e st;

  logic [NCNT_W-1:0] k;
  logic              is_eof;
  logic              waited;

  assign is_eof = fifo_rdata[FIFO_DW-1];

  line_addr_t wr_line;
  assign wr_line = spk_addr + line_addr_t'(k);

  always_comb begin
    m_req       = '0;
    m_req.we    = 1'b1;
    m_req.addr  = SRAM_BASE + bus_addr_t'(wr_line);
    m_req.wdata = bus_data_t'(fifo_rdata[FIFO_DW-2:0]);
    m_req.req   = (st == F_WRITE);
  end

  assign fifo_rd    = ((st == F_IDLE) && !fifo_empty && is_eof) ||
                      ((st == F_WRITE) && m_rsp.gnt);
  assign start      = (st == F_START) && !pe_running;
  assign start_nspk = k;
  assign state      = 8'(st);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; k <= '0; waited <= 1'b0;
      err_frames <= '0; blocked_cycles <= '0; postponed_starts <= '0; frames <= '0;
    end else begin
      unique case (st)
        F_IDLE: if (!fifo_empty) begin
          if (is_eof) begin
            if (fifo_rdata[FIFO_DW-2:0] != (FIFO_DW-1)'(k)) err_frames <= err_frames + 1'b1;
            waited <= 1'b0;
            st <= F_START;
          end else if (pe_inlayer_busy) begin
            blocked_cycles <= blocked_cycles + 1'b1;
          end else begin
            st <= F_WRITE;
          end
        end
        F_WRITE: if (m_rsp.gnt) begin
          k  <= k + 1'b1;
          st <= F_IDLE;
        end
        F_START: begin
          if (!pe_running) begin
            if (waited) postponed_starts <= postponed_starts + 1'b1;
            frames <= frames + 1'b1;
            k  <= '0;
            st <= F_IDLE;
          end else begin
            waited <= 1'b1;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{m_rsp.rvalid, m_rsp.rdata};
endmodule
