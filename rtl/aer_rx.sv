// aer_rx: receiver side of the four-phase AER handshake.
//
// The sensor raises `aer_req` with the event address on `aer_data`. The
// request is brought into the clock domain through a two-flop synchronizer.
// When a synchronized request is seen and the downstream buffer can take an
// event (`ev_ready`), the address is sampled on the same edge that raises
// `aer_ack` (req is high and ack becomes high: the address has then been
// stable for at least the two synchronizer cycles), and the event is offered
// on ev_valid/ev_addr for one cycle. `aer_ack` stays high until the
// synchronized request falls, then drops, completing the four phases (req+,
// ack+, req-, ack-). A sender may change the data as soon as it sees ack, or
// hold it until it lowers req; both work. Throughput: one event per about
// five clock cycles plus the sender's response time. Holding
// back `aer_ack` while the input FIFO is full is how back-pressure reaches the
// sensor; that is this implementation's choice.
module aer_rx
  import adlif_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             aer_req,
  input  logic [AER_W-1:0] aer_data,
  output logic             aer_ack,
  input  logic             ev_ready,
  output logic             ev_valid,
  output logic [AER_W-1:0] ev_addr
);
  logic req_s1, req_s2;
  logic [AER_W-1:0] data_q;

  typedef enum logic [1:0] {A_IDLE, A_WAIT_LOW} aer_state_e;
  aer_state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s1 <= 1'b0;
      req_s2 <= 1'b0;
    end else begin
      req_s1 <= aer_req;
      req_s2 <= req_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      aer_ack  <= 1'b0;
      ev_valid <= 1'b0;
      data_q   <= '0;
    end else begin
      ev_valid <= 1'b0;
      unique case (st)
        A_IDLE: if (req_s2 && ev_ready) begin   // data stable since req rose
          aer_ack  <= 1'b1;
          data_q   <= aer_data;
          ev_valid <= 1'b1;
          st       <= A_WAIT_LOW;
        end
        A_WAIT_LOW: if (!req_s2) begin
          aer_ack <= 1'b0;
          st      <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign ev_addr = data_q;
endmodule
