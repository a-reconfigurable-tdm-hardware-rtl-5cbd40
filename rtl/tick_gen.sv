// tick_gen: programmable global tick, the time base of the accelerator.
//
// While `en` is high a cycle counter runs from 0 to period-1 and `tick`
// pulses for one cycle each time it wraps, so one tick every `period` clock
// cycles (a period of 0 or 1 gives a tick every cycle). Each tick closes the
// current input frame (time-step). The period and the enable come from the
// register file (TICK_COUNTER and START_TICK_GEN), as in the design
// description; that the count restarts from 0 whenever `en` falls is this
// implementation's choice.
module tick_gen #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [CNT_W-1:0] period,
  output logic             tick
);
  logic [CNT_W-1:0] cnt;
  logic             wrap;

  assign wrap = (cnt + 1'b1 >= period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= wrap;
      cnt  <= wrap ? '0 : cnt + 1'b1;
    end
  end
endmodule
