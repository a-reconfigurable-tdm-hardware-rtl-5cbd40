// tb_input_spike_fifo: random AER events (delivered two cycles after the
// receiver saw ev_ready, as aer_rx does) and random ticks, with a reader that
// stalls for long stretches so the FIFO fills. Checks that the events come out
// in order and none is lost, that every tick yields exactly one End-of-Frame
// marker (MSB 1) whose count equals the events since the previous marker, and
// that ev_ready falls before the FIFO is full.
module tb_input_spike_fifo;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tick = 0, ev_valid = 0, ev_ready, rd_en = 0, full, empty;
  logic [AER_W-1:0] ev_addr = '0;
  logic [FIFO_DW-1:0] rdata;
  logic [IN_FIFO_AW:0] count;
  input_spike_fifo dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sent[$], got_ev[$];
  int ticks = 0, markers = 0, since = 0, full_cycles = 0, pend_ticks = 0;
  bit draining = 0, stall = 0;
  logic rdy_d1, rdy_d2;   // ready as seen by the receiver, two cycles back

  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_en && !empty) begin
        if (rdata[15]) begin
          markers++;
          check(int'(rdata[14:0]) == since, $sformatf("marker count %0d exp %0d", rdata[14:0], since));
          since = 0;
        end else begin
          got_ev.push_back(int'(rdata[11:0]));
          since++;
        end
      end
      if (full) full_cycles++;
      if (full && tick) pend_ticks++;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    rdy_d1 = 0; rdy_d2 = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (t % 3000 == 0) stall = !stall;
      // receiver model: an event offered now was accepted two cycles ago
      ev_valid = rdy_d2 && ($urandom_range(0, 9) < 6) && !draining;
      rdy_d2 = 0;
      if (ev_valid) begin
        ev_addr = AER_W'($urandom_range(0, 4095));
        sent.push_back(int'(ev_addr));
        rdy_d1 = 0;               // next handshake not before this one ends
      end
      if (!ev_valid && !rdy_d1) begin rdy_d2 = 0; rdy_d1 = ev_ready; end
      else if (rdy_d1) begin rdy_d2 = 1; rdy_d1 = 0; end
      tick = ($urandom_range(0, 99) == 0) && (t < 19000);
      if (tick) ticks++;
      if (ev_valid) check(!full, "event offered while full");
      rd_en = stall ? ($urandom_range(0, 99) < 2) : ($urandom_range(0, 9) < 7);
      if (t > 19000) begin draining = 1; rd_en = 1; end
    end
    @(negedge clk); ev_valid = 0; tick = 0; rd_en = 1;
    repeat (600) @(negedge clk);
    check(got_ev == sent, $sformatf("event order/loss: sent %0d got %0d", sent.size(), got_ev.size()));
    check(markers == ticks, $sformatf("markers %0d ticks %0d", markers, ticks));
    check(full_cycles > 0, "FIFO reached full");
    check(pend_ticks > 0, "tick while full kept pending");
    $display("events=%0d ticks=%0d full_cycles=%0d pending_ticks=%0d", sent.size(), ticks, full_cycles, pend_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
