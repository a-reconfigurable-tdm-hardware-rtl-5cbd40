// tb_aer_rx: four-phase handshakes with random sender delays (the sender
// changes the address as soon as it has seen ack); checks the
// delivered addresses, that ack follows req in both directions, that no ack
// is given while the receiver is not ready, and one event per handshake.
module tb_aer_rx;
  import adlif_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic aer_req = 0, aer_ack, ev_ready = 1, ev_valid;
  logic [AER_W-1:0] aer_data = '0, ev_addr;
  aer_rx dut (.*);
  int checks = 0, failures = 0;
  int got[$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (ev_valid) got.push_back(int'(ev_addr));
  initial begin
    int sent[$];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      int addr;
      addr = int'($urandom_range(0, 4095));
      sent.push_back(addr);
      aer_data = AER_W'(addr);
      repeat ($urandom_range(0, 20)) #1;
      aer_req = 1;
      if (e % 25 == 0) begin
        ev_ready = 0;
        repeat (20) begin @(negedge clk); check(!aer_ack, "no ack while not ready"); end
        ev_ready = 1;
      end
      wait (aer_ack);
      check(aer_req, "ack only while req high");
      #1 aer_data = AER_W'($urandom_range(0, 4095));   // data changes right after ack
      repeat ($urandom_range(1, 30)) #1;
      aer_req = 0;
      wait (!aer_ack);
      repeat ($urandom_range(0, 15)) #1;
    end
    repeat (5) @(negedge clk);
    check(got.size() == sent.size(), "one event per handshake");
    foreach (sent[k]) if (k < got.size() && got[k] != sent[k]) $display("ev %0d got %0d exp %0d", k, got[k], sent[k]);
    check(got == sent, "addresses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
