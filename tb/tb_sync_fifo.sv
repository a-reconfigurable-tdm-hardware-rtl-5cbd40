// tb_sync_fifo: random pushes and pops against a queue model, with
// full/empty/count checked every cycle (16-entry output FIFO geometry).
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  logic [4:0] count;
  sync_fifo #(.DW(16), .AW(4)) dut (.*);
  int checks = 0, failures = 0, n_full = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    int q[$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      check(int'(count) == q.size(), "count");
      check(full == (q.size() == 16) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(int'(rdata) == q[0], "head");
      if (full) n_full++;
      wr_en = ($urandom_range(0, 99) < ((t / 500) % 2 != 0 ? 70 : 30));
      rd_en = ($urandom_range(0, 99) < ((t / 500) % 2 != 0 ? 30 : 70));
      wdata = 16'($urandom);
      begin
        bit can_wr;
        can_wr = (q.size() < 16);
        @(posedge clk); #1;
        if (rd_en && q.size() > 0) void'(q.pop_front());
        if (wr_en && can_wr) q.push_back(int'(wdata));
      end
    end
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
