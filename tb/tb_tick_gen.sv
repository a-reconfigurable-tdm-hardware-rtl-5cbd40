// tb_tick_gen: tick spacing for several periods, no tick while disabled.
module tb_tick_gen;
  logic clk = 0, rst_n = 0, en = 0, tick;
  logic [31:0] period = 0;
  always #5 clk = ~clk;
  tick_gen dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    int last, cyc, cnt;
    repeat (2) @(negedge clk); rst_n = 1;
    period = 10;
    repeat (50) begin @(negedge clk); check(!tick, "no tick while disabled"); end
    for (int x = 0; x < 4; x++) begin
      int p;
      p = (x == 0) ? 7 : (x == 1) ? 100 : (x == 2) ? 1 : 2;
      @(negedge clk); period = 32'(p); en = 1;
      last = -1; cyc = 0; cnt = 0;
      while (cnt < 6) begin
        @(negedge clk); cyc++;
        if (tick) begin
          if (last >= 0) check(cyc - last == p, $sformatf("period %0d: spacing %0d", p, cyc - last));
          last = cyc; cnt++;
        end
      end
      en = 0; @(negedge clk); @(negedge clk);
      check(!tick, "tick stops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
