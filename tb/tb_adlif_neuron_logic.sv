// tb_adlif_neuron_logic: random operands against the reference equations.
// Checks u', w', spike and two debug intermediates for 3000 updates, and that
// every update takes exactly 16 cycles from start to done.
module tb_adlif_neuron_logic;
  import adlif_pkg::*;
  import tb_adlif_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  state_t i_in, u_in, w_in;
  param_t alpha, beta, theta, a, b;
  logic busy, done, spike;
  state_t u_new, w_new;
  nrn_dbg_t dbg;
  adlif_neuron_logic dut (.*);

  int checks = 0, failures = 0, spikes = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int eu, ew, lat; bit es;
    i_in = '0; u_in = '0; w_in = '0; alpha = '0; beta = '0; theta = '0; a = '0; b = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t < 5) begin   // extremes: saturation paths
        i_in = (t % 2 != 0) ? 12'sh7FF : 12'sh800; u_in = 12'sh7F0; w_in = 12'sh810;
        alpha = 8'sh7F; beta = 8'sh80; theta = 8'sh80; a = 8'sh7F; b = 8'sh7F;
      end else begin
        i_in = state_t'($urandom_range(0, 4095)); u_in = state_t'($urandom_range(0, 4095));
        w_in = state_t'($urandom_range(0, 4095));
        alpha = param_t'($urandom_range(0, 255)); beta = param_t'($urandom_range(0, 255));
        theta = param_t'($urandom_range(0, 255)); a = param_t'($urandom_range(0, 255));
        b = param_t'($urandom_range(0, 255));
      end
      ref_neuron(int'(i_in), int'(u_in), int'(w_in), int'(alpha), int'(beta), int'(theta),
                 int'(a), int'(b), eu, ew, es);
      start = 1;
      @(negedge clk); start = 0;
      i_in = '0; u_in = '0; w_in = '0; alpha = '0; beta = '0; theta = '0;  // captured already
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 16, $sformatf("latency %0d", lat));
      check(int'(u_new) == eu, $sformatf("u' %0d exp %0d", u_new, eu));
      check(int'(w_new) == ew, $sformatf("w' %0d exp %0d", w_new, ew));
      check(spike == es, "spike");
      check(int'(dbg.new_u) == eu && int'(dbg.new_w) == ew, "debug NEW_U/NEW_W");
      if (es) spikes++;
    end
    check(spikes > 100 && spikes < 2900, "both spiking and silent cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
