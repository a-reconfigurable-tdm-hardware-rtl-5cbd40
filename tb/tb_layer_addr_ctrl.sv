// tb_layer_addr_ctrl: offsets of a four-layer network against the layout
// computed by the reference model (layer bases, neuron records, current
// lines, input weight rows) while walking the look-ahead buffer layer by
// layer, plus the line counts of the four evaluated topologies.
module tb_layer_addr_ctrl;
  import adlif_pkg::*;
  import tb_adlif_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, set_nn = 0, advance = 0;
  line_addr_t l1_addr, l2_addr;
  logic [NCNT_W-1:0] l1_nrn, l2_nrn, nn_in, nrn_idx, in_idx;
  line_addr_t cur_addr, nxt_addr, nrn_addr, cur_iline, nxt_iline, in_waddr, next2_addr;
  logic [NCNT_W-1:0] cur_n, nxt_n, nn, wrows;
  logic [7:0] layer_idx;
  logic is_output;
  layer_addr_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic walk(input int sizes[], input int exp_end);
    net_model m;
    m = new(sizes, 0, 1, 0);
    @(negedge clk);
    l1_addr = line_addr_t'(m.base[1]); l1_nrn = NCNT_W'(sizes[1]);
    l2_addr = (sizes.size() > 2) ? line_addr_t'(m.base[2]) : '0;
    l2_nrn  = (sizes.size() > 2) ? NCNT_W'(sizes[2]) : '0;
    init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < sizes[0]; i += 7) begin
      in_idx = NCNT_W'(i); #1;
      check(int'(in_waddr) == i * lines4(sizes[1]), "input weight row");
    end
    @(negedge clk);
    for (int l = 1; l < sizes.size(); l++) begin
      check(int'(cur_addr) == m.base[l] && int'(cur_n) == sizes[l], $sformatf("layer %0d base %0d/%0d n %0d", l, cur_addr, m.base[l], cur_n));
      check(is_output == (l == sizes.size() - 1), "output flag");
      check(int'(cur_iline) == m.base[l] + 1, "current lines");
      if (l + 1 < sizes.size()) check(int'(nxt_iline) == m.base[l+1] + 1, "next current lines");
      // marker of layer l holds n(l+2)
      set_nn = 1; nn_in = NCNT_W'((l + 2 < sizes.size()) ? sizes[l+2] : 0);
      @(negedge clk); set_nn = 0;
      for (int j = 0; j < sizes[l]; j += 3) begin
        nrn_idx = NCNT_W'(j); #1;
        check(int'(nrn_addr) == m.nrn_line(l, j), $sformatf("neuron %0d of layer %0d", j, l));
      end
      @(negedge clk);
      if (l + 2 < sizes.size()) check(int'(next2_addr) == m.base[l+2], "base of L+2");
      if (l == sizes.size() - 1) check(int'(cur_addr) + 1 + lines4(sizes[l]) + 7 * sizes[l] == m.end_line, "end");
      if (l < sizes.size() - 1) begin advance = 1; @(negedge clk); advance = 0; end
    end
    check(m.end_line == exp_end || exp_end < 0, $sformatf("footprint %0d lines", m.end_line));
  endtask

  initial begin
    l1_addr = '0; l2_addr = '0; l1_nrn = '0; l2_nrn = '0; nn_in = '0; nrn_idx = '0; in_idx = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    walk('{50, 13, 9, 5, 3}, -1);
    walk('{20, 6, 3}, -1);
    // memory footprints of the evaluated topologies (lines)
    walk('{2450, 4}, 2480);
    walk('{2450, 16, 4}, 9963);
    walk('{2450, 32, 4}, 19895);
    walk('{2312, 10}, 7010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
