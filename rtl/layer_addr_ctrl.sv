// layer_addr_ctrl: layer look-ahead buffer and SRAM offset arithmetic.
//
// Memory layout (one block per layer, lines of 48 bits):
//   input layer, at line 0:  for each input neuron i, ceil(n1/4) weight lines
//   non-input layer L, at B_L: one marker line holding n(L+2), then
//     ceil(nL/4) synaptic-current lines (4 currents per line), then for each
//     neuron j a record of 7 parameter lines (u, w, alpha, beta, theta, a, b)
//     followed by ceil(n(L+1)/4) lines of its outgoing weights (none in the
//     output layer).
// The buffer holds base line and neuron count of the layer being updated
// (cur = L) and of the layer receiving its spikes (nxt = L+1), plus n(L+2)
// once the marker of L has been read. From these it computes the address of
// neuron records, current lines and input-layer weight rows, and the base of
// layer L+2:  B(L+2) = B(L+1) + 1 + ceil(n(L+1)/4) + n(L+1)*(7 + ceil(n(L+2)/4)).
// All divisions are shifts because the packing factors are powers of two.
// `init` loads the first two non-input layers from the register file,
// `set_nn` stores the marker value, `advance` moves to the next layer.
// The layout and the three-layer look-ahead follow the design description;
// the order of the parameter lines and the input layer at line 0 are
// implementation choices (the line counts match the design's memory-footprint
// table for all four evaluated networks).
module layer_addr_ctrl
  import adlif_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  line_addr_t        l1_addr,
  input  logic [NCNT_W-1:0] l1_nrn,
  input  line_addr_t        l2_addr,
  input  logic [NCNT_W-1:0] l2_nrn,
  input  logic              set_nn,
  input  logic [NCNT_W-1:0] nn_in,
  input  logic              advance,
  // index inputs for the address calculations
  input  logic [NCNT_W-1:0] nrn_idx,   // neuron j of the current layer
  input  logic [NCNT_W-1:0] in_idx,    // input neuron i (input layer)
  // state of the buffer
  output line_addr_t        cur_addr,
  output logic [NCNT_W-1:0] cur_n,
  output line_addr_t        nxt_addr,
  output logic [NCNT_W-1:0] nxt_n,
  output logic [NCNT_W-1:0] nn,
  output logic [7:0]        layer_idx,
  output logic              is_output,
  // computed offsets
  output logic [NCNT_W-1:0] wrows,     // weight lines per neuron of cur layer
  output line_addr_t        nrn_addr,  // first line of neuron nrn_idx's record
  output line_addr_t        cur_iline, // first current line of the cur layer
  output line_addr_t        nxt_iline, // first current line of the nxt layer
  output line_addr_t        in_waddr,  // first weight line of input neuron in_idx
  output line_addr_t        next2_addr // base of layer L+2
);
  function automatic logic [NCNT_W-1:0] lines_of(input logic [NCNT_W-1:0] n);
    // ceil(n / 4) with a shift
    return (n + NCNT_W'(WPL - 1)) >> WPL_LG;
  endfunction

  logic [NCNT_W-1:0] stride;
  logic [NCNT_W-1:0] nxt_stride;

  assign wrows      = lines_of(nxt_n);
  assign stride     = NCNT_W'(NRN_LINES) + wrows;
  assign nxt_stride = NCNT_W'(NRN_LINES) + lines_of(nn);
  assign is_output  = (nxt_n == '0);
  assign cur_iline  = cur_addr + 1'b1;
  assign nxt_iline  = nxt_addr + 1'b1;
  assign nrn_addr   = line_addr_t'(32'(cur_addr) + 1 + 32'(lines_of(cur_n)) + 32'(nrn_idx) * 32'(stride));
  assign in_waddr   = line_addr_t'(32'(in_idx) * 32'(lines_of(cur_n)));
  assign next2_addr = line_addr_t'(32'(nxt_addr) + 1 + 32'(lines_of(nxt_n)) + 32'(nxt_n) * 32'(nxt_stride));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_addr  <= '0; cur_n <= '0;
      nxt_addr  <= '0; nxt_n <= '0;
      nn        <= '0;
      layer_idx <= '0;
    end else if (init) begin
      cur_addr  <= l1_addr; cur_n <= l1_nrn;
      nxt_addr  <= l2_addr; nxt_n <= l2_nrn;
      nn        <= '0;
      layer_idx <= 8'd1;
    end else if (advance) begin
      cur_addr  <= nxt_addr; cur_n <= nxt_n;
      nxt_addr  <= next2_addr; nxt_n <= nn;
      nn        <= '0;
      layer_idx <= layer_idx + 8'd1;
    end else if (set_nn) begin
      nn <= nn_in;
    end
  end
endmodule
