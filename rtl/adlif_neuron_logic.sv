// adlif_neuron_logic: fixed-point adLIF state update for one virtual neuron.
//
// Computes the semi-implicit Euler update
//   u_bar = alpha*u + (1-alpha)*(I - w)
//   spike = (u_bar >= theta);  u_hat = spike ? u_bar - theta : u_bar
//   w_new = beta*w + (1-beta)*(a*u_hat + b*spike)
// with a single two-stage pipelined multiplier and a single adder, scheduled
// as a fixed sequence of micro-steps (the intermediate names follow the
// design's debug register table). Products of two Q.5 numbers are shifted
// right by FRAC (arithmetic shift, i.e. rounding towards minus infinity) and
// every result is saturated to the 12-bit state range; the shift and the
// saturation are this implementation's choice, the operation order and the
// formats follow the design description.
//
// Interface: pulse `start` with the operands valid; they are captured on that
// edge. `done` pulses for one cycle when u_new, w_new and spike are valid;
// they then hold until the next start. Latency: 16 cycles from start to done.
module adlif_neuron_logic
  import adlif_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t i_in,
  input  state_t u_in,
  input  state_t w_in,
  input  param_t alpha,
  input  param_t beta,
  input  param_t theta,
  input  param_t a,
  input  param_t b,
  output logic   busy,
  output logic   done,
  output state_t u_new,
  output state_t w_new,
  output logic   spike,
  output nrn_dbg_t dbg
);

  localparam int unsigned LAST_STEP = 15;

  // captured operands
  state_t r_i, r_u, r_w, r_alpha, r_beta, r_theta, r_a, r_b;
  nrn_dbg_t d;
  logic [4:0] step;
  logic spk;

  // ---- single pipelined multiplier: inputs registered, product registered
  state_t m_x, m_y;
  state_t m_op_x, m_op_y;
  logic signed [2*S_BITS-1:0] m_prod;
  state_t m_res;   // product scaled and saturated, valid 2 cycles after issue

  always_ff @(posedge clk) begin
    m_op_x <= m_x;
    m_op_y <= m_y;
    m_prod <= m_op_x * m_op_y;
  end
  assign m_res = sat_state(32'(m_prod >>> FRAC));

  // ---- single adder/subtractor
  state_t     add_x, add_y;
  logic       add_sub;
  state_t     add_res;
  always_comb begin
    if (add_sub) add_res = sat_state(32'(add_x) - 32'(add_y));
    else         add_res = sat_state(32'(add_x) + 32'(add_y));
  end

  localparam state_t ONE = state_t'(1 << FRAC);

  // operand selection per step
  always_comb begin
    m_x = '0; m_y = '0;
    add_x = '0; add_y = '0; add_sub = 1'b0;
    unique case (step)
      5'd1:  begin add_x = r_i;   add_y = r_w;    add_sub = 1'b1;      // I - w
                   m_x = r_alpha; m_y = r_u; end        // alpha*u
      5'd2:  begin add_x = ONE;   add_y = r_alpha; add_sub = 1'b1; end // 1 - alpha
      5'd3:  begin add_x = ONE;   add_y = r_beta;  add_sub = 1'b1;     // 1 - beta
                   m_x = d.one_alpha; m_y = d.adapted_i; end
      5'd4:  begin m_x = r_beta; m_y = r_w; end        // beta*w
      5'd6:  begin add_x = d.alpha_u; add_y = d.scaled_i; end          // u_bar
      5'd7:  begin add_x = d.u_bar; add_y = r_theta; add_sub = 1'b1; end // u_bar - theta
      5'd8:  begin m_x = r_a; m_y = d.new_u; end       // a*u_hat
      5'd10: begin add_x = m_res; add_y = r_b; end                     // a*u_hat + b
      5'd11: begin m_x = d.one_beta; m_y = spk ? d.au_p_b : d.a_ubar; end
      5'd14: begin add_x = d.beta_w; add_y = d.beta_scaled; end       // w_new
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; done <= 1'b0; spk <= 1'b0; d <= '0;
      r_i <= '0; r_u <= '0; r_w <= '0; r_alpha <= '0; r_beta <= '0;
      r_theta <= '0; r_a <= '0; r_b <= '0;
    end else begin
      done <= 1'b0;
      if (step == 5'd0) begin
        if (start) begin
          r_i <= i_in; r_u <= u_in; r_w <= w_in;
          r_alpha <= state_t'(alpha); r_beta <= state_t'(beta);
          r_theta <= state_t'(theta); r_a <= state_t'(a); r_b <= state_t'(b);
          step <= 5'd1;
        end
      end else begin
        unique case (step)
          5'd1:  d.adapted_i <= add_res;
          5'd2:  d.one_alpha <= add_res;
          5'd3:  begin d.one_beta <= add_res; d.alpha_u <= m_res; end
          5'd5:  d.scaled_i <= m_res;
          5'd6:  begin d.u_bar <= add_res; d.beta_w <= m_res; end
          5'd7:  begin
                   spk     <= (d.u_bar >= r_theta);
                   d.new_u <= (d.u_bar >= r_theta) ? add_res : d.u_bar;
                 end
          5'd10: begin d.a_ubar <= m_res; d.au_p_b <= add_res; end
          5'd13: d.beta_scaled <= m_res;
          5'd14: d.new_w <= add_res;
          default: ;
        endcase
        if (step == 5'(LAST_STEP)) begin
          step <= '0;
          done <= 1'b1;
        end else begin
          step <= step + 5'd1;
        end
      end
    end
  end

  assign busy  = (step != 5'd0);
  assign u_new = d.new_u;
  assign w_new = d.new_w;
  assign spike = spk;
  assign dbg   = d;

endmodule
