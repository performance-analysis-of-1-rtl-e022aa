// park_transform: alpha-beta to dq rotation of the T/4 PLL phase detector.
//
// Rotates the stationary-frame vector (v_alpha, v_beta) into the frame of the
// PLL phase theta':
//   v_d =  v_alpha*cos(theta') + v_beta*sin(theta')
//   v_q =  v_alpha*sin(theta') - v_beta*cos(theta')
// For an input v = V*cos(theta) and v_beta = V*sin(theta) this gives
// v_d = V*cos(theta - theta') and v_q = V*sin(theta' - theta): v_d is the
// amplitude once locked, and v_q grows with the amount by which the PLL phase
// leads, so that the error v_q* - v_q (v_q* = 0) of the loop filter gives
// negative feedback.  The sign convention of v_q is this design's choice.
//
// Timing: registered, `out_valid` one cycle after `in_valid`.  All values
// per unit with 2**14 = 1.0.
module park_transform
  import pll_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  volt_t v_alpha,
  input  volt_t v_beta,
  input  volt_t sin_t,
  input  volt_t cos_t,
  output logic  out_valid,
  output err_t  v_d,
  output err_t  v_q
);
  logic signed [2*VW-1:0] p_ac, p_as, p_bc, p_bs;
  logic signed [2*VW:0]   d_full, q_full;

  always_comb begin
    p_ac   = v_alpha * cos_t;
    p_as   = v_alpha * sin_t;
    p_bc   = v_beta  * cos_t;
    p_bs   = v_beta  * sin_t;
    d_full = (2*VW+1)'(p_ac) + (2*VW+1)'(p_bs);
    q_full = (2*VW+1)'(p_as) - (2*VW+1)'(p_bc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; v_d <= '0; v_q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_d <= err_t'(d_full >>> VF);
        v_q <= err_t'(q_full >>> VF);
      end
    end
  end
endmodule
