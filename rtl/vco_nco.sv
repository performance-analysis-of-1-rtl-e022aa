// vco_nco: voltage-controlled oscillator (VCO) of the T/4 PLL, a numerically
// controlled oscillator.
//
// The instantaneous angular frequency is the central frequency plus the
// corrections, omega' = omega_c + v_f + w_ff, with omega_c = 2*pi*F_NOM
// setting the initial operating point.  The integrator 1/s is a phase
// accumulator: each sample adds omega'*Ts/(2*pi) of a turn, in a 32-bit
// phase that wraps once per turn.  The increment is formed with one
// multiplier by the constant GV = Ts/(2*pi) * 2**(PW-WF+24).
//
// Timing: registered; on `in_valid` the phase advances and `omega` shows the
// frequency used; both are valid from the next cycle until the next strobe.
module vco_nco
  import pll_pkg::*;
#(
  parameter real F_NOM = 50.0,
  parameter real TS    = 20.48e-6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  omega_t v_f,     // loop-filter output, rad/s
  input  omega_t w_ff,    // feedforward correction, rad/s (0 if unused)
  output omega_t omega,   // omega' in rad/s
  output phase_t theta    // theta'
);
  localparam longint WC = longint'(2.0 * PI_R * F_NOM * (2.0 ** WF));
  localparam longint GV = longint'(TS / (2.0 * PI_R) * (2.0 ** (PW - WF + 24)));

  logic signed [63:0] w_sum, inc;

  always_comb begin
    w_sum = WC + 64'(v_f) + 64'(w_ff);
    inc   = (w_sum * GV) >>> 24;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0; omega <= omega_t'(WC);
    end else if (in_valid) begin
      omega <= sat_omega(w_sum);
      theta <= theta + phase_t'(inc);
    end
  end
endmodule
