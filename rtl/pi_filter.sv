// pi_filter: loop filter (LF) of the T/4 PLL, a PI controller
//   v_f = k_p * (e + (1/T_i) * integral(e dt)).
//
// The reference design tunes k_p = 9.2/T_set and T_i = T_set*xi^2/2.3 and uses
// k_p = 46 and 1/T_i = 23 (T_set = 0.2 s, xi = 0.707); KP and KI below are
// those two numbers.  The integral is a backward-Euler sum with step Ts.
// Gains are turned into fixed point at elaboration:
//   GP = KP * 2**(WF-VF+GF),  GI = KP * KI * TS * 2**(WF-VF+GF)
// so that an error in per unit (2**14) gives v_f in rad/s (2**16).  The
// integrator is clamped to +-I_LIM rad/s against wind-up; that limit is this
// design's choice.
//
// Timing: registered, `out_valid` one cycle after `in_valid`;
// v_f[n] = GP*e[n] + I[n], I[n] = I[n-1] + GI*e[n].  `clear` zeroes I.
module pi_filter
  import pll_pkg::*;
#(
  parameter real KP    = 46.0,
  parameter real KI    = 23.0,
  parameter real TS    = 20.48e-6,
  parameter real I_LIM = 100.0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  err_t   e,
  output logic   out_valid,
  output omega_t v_f,
  output omega_t v_i
);
  localparam real SC = 2.0 ** (WF - VF + GF);
  localparam longint GP   = longint'(KP * SC);
  localparam longint GI   = longint'(KP * KI * TS * SC);
  localparam longint ILIM = longint'(I_LIM * (2.0 ** (WF + GF)));

  logic signed [63:0] acc;       // integral, rad/s with WF+GF fraction bits
  logic signed [63:0] acc_nx, prop;

  always_comb begin
    acc_nx = acc + 64'(e) * GI;
    if (acc_nx > ILIM)       acc_nx = ILIM;
    else if (acc_nx < -ILIM) acc_nx = -ILIM;
    prop = 64'(e) * GP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; out_valid <= 1'b0; v_f <= '0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        acc <= '0;
      end else if (in_valid) begin
        acc <= acc_nx;
        v_f <= sat_omega((prop + acc_nx) >>> GF);
      end
    end
  end

  assign v_i = omega_t'(acc >>> GF);
endmodule
