// fff_path: secondary control path of the frequency feedforward (FFF) T/4 PLL.
//
// The angle of the stationary-frame voltage vector, theta_v = atan2(v_beta,
// v_alpha), is differentiated and scaled by k_FF, limited, and low-pass
// filtered by an FIR filter; the result w_ff corrects the central frequency
// of the PLL.  The derivative is the first difference of theta_v times
// k_FF = 1/Ts = 48828.125 1/s, so it estimates the grid angular frequency.
// This design's choices where the reference design gives no detail: the estimate is
// taken relative to omega_c = 2*pi*F_NOM, so that w_ff is the deviation from
// the central frequency; the limit is +-FF_LIM rad/s; the FIR filter is a
// TAPS-long moving average (all taps 1/TAPS), which with 512 taps (10.5 ms)
// spans about the 100 Hz ripple that the T/4 delay causes off nominal
// frequency.  Until TAPS samples have been taken the missing taps are zero.
//
// Timing: `out_valid` two cycles after `in_valid`; `w_est` (the unfiltered
// estimate) and `w_ff` hold until the next strobe.  `lim` flags that the
// limiter was active for the last sample.
module fff_path
  import pll_pkg::*;
#(
  parameter real KFF    = 48828.125,
  parameter real F_NOM  = 50.0,
  parameter real FF_LIM = 31.4159,
  parameter int  TAPS   = 512          // power of two
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  phase_t theta_v,
  output logic   out_valid,
  output omega_t w_est,
  output omega_t w_ff,
  output logic   lim
);
  localparam int     LT   = $clog2(TAPS);
  localparam longint GD   = longint'(KFF * 2.0 * PI_R * (2.0 ** (WF - PW + GF)));
  localparam longint WC   = longint'(2.0 * PI_R * F_NOM * (2.0 ** WF));
  localparam longint LIMQ = longint'(FF_LIM * (2.0 ** WF));

  phase_t             prev;
  logic               have_prev;
  logic signed [63:0] est, dev, x;
  logic               x_lim;

  always_comb begin
    est   = (64'(signed'(theta_v - prev)) * GD) >>> GF;
    dev   = have_prev ? est - WC : 64'sd0;
    x_lim = 1'b1;
    if (dev > LIMQ)       x = LIMQ;
    else if (dev < -LIMQ) x = -LIMQ;
    else begin
      x     = dev;
      x_lim = 1'b0;
    end
  end

  // moving-average FIR: running sum over a circular buffer
  omega_t         mem [TAPS];
  logic [LT-1:0]  ptr;
  logic           full, full_q, v1;
  omega_t         old_r, x_r;
  logic signed [WW+LT:0] sum, sum_nx;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      old_r    <= mem[ptr];
      mem[ptr] <= omega_t'(x);
    end
  end

  always_comb sum_nx = sum + (WW+LT+1)'(x_r) - (full_q ? (WW+LT+1)'(old_r) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; have_prev <= 1'b0; ptr <= '0; full <= 1'b0; full_q <= 1'b0;
      v1 <= 1'b0; x_r <= '0; sum <= '0; out_valid <= 1'b0;
      w_est <= '0; w_ff <= '0; lim <= 1'b0;
    end else begin
      v1        <= in_valid && !clear;
      out_valid <= v1;
      if (clear) begin
        prev <= '0; have_prev <= 1'b0; ptr <= '0; full <= 1'b0; full_q <= 1'b0;
        sum <= '0; w_ff <= '0; w_est <= '0; lim <= 1'b0;
      end else begin
        if (in_valid) begin
          prev      <= theta_v;
          have_prev <= 1'b1;
          x_r       <= omega_t'(x);
          lim       <= x_lim;
          w_est     <= have_prev ? sat_omega(est) : omega_t'(WC);
          full_q    <= full;
          ptr       <= ptr + LT'(1);
          if (&ptr) full <= 1'b1;
        end
        if (v1) begin
          sum  <= sum_nx;
          w_ff <= omega_t'(sum_nx >>> LT);
        end
      end
    end
  end
endmodule
