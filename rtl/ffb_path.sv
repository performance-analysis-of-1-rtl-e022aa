// ffb_path: secondary control path of the frequency feedback (FFB) T/4 PLL.
//
// The loop-filter output v_f (the frequency correction) is fed back to the
// input of the loop filter through
//   v_FB = min(|v_f * k_FB|, V_SAT)
// (absolute value, gain, saturation), and added there to the error
// v_q* - v_q.  The reference design's simulation uses k_FB = 80000 and V_SAT = 5; its
// experiments retune to k_FB = 50 and V_SAT = 0.5.  Here v_f is in rad/s and
// v_FB in per unit of the grid voltage, which is this design's reading of the
// units; the gain is GFB = KFB * 2**(VF-WF+GF) in fixed point.
//
// Timing: registered, `out_valid` one cycle after `in_valid`; v_fb holds
// until the next strobe.  `sat` flags that the saturation was active.
module ffb_path
  import pll_pkg::*;
#(
  parameter real KFB    = 80000.0,
  parameter real FB_SAT = 5.0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  omega_t v_f,
  output logic   out_valid,
  output err_t   v_fb,
  output logic   sat
);
  localparam longint GFB  = longint'(KFB * (2.0 ** (VF - WF + GF)));
  localparam longint SATQ = longint'(FB_SAT * (2.0 ** VF));

  logic [63:0] mag, prod;

  always_comb begin
    mag  = (v_f < 0) ? 64'(-64'(v_f)) : 64'(v_f);
    prod = (mag * 64'(GFB)) >> GF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; v_fb <= '0; sat <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        v_fb <= '0; sat <= 1'b0;
      end else if (in_valid) begin
        if (prod >= 64'(SATQ)) begin
          v_fb <= err_t'(SATQ);
          sat  <= 1'b1;
        end else begin
          v_fb <= err_t'(prod);
          sat  <= 1'b0;
        end
      end
    end
  end
endmodule
