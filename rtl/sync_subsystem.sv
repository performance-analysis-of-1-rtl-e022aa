// sync_subsystem: grid synchronization subsystem of a current-sensorless
// bridgeless PFC controller.
//
// The sampled grid voltage is decimated by a CIC filter and fed, in
// parallel, to three single-phase T/4 PLLs: the conventional one, one with a
// frequency feedback (FFB) secondary control path and one with a frequency
// feedforward (FFF) path.  Running them side by side on the same samples is
// how the three were compared; `sel` picks the one whose phase drives the
// converter.  The selected PLL gives the unit sinusoid cos(theta') in phase
// with the grid voltage, used to rebuild the line current, and `zc_pll`, the
// grid polarity derived from it (high in the positive half cycle), whose
// edges are the PLL's zero crossings.
//
// The gains are those of the reference design's simulation table (k_p = 46,
// 1/T_i = 23, k_FB = 80000, k_FF = 48828.125, Ts = 20.48 us, 50 Hz); the FFB
// path can be set to the retuned values (k_FB = 50, saturation 0.5) through
// its parameters.  The ADC, the power stage, the voltage controller, the
// carrier generator and the current-rebuilding modulator lie outside: the
// ADC word comes in on `adc_*`, the phase and polarity go out.
//
// Timing: one ADC word per `adc_valid` (two's complement, 1 pu = 2**14), at
// least 2 clocks apart so that a PLL sample (CIC_R words) is at least 64
// clocks long; the system clock of 100 MHz and an ADC strobe every 64 clocks
// give Ts = 20.48 us.  `pll_valid[i]` pulses when PLL i has a new result.
module sync_subsystem
  import pll_pkg::*;
#(
  parameter int  CIC_N   = 3,
  parameter int  CIC_R   = 32,
  parameter real F_NOM   = 50.0,
  parameter real TS      = 20.48e-6,
  parameter real KP      = 46.0,
  parameter real KI      = 23.0,
  parameter real KFB     = 80000.0,
  parameter real FB_SAT  = 5.0,
  parameter real KFF     = 48828.125,
  parameter real FF_LIM  = 31.4159,
  parameter int  FF_TAPS = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     adc_valid,
  input  volt_t    adc_data,
  input  scp_e     sel,
  output logic     v_valid,     // a filtered grid-voltage sample
  output volt_t    v_filt,
  output logic     pll_valid [3],
  output pll_obs_t pll [3],     // index 0: T/4, 1: T/4 FFB, 2: T/4 FFF
  output phase_t   theta_sel,
  output volt_t    cos_sel,
  output logic     zc_pll
);
  cic_decim #(.N(CIC_N), .R(CIC_R), .IW(VW), .OW(VW)) u_cic (
    .clk, .rst_n, .in_valid(adc_valid), .x(adc_data),
    .out_valid(v_valid), .y(v_filt));

  localparam scp_e MODES [3] = '{SCP_NONE, SCP_FFB, SCP_FFF};

  for (genvar i = 0; i < 3; i++) begin : g_pll
    t4_pll #(
      .SCP(MODES[i]), .F_NOM(F_NOM), .TS(TS), .KP(KP), .KI(KI),
      .KFB(KFB), .FB_SAT(FB_SAT), .KFF(KFF), .FF_LIM(FF_LIM), .FF_TAPS(FF_TAPS)
    ) u_pll (
      .clk, .rst_n, .in_valid(v_valid), .v_in(v_filt),
      .busy(), .out_valid(pll_valid[i]),
      .theta(pll[i].theta), .omega(pll[i].omega),
      .sin_o(pll[i].sin_t), .cos_o(pll[i].cos_t),
      .v_d(pll[i].v_d), .v_q(pll[i].v_q), .err(pll[i].err), .v_f(pll[i].v_f),
      .v_fb(pll[i].v_fb), .w_ff(pll[i].w_ff), .scp_sat(pll[i].scp_sat));
  end

  // output of the selected PLL
  always_comb begin
    unique case (sel)
      SCP_FFB: begin theta_sel = pll[1].theta; cos_sel = pll[1].cos_t; end
      SCP_FFF: begin theta_sel = pll[2].theta; cos_sel = pll[2].cos_t; end
      default: begin theta_sel = pll[0].theta; cos_sel = pll[0].cos_t; end
    endcase
  end

  // grid polarity from the PLL phase: cos(theta') >= 0, i.e. theta' in
  // [-pi/2, pi/2); taken from the phase itself so it switches exactly at
  // the PLL's zero crossings
  assign zc_pll = (theta_sel[31] == theta_sel[30]);
endmodule
