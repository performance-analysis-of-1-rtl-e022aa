// t4_pll: single-phase T/4 delay PLL, conventional or with a secondary
// control path (SCP) that adjusts its frequency.
//
// Structure (per sample of the grid voltage v):
//   phase detector   v_alpha = v, v_beta = v delayed by T/4 (qsg_t4); both
//                    rotated into the dq frame of theta' (cordic_sincos,
//                    park_transform); v_d is the amplitude, v_q the phase error
//   loop filter      e = v_q* - v_q (+ v_FB with SCP_FFB), v_q* = 0, into a
//                    PI controller k_p(1 + 1/(T_i s)) giving v_f (pi_filter)
//   VCO              omega' = omega_c + v_f (+ w_ff with SCP_FFF), integrated
//                    to theta' (vco_nco)
//   SCP_FFB          v_FB = min(|v_f k_FB|, V_SAT) fed back to the loop-filter
//                    input (ffb_path); the v_f of the previous sample is used
//   SCP_FFF          atan2(v_beta, v_alpha) (cordic_atan), differentiated,
//                    scaled by k_FF, limited and FIR filtered into w_ff
//                    (fff_path), a fast correction of the central frequency
// Once locked, cos(theta') is in phase with the input: for v = V*cos(theta),
// theta' = theta.  The structures and gains follow the reference design; the fixed
// point formats, the CORDICs and the sequencing are this design's.
//
// Timing: one sample per `in_valid` (a strobe while `busy` is an error; at
// least 30 cycles apart).  `out_valid` rises 24 clock edges after the edge
// that takes `in_valid` (28 with the FFF path, whose CORDIC is longer); every
// output then holds until the next one.  `err` is the loop-filter input, the signal a scope would
// show as the PLL's error.
module t4_pll
  import pll_pkg::*;
#(
  parameter scp_e SCP     = SCP_NONE,
  parameter real  F_NOM   = 50.0,
  parameter real  TS      = 20.48e-6,
  parameter real  KP      = 46.0,
  parameter real  KI      = 23.0,
  parameter real  I_LIM   = 100.0,
  parameter real  KFB     = 80000.0,
  parameter real  FB_SAT  = 5.0,
  parameter real  KFF     = 48828.125,
  parameter real  FF_LIM  = 31.4159,
  parameter int   FF_TAPS = 512,
  parameter int   QDEPTH  = int'(1.0 / (4.0 * F_NOM * TS))
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  volt_t  v_in,
  output logic   busy,
  output logic   out_valid,
  output phase_t theta,     // theta'
  output omega_t omega,     // omega', rad/s
  output volt_t  sin_o,     // sin(theta') used in the last sample
  output volt_t  cos_o,     // cos(theta'), in phase with v_in when locked
  output err_t   v_d,
  output err_t   v_q,
  output err_t   err,       // loop-filter input
  output omega_t v_f,       // loop-filter output
  output err_t   v_fb,      // SCP_FFB feedback (0 otherwise)
  output omega_t w_ff,      // SCP_FFF correction (0 otherwise)
  output logic   scp_sat    // FFB saturation / FFF limiter active
);
  typedef enum logic [2:0] {S_IDLE, S_QSG, S_CORD, S_PARK, S_PI, S_VCO} state_e;
  state_e st;
  logic   at_ok;             // angle of this sample ready (or no FFF path)
  logic   fb_sat, ff_lim;

  // ---------------- phase detector ----------------
  logic  qsg_v;
  volt_t va, vb, va_r, vb_r;
  qsg_t4 #(.DEPTH(QDEPTH)) u_qsg (
    .clk, .rst_n, .in_valid(in_valid && st == S_IDLE), .v_in,
    .out_valid(qsg_v), .v_alpha(va), .v_beta(vb));

  logic sc_start, sc_done, sc_ok;
  cordic_sincos u_sincos (
    .clk, .rst_n, .start(sc_start), .phase(theta),
    .busy(), .done(sc_done), .sin_o, .cos_o);

  logic  pk_v;
  park_transform u_park (
    .clk, .rst_n, .in_valid(st == S_CORD && sc_ok && at_ok), .v_alpha(va_r), .v_beta(vb_r),
    .sin_t(sin_o), .cos_t(cos_o), .out_valid(pk_v), .v_d, .v_q);

  // ---------------- loop filter ----------------
  err_t e_sum;
  always_comb begin
    logic signed [EW:0] s;
    s = (EW+1)'(v_fb) - (EW+1)'(v_q);
    if (s > (EW+1)'(2**(EW-1) - 1))   e_sum = err_t'(2**(EW-1) - 1);
    else if (s < -(EW+1)'(2**(EW-1))) e_sum = err_t'(-(2**(EW-1)));
    else                              e_sum = err_t'(s);
  end

  logic pi_v;
  pi_filter #(.KP(KP), .KI(KI), .TS(TS), .I_LIM(I_LIM)) u_pi (
    .clk, .rst_n, .clear(1'b0), .in_valid(pk_v), .e(e_sum),
    .out_valid(pi_v), .v_f, .v_i());

  // ---------------- secondary control paths ----------------
  generate
    if (SCP == SCP_FFB) begin : g_ffb
      ffb_path #(.KFB(KFB), .FB_SAT(FB_SAT)) u_ffb (
        .clk, .rst_n, .clear(1'b0), .in_valid(pi_v), .v_f,
        .out_valid(), .v_fb, .sat(fb_sat));
    end else begin : g_no_ffb
      assign v_fb   = '0;
      assign fb_sat = 1'b0;
    end

    if (SCP == SCP_FFF) begin : g_fff
      logic   at_done;
      phase_t theta_v;
      omega_t w_est;
      cordic_atan u_atan (
        .clk, .rst_n, .start(sc_start), .x(va), .y(vb),
        .busy(), .done(at_done), .angle(theta_v));
      fff_path #(.KFF(KFF), .F_NOM(F_NOM), .FF_LIM(FF_LIM), .TAPS(FF_TAPS)) u_fff (
        .clk, .rst_n, .clear(1'b0), .in_valid(at_done), .theta_v,
        .out_valid(), .w_est, .w_ff, .lim(ff_lim));
      logic at_seen;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        at_seen <= 1'b0;
        else if (sc_start) at_seen <= 1'b0;
        else if (at_done)  at_seen <= 1'b1;
      end
      assign at_ok = at_seen;
    end else begin : g_no_fff
      assign w_ff   = '0;
      assign ff_lim = 1'b0;
      assign at_ok  = 1'b1;
    end
  endgenerate

  assign scp_sat = fb_sat | ff_lim;

  // ---------------- VCO ----------------
  vco_nco #(.F_NOM(F_NOM), .TS(TS)) u_vco (
    .clk, .rst_n, .in_valid(st == S_VCO), .v_f, .w_ff, .omega, .theta);

  // ---------------- sequencer ----------------
  assign sc_start = qsg_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; va_r <= '0; vb_r <= '0; sc_ok <= 1'b0; out_valid <= 1'b0; err <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (in_valid) st <= S_QSG;
        S_QSG:  if (qsg_v) begin
                  va_r  <= va;
                  vb_r  <= vb;
                  sc_ok <= 1'b0;
                  st    <= S_CORD;
                end
        S_CORD: begin
                  if (sc_done) sc_ok <= 1'b1;
                  if (sc_ok && at_ok) st <= S_PARK;
                end
        S_PARK: if (pk_v) begin
                  err <= e_sum;
                  st  <= S_PI;
                end
        S_PI:   if (pi_v) st <= S_VCO;
        // the FFB/FFF outputs of this sample settle while the VCO steps
        S_VCO:  begin
                  out_valid <= 1'b1;
                  st        <= S_IDLE;
                end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> st == S_IDLE);
endmodule
