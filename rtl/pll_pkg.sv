// pll_pkg: number formats, types and constants shared by the single-phase
// T/4 PLL blocks and the synchronization subsystem.
//
// Formats (all fixed point, chosen by this design; the control law follows
// the PLL block diagrams and the gains of the simulation parameter table):
//   volt_t   signed 16 bit, per-unit grid voltage, 1.0 pu = 2**VF = 16384
//   err_t    signed 20 bit, same scale as volt_t, for the phase-detector error
//   omega_t  signed 32 bit, angular frequency in rad/s with WF = 16 fraction
//            bits (range +-32768 rad/s, resolution 15 urad/s)
//   phase_t  unsigned 32 bit, phase angle, 2**32 = one full turn (2*pi)
package pll_pkg;

  localparam int VW = 16;  // voltage sample width
  localparam int VF = 14;  // fraction bits of a per-unit voltage
  localparam int EW = 20;  // phase-detector error width
  localparam int WW = 32;  // angular-frequency width
  localparam int WF = 16;  // fraction bits of an angular frequency
  localparam int PW = 32;  // phase width
  localparam int GF = 16;  // fraction bits of the fixed-point loop gains

  typedef logic signed [VW-1:0] volt_t;
  typedef logic signed [EW-1:0] err_t;
  typedef logic signed [WW-1:0] omega_t;
  typedef logic        [PW-1:0] phase_t;

  // Secondary control path (SCP) of a T/4 PLL.
  typedef enum logic [1:0] {
    SCP_NONE = 2'd0,  // conventional T/4 PLL
    SCP_FFB  = 2'd1,  // frequency feedback loop
    SCP_FFF  = 2'd2   // frequency feedforward loop
  } scp_e;

  // Observable state of one PLL after a sample.
  typedef struct packed {
    phase_t theta;    // theta'
    omega_t omega;    // omega', rad/s
    volt_t  cos_t;    // cos(theta'), in phase with the grid voltage
    volt_t  sin_t;    // sin(theta')
    err_t   v_d;      // amplitude estimate
    err_t   v_q;      // phase-detector output
    err_t   err;      // loop-filter input (phase-detector error)
    err_t   v_fb;     // frequency feedback v_FB (FFB PLL only)
    omega_t w_ff;     // frequency feedforward w_FF (FFF PLL only)
    omega_t v_f;      // loop-filter output
    logic   scp_sat;  // secondary path saturated / limited
  } pll_obs_t;

  localparam real PI_R = 3.14159265358979323846;

  // Angle of one CORDIC micro-rotation, atan(2**-i), as a phase_t:
  // round(atan(2**-i) / (2*pi) * 2**32).
  function automatic phase_t cordic_angle(input int i);
    case (i)
      0:  return 32'd536870912;
      1:  return 32'd316933406;
      2:  return 32'd167458907;
      3:  return 32'd85004756;
      4:  return 32'd42667331;
      5:  return 32'd21354465;
      6:  return 32'd10679838;
      7:  return 32'd5340245;
      8:  return 32'd2670163;
      9:  return 32'd1335087;
      10: return 32'd667544;
      11: return 32'd333772;
      12: return 32'd166886;
      13: return 32'd83443;
      14: return 32'd41722;
      15: return 32'd20861;
      16: return 32'd10430;
      17: return 32'd5215;
      18: return 32'd2608;
      19: return 32'd1304;
      20: return 32'd652;
      21: return 32'd326;
      22: return 32'd163;
      default: return 32'd81;
    endcase
  endfunction

  // Saturate a wide signed value to a 32-bit omega_t.
  function automatic omega_t sat_omega(input logic signed [63:0] x);
    if (x > 64'sd2147483647)       return 32'sh7fffffff;
    else if (x < -64'sd2147483648) return 32'sh80000000;
    else                           return omega_t'(x);
  endfunction

endpackage
