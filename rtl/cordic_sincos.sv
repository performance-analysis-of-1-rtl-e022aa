// cordic_sincos: sine and cosine of the PLL phase theta'.
//
// The T/4 PLL needs sin(theta') and cos(theta') for the alpha-beta to dq
// rotation of its phase detector.  This block computes them with an
// iterative CORDIC in rotation mode, one micro-rotation per clock, so a
// single adder pair is shared over ITER cycles.  The phase is first folded
// into [-pi/2, pi/2] (a rotation by pi, undone by negating the result); the
// start vector is (1/K, 0), where K is the CORDIC gain, so no multiplier is
// needed.  The use of CORDIC and its sizes are this design's choice; the
// reference design only shows that theta' is fed back into the dq rotation.
//
// Interface: pulse `start` with `phase` (2**32 = one turn) while `busy` is
// low.  `done` pulses ITER+2 cycles after the start with `sin_o`, `cos_o` in per-unit
// (1.0 = 2**14) held until the next start.  Error is below 2e-4 pu.
module cordic_sincos
  import pll_pkg::*;
#(
  parameter int ITER = 16   // micro-rotations (<= 24)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  phase_t phase,
  output logic   busy,
  output logic   done,
  output volt_t  sin_o,
  output volt_t  cos_o
);
  // Internal scale 2**18 per unit gives guard bits for the shifts.
  localparam int IWD = 22;
  localparam logic signed [IWD-1:0] X0 = IWD'(159188);  // round(0.607253 * 2**18)

  logic signed [IWD-1:0] x, y;
  logic signed [PW-1:0]  z;
  logic                  neg;
  logic [4:0]            it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; neg <= 1'b0; it <= '0;
      busy <= 1'b0; done <= 1'b0; sin_o <= '0; cos_o <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // fold into [-pi/2, pi/2): angles in the left half-plane are
        // rotated by pi and the result negated
        logic signed [PW-1:0] zs;
        zs = signed'(phase);
        if (zs >= 32'sh40000000 || zs < -32'sh40000000) begin
          z   <= zs - 32'sh80000000;
          neg <= 1'b1;
        end else begin
          z   <= zs;
          neg <= 1'b0;
        end
        x    <= X0;
        y    <= '0;
        it   <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (int'(it) == ITER) begin
          logic signed [IWD-1:0] xr, yr;
          // round from 2**18 to 2**14 scale
          xr = (x + IWD'(8)) >>> 4;
          yr = (y + IWD'(8)) >>> 4;
          cos_o <= neg ? volt_t'(-xr) : volt_t'(xr);
          sin_o <= neg ? volt_t'(-yr) : volt_t'(yr);
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          if (z >= 0) begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - signed'(cordic_angle(int'(it)));
          end else begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + signed'(cordic_angle(int'(it)));
          end
          it <= it + 5'd1;
        end
      end
    end
  end

  // a start is only accepted while idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
