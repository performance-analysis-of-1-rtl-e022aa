// cordic_atan: angle of the stationary-frame voltage vector (v_alpha, v_beta).
//
// This is the tan^-1 block of the frequency feedforward path: it returns
// atan2(v_beta, v_alpha) as a phase_t (2**32 = one turn), which the path then
// differentiates to estimate the grid frequency.  It is an iterative CORDIC
// in vectoring mode, one micro-rotation per clock.  A vector in the left
// half-plane is first rotated by pi.  The CORDIC algorithm and its sizes are
// this design's choice; the reference design only names the arctangent.
//
// Interface: pulse `start` with `x` (v_alpha) and `y` (v_beta) while `busy`
// is low; `done` pulses ITER+2 cycles after the start with `angle` held until the next
// start.
module cordic_atan
  import pll_pkg::*;
#(
  parameter int ITER = 20   // micro-rotations (<= 24)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  volt_t  x,
  input  volt_t  y,
  output logic   busy,
  output logic   done,
  output phase_t angle
);
  // inputs are scaled by 2**6 for guard bits; the CORDIC gain 1.65 and
  // the sqrt(2) of the vector length need two more integer bits
  localparam int IWD = VW + 6 + 3;

  logic signed [IWD-1:0] xr, yr;
  logic signed [PW-1:0]  z;
  logic [4:0]            it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; z <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        logic signed [IWD-1:0] xs, ys;
        xs = IWD'(x) <<< 6;
        ys = IWD'(y) <<< 6;
        if (x < 0) begin
          xr <= -xs; yr <= -ys; z <= 32'sh80000000;
        end else begin
          xr <= xs;  yr <= ys;  z <= '0;
        end
        it   <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (int'(it) == ITER) begin
          angle <= phase_t'(z);
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          // drive y towards zero, accumulating the rotation in z
          if (yr >= 0) begin
            xr <= xr + (yr >>> it);
            yr <= yr - (xr >>> it);
            z  <= z + signed'(cordic_angle(int'(it)));
          end else begin
            xr <= xr - (yr >>> it);
            yr <= yr + (xr >>> it);
            z  <= z - signed'(cordic_angle(int'(it)));
          end
          it <= it + 5'd1;
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
