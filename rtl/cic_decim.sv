// cic_decim: CIC decimation filter between the grid-voltage ADC and the PLLs.
//
// A cascade of N integrators running at the ADC sample rate, a decimation
// by R, and N combs (differential delay 1) at the output rate.  It removes the
// switching ripple and noise from the sampled grid voltage and brings the
// sample rate down to the PLL rate: with the ADC sampled at 1.5625 MHz and
// R = 32 the output period is Ts = 20.48 us.  The DC gain R**N = 2**15 is
// divided out by a shift, so the output has the scale of the input.  The
// reference design names the filter only; its order, ratio and the ADC rate are this
// design's choice.  Registers are B = IW + N*log2(R) bits wide, enough that
// the modular arithmetic of the integrators never loses the result.
//
// Timing: `in_valid` with each ADC sample; every R-th sample `out_valid`
// pulses one cycle later (after the combs) with `y`.
module cic_decim
  import pll_pkg::*;
#(
  parameter int N  = 3,
  parameter int R  = 32,    // power of two
  parameter int IW = 16,
  parameter int OW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x,
  output logic                 out_valid,
  output logic signed [OW-1:0] y
);
  localparam int LR = $clog2(R);
  localparam int B  = IW + N * LR;

  logic signed [B-1:0] integ [N];
  logic signed [B-1:0] comb_d [N];   // comb delay registers
  logic [LR-1:0]       cnt;

  // comb chain, combinational between decimated samples
  logic signed [B-1:0] c [N+1];
  always_comb begin
    c[0] = integ[N-1];
    for (int k = 0; k < N; k++) c[k+1] = c[k] - comb_d[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        integ[k]  <= '0;
        comb_d[k] <= '0;
      end
      cnt <= '0; out_valid <= 1'b0; y <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + B'(x);
        for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
        cnt <= cnt + LR'(1);
        if (&cnt) begin
          // decimation instant: run the combs on the last integrator value
          for (int k = 0; k < N; k++) comb_d[k] <= c[k];
          y         <= OW'(c[N] >>> (N * LR));
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
