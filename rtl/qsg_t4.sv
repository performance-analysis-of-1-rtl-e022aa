// qsg_t4: quadrature signal generator of the single-phase T/4 PLL.
//
// A single-phase grid has no second phase to build a stationary alpha-beta
// frame from, so the T/4 PLL makes one: v_alpha is the input sample and
// v_beta is the same signal delayed by a quarter of the nominal grid period.
// The delay is a circular buffer of DEPTH samples; DEPTH follows from the
// sampling period, DEPTH = round(1 / (4 * f_nom * Ts)) = 244 for 50 Hz and
// Ts = 20.48 us.  When the grid frequency moves away from f_nom the delay is
// no longer exactly 90 degrees, which is the error source the secondary
// control paths are meant to ride through.  Until DEPTH samples have been
// written, v_beta reads as zero.
//
// Timing: one sample per `in_valid`; `out_valid` follows one cycle later with
// v_alpha = v_in and v_beta = the sample taken DEPTH strobes earlier.
module qsg_t4
  import pll_pkg::*;
#(
  parameter int DEPTH = 244
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  volt_t v_in,
  output logic  out_valid,
  output volt_t v_alpha,
  output volt_t v_beta
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  volt_t          mem [DEPTH];
  logic [AW-1:0]  ptr;
  logic           full;
  volt_t          rd;

  // buffer: read-before-write at the same address
  always_ff @(posedge clk) begin
    if (in_valid) begin
      rd       <= mem[ptr];
      mem[ptr] <= v_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; full <= 1'b0; out_valid <= 1'b0; v_alpha <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_alpha <= v_in;
        if (int'(ptr) == DEPTH - 1) begin
          ptr  <= '0;
          full <= 1'b1;
        end else begin
          ptr <= ptr + AW'(1);
        end
      end
    end
  end

  // `full` still reflects the state at the read; the first DEPTH reads are
  // of unwritten entries
  logic full_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        full_q <= 1'b0;
    else if (in_valid) full_q <= full;
  end

  assign v_beta = full_q ? rd : '0;
endmodule
