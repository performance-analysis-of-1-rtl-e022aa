// tb_pi_filter: drives pi_filter (k_p = 46, 1/T_i = 23, Ts = 20.48 us) with
// random per-unit errors and compares v_f with a real-valued model of
// k_p*(e + (1/T_i)*sum(e)*Ts), then checks the integrator clamp and clear.
module tb_pi_filter;
  import pll_pkg::*;
  localparam real KP = 46.0, KI = 23.0, TS = 20.48e-6, ILIM = 100.0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  err_t e;
  omega_t v_f, v_i;
  int checks = 0, failures = 0;

  pi_filter dut (.clk, .rst_n, .clear, .in_valid, .e, .out_valid, .v_f, .v_i);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real integ;
  task automatic step(input err_t x);
    real ep, vf;
    @(negedge clk); e = x; in_valid = 1;
    @(negedge clk); in_valid = 0;
    ep = real'(x) / 16384.0;
    integ += KP * KI * TS * ep;
    if (integ > ILIM) integ = ILIM;
    if (integ < -ILIM) integ = -ILIM;
    vf = KP * ep + integ;
    checks += 2;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    if ((real'(v_f) / 65536.0 - vf) > 0.002 + 1e-4 * (integ < 0 ? -integ : integ) || (vf - real'(v_f) / 65536.0) > 0.002 + 1e-4 * (integ < 0 ? -integ : integ)) begin
      failures++;
      $display("FAIL v_f=%f expected %f", real'(v_f) / 65536.0, vf);
    end
  endtask

  initial begin
    e = '0; integ = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) step(err_t'($urandom_range(0, 8192)) - err_t'(4096));
    // a constant 1 pu error drives the integral into its clamp
    for (int i = 0; i < 6000; i++) step(err_t'(16384));
    checks++;
    if (v_i != omega_t'(ILIM * 65536.0)) begin failures++; $display("FAIL clamp %0d", v_i); end
    for (int i = 0; i < 12000; i++) step(-err_t'(16384));
    checks++;
    if (v_i != -omega_t'(ILIM * 65536.0)) begin failures++; $display("FAIL clamp- %0d", v_i); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (v_i != 0) begin failures++; $display("FAIL clear"); end
    integ = 0.0;
    for (int i = 0; i < 100; i++) step(err_t'(1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
