// tb_vco_nco: checks that vco_nco integrates omega' = omega_c + v_f + w_ff
// (omega_c = 2*pi*50 rad/s, Ts = 20.48 us) into the phase theta': after N
// samples theta' must equal N*omega'*Ts/(2*pi) turns, modulo one turn, for
// several constant corrections, including the nominal 50 Hz case where one
// grid period is 976.5625 samples.
module tb_vco_nco;
  import pll_pkg::*;
  localparam real TS = 20.48e-6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  omega_t v_f, w_ff, omega;
  phase_t theta;
  int checks = 0, failures = 0;

  vco_nco dut (.clk, .rst_n, .in_valid, .v_f, .w_ff, .omega, .theta);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real f_corr, input real w_corr, input int n);
    real    w, turns, frac;
    phase_t p0;
    longint d;
    p0 = theta;
    v_f  = omega_t'($rtoi(f_corr * 65536.0));
    w_ff = omega_t'($rtoi(w_corr * 65536.0));
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
    end
    w     = 2.0 * PI_R * 50.0 + real'(v_f) / 65536.0 + real'(w_ff) / 65536.0;
    turns = real'(n) * w * TS / (2.0 * PI_R);
    frac  = turns - $floor(turns);
    d     = longint'(signed'(theta - p0 - phase_t'(longint'(frac * 4294967296.0))));
    checks += 2;
    if (d > n + 2 || d < -n - 2) begin
      failures++;
      $display("FAIL n=%0d phase step %0d off by %0d", n, theta - p0, d);
    end
    if ((real'(omega) / 65536.0 - w) > 1e-3 || (w - real'(omega) / 65536.0) > 1e-3) begin
      failures++;
      $display("FAIL omega %f vs %f", real'(omega) / 65536.0, w);
    end
  endtask

  initial begin
    v_f = '0; w_ff = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (theta != 0) begin failures++; $display("FAIL reset phase"); end
    run(0.0, 0.0, 4096);        // 50 Hz, 4096 samples = 4.194 periods
    run(-6.2832, 0.0, 1000);    // 49 Hz
    run(3.0, 3.2832, 3000);     // 51 Hz through both inputs
    run(-30.0, 12.5, 777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
