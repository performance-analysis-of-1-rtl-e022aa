// tb_fff_path: feeds fff_path with the angle of a rotating vector at 49 Hz,
// then 51 Hz, then 60 Hz (Ts = 20.48 us) and checks, sample by sample,
// the unfiltered frequency estimate k_FF * d(theta_v) against 2*pi*f, and
// w_ff against a real-valued model: the deviation from 2*pi*50 rad/s, limited
// to +-FF_LIM, averaged over the last 512 samples (zero before the first).
module tb_fff_path;
  import pll_pkg::*;
  localparam real TS = 20.48e-6, LIM = 31.4159;
  localparam int  TAPS = 512;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid, lim;
  phase_t theta_v;
  omega_t w_est, w_ff;
  int checks = 0, failures = 0, lim_seen = 0;
  real hist [$];
  real ph;

  fff_path dut (.clk, .rst_n, .clear, .in_valid, .theta_v, .out_valid, .w_est, .w_ff, .lim);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real f, input int n);
    for (int i = 0; i < n; i++) begin
      real dev, avg;
      ph += f * TS;
      ph -= $floor(ph);
      theta_v = phase_t'(longint'(ph * 4294967296.0));
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      dev = (hist.size() == 0) ? 0.0 : 2.0 * PI_R * (f - 50.0);
      if (dev > LIM) dev = LIM;
      if (dev < -LIM) dev = -LIM;
      hist.push_back(dev);
      if (hist.size() > TAPS) void'(hist.pop_front());
      avg = 0.0;
      foreach (hist[k]) avg += hist[k];
      avg /= real'(TAPS);
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      if ((real'(w_ff) / 65536.0 - avg) > 0.01 || (avg - real'(w_ff) / 65536.0) > 0.01) begin
        failures++;
        $display("FAIL f=%f i=%0d w_ff=%f expected %f", f, i, real'(w_ff) / 65536.0, avg);
      end
      if (hist.size() > 1) begin
        checks++;
        if ((real'(w_est) / 65536.0 - 2.0 * PI_R * f) > 0.01 ||
            (2.0 * PI_R * f - real'(w_est) / 65536.0) > 0.01) begin
          failures++;
          $display("FAIL w_est %f for f=%f", real'(w_est) / 65536.0, f);
        end
        checks++;
        if (lim != (f > 55.0)) begin failures++; $display("FAIL lim flag"); end
        if (lim) lim_seen++;
      end
    end
  endtask

  initial begin
    theta_v = '0; ph = 0.3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(49.0, 1500);
    run(51.0, 1500);
    run(60.0, 700);
    checks++;
    if (lim_seen == 0) begin failures++; $display("FAIL limiter never active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
