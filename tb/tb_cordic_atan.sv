// tb_cordic_atan: checks cordic_atan against the real-valued atan2 for
// random vectors of 0.25 to 1.9 pu length in all quadrants, and its latency.
module tb_cordic_atan;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  volt_t x, y;
  logic busy, done;
  phase_t ang;
  int checks = 0, failures = 0;

  cordic_atan dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .angle(ang));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real mag, input real a);
    real   ea, diff;
    int    lat;
    @(negedge clk);
    x = volt_t'($rtoi(mag * $cos(a) * 16384.0));
    y = volt_t'($rtoi(mag * $sin(a) * 16384.0));
    start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    ea   = $atan2(real'(y), real'(x)) / (2.0 * PI_R) * 4294967296.0;
    diff = real'(signed'(ang - phase_t'(longint'(ea))));
    checks += 2;
    if (diff > 20000.0 || diff < -20000.0) begin
      failures++;
      $display("FAIL x=%0d y=%0d angle=%h expected %f", x, y, ang, ea);
    end
    if (lat != 22) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1.0, 0.0); run(1.0, PI_R / 2.0); run(1.0, PI_R); run(1.0, -PI_R / 2.0);
    run(1.0, 3.0); run(1.0, -3.0);
    for (int i = 0; i < 2000; i++)
      run(0.25 + 1.65 * real'($urandom_range(0, 1000)) / 1000.0,
          2.0 * PI_R * real'($urandom_range(0, 100000)) / 100000.0 - PI_R);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
