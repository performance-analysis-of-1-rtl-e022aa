// tb_cordic_sincos: checks cordic_sincos against the real-valued sine and
// cosine over random phases and the four quadrant boundaries, and checks the
// latency of ITER+2 cycles from start to done.
module tb_cordic_sincos;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  phase_t phase;
  logic busy, done;
  volt_t s, c;
  int checks = 0, failures = 0;

  cordic_sincos dut (.clk, .rst_n, .start, .phase, .busy, .done, .sin_o(s), .cos_o(c));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input phase_t p);
    real a, es, ec;
    int  lat;
    @(negedge clk); phase = p; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    a  = 2.0 * PI_R * real'(p) / 4294967296.0;
    es = $sin(a) * 16384.0;
    ec = $cos(a) * 16384.0;
    checks += 3;
    if ((real'(s) - es) > 3.0 || (es - real'(s)) > 3.0 ||
        (real'(c) - ec) > 3.0 || (ec - real'(c)) > 3.0) begin
      failures++;
      $display("FAIL phase=%h sin=%0d (%f) cos=%0d (%f)", p, s, es, c, ec);
    end
    if (lat != 18) begin failures++; $display("FAIL latency %0d", lat); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    phase = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h0); run(32'h4000_0000); run(32'h8000_0000); run(32'hC000_0000);
    run(32'h3FFF_FFFF); run(32'hBFFF_FFFF); run(32'h2000_0000);
    for (int i = 0; i < 2000; i++) run($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
