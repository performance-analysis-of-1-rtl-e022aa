// tb_park_transform: checks the dq rotation on random vectors against a
// real-valued reference, and on a locked case: v = cos(theta), v_beta =
// sin(theta) rotated by theta' = theta must give v_d = 1 pu, v_q = 0, and a
// small lead of theta' must give a positive v_q.
module tb_park_transform;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  volt_t va, vb, s, c;
  err_t vd, vq;
  int checks = 0, failures = 0;

  park_transform dut (.clk, .rst_n, .in_valid, .v_alpha(va), .v_beta(vb),
                      .sin_t(s), .cos_t(c), .out_valid, .v_d(vd), .v_q(vq));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input volt_t a, input volt_t b, input volt_t sn, input volt_t cs,
                       output err_t d, output err_t q);
    @(negedge clk); va = a; vb = b; s = sn; c = cs; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    d = vd; q = vq;
  endtask

  initial begin
    err_t d, q;
    real  ed, eq;
    va = '0; vb = '0; s = '0; c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      volt_t a, b, sn, cs;
      a = volt_t'($urandom); b = volt_t'($urandom);
      sn = volt_t'($urandom_range(0, 32768)) - 16'sd16384;
      cs = volt_t'($urandom_range(0, 32768)) - 16'sd16384;
      apply(a, b, sn, cs, d, q);
      ed = (real'(a) * real'(cs) + real'(b) * real'(sn)) / 16384.0;
      eq = (real'(a) * real'(sn) - real'(b) * real'(cs)) / 16384.0;
      checks += 2;
      if (real'(d) > ed + 0.01 || real'(d) < ed - 1.01) begin failures++; $display("FAIL vd %0d %f", d, ed); end
      if (real'(q) > eq + 0.01 || real'(q) < eq - 1.01) begin failures++; $display("FAIL vq %0d %f", q, eq); end
    end
    // locked: theta' = theta = 0.7 rad
    apply(volt_t'($rtoi(16384.0 * $cos(0.7))), volt_t'($rtoi(16384.0 * $sin(0.7))),
          volt_t'($rtoi(16384.0 * $sin(0.7))), volt_t'($rtoi(16384.0 * $cos(0.7))), d, q);
    checks += 2;
    if (d < 16380 || d > 16386) begin failures++; $display("FAIL locked vd %0d", d); end
    if (q < -3 || q > 3) begin failures++; $display("FAIL locked vq %0d", q); end
    // theta' leads by 0.1 rad: v_q = sin(0.1) pu
    apply(volt_t'($rtoi(16384.0 * $cos(0.7))), volt_t'($rtoi(16384.0 * $sin(0.7))),
          volt_t'($rtoi(16384.0 * $sin(0.8))), volt_t'($rtoi(16384.0 * $cos(0.8))), d, q);
    checks++;
    if (q < 1630 || q > 1640) begin failures++; $display("FAIL lead vq %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
