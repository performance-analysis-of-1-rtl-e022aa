// tb_ffb_path: checks v_FB = min(|v_f * k_FB|, V_SAT) of ffb_path for random
// loop-filter outputs, with the simulation values (k_FB = 80000, V_SAT = 5)
// and the retuned experimental values (k_FB = 50, V_SAT = 0.5), including the
// saturation flag.
module tb_ffb_path;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  omega_t v_f;
  logic ov_a, ov_b, sat_a, sat_b;
  err_t fb_a, fb_b;
  int checks = 0, failures = 0;

  ffb_path dut_a (.clk, .rst_n, .clear, .in_valid, .v_f, .out_valid(ov_a), .v_fb(fb_a), .sat(sat_a));
  ffb_path #(.KFB(50.0), .FB_SAT(0.5)) dut_b (.clk, .rst_n, .clear, .in_valid, .v_f,
                                              .out_valid(ov_b), .v_fb(fb_b), .sat(sat_b));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input err_t got, input logic s, input real kfb, input real lim, input real vf);
    real ex;
    logic es;
    ex = (vf < 0 ? -vf : vf) * kfb;
    es = ex >= lim;
    if (es) ex = lim;
    checks += 2;
    if ((real'(got) / 16384.0 - ex) > 1.0 / 16384.0 + 1e-9 || (ex - real'(got) / 16384.0) > 2.0 / 16384.0) begin
      failures++;
      $display("FAIL kfb=%f v_f=%f v_fb=%f expected %f", kfb, vf, real'(got) / 16384.0, ex);
    end
    if (s != es && (ex - lim) * (ex - lim) > 1e-8) begin failures++; $display("FAIL sat flag"); end
  endtask

  initial begin
    v_f = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      real vf;
      case (i % 3)
        0: v_f = omega_t'($urandom_range(0, 200)) - omega_t'(100);          // tiny, below 1/65536 * 200
        1: v_f = omega_t'($urandom_range(0, 2 * 65536)) - omega_t'(65536);   // +-1 rad/s
        default: v_f = omega_t'($urandom);
      endcase
      vf = real'(v_f) / 65536.0;
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!ov_a || !ov_b) begin failures++; $display("FAIL latency"); end
      chk(fb_a, sat_a, 80000.0, 5.0, vf);
      chk(fb_b, sat_b, 50.0, 0.5, vf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
