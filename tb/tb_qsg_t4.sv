// tb_qsg_t4: feeds random samples at irregular intervals into qsg_t4 at its
// default depth (244 samples, a quarter period of 50 Hz at Ts = 20.48 us)
// and checks v_alpha = the new sample, v_beta = the sample 244 strobes
// earlier (zero before the buffer has filled), and the one-cycle latency.
module tb_qsg_t4;
  import pll_pkg::*;
  localparam int D = 244;
  logic clk = 0, rst_n = 0, in_valid = 0;
  volt_t v_in, va, vb;
  logic out_valid;
  int checks = 0, failures = 0;
  volt_t hist [$];

  qsg_t4 dut (.clk, .rst_n, .in_valid, .v_in, .out_valid, .v_alpha(va), .v_beta(vb));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * D + 17; n++) begin
      volt_t exp_b;
      @(negedge clk);
      v_in = volt_t'($urandom);
      in_valid = 1;
      hist.push_back(v_in);
      exp_b = (n >= D) ? hist[n - D] : volt_t'(0);
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid) begin failures++; $display("FAIL no out_valid at %0d", n); end
      if (va != v_in) begin failures++; $display("FAIL v_alpha at %0d", n); end
      if (vb != exp_b) begin failures++; $display("FAIL v_beta at %0d: %0d vs %0d", n, vb, exp_b); end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL stray out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
