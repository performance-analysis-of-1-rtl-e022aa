// tb_cic_decim: compares cic_decim (N = 3, R = 32) with a direct model of the
// same filter, three cascaded 32-sample moving sums divided by 32**3 and
// taken every 32nd input, on random ADC words, and checks that a constant
// input comes out unchanged and that one output is produced per 32 inputs.
// The model accounts for the pipelined integrators: the output taken at the
// input with index k*R - 1 is the filtered signal at index k*R - 1 - N.
module tb_cic_decim;
  import pll_pkg::*;
  localparam int N = 3, R = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  volt_t x, y;
  int checks = 0, failures = 0, nout = 0;
  longint xs [$];

  cic_decim dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cascade of N moving sums of length R, at sample index t
  function automatic longint boxn(input int t);
    longint s1 [$], s2 [$];
    // stage 1 over the needed window
    for (int u = t - (N - 1) * (R - 1); u <= t; u++) begin
      longint a = 0;
      for (int k = 0; k < R; k++) if (u - k >= 0) a += xs[u - k];
      s1.push_back(a);
    end
    for (int u = (R - 1); u < s1.size(); u++) begin
      longint a = 0;
      for (int k = 0; k < R; k++) a += s1[u - k];
      s2.push_back(a);
    end
    boxn = 0;
    for (int k = 0; k < R; k++) boxn += s2[s2.size() - 1 - k];
  endfunction

  initial begin
    int n = 0;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      for (int j = 0; j < R; j++) begin
        @(negedge clk);
        x = (blk < 40) ? volt_t'($urandom_range(0, 40000)) - volt_t'(20000) : volt_t'(12345);
        xs.push_back(longint'(x));
        in_valid = 1;
        @(negedge clk); in_valid = 0;
        if (j != R - 1) begin
          checks++;
          if (out_valid) begin failures++; $display("FAIL early out_valid"); end
        end else begin
          checks++;
          if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
          else nout++;
          // skip the start-up transient of the filter
          if (n - N >= (N + 1) * R) begin
            longint e;
            e = boxn(n - N) >>> (N * 5);
            checks++;
            if (longint'(y) != e) begin failures++; $display("FAIL blk %0d y=%0d expected %0d", blk, y, e); end
          end
        end
        if (!in_valid && x == 12345 && blk == 59 && j == R - 1) begin
          checks++;
          if (y != 12345) begin failures++; $display("FAIL dc gain %0d", y); end
        end
        n++;
      end
    end
    checks++;
    if (nout != 60) begin failures++; $display("FAIL %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
