// tb_t4_pll: runs the three T/4 PLL variants on an ideal grid voltage
// v = cos(theta) of 1 pu that steps from 49 Hz to 51 Hz, the test case of the
// reference design.  Conventional and FFF use the default (simulation-table) gains,
// FFB the retuned k_FB = 50, V_SAT = 0.5.  Checks, against the known input:
//  - before and 0.4 s after the step, conventional and FFF PLL phases are
//    within 2 degrees of theta and their mean omega' within 0.2 rad/s of
//    2*pi*f;
//  - the FFB PLL locks in frequency with the phase offset asin(v_FB / V)
//    that its positive feedback implies (v_q = v_FB in steady state), within
//    3 degrees;
//  - the FFF correction w_ff, averaged over 0.1 s, settles at 2*pi*(f - 50) within 0.3 rad/s;
//  - v_d, the amplitude estimate, is 1 pu within 2 %;
//  - one result per sample, LAT (LAT_FFF) cycles after the sample.
module tb_t4_pll;
  import pll_pkg::*;
  localparam real TS = 20.48e-6;
  localparam int  NS_STEP = 24414;          // 0.5 s
  localparam int  NS_END  = NS_STEP + 19531; // + 0.4 s
  localparam int  LAT     = 24;             // in_valid to out_valid, cycles
  localparam int  LAT_FFF = 28;             // with the FFF path (longer CORDIC)
  logic clk = 0, rst_n = 0, in_valid = 0;
  volt_t v_in;
  int checks = 0, failures = 0;

  logic   busy [3], ov [3], sat [3];
  phase_t th [3];
  omega_t om [3], vf [3], wff [3];
  volt_t  sn [3], cs [3];
  err_t   vd [3], vq [3], er [3], vfb [3];

  t4_pll #(.SCP(SCP_NONE)) u0 (.clk, .rst_n, .in_valid, .v_in, .busy(busy[0]), .out_valid(ov[0]),
    .theta(th[0]), .omega(om[0]), .sin_o(sn[0]), .cos_o(cs[0]), .v_d(vd[0]), .v_q(vq[0]),
    .err(er[0]), .v_f(vf[0]), .v_fb(vfb[0]), .w_ff(wff[0]), .scp_sat(sat[0]));
  t4_pll #(.SCP(SCP_FFB), .KFB(50.0), .FB_SAT(0.5)) u1 (.clk, .rst_n, .in_valid, .v_in,
    .busy(busy[1]), .out_valid(ov[1]),
    .theta(th[1]), .omega(om[1]), .sin_o(sn[1]), .cos_o(cs[1]), .v_d(vd[1]), .v_q(vq[1]),
    .err(er[1]), .v_f(vf[1]), .v_fb(vfb[1]), .w_ff(wff[1]), .scp_sat(sat[1]));
  t4_pll #(.SCP(SCP_FFF)) u2 (.clk, .rst_n, .in_valid, .v_in, .busy(busy[2]), .out_valid(ov[2]),
    .theta(th[2]), .omega(om[2]), .sin_o(sn[2]), .cos_o(cs[2]), .v_d(vd[2]), .v_q(vq[2]),
    .err(er[2]), .v_f(vf[2]), .v_fb(vfb[2]), .w_ff(wff[2]), .scp_sat(sat[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (NS_END * 40 + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase error of PLL i for grid phase a: angle of cos/sin output against a
  function automatic real perr(input int i, input real a);
    real c = real'(cs[i]) / 16384.0, s = real'(sn[i]) / 16384.0;
    return $atan2(s * $cos(a) - c * $sin(a), c * $cos(a) + s * $sin(a));
  endfunction

  real ph, f;
  real e_max [3], w_sum [3], ff_last, ff_sum;
  int  nwin, nres [3], lat_bad;
  int  settle [3];

  task automatic window_check(input string tag);
    for (int i = 0; i < 3; i++) begin
      real wm = w_sum[i] / real'(nwin);
      if (i != 1) begin
        checks += 2;
        if (e_max[i] > 2.0 * PI_R / 180.0) begin
          failures++; $display("FAIL %s pll%0d phase error %f rad", tag, i, e_max[i]);
        end
        if ((wm - 2.0 * PI_R * f) > 0.2 || (2.0 * PI_R * f - wm) > 0.2) begin
          failures++; $display("FAIL %s pll%0d mean omega %f", tag, i, wm);
        end
      end else begin
        // FFB: phase offset asin(v_FB / V) removed before the comparison
        checks += 2;
        if (e_max[i] > 3.0 * PI_R / 180.0) begin
          failures++; $display("FAIL %s ffb phase error beyond its offset %f rad", tag, e_max[i]);
        end
        if ((wm - 2.0 * PI_R * f) > 0.2 || (2.0 * PI_R * f - wm) > 0.2) begin
          failures++; $display("FAIL %s ffb mean omega %f", tag, wm);
        end
      end
      // amplitude: 1 pu, seen through the phase offset of the FFB PLL
      begin
        real vde = (i == 1) ? 16384.0 * $cos($asin(real'(vfb[1]) / 16384.0)) : 16384.0;
        checks++;
        if (real'(vd[i]) < 0.98 * vde || real'(vd[i]) > 1.02 * vde) begin
          failures++; $display("FAIL %s pll%0d v_d %0d", tag, i, vd[i]);
        end
      end
      $display("%s pll%0d: max|phase err| %f rad, mean omega %f rad/s", tag, i, e_max[i], wm);
    end
  endtask

  initial begin
    v_in = '0; ph = 0.0; f = 49.0; lat_bad = 0;
    foreach (nres[i]) begin nres[i] = 0; settle[i] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS_END; n++) begin
      int lat;
      if (n == NS_STEP) f = 51.0;
      // sample of the grid, then advance its phase
      v_in = volt_t'($rtoi(16384.0 * $cos(2.0 * PI_R * ph)));
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (lat < 39) begin
        @(negedge clk); lat++;
        for (int i = 0; i < 3; i++) if (ov[i]) begin
          nres[i]++;
          if (lat != ((i == 2) ? LAT_FFF : LAT)) lat_bad++;
        end
      end
      // the outputs now hold sin/cos of theta' used for this sample
      if ((n >= NS_STEP - 4883 && n < NS_STEP) || n >= NS_END - 4883) begin
        if (n == NS_STEP - 4883 || n == NS_END - 4883) begin
          nwin = 0; ff_sum = 0.0; foreach (e_max[i]) begin e_max[i] = 0.0; w_sum[i] = 0.0; end
        end
        nwin++;
        ff_sum += real'(wff[2]) / 65536.0;
        for (int i = 0; i < 3; i++) begin
          real e;
          e = perr(i, 2.0 * PI_R * ph);
          if (i == 1) e -= $asin(real'(vfb[1]) / 16384.0);
          if (e < 0) e = -e;
          if (e > e_max[i]) e_max[i] = e;
          w_sum[i] += real'(om[i]) / 65536.0;
        end
      end
      if (n >= NS_STEP) for (int i = 0; i < 3; i += 2) begin
        real e;
        e = perr(i, 2.0 * PI_R * ph);
        if (e < 0) e = -e;
        if (e > 0.02) settle[i] = -1;
        else if (settle[i] < 0) settle[i] = n - NS_STEP;
      end
      if (n == NS_STEP - 1) begin
        window_check("49Hz");
        ff_last = ff_sum / real'(nwin);
        checks++;
        if (ff_last > -2.0 * PI_R + 0.3 || ff_last < -2.0 * PI_R - 0.3) begin
          failures++; $display("FAIL w_ff at 49 Hz %f", ff_last);
        end
      end
      ph += f * TS;
      ph -= $floor(ph);
    end
    window_check("51Hz");
    ff_last = ff_sum / real'(nwin);
    checks++;
    if (ff_last > 2.0 * PI_R + 0.3 || ff_last < 2.0 * PI_R - 0.3) begin
      failures++; $display("FAIL w_ff at 51 Hz %f", ff_last);
    end
    checks++;
    if (!sat[1]) begin failures++; $display("FAIL ffb never saturated"); end
    checks += 3;
    foreach (nres[i]) if (nres[i] != NS_END) begin failures++; $display("FAIL pll%0d %0d results", i, nres[i]); end
    checks++;
    if (lat_bad != 0) begin failures++; $display("FAIL latency off in %0d samples", lat_bad); end
    $display("settling (|err|<0.02 rad) after the step: T/4 %0d samples, FFF %0d samples", settle[0], settle[2]);
    // the feedforward path settles first
    checks++;
    if (settle[2] < 0 || settle[0] < 0 || settle[2] >= settle[0]) begin
      failures++; $display("FAIL FFF not faster than T/4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
