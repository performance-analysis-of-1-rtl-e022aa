// tb_sync_subsystem: end-to-end test of the synchronization subsystem.
//
// A 1 pu grid voltage with switching ripple and noise is sampled as ADC
// words, decimated by the CIC filter and tracked by the three PLLs side by
// side, through a frequency step from 49 Hz to 51 Hz at t = 0.5 s (the
// reference design's test case), until t = 0.9 s.  The FFB PLL uses the retuned
// feedback (k_FB = 50, saturation 0.5).  The output selection cycles through
// the three PLLs.  Each mechanism is counted and must occur: CIC decimation,
// PLL results, FFB saturation, FFF limiting, the frequency step, output
// selection changes and PLL zero crossings.  Checked against the known grid:
// the phase of the conventional and FFF PLLs within 2.5 degrees and their mean
// frequency within 0.3 rad/s in the last 0.1 s before and after the step
// (the FFB PLL: frequency only, its feedback holds a phase offset); the
// selected outputs equal those of the selected PLL; zc_pll switches where
// the grid voltage crosses zero; the CIC passes the amplitude.
module tb_sync_subsystem;
  import pll_pkg::*;
  localparam int  ADC_DIV = 2;         // clocks per ADC word
  localparam real TS      = 20.48e-6;
  localparam int  R       = 32;
  localparam real T_STEP  = 0.5, T_END = 0.9;
  localparam real GDELAY  = 49.5;      // CIC delay in ADC samples (3*31/2 + 3 pipeline)

  logic clk = 0, rst_n = 0, adc_valid = 0;
  volt_t adc_data;
  scp_e sel;
  logic v_valid, zc_pll;
  volt_t v_filt, cos_sel;
  logic pll_valid [3];
  pll_obs_t pll [3];
  phase_t theta_sel;
  int checks = 0, failures = 0;

  sync_subsystem #(.KFB(50.0), .FB_SAT(0.5)) dut (
    .clk, .rst_n, .adc_valid, .adc_data, .sel, .v_valid, .v_filt,
    .pll_valid, .pll, .theta_sel, .cos_sel, .zc_pll);

  always #5 clk = ~clk;

  initial begin
    repeat (int'(T_END / TS) * R * ADC_DIV + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grid model
  real t, ph, f, ph_v;
  int  n_adc;
  real tadc = TS / real'(R);

  // mechanism counters
  int n_dec, n_res [3], n_ffb_sat, n_fff_lim, n_sel_sw, n_zc, n_zc_chk, n_step;
  real v_peak;

  // window statistics
  real e_max [3], w_sum [3];
  int  nwin [3];

  function automatic real wrap(input real a);
    return a - 2.0 * PI_R * $floor((a + PI_R) / (2.0 * PI_R));
  endfunction

  task automatic window_check(input string tag);
    for (int i = 0; i < 3; i++) begin
      real wm = w_sum[i] / real'(nwin[i]);
      if (i != 1) begin
        checks++;
        if (e_max[i] > 2.5 * PI_R / 180.0) begin
          failures++; $display("FAIL %s pll%0d phase error %f rad", tag, i, e_max[i]);
        end
      end
      checks++;
      if ((wm - 2.0 * PI_R * f) > 0.3 || (2.0 * PI_R * f - wm) > 0.3) begin
        failures++; $display("FAIL %s pll%0d mean omega %f", tag, i, wm);
      end
      $display("%s pll%0d: max|phase err| %f rad, mean omega %f rad/s", tag, i, e_max[i], wm);
      e_max[i] = 0.0; w_sum[i] = 0.0; nwin[i] = 0;
    end
  endtask

  // stimulus: ADC words
  initial begin
    adc_data = '0; sel = SCP_NONE;
    t = 0.0; ph = 0.0; f = 49.0; n_adc = 0;
    n_dec = 0; n_ffb_sat = 0; n_fff_lim = 0; n_sel_sw = 0; n_zc = 0; n_zc_chk = 0; n_step = 0;
    v_peak = 0.0;
    foreach (n_res[i]) begin n_res[i] = 0; e_max[i] = 0.0; w_sum[i] = 0.0; nwin[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (t < T_END) begin
      real v;
      v = $cos(2.0 * PI_R * ph) + 0.02 * $sin(2.0 * PI_R * 20.0e3 * t)
          + 0.01 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      @(negedge clk);
      adc_data  = volt_t'($rtoi(16384.0 * v));
      adc_valid = 1;
      @(negedge clk);
      adc_valid = 0;
      repeat (ADC_DIV - 2) @(negedge clk);
      n_adc++;
      t += tadc;
      ph += f * tadc;
      ph -= $floor(ph);
      if (f < 50.0 && t >= T_STEP) begin
        window_check("49Hz");
        f = 51.0;
        n_step++;
      end
      // cycle the selected PLL every 0.1 s
      if (n_adc % int'(0.1 / tadc) == 0) begin
        sel = (sel == SCP_NONE) ? SCP_FFB : (sel == SCP_FFB) ? SCP_FFF : SCP_NONE;
        n_sel_sw++;
      end
    end
    window_check("51Hz");
    checks += 9;
    if (n_dec == 0)     begin failures++; $display("FAIL no CIC output"); end
    if (n_dec != n_adc / R) begin failures++; $display("FAIL %0d CIC outputs for %0d words", n_dec, n_adc); end
    // the last sample's results may still be in flight
    foreach (n_res[i]) if (n_res[i] < n_dec - 1 || n_res[i] > n_dec) begin failures++; $display("FAIL pll%0d %0d results", i, n_res[i]); end
    if (n_ffb_sat == 0) begin failures++; $display("FAIL FFB saturation never active"); end
    if (n_fff_lim == 0) begin failures++; $display("FAIL FFF limiter never active"); end
    if (n_step != 1)    begin failures++; $display("FAIL frequency step"); end
    if (n_sel_sw < 3)   begin failures++; $display("FAIL selection switched %0d times", n_sel_sw); end
    checks += 3;
    if (n_zc < 2 * 40)  begin failures++; $display("FAIL only %0d zero crossings", n_zc); end
    if (n_zc_chk == 0)  begin failures++; $display("FAIL no zero crossing checked"); end
    if (v_peak < 0.97 || v_peak > 1.06) begin failures++; $display("FAIL CIC amplitude %f", v_peak); end
    $display("mechanisms: CIC outputs %0d, PLL results %0d/%0d/%0d, FFB saturated %0d, FFF limited %0d, step %0d, selection changes %0d, zero crossings %0d (%0d checked)",
             n_dec, n_res[0], n_res[1], n_res[2], n_ffb_sat, n_fff_lim, n_step, n_sel_sw, n_zc, n_zc_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  logic zc_q;
  scp_e sel_q;
  always @(posedge clk) begin
    if (rst_n) begin
      if (v_valid) begin
        n_dec++;
        // grid phase of the sample leaving the CIC filter
        ph_v = ph - f * GDELAY * tadc;
        if (t > 0.1 && real'(v_filt) / 16384.0 > v_peak) v_peak = real'(v_filt) / 16384.0;
      end
      for (int i = 0; i < 3; i++) if (pll_valid[i]) begin
        real c, s, e;
        n_res[i]++;
        if (pll[i].scp_sat && i == 1) n_ffb_sat++;
        if (pll[i].scp_sat && i == 2) n_fff_lim++;
        if ((t > T_STEP - 0.1 && t < T_STEP) || t > T_END - 0.1) begin
          c = real'(pll[i].cos_t) / 16384.0;
          s = real'(pll[i].sin_t) / 16384.0;
          e = $atan2(s * $cos(2.0 * PI_R * ph_v) - c * $sin(2.0 * PI_R * ph_v),
                     c * $cos(2.0 * PI_R * ph_v) + s * $sin(2.0 * PI_R * ph_v));
          if (e < 0) e = -e;
          if (e > e_max[i]) e_max[i] = e;
          w_sum[i] += real'(pll[i].omega) / 65536.0;
          nwin[i]++;
        end
        if (sel == MODES(i)) begin
          checks += 2;
          if (theta_sel != pll[i].theta) begin failures++; $display("FAIL theta_sel"); end
          if (cos_sel != pll[i].cos_t) begin failures++; $display("FAIL cos_sel"); end
        end
      end
      zc_q  <= zc_pll;
      sel_q <= sel;
      if (zc_pll != zc_q && sel == sel_q) begin
        n_zc++;
        // the polarity must change where the grid voltage (seen through the
        // filter delay) crosses zero, for the PLLs without phase offset
        if (sel != SCP_FFB && t > 0.3 && (t < T_STEP || t > T_STEP + 0.2)) begin
          real cg;
          cg = $cos(2.0 * PI_R * (ph - f * GDELAY * tadc));
          n_zc_chk++;
          checks++;
          if (cg > 0.06 || cg < -0.06) begin failures++; $display("FAIL zc at t=%f cos=%f", t, cg); end
        end
      end
    end else begin
      zc_q <= 1'b0;
      sel_q <= SCP_NONE;
    end
  end

  function automatic scp_e MODES(input int i);
    return (i == 0) ? SCP_NONE : (i == 1) ? SCP_FFB : SCP_FFF;
  endfunction
endmodule
