// tb_uflp_pcr: two-board bench test. The UFLP (uflp_top) drives the plasma
// emulator (pcr_top) through its bias DAC, and measures the emulator's current
// and voltage outputs through its ADC; each direction passes two registers
// for the converters. Both run at their default parameters.
//   1. 80 kHz (521 clocks per state) with Te = 2.7 +- 0.5 eV and
//      Isat = 20 +- 5 mA swept by a sinusoid of 160 iterations, Vf = -9 V and
//      6 % noise: averaged over 16 iterations the results must track the
//      emulator's parameters (single results carry the noise, which the
//      emulator refreshes only every 35 clocks), and the capacitor code must
//      follow Isat in steps of (Isat >> 5) + 1.
//   2. 200 kHz (208 clocks per state), steady plasma: the mean of 40 results
//      is within 5 %, since the emulator's 37..72 clock response delay ends
//      before the 64-clock averaging window.
//   3. 500 kHz (83 clocks per state): the response delay overlaps the
//      averaging window, so the results must be off; this is the emulator's
//      limit, not the UFLP's.
module tb_uflp_pcr;
  import uflp_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;   // 125 MHz

  // UFLP side
  logic         rst_btn = 1'b0;
  ctl_t         ctl;
  sts_t         sts;
  word_t        adc_i, adc_v, dac_bias, dac_aux;
  logic [6:0]   cap_gpio;
  logic [31:0]  tdata;
  logic         tvalid;
  logic         led_reset;

  // emulator side
  logic         pcr_rst = 1'b1;
  word_t        pcr_bias, pcr_i, pcr_v, isat_now, te_now, vf_now;
  word_t        isat0 = word_t'(2621), te0 = word_t'(1382), vf0 = word_t'(-1152);
  word_t        isat_amp = word_t'(655), te_amp = word_t'(256), vf_amp = '0;
  logic [31:0]  phase_inc = 32'd17174;   // 2^32 / (160 * 1563)

  uflp_top dut (
    .clk, .rst_btn, .ctl, .sts, .adc_i, .adc_v, .dac_bias, .dac_aux, .cap_gpio,
    .gpio_trigger(1'b0), .m_axis_tdata(tdata), .m_axis_tvalid(tvalid),
    .m_axis_tready(1'b1), .led_reset);

  pcr_top u_pcr (
    .clk, .rst(pcr_rst), .adc_bias(pcr_bias), .isat0, .te0, .vf0, .isat_amp,
    .te_amp, .vf_amp, .phase_inc, .noise_en(1'b1), .noise_shift(4'd4),
    .dac_i(pcr_i), .dac_v(pcr_v), .isat_now, .te_now, .vf_now);

  // converters and cables: two registers each way
  word_t bias_d1, i_d1, v_d1;
  always_ff @(posedge clk) begin
    bias_d1  <= dac_bias;  pcr_bias <= bias_d1;
    i_d1     <= pcr_i;     adc_i    <= i_d1;
    v_d1     <= pcr_v;     adc_v    <= v_d1;
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real te_of(input word_t w);  return real'(w) / 512.0;    endfunction
  function automatic real i_of(input word_t w);   return real'(w) / 131072.0; endfunction
  function automatic real v_of(input word_t w);   return real'(w) / 128.0;    endfunction

  task automatic iterations(input int n);
    repeat (n) begin
      @(posedge dut.cycle_done);
      @(negedge clk);
    end
  endtask

  task automatic restart(input int state_cycles);
    ctl.sw_reset     = 1'b1;
    ctl.state_cycles = 16'(state_cycles);
    pcr_rst = 1'b1;
    repeat (2) @(negedge clk);
    ctl.sw_reset = 1'b0;
    pcr_rst = 1'b0;
    wait (!dut.rst);
    @(negedge clk);
  endtask

  // capacitor code at each relay change
  int cap_changes = 0, cap_bad = 0;
  logic [6:0] cap_q = 7'd127;
  always @(negedge clk) begin
    if (!dut.rst && cap_gpio != cap_q) begin
      int want;
      cap_changes++;
      want = (int'(sts.isat) >>> 5) + 1;
      if (want > 127) want = 127;
      if (int'(cap_gpio) - want > 1 || want - int'(cap_gpio) > 1) cap_bad++;
    end
    cap_q <= cap_gpio;
  end

  initial begin
    ctl = '0;
    ctl.dynamic_en   = 1'b1;
    ctl.static_te    = word_t'(1024);
    ctl.i_scale      = 16'd4096;
    ctl.v_scale      = 16'd4096;
    ctl.dac_scale    = 16'd4096;
    ctl.zero_corr_en = 1'b1;
    ctl.cap_shift    = 4'd5;
    ctl.out_mode     = MODE_PARAMS;
    ctl.acq_cycles   = 32'd100_000_000;
    ctl.sw_trigger   = 1'b1;
    wait (!dut.rst);

    // ---- 1. 80 kHz, swept plasma -------------------------------------------
    restart(521);
    iterations(10);
    begin
      real te_m[320], te_t[320], is_m[320], is_t[320];
      real e, te_worst = 0.0, is_worst = 0.0, te_bias = 0.0, vf_worst = 0.0;
      real te_lo = 100.0, te_hi = 0.0;
      int  cap_vals[int];
      cap_changes = 0;
      cap_bad = 0;
      for (int k = 0; k < 320; k++) begin
        iterations(1);
        te_m[k] = te_of(sts.te);    te_t[k] = te_of(te_now);
        is_m[k] = i_of(sts.isat);   is_t[k] = i_of(isat_now);
        te_bias += (te_m[k] - te_t[k]) / 320.0;
        e = v_of(sts.vf) - v_of(vf_now);
        if (e < 0.0) e = -e;
        if (e > vf_worst) vf_worst = e;
        cap_vals[int'(cap_gpio)] = 1;
      end
      // single results carry the emulator noise; compare 16-iteration means
      for (int k = 0; k + 16 <= 320; k++) begin
        real mt, tt, mi, ti;
        mt = 0.0; tt = 0.0; mi = 0.0; ti = 0.0;
        for (int j = k; j < k + 16; j++) begin
          mt += te_m[j] / 16.0;  tt += te_t[j] / 16.0;
          mi += is_m[j] / 16.0;  ti += is_t[j] / 16.0;
        end
        e = mt - tt;
        if (e < 0.0) e = -e;
        if (e > te_worst) te_worst = e;
        e = (mi - ti) / ti;
        if (e < 0.0) e = -e;
        if (e > is_worst) is_worst = e;
        if (mt < te_lo) te_lo = mt;
        if (mt > te_hi) te_hi = mt;
      end
      $display("80 kHz: 16-iteration means: Te worst %f eV, range %f..%f eV, Isat worst %f %%; Te bias %f eV; Vf worst %f V",
               te_worst, te_lo, te_hi, is_worst * 100.0, te_bias, vf_worst);
      $display("80 kHz: %0d capacitor changes, %0d distinct codes, %0d off",
               cap_changes, cap_vals.num(), cap_bad);
      check(te_worst < 0.2, "80 kHz: mean Te tracks within 0.2 eV");
      check(te_bias < 0.1 && te_bias > -0.1, "80 kHz: no Te bias beyond 0.1 eV");
      check(te_lo < 2.5 && te_hi > 2.9, "80 kHz: measured Te follows the swing");
      check(is_worst < 0.05, "80 kHz: mean Isat tracks within 5 %");
      check(vf_worst < 0.5, "80 kHz: Vf within 0.5 V");
      check(cap_changes >= 3 && cap_bad == 0, "80 kHz: capacitor code follows Isat");
      check(cap_vals.num() >= 3, "80 kHz: several quantised capacitor values");
    end

    // ---- 2. 200 kHz, steady plasma ------------------------------------------
    isat_amp = '0; te_amp = '0;
    restart(208);
    iterations(20);
    begin
      real te_mean = 0.0, is_mean = 0.0;
      for (int k = 0; k < 40; k++) begin
        iterations(1);
        te_mean += te_of(sts.te) / 40.0;
        is_mean += i_of(sts.isat) / 40.0;
      end
      $display("200 kHz: mean Te=%f (%f) eV, mean Isat=%f (%f) mA, Vf=%f (%f) V",
               te_mean, te_of(te_now), is_mean * 1e3, i_of(isat_now) * 1e3,
               v_of(sts.vf), v_of(vf_now));
      check(te_mean > 0.95 * te_of(te_now) && te_mean < 1.05 * te_of(te_now),
            "200 kHz: mean Te within 5 %");
      check(is_mean > 0.95 * i_of(isat_now) && is_mean < 1.05 * i_of(isat_now),
            "200 kHz: mean Isat within 5 %");
    end

    // ---- 3. 500 kHz: beyond the emulator ------------------------------------
    restart(83);
    iterations(40);
    $display("500 kHz: Te=%f (%f) eV Isat=%f (%f) mA", te_of(sts.te), te_of(te_now),
             i_of(sts.isat) * 1e3, i_of(isat_now) * 1e3);
    check(!(te_of(sts.te) > 0.9 * te_of(te_now) && te_of(sts.te) < 1.1 * te_of(te_now) &&
            i_of(sts.isat) > 0.9 * i_of(isat_now) && i_of(sts.isat) < 1.1 * i_of(isat_now)),
          "500 kHz: emulator delay spoils the result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
