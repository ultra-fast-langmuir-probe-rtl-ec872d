// tb_uflp_workloads: the complete UFLP, at its default parameters, run through
// the operating cases a probe of this kind is used for. Each case starts from
// a software reset, sets the state length for its parameter rate and drives
// plasma_model with a plasma that varies over time:
//   A. steady DC magnetron plasma at 50 kHz (833 clocks per state);
//   B. DC plasma at 110 kHz (379 clocks per state) with a step in density,
//      as a gas-pressure change would give;
//   C. 80 kHz (521 clocks per state) with a sinusoidal electron temperature,
//      as in a two-board test against an emulated plasma;
//   D. a 200 us HiPIMS pulse at 500 kHz (83 clocks per state), recorded by a
//      count-mode acquisition started on the GPIO trigger at the pulse edge;
//   E. a filament, a 32 us bump in density and temperature, crossing the
//      probe at 500 kHz.
// Each case checks the parameter rate on the stream and how closely the
// results follow the plasma. Mechanisms are counted; a case that did not
// run its mechanism counts a failure.
module tb_uflp_workloads;
  import uflp_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;   // 125 MHz

  logic         rst_btn = 1'b0;
  ctl_t         ctl;
  sts_t         sts;
  word_t        adc_i, adc_v, dac_bias, dac_aux;
  logic [6:0]   cap_gpio;
  logic         gpio_trigger = 1'b0;
  logic [31:0]  tdata;
  logic         tvalid, tready = 1'b1;
  logic         led_reset;

  real isat_a = 0.005, te_ev = 3.0, vf_v = -4.0, ioff_a = 0.0, noise = 0.02;

  uflp_top dut (
    .clk, .rst_btn, .ctl, .sts, .adc_i, .adc_v, .dac_bias, .dac_aux, .cap_gpio,
    .gpio_trigger, .m_axis_tdata(tdata), .m_axis_tvalid(tvalid),
    .m_axis_tready(tready), .led_reset);

  plasma_model u_plasma (
    .clk, .dac_bias, .isat_a, .te_ev, .vf_v, .i_offset_a(ioff_a),
    .noise_frac(noise), .adc_i, .adc_v);

  int checks = 0, failures = 0;
  int n_cases = 0, n_step = 0, n_sine = 0, n_pulse = 0, n_filament = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real got, input real want, input real tol);
    return (got - want <= tol) && (want - got <= tol);
  endfunction

  function automatic real te_of(input word_t w);  return real'(w) / 512.0;    endfunction
  function automatic real i_of(input word_t w);   return real'(w) / 131072.0; endfunction
  function automatic real v_of(input word_t w);   return real'(w) / 128.0;    endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream monitor: spacing of parameter words and words per acquisition
  longint cycle = 0, last_word = -1;
  int     period = 0, spacing_ok = 0, spacing_bad = 0, words = 0;
  always @(negedge clk) begin
    cycle++;
    if (tvalid && tready) begin
      words++;
      if (last_word >= 0) begin
        if (cycle - last_word == longint'(period)) spacing_ok++;
        else spacing_bad++;
      end
      last_word = cycle;
    end
  end

  // one iteration of the three states
  task automatic iterations(input int n);
    repeat (n) begin
      @(posedge dut.cycle_done);
      @(negedge clk);
    end
  endtask

  // software reset, then a new state length and a continuous acquisition
  task automatic restart(input int state_cycles, input string name);
    ctl.sw_trigger   = 1'b0;
    ctl.sw_reset     = 1'b1;
    ctl.state_cycles = 16'(state_cycles);
    repeat (2) @(negedge clk);
    ctl.sw_reset = 1'b0;
    wait (!dut.rst);
    @(negedge clk);
    check(sts.te == word_t'(5120) && cap_gpio == 7'd127, {name, ": reset state"});
    ctl.sw_trigger = 1'b1;
    period      = 3 * state_cycles;
    last_word   = -1;
    spacing_ok  = 0;
    spacing_bad = 0;
    $display("%s: %0d clocks per state, %.1f kHz", name, state_cycles,
             125.0e3 / real'(period));
  endtask

  task automatic check_rate(input string name);
    check(spacing_ok >= 10 && spacing_bad == 0, {name, ": one parameter word per iteration"});
  endtask

  task automatic check_plasma(input string name, input real tol);
    $display("%s: Te=%f (%f) eV Isat=%f (%f) mA Vf=%f (%f) V", name,
             te_of(sts.te), te_ev, i_of(sts.isat) * 1e3, isat_a * 1e3,
             v_of(sts.vf), vf_v);
    check(near(te_of(sts.te), te_ev, tol * te_ev), {name, ": Te"});
    check(near(i_of(sts.isat), isat_a, tol * isat_a), {name, ": Isat"});
    check(near(v_of(sts.vf), vf_v, 0.3), {name, ": Vf"});
  endtask

  initial begin
    ctl = '0;
    ctl.state_cycles = 16'd833;
    ctl.dynamic_en   = 1'b1;
    ctl.static_te    = word_t'(1024);
    ctl.i_scale      = 16'd4096;
    ctl.v_scale      = 16'd4096;
    ctl.dac_scale    = 16'd4096;
    ctl.zero_corr_en = 1'b1;
    ctl.cap_shift    = 4'd5;
    ctl.out_mode     = MODE_PARAMS;
    ctl.acq_cycles   = 32'd100_000_000;
    ctl.aux_sel      = 2'd1;
    wait (!dut.rst);
    @(negedge clk);

    // ---- A: DC plasma, 50 kHz -------------------------------------------
    isat_a = 0.005; te_ev = 3.0; vf_v = -4.0;
    restart(833, "A 50 kHz");
    iterations(20);
    check_rate("A");
    check_plasma("A", 0.08);
    n_cases++;

    // ---- B: 110 kHz, density step ------------------------------------------
    isat_a = 0.008; te_ev = 2.5; vf_v = -5.0;
    restart(379, "B 110 kHz");
    iterations(20);
    check_plasma("B before step", 0.08);
    isat_a = 0.013;
    iterations(20);
    check_plasma("B after step", 0.08);
    check_rate("B");
    n_step++;
    n_cases++;

    // ---- C: 80 kHz, sinusoidal Te ------------------------------------------
    isat_a = 0.020; te_ev = 2.7; vf_v = -9.0;
    restart(521, "C 80 kHz");
    iterations(10);
    begin
      real te_true, err, worst = 0.0;
      real te_min = 100.0, te_max = 0.0;
      // 2.7 eV +- 0.5 eV over 40 iterations (500 us); the result of an
      // iteration answers the plasma of that iteration, one iteration late
      for (int k = 0; k < 80; k++) begin
        te_true = 2.7 + 0.5 * $sin(2.0 * 3.14159265 * real'(k) / 40.0);
        te_ev = te_true;
        iterations(1);
        err = te_of(sts.te) - te_true;
        if (err < 0.0) err = -err;
        if (k > 2 && err > worst) worst = err;
        if (te_of(sts.te) < te_min) te_min = te_of(sts.te);
        if (te_of(sts.te) > te_max) te_max = te_of(sts.te);
      end
      $display("C: worst Te error %f eV, measured swing %f..%f eV", worst, te_min, te_max);
      check(worst < 0.3, "C: Te follows the sinusoid within 0.3 eV");
      check(te_max - te_min > 0.8 && te_max - te_min < 1.2, "C: Te swing near 1 eV");
    end
    check_rate("C");
    n_sine++;
    n_cases++;

    // ---- D: HiPIMS pulse, 500 kHz -----------------------------------------
    isat_a = 0.002; te_ev = 1.5; vf_v = -2.0;
    restart(83, "D 500 kHz");
    iterations(30);
    check_plasma("D before pulse", 0.12);
    check_rate("D");
    // count-mode acquisition of 200 us, started by the trigger at the edge
    ctl.sw_trigger = 1'b0;
    ctl.acq_gated  = 1'b1;       // ends the running acquisition
    repeat (3) @(negedge clk);
    ctl.acq_gated  = 1'b0;
    ctl.acq_cycles = 32'd25_000;
    @(negedge clk);
    begin
      int first_good = -1;
      words = 0;
      isat_a = 0.040; te_ev = 5.0; vf_v = -15.0;
      gpio_trigger = 1'b1;
      for (int k = 0; k < 100; k++) begin
        iterations(1);
        if (first_good < 0 && near(te_of(sts.te), te_ev, 0.1 * te_ev) &&
            near(i_of(sts.isat), isat_a, 0.1 * isat_a))
          first_good = k + 1;
      end
      $display("D: within 10%% after %0d iterations of the pulse", first_good);
      check(first_good > 0 && first_good <= 5, "D: follows the pulse within 10 us");
      check_plasma("D in pulse", 0.08);
      wait (!sts.acq_active);
      gpio_trigger = 1'b0;
      $display("D: %0d words in the 200 us acquisition", words);
      check(words >= 100 && words <= 101, "D: 100 parameter words in 200 us");
    end
    isat_a = 0.002; te_ev = 1.5; vf_v = -2.0;
    iterations(40);
    check_plasma("D after pulse", 0.12);
    n_pulse++;
    n_cases++;

    // ---- E: filament, 32 us, 500 kHz --------------------------------------
    isat_a = 0.010; te_ev = 2.0; vf_v = -5.0;
    ctl.acq_cycles = 32'd100_000_000;
    restart(83, "E filament");
    iterations(30);
    check_plasma("E background", 0.08);
    begin
      real shape, te_peak_meas = 0.0, isat_peak_meas = 0.0;
      // raised-cosine bump, 16 iterations (32 us): Isat x2, Te 2 -> 4 eV
      for (int k = 0; k <= 20; k++) begin
        shape = (k < 16) ? 0.5 - 0.5 * $cos(2.0 * 3.14159265 * real'(k) / 16.0) : 0.0;
        isat_a = 0.010 * (1.0 + shape);
        te_ev  = 2.0 * (1.0 + shape);
        iterations(1);
        if (te_of(sts.te) > te_peak_meas)     te_peak_meas = te_of(sts.te);
        if (i_of(sts.isat) > isat_peak_meas)  isat_peak_meas = i_of(sts.isat);
      end
      $display("E: peak Te %f eV (4.0), peak Isat %f mA (20.0)", te_peak_meas,
               isat_peak_meas * 1e3);
      check(te_peak_meas > 3.6 && te_peak_meas < 4.4, "E: filament Te peak resolved");
      check(isat_peak_meas > 0.018 && isat_peak_meas < 0.022, "E: filament Isat peak resolved");
    end
    iterations(10);
    check_plasma("E after filament", 0.08);
    check_rate("E");
    n_filament++;
    n_cases++;

    // mechanisms
    check(n_cases == 5, "all five cases ran");
    check(n_step == 1 && n_sine == 1 && n_pulse == 1 && n_filament == 1,
          "step, sinusoid, pulse and filament all applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
