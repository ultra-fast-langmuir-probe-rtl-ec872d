// tb_uflp_top: end-to-end test of the complete UFLP at its default parameters.
//
// The design drives plasma_model, a behavioural probe in a plasma with known
// Isat, Te and Vf, and must find those values from its own bias and the
// returned current. The test follows one acquisition through these phases:
//   1. start from reset with a 10 eV guess against a 2.7 eV, 20 mA, -9 V
//      plasma carrying a 0.5 mA coupling error current, with noise;
//      check convergence of Te, Isat and Vf, the zero-state offset
//      correction, the capacitor code and the parameter words on the stream,
//      including their 249-clock spacing (83 clocks per state, ~500 kHz);
//   2. step the plasma to 4 eV / -12 V and check that the design follows;
//   3. static-temperature mode: bias levels from the host temperature;
//   4. bias ramp (slew limit) active;
//   5. the other three stream layouts, a stalled stream (dropped words) and a
//      gated acquisition;
//   6. a reset button press.
// Every mechanism is counted, and one that never happened counts a failure.
module tb_uflp_top;
  import uflp_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;   // 125 MHz

  logic         rst_btn;
  ctl_t         ctl;
  sts_t         sts;
  word_t        adc_i, adc_v, dac_bias, dac_aux;
  logic [6:0]   cap_gpio;
  logic         gpio_trigger;
  logic [31:0]  tdata;
  logic         tvalid, tready;
  logic         led_reset;

  real isat_a = 0.020, te_ev = 2.7, vf_v = -9.0, ioff_a = 0.0005, noise = 0.02;

  uflp_top dut (
    .clk, .rst_btn, .ctl, .sts, .adc_i, .adc_v, .dac_bias, .dac_aux, .cap_gpio,
    .gpio_trigger, .m_axis_tdata(tdata), .m_axis_tvalid(tvalid),
    .m_axis_tready(tready), .led_reset);

  plasma_model u_plasma (
    .clk, .dac_bias, .isat_a, .te_ev, .vf_v, .i_offset_a(ioff_a),
    .noise_frac(noise), .adc_i, .adc_v);

  int checks = 0, failures = 0;
  int n_fallback = 0, n_cap_change = 0, n_param_words = 0, n_slew = 0;
  int n_dropped = 0, n_gated_end = 0, n_offset_corr = 0, n_static = 0;
  int n_track = 0, n_reset = 0, n_modes = 0;

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

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic       fb_q;
  logic [6:0] cap_q;
  always @(negedge clk) begin
    fb_q  <= sts.te_fallback;
    cap_q <= cap_gpio;
    if (sts.te_fallback && !fb_q) n_fallback++;
    if (cap_gpio != cap_q && !dut.rst) n_cap_change++;
    if (dut.u_bias.slewing) n_slew++;
  end

  // parameter-word spacing on the stream
  longint last_word_cycle = -1, cycle = 0;
  int     spacing_bad = 0, spacing_ok = 0;
  always @(negedge clk) begin
    cycle++;
    if (tvalid && tready && ctl.out_mode == MODE_PARAMS) begin
      n_param_words++;
      if (last_word_cycle >= 0) begin
        if (cycle - last_word_cycle == 249) spacing_ok++;
        else spacing_bad++;
      end
      last_word_cycle = cycle;
    end
  end

  task automatic run_iterations(input int n);
    repeat (n * 249) @(posedge clk);
    @(negedge clk);
  endtask

  function automatic real te_of(input word_t w);  return real'(w) / 512.0;    endfunction
  function automatic real i_of(input word_t w);   return real'(w) / 131072.0; endfunction
  function automatic real v_of(input word_t w);   return real'(w) / 128.0;    endfunction

  task automatic check_converged(input string tag);
    $display("%s: Te=%f eV Isat=%f mA Vf=%f V cap=%0d", tag, te_of(sts.te),
             i_of(sts.isat) * 1e3, v_of(sts.vf), cap_gpio);
    check(near(te_of(sts.te), te_ev, 0.08 * te_ev), {tag, " Te"});
    check(near(i_of(sts.isat), isat_a, 0.08 * isat_a), {tag, " Isat"});
    check(near(v_of(sts.vf), vf_v, 0.3), {tag, " Vf"});
  endtask

  initial begin
    int iters_to_converge;
    word_t neg_expect;
    logic [31:0] w;

    ctl = '0;
    ctl.state_cycles = 16'd83;
    ctl.dynamic_en   = 1'b1;
    ctl.static_te    = word_t'(1024);
    ctl.i_scale      = 16'd4096;
    ctl.v_scale      = 16'd4096;
    ctl.dac_scale    = 16'd4096;
    ctl.zero_corr_en = 1'b1;
    ctl.cap_shift    = 4'd5;
    ctl.out_mode     = MODE_PARAMS;
    ctl.acq_cycles   = 32'd1_000_000;
    ctl.aux_sel      = 2'd1;
    rst_btn      = 1'b0;
    gpio_trigger = 1'b0;
    tready       = 1'b1;

    // power-up reset
    wait (!dut.rst);
    repeat (5) @(posedge clk);
    @(negedge clk);
    ctl.sw_trigger = 1'b1;

    // ---- phase 1: convergence from the initial guess --------------------
    iters_to_converge = -1;
    for (int k = 0; k < 200; k++) begin
      run_iterations(1);
      if (iters_to_converge < 0 && near(te_of(sts.te), te_ev, 0.1 * te_ev) &&
          near(v_of(sts.vf), vf_v, 0.5))
        iters_to_converge = k + 1;
    end
    $display("converged to 10%% in %0d iterations", iters_to_converge);
    check(iters_to_converge > 0 && iters_to_converge <= 50, "convergence within 50 iterations (100 us)");
    check_converged("phase1");
    // the coupling error current is measured and removed
    $display("zero-state offset = %f mA", i_of(dut.u_acq.i_zero_offset) * 1e3);
    check(near(i_of(dut.u_acq.i_zero_offset), ioff_a, 0.2 * ioff_a), "zero-state offset");
    if (dut.u_acq.i_zero_offset != 0) n_offset_corr++;
    // capacitor code follows Isat: (Isat >> 5) + 1
    // (the relays hold a code for 1 ms, so it may lag Isat slightly)
    check(near(real'(cap_gpio), real'((sts.isat >>> 5) + 1), 6.0), "capacitor code");
    // the last parameter word matches the status registers
    w = tdata;
    check(w[31:21] == 11'(sts.isat >>> 3) && w[20:10] == 11'(sts.te >>> 3) &&
          w[9:1] == 9'(sts.vf >>> 5), "parameter word layout");
    $display("word spacing ok=%0d bad=%0d", spacing_ok, spacing_bad);
    check(spacing_ok > 100 && spacing_bad == 0, "one parameter word per 249 clocks");
    // auxiliary DAC carries Te
    check(dac_aux == sts.te, "aux DAC = Te");

    // ---- phase 2: follow a step in the plasma ---------------------------
    te_ev = 4.0; vf_v = -12.0;
    run_iterations(150);
    check_converged("phase2");
    n_track++;

    // ---- phase 3: static temperature mode ---------------------------------
    ctl.dynamic_en = 1'b0;
    run_iterations(3);
    neg_expect = word_t'((1024 * -13619) >>> 14);
    wait (dut.u_fet.state == ST_NEG && dut.u_fet.state_last);
    $display("static mode negative bias %0d (expect %0d)", dac_bias, neg_expect);
    check(dac_bias == neg_expect, "static-mode negative bias");
    wait (dut.u_fet.state == ST_POS && dut.u_fet.state_last);
    check(dac_bias == word_t'((1024 * 2765) >>> 14), "static-mode positive bias");
    n_static++;
    ctl.dynamic_en = 1'b1;
    run_iterations(100);
    check_converged("phase3");

    // ---- phase 4: bias ramp ----------------------------------------------
    ctl.ramp_step = 14'd128;
    for (int k = 0; k < 50; k++) begin
      run_iterations(1);
    end
    check_converged("phase4 ramp");
    ctl.ramp_step = 14'd0;

    // ---- phase 5: stream layouts, stall and gated acquisition ------------
    ctl.out_mode = MODE_VI;
    repeat (10) @(posedge clk);
    @(negedge clk);
    begin
      logic [31:0] expect_w;
      int vi_ok = 0;
      for (int k = 0; k < 20; k++) begin
        expect_w = {16'(dut.u_acq.v_cal), 16'(dut.u_acq.i_cal)};
        @(negedge clk);
        if (tvalid && tdata == expect_w) vi_ok++;
      end
      check(vi_ok == 20, "VI mode: one voltage/current word every clock");
    end
    n_modes++;
    tready = 1'b0;
    repeat (20) @(posedge clk);
    @(negedge clk);
    check(sts.words_dropped > 0, "dropped words counted while stalled");
    if (sts.words_dropped > 0) n_dropped++;
    tready = 1'b1;
    ctl.out_mode = MODE_CURRENTS;
    wait (dut.u_fet.cycle_done);
    @(posedge clk); @(negedge clk);
    check(tdata[15:0] == 16'(dut.u_acq.i_zero_offset), "current/average word");
    n_modes++;
    ctl.out_mode = MODE_ISAT_CAP;
    wait (dut.u_fet.cycle_done);
    @(posedge clk); @(negedge clk);
    check(tdata[31:16] == 16'(sts.isat) && tdata[6:0] == cap_gpio, "Isat/capacitor word");
    n_modes++;
    // count-mode acquisition of 100 clocks on a software trigger pulse
    ctl.sw_trigger = 1'b0;
    ctl.acq_gated  = 1'b1;          // ends the running acquisition
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!sts.acq_active, "acquisition stopped");
    ctl.acq_gated  = 1'b0;
    ctl.acq_cycles = 32'd100;
    ctl.sw_trigger = 1'b1;
    repeat (50) @(posedge clk);
    @(negedge clk);
    check(sts.acq_active && sts.timestamp >= 32'd48 && sts.timestamp <= 32'd52,
          "count-mode acquisition running, timestamp since start");
    repeat (60) @(posedge clk);
    @(negedge clk);
    check(!sts.acq_active, "count-mode acquisition ended after acq_cycles");
    ctl.sw_trigger = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    // gated acquisition on the GPIO trigger
    ctl.acq_gated = 1'b1;
    gpio_trigger = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(sts.acq_active, "gated acquisition started");
    repeat (500) @(posedge clk);
    @(negedge clk);
    check(sts.acq_active, "gated acquisition holds while trigger is high");
    gpio_trigger = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!sts.acq_active, "gated acquisition ended");
    if (!sts.acq_active) n_gated_end++;

    // ---- phase 6: reset button ------------------------------------------
    rst_btn = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_btn = 1'b0;
    check(dut.rst && led_reset, "reset asserted");
    wait (!dut.rst);
    @(negedge clk);
    check(sts.te == word_t'(5120) && cap_gpio == 7'd127, "reset values");
    n_reset++;
    run_iterations(100);
    check_converged("after reset");

    // ---- every mechanism must have happened ------------------------------
    $display("fallback=%0d cap_change=%0d param_words=%0d slew=%0d dropped=%0d gated=%0d offset=%0d static=%0d track=%0d reset=%0d modes=%0d",
             n_fallback, n_cap_change, n_param_words, n_slew, n_dropped, n_gated_end,
             n_offset_corr, n_static, n_track, n_reset, n_modes);
    check(n_fallback > 0, "Te fallback to initial guess happened");
    check(n_cap_change > 0, "capacitor switch happened");
    check(n_param_words > 0, "parameter words streamed");
    check(n_slew > 0, "bias slew limiting happened");
    check(n_dropped > 0, "stream stall happened");
    check(n_gated_end > 0, "gated acquisition happened");
    check(n_offset_corr > 0, "zero-state offset correction happened");
    check(n_static > 0, "static mode happened");
    check(n_track > 0, "tracking happened");
    check(n_reset > 0, "reset happened");
    check(n_modes == 3, "all stream layouts used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
