// tb_uflp_1mhz: the complete UFLP built for a 1 MHz parameter rate. The
// averaging window is halved (AVG_LOG2 = 5, 32 samples) so that a state can
// be 42 clocks long (MIN_CYCLES = 41); the 39-clock solvers still finish
// before their results are needed. At 42 clocks per state one iteration takes
// 126 clocks (992 kHz).
// Checked against plasma_model (20 mA, 2.7 eV, -9 V, 2 % noise): convergence
// from the initial guess, one parameter word per 126 clocks, and a 32 us
// filament (Isat x2, Te 2.7 -> 5.4 eV) resolved at its peak.
module tb_uflp_1mhz;
  import uflp_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;   // 125 MHz

  ctl_t         ctl;
  sts_t         sts;
  word_t        adc_i, adc_v, dac_bias, dac_aux;
  logic [6:0]   cap_gpio;
  logic [31:0]  tdata;
  logic         tvalid;
  logic         led_reset;

  real isat_a = 0.020, te_ev = 2.7, vf_v = -9.0;

  uflp_top #(.AVG_LOG2(5), .MIN_CYCLES(41)) dut (
    .clk, .rst_btn(1'b0), .ctl, .sts, .adc_i, .adc_v, .dac_bias, .dac_aux,
    .cap_gpio, .gpio_trigger(1'b0), .m_axis_tdata(tdata),
    .m_axis_tvalid(tvalid), .m_axis_tready(1'b1), .led_reset);

  plasma_model u_plasma (
    .clk, .dac_bias, .isat_a, .te_ev, .vf_v, .i_offset_a(0.0),
    .noise_frac(0.02), .adc_i, .adc_v);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real te_of(input word_t w);  return real'(w) / 512.0;    endfunction
  function automatic real i_of(input word_t w);   return real'(w) / 131072.0; endfunction
  function automatic real v_of(input word_t w);   return real'(w) / 128.0;    endfunction

  function automatic bit near(input real got, input real want, input real tol);
    return (got - want <= tol) && (want - got <= tol);
  endfunction

  task automatic iterations(input int n);
    repeat (n) begin
      @(posedge dut.cycle_done);
      @(negedge clk);
    end
  endtask

  longint cycle = 0, last_word = -1;
  int     spacing_ok = 0, spacing_bad = 0;
  always @(negedge clk) begin
    cycle++;
    if (tvalid) begin
      if (last_word >= 0) begin
        if (cycle - last_word == 126) spacing_ok++;
        else spacing_bad++;
      end
      last_word = cycle;
    end
  end

  initial begin
    int first_good = -1;
    ctl = '0;
    ctl.state_cycles = 16'd42;
    ctl.dynamic_en   = 1'b1;
    ctl.i_scale      = 16'd4096;
    ctl.v_scale      = 16'd4096;
    ctl.dac_scale    = 16'd4096;
    ctl.zero_corr_en = 1'b1;
    ctl.cap_shift    = 4'd5;
    ctl.out_mode     = MODE_PARAMS;
    ctl.acq_cycles   = 32'd100_000_000;
    ctl.sw_trigger   = 1'b1;
    wait (!dut.rst);

    for (int k = 0; k < 40; k++) begin
      iterations(1);
      if (first_good < 0 && near(te_of(sts.te), te_ev, 0.1 * te_ev) &&
          near(i_of(sts.isat), isat_a, 0.1 * isat_a) && near(v_of(sts.vf), vf_v, 0.5))
        first_good = k + 1;
    end
    $display("1 MHz: within 10 %% after %0d iterations; Te=%f Isat=%f mA Vf=%f",
             first_good, te_of(sts.te), i_of(sts.isat) * 1e3, v_of(sts.vf));
    check(first_good > 0 && first_good <= 10, "converges within 10 iterations");
    check(near(te_of(sts.te), te_ev, 0.08 * te_ev), "Te");
    check(near(i_of(sts.isat), isat_a, 0.08 * isat_a), "Isat");
    check(near(v_of(sts.vf), vf_v, 0.3), "Vf");
    $display("word spacing ok=%0d bad=%0d", spacing_ok, spacing_bad);
    check(spacing_ok > 30 && spacing_bad == 0, "one parameter word per 126 clocks");

    // 32 us filament = 32 iterations
    begin
      real shape, te_peak = 0.0, is_peak = 0.0;
      for (int k = 0; k <= 36; k++) begin
        shape  = (k < 32) ? 0.5 - 0.5 * $cos(2.0 * 3.14159265 * real'(k) / 32.0) : 0.0;
        isat_a = 0.020 * (1.0 + shape);
        te_ev  = 2.7 * (1.0 + shape);
        iterations(1);
        if (te_of(sts.te) > te_peak)  te_peak = te_of(sts.te);
        if (i_of(sts.isat) > is_peak) is_peak = i_of(sts.isat);
      end
      $display("filament: peak Te %f eV (5.4), peak Isat %f mA (40.0)", te_peak, is_peak * 1e3);
      check(te_peak > 4.9 && te_peak < 5.9, "filament Te peak resolved");
      check(is_peak > 0.036 && is_peak < 0.044, "filament Isat peak resolved");
    end
    iterations(10);
    check(near(te_of(sts.te), 2.7, 0.08 * 2.7), "Te back to background");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
