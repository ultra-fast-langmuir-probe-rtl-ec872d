// tb_pcr_top: checks the plasma emulator on its own.
//   1. Static plasma, no noise: for random Isat, Te, Vf and held biases the
//      voltage output must be bias + Vf exactly and the current must match
//      Isat * (1 - exp(bias / Te)) within the table's bin width; biases far
//      above Vf must saturate the current.
//   2. Timing: a bias change reaches the outputs 37 to 72 clocks later, and
//      results come every 35 clocks.
//   3. Noise: spread within +-Isat * 2^-noise_shift around the noiseless
//      value, a realistic standard deviation, and the same sequence after a
//      reset (fixed seed).
//   4. Perturbation: Te swings between te0 - te_amp and te0 + te_amp with the
//      period set by phase_inc, and never falls below 1 LSB.
module tb_pcr_top;
  import uflp_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;

  logic        rst = 1'b1;
  word_t       bias = '0, isat0, te0, vf0, isat_amp = '0, te_amp = '0, vf_amp = '0;
  logic [31:0] phase_inc = '0;
  logic        noise_en = 1'b0;
  logic [3:0]  noise_shift = 4'd4;
  word_t       dac_i, dac_v, isat_now, te_now, vf_now;

  pcr_top dut (
    .clk, .rst, .adc_bias(bias), .isat0, .te0, .vf0, .isat_amp, .te_amp,
    .vf_amp, .phase_inc, .noise_en, .noise_shift, .dac_i, .dac_v, .isat_now,
    .te_now, .vf_now);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  endtask

  function automatic int sat14(input real x);
    if (x > 8191.0) return 8191;
    if (x < -8192.0) return -8192;
    return $rtoi(x);
  endfunction

  int n_static = 0;

  initial begin
    int hold_bad = 0;
    isat0 = word_t'(2000); te0 = word_t'(1382); vf0 = word_t'(-1152);
    do_reset();

    // ---- 1. static plasma -------------------------------------------------
    for (int k = 0; k < 300; k++) begin
      real x, want, tol;
      int  b;
      isat0 = word_t'($urandom_range(6000, 300));
      te0   = word_t'($urandom_range(4096, 256));
      vf0   = word_t'(int'($urandom_range(4000)) - 2000);
      // bias from 12 Te below to 3.9 Te above the floating potential
      x = -12.0 + 15.9 * real'($urandom_range(10000)) / 10000.0;
      b = $rtoi(x * real'(te0) / 4.0);
      if (b > 8191) b = 8191;
      if (b < -8192) b = -8192;
      bias = word_t'(b);
      repeat (80) @(negedge clk);
      x    = 4.0 * real'(bias) / real'(te0);
      want = real'(isat0) * (1.0 - $exp(x));
      tol  = 3.0 + real'(isat0) * $exp(x) * 1.1 / 64.0;
      check(int'(dac_v) == sat14(real'(bias) + real'(vf0)), "voltage = bias + Vf");
      if (want > -8100.0) begin
        check(real'(dac_i) - want <= tol && want - real'(dac_i) <= tol,
              $sformatf("current isat=%0d te=%0d bias=%0d got %0d want %f",
                        isat0, te0, bias, dac_i, want));
        n_static++;
      end else begin
        check(dac_i < word_t'(-7900), "large electron current saturates");
      end
    end
    check(n_static > 200, "most static points in range");
    // far above Vf: clamped table and saturated current
    isat0 = word_t'(6000); te0 = word_t'(512); bias = word_t'(2000);
    repeat (80) @(negedge clk);
    check(dac_i == word_t'(-8192), "current saturates for bias >> Te");

    // ---- 2. timing ----------------------------------------------------------
    begin
      int t0, t1, lat;
      int last = -1, spacing_bad = 0, spacing_n = 0;
      isat0 = word_t'(2000); te0 = word_t'(1024); vf0 = '0;
      bias = word_t'(-1000);
      repeat (100) @(negedge clk);
      bias = word_t'(-2000);
      lat = 0;
      while (dac_v != word_t'(-2000) && lat < 200) begin
        @(negedge clk);
        lat++;
      end
      $display("bias-to-output delay %0d clocks", lat);
      check(lat >= 37 && lat <= 72, "bias reaches the outputs in 37..72 clocks");
      for (int c = 0; c < 1000; c++) begin
        @(negedge clk);
        if (dut.lut_valid) begin
          if (last >= 0) begin
            spacing_n++;
            if (c - last != 35) spacing_bad++;
          end
          last = c;
        end
      end
      check(spacing_n > 20 && spacing_bad == 0, "one result every 35 clocks");
    end

    // ---- 3. noise -------------------------------------------------------------
    begin
      int   seq_a[20], seq_b[20];
      real  base, sum = 0.0, sq = 0.0, mean, sd, worst = 0.0;
      isat0 = word_t'(4000); te0 = word_t'(1024); bias = word_t'(-512);
      do_reset();
      repeat (80) @(negedge clk);
      base = real'(dac_i);        // noiseless value
      noise_en = 1'b1;
      do_reset();
      for (int s = 0; s < 400; s++) begin
        @(posedge dut.lut_valid);
        @(negedge clk);
        @(negedge clk);
        if (s < 20) seq_a[s] = int'(dac_i);
        if (s >= 2) begin
          real d;
          d = real'(dac_i) - base;
          sum += d;
          sq  += d * d;
          if (d > worst) worst = d;
          if (-d > worst) worst = -d;
        end
      end
      mean = sum / 398.0;
      sd   = $sqrt(sq / 398.0 - mean * mean);
      $display("noise: mean %f sd %f worst %f (peak %0d)", mean, sd, worst, 4000 >> 4);
      check(worst <= 252.0, "noise within the set peak");
      check(sd > 100.0 && sd < 190.0, "noise spread is that of a uniform source");
      check(mean > -30.0 && mean < 30.0, "noise has no offset");
      do_reset();
      for (int s = 0; s < 20; s++) begin
        @(posedge dut.lut_valid);
        @(negedge clk);
        @(negedge clk);
        seq_b[s] = int'(dac_i);
      end
      begin
        int same = 0;
        for (int s = 2; s < 20; s++) if (seq_a[s] == seq_b[s]) same++;
        check(same == 18, "noise sequence repeats after reset");
      end
      noise_en = 1'b0;
    end

    // ---- 4. perturbation --------------------------------------------------------
    begin
      int tmin = 100000, tmax = -100000, up_last = -1, periods_bad = 0, periods = 0;
      int prev;
      te0 = word_t'(2000); te_amp = word_t'(500);
      isat0 = word_t'(3000); isat_amp = word_t'(1000);
      phase_inc = 32'd429497;      // 2^32 / 10000: period 10000 clocks
      do_reset();
      prev = int'(te_now);
      for (int c = 0; c < 40000; c++) begin
        @(negedge clk);
        if (int'(te_now) < tmin) tmin = int'(te_now);
        if (int'(te_now) > tmax) tmax = int'(te_now);
        if (prev < 2000 && int'(te_now) >= 2000 && c > 100) begin
          if (up_last >= 0) begin
            periods++;
            if (c - up_last < 9990 || c - up_last > 10010) periods_bad++;
          end
          up_last = c;
        end
        prev = int'(te_now);
      end
      $display("perturbation: Te %0d..%0d, %0d periods", tmin, tmax, periods);
      check(tmin >= 1497 && tmin <= 1503 && tmax >= 2497 && tmax <= 2503,
            "Te swings te0 +- te_amp");
      check(periods >= 2 && periods_bad == 0, "perturbation period from phase_inc");
      // Te never reaches zero
      te0 = word_t'(100); te_amp = word_t'(500);
      tmin = 100000;
      for (int c = 0; c < 12000; c++) begin
        @(negedge clk);
        if (int'(te_now) < tmin) tmin = int'(te_now);
      end
      check(tmin == 1, "Te held at 1 LSB or more");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
