// tb_isat_core: checks the ion saturation current solver on random plasmas.
// For a chosen Isat, Te and Vf, the negative-state voltage is placed a
// random 0.5 to 8 Te below Vf and the current follows the probe equation;
// the core, given the exact Te and Vf, must return Isat within 2 % (+2 LSB).
// Also checked: an input with V above Vf leaves Isat unchanged, and the
// latency from start to done is 39 clocks.
module tb_isat_core;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, done;
  word_t i_avg, v_avg, vf_prev, te_prev, isat;
  int checks = 0, failures = 0;

  isat_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int lat);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    real is_a, te, vf, a, v, cur;
    int lat;
    word_t isat_before;
    rst = 1'b1; start = 1'b0; i_avg = '0; v_avg = '0; vf_prev = '0; te_prev = word_t'(512);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      is_a = 0.002 + 0.05 * real'($urandom_range(1000)) / 1000.0;
      te   = 1.0 + 9.0 * real'($urandom_range(1000)) / 1000.0;
      vf   = -20.0 + 20.0 * real'($urandom_range(1000)) / 1000.0;
      a    = 0.5 + 7.5 * real'($urandom_range(1000)) / 1000.0;
      v    = vf - a * te;
      if (v < -63.0) continue;
      cur  = is_a * (1.0 - $exp(-a));
      te_prev = word_t'($rtoi(te * 512.0));
      vf_prev = word_t'($rtoi(vf * 128.0));
      v_avg   = word_t'($rtoi(v * 128.0));
      i_avg   = word_t'($rtoi(cur * 131072.0));
      run(lat);
      checks++;
      if (lat != 39) begin failures++; $display("FAIL: latency %0d", lat); end
      checks++;
      if (real'(isat) / 131072.0 - is_a > 0.02 * is_a + 2.0 / 131072.0 ||
          is_a - real'(isat) / 131072.0 > 0.02 * is_a + 2.0 / 131072.0) begin
        failures++;
        $display("FAIL: a=%f Isat %f mA expected %f mA", a, real'(isat) / 131.072, is_a * 1e3);
      end
    end
    // V above the floating potential: no solution, Isat kept
    isat_before = isat;
    vf_prev = word_t'(-1000); v_avg = word_t'(-500); i_avg = word_t'(100);
    run(lat);
    checks++;
    if (isat != isat_before || lat != 1) begin failures++; $display("FAIL: guard"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
