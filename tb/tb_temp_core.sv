// tb_temp_core: checks the electron temperature solver on random plasmas.
// The positive-state voltage is placed 0.3 to 1.5 Te above Vf and the
// (electron, negative) current follows the probe equation; given the exact
// Isat and Vf, the core must return Te within 2 % (+2 LSB) in 39 clocks.
// Also checked: fallback to the 10 eV initial guess when there is no electron
// current, when V is not above Vf, and when the result is below 50 LSB.
module tb_temp_core;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, done, te_fallback;
  word_t i_avg, v_avg, isat, vf_prev, te;
  int checks = 0, failures = 0;

  temp_core dut (.*);

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real is_a, te_t, vf, b, v, cur, got;
    int lat;
    rst = 1'b1; start = 1'b0; i_avg = '0; v_avg = '0; vf_prev = '0; isat = word_t'(2000);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(te == word_t'(5120), "reset value is the initial guess");
    for (int k = 0; k < 300; k++) begin
      is_a = 0.002 + 0.02 * real'($urandom_range(1000)) / 1000.0;
      te_t = 1.0 + 9.0 * real'($urandom_range(1000)) / 1000.0;
      vf   = -20.0 + 20.0 * real'($urandom_range(1000)) / 1000.0;
      b    = 0.3 + 1.2 * real'($urandom_range(1000)) / 1000.0;
      v    = vf + b * te_t;
      cur  = is_a * (1.0 - $exp(b));
      if (cur * 131072.0 < -8000.0) continue;
      isat    = word_t'($rtoi(is_a * 131072.0));
      vf_prev = word_t'($rtoi(vf * 128.0));
      v_avg   = word_t'($rtoi(v * 128.0));
      i_avg   = word_t'($rtoi(cur * 131072.0));
      run(lat);
      got = real'(te) / 512.0;
      check(lat == 39, "latency 39");
      check(!te_fallback, "no fallback on valid input");
      check(got - te_t <= 0.02 * te_t + 2.0 / 512.0 && te_t - got <= 0.02 * te_t + 2.0 / 512.0,
            $sformatf("b=%f Te %f expected %f", b, got, te_t));
    end
    // no electron current
    i_avg = word_t'(100); v_avg = word_t'(200); vf_prev = '0;
    run(lat);
    check(te == word_t'(5120) && te_fallback, "fallback: no electron current");
    // V not above Vf
    i_avg = word_t'(-100); v_avg = word_t'(-200); vf_prev = '0;
    run(lat);
    check(te == word_t'(5120) && te_fallback, "fallback: V below Vf");
    // result below 50 LSB (0.1 eV): V - Vf = 0.05 V with r ~ 1
    isat = word_t'(2000); i_avg = word_t'(-2000); v_avg = word_t'(6); vf_prev = '0;
    run(lat);
    check(te == word_t'(5120) && te_fallback, "fallback: Te below minimum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
