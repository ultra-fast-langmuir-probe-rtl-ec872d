// tb_bias_set: checks the three bias levels (-3.325 Te, +0.675 Te, 0) against
// values computed here, that the temperature is latched only on change_bias,
// the static/dynamic temperature selection, the two-clock response to a state
// change, and the slew limit: with ramp_step set, the output never moves by
// more than ramp_step per clock and still reaches the level.
module tb_bias_set;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, change_bias, dynamic_en, slewing;
  bias_state_e state;
  word_t te_calc, te_static, bias, te_used;
  logic [13:0] ramp_step;
  int checks = 0, failures = 0;

  bias_set dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t level(input bias_state_e s, input word_t t);
    real m, v;
    m = (s == ST_NEG) ? -3.325 : (s == ST_POS) ? 0.675 : 0.0;
    v = m * real'(t) / 512.0 * 128.0;       // volts in 2^-7 V
    return word_t'($rtoi(v >= 0.0 ? v : v - 0.999999));   // floor
  endfunction

  task automatic step_state(input bias_state_e s, input bit cb);
    @(negedge clk);
    state = s; change_bias = cb;
    @(negedge clk);
    change_bias = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    word_t prev;
    int maxstep;
    rst = 1'b1; state = ST_ZERO; change_bias = 0; dynamic_en = 1; ramp_step = '0;
    te_calc = word_t'(1382); te_static = word_t'(1024);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(te_used == word_t'(5120), "reset temperature");
    for (int k = 0; k < 50; k++) begin
      te_calc = word_t'($urandom_range(8191, 50));
      step_state(ST_NEG, 1'b1);
      check(te_used == te_calc, "dynamic temperature latched");
      check(bias - level(ST_NEG, te_calc) <= 1 && level(ST_NEG, te_calc) - bias <= 1,
            $sformatf("negative level %0d want %0d", bias, level(ST_NEG, te_calc)));
      te_calc = word_t'(te_calc / 2 + 10);   // must not be used until change_bias
      step_state(ST_POS, 1'b0);
      check(te_used != te_calc, "temperature held over the iteration");
      check(bias - level(ST_POS, te_used) <= 1 && level(ST_POS, te_used) - bias <= 1, "positive level");
      step_state(ST_ZERO, 1'b0);
      check(bias == '0, "zero level");
    end
    // static mode
    dynamic_en = 1'b0;
    step_state(ST_NEG, 1'b1);
    check(te_used == te_static && bias == word_t'((1024 * -13619) >>> 14), "static negative level");
    // slew limit
    dynamic_en = 1'b1;
    te_calc = word_t'(5000);
    ramp_step = 14'd25;
    @(negedge clk);
    state = ST_NEG; change_bias = 1'b1;
    @(negedge clk);
    change_bias = 1'b0;
    maxstep = 0;
    prev = bias;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      if (bias - prev > maxstep) maxstep = bias - prev;
      if (prev - bias > maxstep) maxstep = prev - bias;
      prev = bias;
      if (c == 3) check(slewing, "slewing flagged");
      if (c == 60) state = ST_POS;
    end
    check(maxstep == 25, $sformatf("max step %0d", maxstep));
    check(bias == level(ST_POS, 5000) || bias == level(ST_POS, 5000) + 1, "level reached after ramp");
    check(!slewing, "slewing ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
