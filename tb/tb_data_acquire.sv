// tb_data_acquire: checks ADC calibration ((adc - offset) * scale / 4096,
// saturated) on both channels with random values and the two-clock latency,
// then the zero-state offset loop: reported zero-state averages accumulate
// into the offset that is subtracted from the current, and disabling the
// correction clears it.
module tb_data_acquire;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, zero_corr_en, i0_valid;
  word_t adc_i, adc_v, i_offset, v_offset, i0_avg, i_cal, v_cal, i_uncorr, i_zero_offset;
  logic [15:0] i_scale, v_scale;
  int checks = 0, failures = 0;

  data_acquire dut (.*);

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

  function automatic word_t cal(input word_t x, input word_t o, input logic [15:0] s);
    longint p;
    p = (longint'(x) - longint'(o)) * longint'(s);
    p = p >>> 12;
    if (p > 8191) p = 8191;
    if (p < -8192) p = -8192;
    return word_t'(p);
  endfunction

  initial begin
    word_t ei, ev;
    rst = 1'b1; zero_corr_en = 1'b1; i0_valid = 0; i0_avg = '0;
    adc_i = '0; adc_v = '0; i_offset = '0; v_offset = '0; i_scale = 16'd4096; v_scale = 16'd4096;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      adc_i = word_t'($urandom_range(16383) - 8192);
      adc_v = word_t'($urandom_range(16383) - 8192);
      i_offset = word_t'($urandom_range(400) - 200);
      v_offset = word_t'($urandom_range(400) - 200);
      i_scale = 16'($urandom_range(16384));
      v_scale = (k % 2 == 0) ? 16'd8192 : 16'($urandom_range(16384));   // x2 divider
      ei = cal(adc_i, i_offset, i_scale);
      ev = cal(adc_v, v_offset, v_scale);
      @(negedge clk);
      @(negedge clk);
      check(i_cal == ei && v_cal == ev && i_uncorr == ei,
            $sformatf("calibration %0d/%0d want %0d/%0d", i_cal, v_cal, ei, ev));
    end
    // offset loop
    i_scale = 16'd4096; i_offset = '0; adc_i = word_t'(300);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      i0_avg = word_t'(40); i0_valid = 1'b1;
      @(negedge clk);
      i0_valid = 1'b0;
    end
    repeat (3) @(negedge clk);
    check(i_zero_offset == word_t'(160), "offset accumulated");
    check(i_cal == word_t'(140) && i_uncorr == word_t'(300), "offset subtracted");
    zero_corr_en = 1'b0;
    repeat (3) @(negedge clk);
    check(i_zero_offset == '0 && i_cal == word_t'(300), "offset cleared when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
