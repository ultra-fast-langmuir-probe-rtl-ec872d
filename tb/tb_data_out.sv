// tb_data_out: checks the DAC calibration (x * scale / 4096 + offset,
// saturated) on the bias channel and on each selection of the auxiliary
// channel, with one clock of latency.
module tb_data_out;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  word_t bias, isat, te, vf, i_meas, dac_offset, dac_bias, dac_aux;
  logic [1:0] aux_sel;
  logic [15:0] dac_scale;
  int checks = 0, failures = 0;

  data_out dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t cal(input word_t x, input logic [15:0] s, input word_t o);
    longint p;
    p = (longint'(x) * longint'(s)) >>> 12;
    p = p + longint'(o);
    if (p > 8191) p = 8191;
    if (p < -8192) p = -8192;
    return word_t'(p);
  endfunction

  initial begin
    word_t sel;
    rst = 1'b1; bias = '0; isat = '0; te = '0; vf = '0; i_meas = '0; aux_sel = '0;
    dac_scale = 16'd4096; dac_offset = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 400; k++) begin
      bias = word_t'($urandom_range(16383) - 8192);
      isat = word_t'($urandom_range(16383) - 8192);
      te   = word_t'($urandom_range(16383) - 8192);
      vf   = word_t'($urandom_range(16383) - 8192);
      i_meas = word_t'($urandom_range(16383) - 8192);
      aux_sel = 2'(k);
      dac_scale = (k % 3 == 0) ? 16'd4096 : 16'($urandom_range(16384));
      dac_offset = word_t'($urandom_range(2000) - 1000);
      sel = (aux_sel == 0) ? isat : (aux_sel == 1) ? te : (aux_sel == 2) ? vf : i_meas;
      @(negedge clk);
      checks++;
      if (dac_bias != cal(bias, dac_scale, dac_offset) || dac_aux != cal(sel, dac_scale, dac_offset)) begin
        failures++;
        $display("FAIL: dac %0d/%0d", dac_bias, dac_aux);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
