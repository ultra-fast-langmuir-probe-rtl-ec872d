// tb_vfloat_core: checks the floating potential solver on random plasmas.
// The zero-state voltage is placed -0.5 to +0.5 Te from Vf and the current
// follows the probe equation; given the exact Isat and Te, the core must
// return Vf within 0.5 % of Te plus 3 LSB, in 39 clocks, and pass the
// zero-state current on to i0_avg with i0_valid one clock after start.
module tb_vfloat_core;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, done, i0_valid;
  word_t i_avg, v_avg, isat, te, vf, i0_avg;
  int checks = 0, failures = 0;

  vfloat_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real is_a, te_t, vf_t, c, v, cur, got, tol;
    int lat;
    bit saw_i0;
    rst = 1'b1; start = 1'b0; i_avg = '0; v_avg = '0; isat = word_t'(2000); te = word_t'(1024);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      is_a = 0.002 + 0.05 * real'($urandom_range(1000)) / 1000.0;
      te_t = 1.0 + 9.0 * real'($urandom_range(1000)) / 1000.0;
      vf_t = -30.0 + 40.0 * real'($urandom_range(1000)) / 1000.0;
      c    = -0.5 + real'($urandom_range(1000)) / 1000.0;
      v    = vf_t + c * te_t;
      cur  = is_a * (1.0 - $exp(c));
      isat  = word_t'($rtoi(is_a * 131072.0));
      te    = word_t'($rtoi(te_t * 512.0));
      v_avg = word_t'($rtoi(v * 128.0));
      i_avg = word_t'($rtoi(cur * 131072.0));
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      saw_i0 = i0_valid && (i0_avg == i_avg);
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      got = real'(vf) / 128.0;
      tol = 0.005 * te_t + 3.0 / 128.0;
      check(lat == 39, "latency 39");
      check(saw_i0, "zero-state current passed on");
      check(got - vf_t <= tol && vf_t - got <= tol,
            $sformatf("c=%f Vf %f expected %f", c, got, vf_t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
