// tb_cap_switch: checks the capacitor code (Isat >> cap_shift) + 1, clamped to
// 1..127, the all-closed code 127 after reset, and the relay hold time: a new
// code is applied at most once per HOLD_CYCLES (shortened to 50 here).
module tb_cap_switch;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, isat_valid, changed;
  word_t isat;
  logic [3:0] cap_shift;
  logic [6:0] cap_code;
  int checks = 0, failures = 0;

  cap_switch #(.HOLD_CYCLES(50)) dut (.*);

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

  function automatic int expect_code(input word_t i, input int sh);
    int c;
    c = (i > 0) ? (int'(i) >> sh) + 1 : 1;
    return (c > 127) ? 127 : c;
  endfunction

  task automatic offer(input word_t i);
    @(negedge clk);
    isat = i; isat_valid = 1'b1;
    @(negedge clk);
    isat_valid = 1'b0;
  endtask

  initial begin
    int e;
    rst = 1'b1; isat_valid = 0; isat = '0; cap_shift = 4'd5;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(cap_code == 7'd127, "reset code 127");
    for (int k = 0; k < 100; k++) begin
      cap_shift = 4'($urandom_range(8));
      isat = word_t'($urandom_range(16383) - 8192);
      e = expect_code(isat, cap_shift);
      begin
        logic [6:0] old;
        bit applied;
        old = cap_code;
        offer(isat);
        applied = changed;
        check(cap_code == 7'(e), $sformatf("code %0d want %0d", cap_code, e));
        check(applied == (old != 7'(e)), "changed strobe");
        // within the hold time a different code is refused
        if (applied) begin
          offer(word_t'(isat > 0 ? -5 : 8191));
          check(cap_code == 7'(e), "hold time respected");
        end
      end
      repeat (55) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
