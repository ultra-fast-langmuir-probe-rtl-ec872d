// tb_fet_switch: checks the bias-state sequence negative -> positive -> zero,
// the length of every state, the strobes (first/last clock, averaging window
// of the last 64 clocks, change_bias, cycle_done), the minimum-length clamp
// and that a new state length takes effect at a state boundary.
module tb_fet_switch;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic [15:0] state_cycles;
  bias_state_e state;
  logic state_first, state_last, avg_window, change_bias, cycle_done;
  int checks = 0, failures = 0;

  fet_switch #(.AVG_LOG2(6), .MIN_CYCLES(64)) dut (.*);

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

  // follow one state from its first clock and measure it
  task automatic measure_state(input bias_state_e want, input int len);
    int n, win, firsts, lasts, cb, cd;
    n = 0; win = 0; firsts = 0; lasts = 0; cb = 0; cd = 0;
    do begin
      check(state == want, "state order");
      n++;
      win    += avg_window;
      firsts += state_first;
      lasts  += state_last;
      cb     += change_bias;
      cd     += cycle_done;
      if (state_last) begin
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end while (n < 100000);
    check(n == len, $sformatf("state %s length %0d want %0d", want.name(), n, len));
    check(win == 64, "averaging window of 64 clocks");
    check(firsts == 1 && lasts == 1, "first/last strobes");
    check(cb == (want == ST_NEG ? 1 : 0), "change_bias in negative state only");
    check(cd == (want == ST_ZERO ? 1 : 0), "cycle_done in zero state only");
  endtask

  initial begin
    rst = 1'b1; state_cycles = 16'd83;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(state == ST_NEG && state_first, "starts in negative state");
    for (int k = 0; k < 3; k++) begin
      measure_state(ST_NEG, 83);
      measure_state(ST_POS, 83);
      measure_state(ST_ZERO, 83);
    end
    // too short a request is raised to the minimum
    state_cycles = 16'd10;
    measure_state(ST_NEG, 83);   // takes effect at the boundary
    measure_state(ST_POS, 64);
    measure_state(ST_ZERO, 64);
    state_cycles = 16'd200;
    measure_state(ST_NEG, 64);
    measure_state(ST_POS, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
