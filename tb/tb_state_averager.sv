// tb_state_averager: drives random current/voltage samples through states of
// random length with the averaging window over the last 2^AVG_LOG2 = 64
// clocks, and compares the averages and the state tag with a sum computed
// here. The result must appear one clock after the last sample.
module tb_state_averager;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  bias_state_e state, avg_state;
  logic state_first, state_last, avg_window, avg_valid;
  word_t i_in, v_in, i_avg, v_avg;
  int checks = 0, failures = 0;

  state_averager #(.AVG_LOG2(6)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint si, sv;
    int len;
    bias_state_e st;
    rst = 1'b1; state = ST_NEG; state_first = 0; state_last = 0; avg_window = 0;
    i_in = '0; v_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 60; k++) begin
      st = bias_state_e'(k % 3);
      len = 64 + $urandom_range(40);
      si = 0; sv = 0;
      for (int c = 0; c < len; c++) begin
        state       = st;
        state_first = (c == 0);
        state_last  = (c == len - 1);
        avg_window  = (c >= len - 64);
        // a large offset early in the state must not leak into the average
        i_in = (c < len - 64) ? word_t'(8000) : word_t'($urandom_range(16383) - 8192);
        v_in = (k % 7 == 0) ? word_t'(-8192) : word_t'($urandom_range(16383) - 8192);
        if (avg_window) begin si += i_in; sv += v_in; end
        @(negedge clk);
        checks++;
        if (avg_valid !== (c == len - 1)) begin
          failures++;
          $display("FAIL: avg_valid timing");
        end
      end
      checks++;
      if (i_avg != word_t'(si >>> 6) || v_avg != word_t'(sv >>> 6) || avg_state != st) begin
        failures++;
        $display("FAIL: average %0d/%0d expected %0d/%0d", i_avg, v_avg, si >>> 6, sv >>> 6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
