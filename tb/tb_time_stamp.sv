// tb_time_stamp: checks that the clock and iteration counters count from
// reset and from a clear, and that they saturate instead of wrapping (with an
// 8-bit counter here).
module tb_time_stamp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, clear, iter_done;
  logic [7:0] cycles, iterations;
  int checks = 0, failures = 0;

  time_stamp #(.W(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_it;
    rst = 1'b1; clear = 1'b0; iter_done = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    n_it = 0;
    for (int c = 1; c <= 100; c++) begin
      iter_done = (c % 7 == 0);
      n_it += iter_done;
      @(negedge clk);
      check(cycles == 8'(c) && iterations == 8'(n_it), "counting");
    end
    iter_done = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(cycles == 0 && iterations == 0, "clear");
    iter_done = 1'b1;
    repeat (300) @(negedge clk);
    check(cycles == 8'd255 && iterations == 8'd255, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
