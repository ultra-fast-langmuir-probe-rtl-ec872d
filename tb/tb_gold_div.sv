// tb_gold_div: checks the Goldschmidt divider against exact integer division.
// Random and corner-case operands (the 12/35 worked example, den = 1, full
// scale, den = 0) are divided; the quotient must be within one LSB (plus a
// relative 2^-16) of floor(num * 256 / den), or saturated where that does not
// fit. The latency from start to done must be 2*ITER + 2 = 34 clocks.
module tb_gold_div;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, busy, done;
  logic [15:0] num, den, quot;
  int checks = 0, failures = 0;

  gold_div #(.NW(16), .DENW(16), .QW(16), .QF(8), .ITER(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [15:0] n, input logic [15:0] d);
    longint exact, got;
    int lat;
    @(negedge clk);
    num = n; den = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    got = longint'(quot);
    exact = (d == 0) ? 65535 : (longint'(n) * 256) / longint'(d);
    if (exact > 65535) exact = 65535;
    checks++;
    if (got - exact > 1 + exact / 65536 || exact - got > 1 + exact / 65536) begin
      failures++;
      $display("FAIL: %0d/%0d -> %0d expected %0d", n, d, got, exact);
    end
    checks++;
    if (lat != 34) begin
      failures++;
      $display("FAIL: latency %0d", lat);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; num = '0; den = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    divide(12, 35);
    divide(1, 1);
    divide(65535, 1);
    divide(65535, 65535);
    divide(100, 0);
    divide(0, 1234);
    divide(5000, 3);
    for (int k = 0; k < 300; k++) divide(16'($urandom), 16'($urandom_range(65535, 1)));
    for (int k = 0; k < 100; k++) divide(16'($urandom_range(8191)), 16'($urandom_range(8191, 50)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
