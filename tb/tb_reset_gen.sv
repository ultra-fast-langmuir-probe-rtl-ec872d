// tb_reset_gen: checks the power-up reset, a button press (synchronised,
// acting on its rising edge; holding the button does not extend the reset),
// a software reset, the reset length of RST_CYCLES and the longer LED hang
// time (shortened to 8 and 40 clocks here).
module tb_reset_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic btn, sw_reset, rst, rst_hang;
  int checks = 0, failures = 0;

  reset_gen #(.RST_CYCLES(8), .HANG_CYCLES(40)) dut (.*);

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

  task automatic measure(output int r, output int h);
    r = 0; h = 0;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      r += rst; h += rst_hang;
    end
  endtask

  initial begin
    int r, h;
    btn = 1'b0; sw_reset = 1'b0;
    #1;
    check(rst && rst_hang, "reset at power-up");
    measure(r, h);
    check(r == 7 && h == 39, $sformatf("power-up lengths %0d/%0d", r, h));
    // button held for 30 clocks
    @(negedge clk); btn = 1'b1;
    r = 0; h = 0;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      if (c == 30) btn = 1'b0;
      r += rst; h += rst_hang;
    end
    check(r == 8 && h == 40, $sformatf("button lengths %0d/%0d", r, h));
    // software reset
    @(negedge clk); sw_reset = 1'b1;
    @(negedge clk); sw_reset = 1'b0;
    check(rst && rst_hang, "software reset");
    measure(r, h);
    check(r == 7 && h == 39, $sformatf("software reset lengths %0d/%0d", r, h));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
