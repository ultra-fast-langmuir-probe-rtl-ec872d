// tb_func_lut: checks the five function tables against the formulas they
// stand for, evaluated here with real arithmetic at the bin centres, and the
// one-clock read latency. Every address of every table is read.
module tb_func_lut;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [9:0]  addr;
  logic [17:0] d0, d1, d2, d3, d4;
  int checks = 0, failures = 0;

  func_lut #(.FUNC(0)) u0 (.clk, .addr, .data(d0));
  func_lut #(.FUNC(1)) u1 (.clk, .addr, .data(d1));
  func_lut #(.FUNC(2)) u2 (.clk, .addr, .data(d2));
  func_lut #(.FUNC(3)) u3 (.clk, .addr, .data(d3));
  func_lut #(.FUNC(4)) u4 (.clk, .addr, .data(d4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expect_val(input int f, input int i);
    real x, y;
    case (f)
      0: begin x = (real'(i) + 0.5) / 64.0;        y = 1.0 / (1.0 - $exp(-x)); end
      1: begin x = (real'(i) + 0.5) / 128.0;       y = 1.0 / $ln(1.0 + x);     end
      2: begin x = -1.0 + (real'(i) + 0.5) / 256.0; y = $ln(1.0 + x);         end
      3: begin x = -12.0 + (real'(i) + 0.5) / 64.0; y = 1.0 - $exp(x);        end
      default: y = $sin(2.0 * 3.14159265358979 * real'(i) / 1024.0);
    endcase
    y = y * 2048.0;
    if (f < 2 && y > 262143.0) y = 262143.0;
    if (f >= 2 && y > 131071.0) y = 131071.0;
    if (f >= 2 && y < -131072.0) y = -131072.0;
    return y;
  endfunction

  task automatic cmp(input int f, input int i, input real got);
    real e;
    e = expect_val(f, i);
    checks++;
    if (got - e > 1.0 || e - got > 1.0) begin
      failures++;
      $display("FAIL: table %0d addr %0d got %f expected %f", f, i, got, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      addr = 10'(i);
      @(posedge clk);
      #1;
      cmp(0, i, real'(d0));
      cmp(1, i, real'(d1));
      cmp(2, i, real'($signed(d2)));
      cmp(3, i, real'($signed(d3)));
      cmp(4, i, real'($signed(d4)));
    end
    // latency: data changes only at the clock edge after the address
    @(negedge clk);
    addr = 10'd0;
    @(posedge clk); #1;
    @(negedge clk);
    addr = 10'd1023;
    #1;
    checks++;
    if (d0 != 18'($rtoi(expect_val(0, 0) + 0.5))) begin
      failures++;
      $display("FAIL: table output changed before the clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
