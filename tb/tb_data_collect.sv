// tb_data_collect: checks the four stream word layouts against words packed
// here, one word per clock in voltage/current mode and one per cycle_done in
// the other modes, a count-mode acquisition of exactly acq_cycles clocks, a
// gated acquisition that ends when the trigger falls, and flow control: a
// word held while tready is low stays unchanged and words arriving meanwhile
// are counted as dropped.
module tb_data_collect;
  import uflp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, trig, acq_gated, cycle_done, tready, tvalid, acq_active, acq_start;
  out_mode_e mode;
  logic [31:0] acq_cycles, tdata, words_sent;
  logic [15:0] words_dropped;
  word_t v_cal, i_cal, isat, te, vf, i0_avg;
  logic [6:0] cap_code;
  int checks = 0, failures = 0;

  data_collect dut (.*);

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

  task automatic randomize_inputs();
    v_cal = word_t'($urandom_range(16383) - 8192);
    i_cal = word_t'($urandom_range(16383) - 8192);
    isat  = word_t'($urandom_range(16383) - 8192);
    te    = word_t'($urandom_range(16383) - 8192);
    vf    = word_t'($urandom_range(16383) - 8192);
    i0_avg = word_t'($urandom_range(16383) - 8192);
    cap_code = 7'($urandom);
  endtask

  function automatic logic [31:0] pack();
    case (mode)
      MODE_VI:       return {{2{v_cal[13]}}, v_cal, {2{i_cal[13]}}, i_cal};
      MODE_PARAMS:   return {isat[13:3], te[13:3], vf[13:5], 1'b0};
      MODE_CURRENTS: return {{2{i_cal[13]}}, i_cal, {2{i0_avg[13]}}, i0_avg};
      default:       return {{2{isat[13]}}, isat, 9'd0, cap_code};
    endcase
  endfunction

  initial begin
    logic [31:0] expect_w, held;
    int active_len;
    rst = 1'b1; trig = 0; acq_gated = 0; cycle_done = 0; tready = 1; mode = MODE_VI;
    acq_cycles = 32'd1000;
    randomize_inputs();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(!tvalid && !acq_active, "idle after reset");
    // no words before a trigger
    repeat (5) @(negedge clk);
    check(!tvalid, "no words without acquisition");
    trig = 1'b1;
    @(negedge clk);
    check(acq_active, "acquisition started");
    // every mode
    for (int k = 0; k < 200; k++) begin
      mode = out_mode_e'(k / 50);
      randomize_inputs();
      cycle_done = (k % 5 == 0);
      expect_w = pack();
      @(negedge clk);
      if (mode == MODE_VI || cycle_done)
        check(tvalid && tdata == expect_w, $sformatf("mode %0d word %h want %h", mode, tdata, expect_w));
      else
        check(!tvalid, "no word between iterations");
      cycle_done = 1'b0;
    end
    // flow control
    mode = MODE_VI;
    @(negedge clk);
    tready = 1'b0;
    @(negedge clk);
    held = tdata;
    for (int k = 0; k < 10; k++) begin
      randomize_inputs();
      @(negedge clk);
      check(tvalid && tdata == held, "word held while stalled");
    end
    check(words_dropped >= 10, "dropped words counted");
    tready = 1'b1;
    // count mode: acquisition of exactly acq_cycles clocks
    trig = 1'b0;
    acq_gated = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(!acq_active, "gated acquisition ends with trigger");
    acq_gated = 1'b0;
    acq_cycles = 32'd37;
    trig = 1'b1;
    active_len = 0;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      active_len += acq_active;
    end
    check(active_len == 37, $sformatf("count-mode length %0d", active_len));
    check(words_sent > 100, "words counted as sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
