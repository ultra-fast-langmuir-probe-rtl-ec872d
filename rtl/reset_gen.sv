// reset_gen: generates the synchronous reset for all cores.
//
// A press of the reset button (or a software reset from the control register)
// asserts rst for RST_CYCLES clocks; while rst is active the device is idle
// and all cores return to their initial values. rst_hang stretches the
// reset indication to HANG_CYCLES clocks (0.1 s at 125 MHz) so that it can
// light an LED visibly. The button is synchronised with two flip-flops and
// acts on its rising edge. The counters power up in reset, so rst is also
// produced at configuration. Pulse lengths are choices of this
// implementation.
module reset_gen #(
  parameter int unsigned RST_CYCLES  = 16,
  parameter int unsigned HANG_CYCLES = 12500000
) (
  input  logic clk,
  input  logic btn,        // asynchronous, active high
  input  logic sw_reset,   // synchronous request, active high
  output logic rst,
  output logic rst_hang
);

  localparam int unsigned RW = $clog2(RST_CYCLES + 1);
  localparam int unsigned HW = $clog2(HANG_CYCLES + 1);

  logic [2:0]    btn_sync = '0;
  logic [RW-1:0] rst_cnt  = RW'(RST_CYCLES);
  logic [HW-1:0] hang_cnt = HW'(HANG_CYCLES);
  logic          request;

  assign request = (btn_sync[1] && !btn_sync[2]) || sw_reset;

  always_ff @(posedge clk) begin
    btn_sync <= {btn_sync[1:0], btn};
    if (request) begin
      rst_cnt  <= RW'(RST_CYCLES);
      hang_cnt <= HW'(HANG_CYCLES);
    end else begin
      if (rst_cnt != '0)  rst_cnt  <= rst_cnt - 1'b1;
      if (hang_cnt != '0) hang_cnt <= hang_cnt - 1'b1;
    end
  end

  assign rst      = (rst_cnt != '0);
  assign rst_hang = (hang_cnt != '0);

endmodule
