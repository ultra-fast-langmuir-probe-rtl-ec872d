// state_averager: smooths the measured current and voltage of each bias state.
//
// The samples inside the averaging window of a state (the last 2^AVG_LOG2
// clocks, marked by avg_window from the FET switch) are summed and the sum is
// divided by the power of two with an arithmetic shift, so the average costs
// no divider. This acts as a low-pass filter on the noisy probe current before
// it enters the solver.
// Interface: accumulation restarts on state_first; on the clock after
// state_last, avg_valid pulses with i_avg / v_avg and the state they belong
// to (avg_state). Both averages are truncated toward minus infinity.
module state_averager #(
  parameter int unsigned AVG_LOG2 = 6
) (
  input  logic                  clk,
  input  logic                  rst,
  input  uflp_pkg::bias_state_e state,
  input  logic                  state_first,
  input  logic                  state_last,
  input  logic                  avg_window,
  input  uflp_pkg::word_t       i_in,
  input  uflp_pkg::word_t       v_in,
  output logic                  avg_valid,
  output uflp_pkg::bias_state_e avg_state,
  output uflp_pkg::word_t       i_avg,
  output uflp_pkg::word_t       v_avg
);

  import uflp_pkg::*;

  localparam int unsigned AW = DW + AVG_LOG2 + 1;

  logic signed [AW-1:0] i_acc, v_acc, i_sum, v_sum;

  always_comb begin
    i_sum = (state_first ? '0 : i_acc) + (avg_window ? AW'(i_in) : '0);
    v_sum = (state_first ? '0 : v_acc) + (avg_window ? AW'(v_in) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_acc     <= '0;
      v_acc     <= '0;
      avg_valid <= 1'b0;
      avg_state <= ST_NEG;
      i_avg     <= '0;
      v_avg     <= '0;
    end else begin
      i_acc     <= i_sum;
      v_acc     <= v_sum;
      avg_valid <= state_last;
      if (state_last) begin
        avg_state <= state;
        i_avg     <= word_t'(i_sum >>> AVG_LOG2);
        v_avg     <= word_t'(v_sum >>> AVG_LOG2);
      end
    end
  end

endmodule
