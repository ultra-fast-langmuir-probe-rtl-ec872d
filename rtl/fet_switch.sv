// fet_switch: bias-state sequencer (the "FET switch" / "FET drive" core).
//
// Steps forever through the three bias states in the fixed order negative,
// positive, zero, holding each for state_cycles clocks (a control register
// field, so the output rate can be changed at run time). Every other core
// takes its timing from the strobes produced here:
//   state_first  - first clock of a state
//   state_last   - last clock of a state
//   avg_window   - high during the last 2^AVG_LOG2 clocks of a state, the
//                  samples that are averaged (earlier samples are left to
//                  settle after the bias step)
//   change_bias  - first clock of the negative state: a new temperature is
//                  taken for the whole three-state iteration
//   cycle_done   - last clock of the zero state: an iteration is complete
// state_cycles below MIN_CYCLES is raised to MIN_CYCLES so that the averaging
// window and the solver latency always fit in one state. A new state_cycles
// value takes effect at the next state boundary. The state order follows the
// reference design; the window placement and minimum length are choices of
// this implementation. Reset starts a fresh negative state.
module fet_switch #(
  parameter int unsigned AVG_LOG2   = 6,
  parameter int unsigned MIN_CYCLES = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [15:0]           state_cycles,
  output uflp_pkg::bias_state_e state,
  output logic                  state_first,
  output logic                  state_last,
  output logic                  avg_window,
  output logic                  change_bias,
  output logic                  cycle_done
);

  import uflp_pkg::*;

  logic [15:0] cnt;     // clocks elapsed in the current state
  logic [15:0] len;     // length of the current state
  logic [15:0] len_req;

  always_comb len_req = (state_cycles < 16'(MIN_CYCLES)) ? 16'(MIN_CYCLES) : state_cycles;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_NEG;
      cnt   <= '0;
      len   <= len_req;
    end else if (cnt == len - 16'd1) begin
      cnt <= '0;
      len <= len_req;
      unique case (state)
        ST_NEG:  state <= ST_POS;
        ST_POS:  state <= ST_ZERO;
        default: state <= ST_NEG;
      endcase
    end else begin
      cnt <= cnt + 16'd1;
    end
  end

  always_comb begin
    state_first = (cnt == '0);
    state_last  = (cnt == len - 16'd1);
    avg_window  = ({16'd0, cnt} >= {16'd0, len} - 32'(1 << AVG_LOG2));
    change_bias = state_first && (state == ST_NEG);
    cycle_done  = state_last && (state == ST_ZERO);
  end

endmodule
