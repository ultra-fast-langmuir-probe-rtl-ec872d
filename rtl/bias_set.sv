// bias_set: generates the probe bias for the current bias state.
//
// The three bias levels are fixed multiples of the electron temperature,
// chosen so that the negative and positive states draw ion and electron
// currents of equal magnitude and the zero state draws none:
//     V- = -3.325 * Te,  V+ = +0.675 * Te,  V0 = 0
// (a 4 Te range). The multipliers are Q4.12 parameters (-13619, 2765), so
// the range can be changed, e.g. to the 3 Te set -2.356 / +0.645.
// The levels are relative: the probe capacitor adds the floating potential.
// A single temperature is used for a whole three-state iteration: it is
// latched on change_bias, from the solver (dynamic_en = 1) or from the static
// value written by the host (dynamic_en = 0, triple-probe style operation).
// The output moves toward the level of the current state by at most
// ramp_step LSBs per clock (0 = immediate step), which softens the current
// spike a voltage step drives through the capacitor; slewing is this
// implementation's reading of the "adjustable ramp time" control.
// Interface: bias is in the voltage format (2^-7 V per LSB); it follows a
// state change after two clocks when not slew limited. te_used shows the
// temperature in use. Reset clears the bias to 0 and te_used to TE_INIT.
module bias_set #(
  parameter int MULT_NEG  = -13619,  // -3.325 in Q4.12
  parameter int MULT_POS  = 2765,    // +0.675 in Q4.12
  parameter int TE_INIT   = 5120
) (
  input  logic                  clk,
  input  logic                  rst,
  input  uflp_pkg::bias_state_e state,
  input  logic                  change_bias,
  input  uflp_pkg::word_t       te_calc,
  input  uflp_pkg::word_t       te_static,
  input  logic                  dynamic_en,
  input  logic [13:0]           ramp_step,
  output uflp_pkg::word_t       bias,
  output uflp_pkg::word_t       te_used,
  output logic                  slewing
);

  import uflp_pkg::*;

  localparam int unsigned SHIFT = CAL_FRAC + TE_FRAC - V_FRAC;

  logic signed [31:0] mult;
  logic signed [47:0] prod;
  word_t              target;
  logic signed [DW+1:0] diff;
  logic signed [DW+1:0] step;

  always_comb begin
    unique case (state)
      ST_NEG:  mult = 32'(MULT_NEG);
      ST_POS:  mult = 32'(MULT_POS);
      default: mult = '0;
    endcase
    prod   = 48'(te_used) * 48'(mult);
    target = sat_word(64'(prod >>> SHIFT));
    diff   = (DW+2)'(target) - (DW+2)'(bias);
    step   = $signed({2'b00, ramp_step});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      te_used <= word_t'(TE_INIT);
      bias    <= '0;
      slewing <= 1'b0;
    end else begin
      if (change_bias) te_used <= dynamic_en ? te_calc : te_static;
      if (ramp_step == '0) begin
        bias    <= target;
        slewing <= 1'b0;
      end else if (diff > step) begin
        bias    <= word_t'((DW+2)'(bias) + step);
        slewing <= 1'b1;
      end else if (diff < -step) begin
        bias    <= word_t'((DW+2)'(bias) - step);
        slewing <= 1'b1;
      end else begin
        bias    <= target;
        slewing <= 1'b0;
      end
    end
  end

endmodule
