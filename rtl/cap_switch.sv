// cap_switch: selects the probe decoupling capacitance from the measured ion
// saturation current.
//
// The probe is AC coupled through a bank of seven relay-switched capacitors,
// giving 127 capacitance values. The smallest capacitance that still passes
// the probe current gives the fastest floating-potential response, and the
// current a capacitor passes grows with its value, so the code is made
// proportional to the current:
//     code = min(127, (Isat >> cap_shift) + 1)
// with cap_shift a host-written control field (code 1 is the smallest
// capacitor; a non-positive Isat gives code 1).
// The reed relays switch at about 1 kHz, so a new code is applied at most
// once every HOLD_CYCLES clocks (1 ms at 125 MHz); the hold rule is this
// implementation's. After reset all seven channels are closed (code 127), the
// largest capacitance, so no current is attenuated before the first estimate.
// Interface: isat_valid strobes a new Isat; cap_code drives the relay GPIO
// pins directly (bit n = relay n); changed pulses when the code changes.
module cap_switch #(
  parameter int unsigned HOLD_CYCLES = 125000
) (
  input  logic            clk,
  input  logic            rst,
  input  uflp_pkg::word_t isat,
  input  logic            isat_valid,
  input  logic [3:0]      cap_shift,
  output logic [6:0]      cap_code,
  output logic            changed
);

  import uflp_pkg::*;

  localparam int unsigned HW = $clog2(HOLD_CYCLES + 1);

  logic [HW-1:0] hold;
  logic [DW-1:0] scaled;
  logic [6:0]    target;

  always_comb begin
    scaled = (isat > 0) ? (DW'(isat) >> cap_shift) : '0;
    target = (scaled >= DW'(127)) ? 7'd127 : 7'(scaled + 1'b1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_code <= 7'd127;
      hold     <= '0;
      changed  <= 1'b0;
    end else begin
      changed <= 1'b0;
      if (hold != '0) hold <= hold - 1'b1;
      if (isat_valid && hold == '0 && target != cap_code) begin
        cap_code <= target;
        changed  <= 1'b1;
        hold     <= HW'(HOLD_CYCLES);
      end
    end
  end

endmodule
