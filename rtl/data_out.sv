// data_out: calibrates the values sent to the two DAC channels.
//
// Channel 0 carries the probe bias to the power amplifier. Channel 1 carries
// one result (aux_sel: 0 Isat, 1 Te, 2 Vf, 3 measured current) so that it can
// be passed by coaxial cable to another system, e.g. a control system or a
// trigger. Both channels apply the host-written scale and offset:
//     dac = sat(((x * scale) >>> 12) + offset)      (scale is Q4.12)
// Using one calibration for both channels, and the choice of results on
// channel 1, are decisions of this implementation.
// Interface: one clock of latency; outputs reset to 0.
module data_out (
  input  logic            clk,
  input  logic            rst,
  input  uflp_pkg::word_t bias,
  input  uflp_pkg::word_t isat,
  input  uflp_pkg::word_t te,
  input  uflp_pkg::word_t vf,
  input  uflp_pkg::word_t i_meas,
  input  logic [1:0]      aux_sel,
  input  logic [15:0]     dac_scale,
  input  uflp_pkg::word_t dac_offset,
  output uflp_pkg::word_t dac_bias,
  output uflp_pkg::word_t dac_aux
);

  import uflp_pkg::*;

  word_t aux;

  function automatic word_t calibrate(input word_t x, input logic [15:0] s, input word_t o);
    logic signed [DW+17:0] p;
    p = (DW+18)'(x) * $signed({1'b0, s});
    return sat_word(64'(p >>> CAL_FRAC) + 64'(o));
  endfunction

  always_comb begin
    unique case (aux_sel)
      2'd0:    aux = isat;
      2'd1:    aux = te;
      2'd2:    aux = vf;
      default: aux = i_meas;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_bias <= '0;
      dac_aux  <= '0;
    end else begin
      dac_bias <= calibrate(bias, dac_scale, dac_offset);
      dac_aux  <= calibrate(aux, dac_scale, dac_offset);
    end
  end

endmodule
