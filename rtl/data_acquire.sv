// data_acquire: calibrates the raw ADC samples of probe current and voltage.
//
// Each channel is corrected in offset and scale with host-written values:
//     x = ((adc - offset) * scale) >>> 12      (scale is Q4.12)
// and saturated to 14 bits. The current channel then has the zero-state
// offset removed. When the probe capacitor is not perfectly decoupling, a
// non-zero average current through it shifts every current sample; the
// zero-state average reported by the floating-potential core is the residual
// of that shift, so it is accumulated into i_zero_offset, which is
// subtracted from every later current sample and drives the zero-state
// current to zero over successive iterations. zero_corr_en = 0 clears it.
// Interface: two clocks from adc_* to i_cal / v_cal. i_uncorr is the current
// before the zero-state correction. i_zero_offset resets to 0.
module data_acquire (
  input  logic            clk,
  input  logic            rst,
  input  uflp_pkg::word_t adc_i,
  input  uflp_pkg::word_t adc_v,
  input  uflp_pkg::word_t i_offset,
  input  logic [15:0]     i_scale,
  input  uflp_pkg::word_t v_offset,
  input  logic [15:0]     v_scale,
  input  logic            zero_corr_en,
  input  uflp_pkg::word_t i0_avg,
  input  logic            i0_valid,
  output uflp_pkg::word_t i_cal,
  output uflp_pkg::word_t v_cal,
  output uflp_pkg::word_t i_uncorr,
  output uflp_pkg::word_t i_zero_offset
);

  import uflp_pkg::*;

  logic signed [DW+17:0] i_prod, v_prod;
  word_t                 i_s1, v_s1;

  always_comb begin
    i_prod = (DW+18)'((DW+1)'(adc_i) - (DW+1)'(i_offset)) * $signed({1'b0, i_scale});
    v_prod = (DW+18)'((DW+1)'(adc_v) - (DW+1)'(v_offset)) * $signed({1'b0, v_scale});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_s1          <= '0;
      v_s1          <= '0;
      i_cal         <= '0;
      v_cal         <= '0;
      i_uncorr      <= '0;
      i_zero_offset <= '0;
    end else begin
      i_s1     <= sat_word(64'(i_prod >>> CAL_FRAC));
      v_s1     <= sat_word(64'(v_prod >>> CAL_FRAC));
      i_uncorr <= i_s1;
      v_cal    <= v_s1;
      i_cal    <= sat_word(64'(i_s1) - 64'(i_zero_offset));
      if (!zero_corr_en)  i_zero_offset <= '0;
      else if (i0_valid)  i_zero_offset <= sat_word(64'(i_zero_offset) + 64'(i0_avg));
    end
  end

endmodule
