// pcr_top: plasma current response, a plasma emulator for bench-testing the
// UFLP without a plasma. It runs on a second board whose ADC takes the UFLP
// bias and whose two DACs return what the UFLP would measure.
//
// The emulated plasma has set values of Isat, Te and Vf (isat0, te0, vf0). The
// three can be swept by one sinusoid: a 32-bit phase accumulator advances by
// phase_inc per clock (frequency phase_inc * 125 MHz / 2^32), its top 10
// bits address a sine table, and each parameter becomes
//     p = p0 + (p_amp * sin(phase)) >>> 11    (sine in Q.11)
// with Te held at 1 LSB or more. The parameters in use are output as
// isat_now / te_now / vf_now, the truth the UFLP results are compared with.
//
// The response follows the planar probe equation with an ideal coupling
// capacitor: the bias passes through unchanged and the probe floats on Vf, so
//     dac_v = bias + Vf
//     dac_i = Isat * (1 - exp(bias / Te)) + noise
// bias / Te is computed by the Goldschmidt divider (gold_div, 8 fractional
// bits of |bias| / Te, i.e. 64 steps per unit of bias/Te given the 4:1 LSB
// ratio of the voltage and Te formats) and addresses a 1 - exp(x) table
// covering x in [-12, 4); larger x is clamped, and the current saturates at
// the 14-bit limits. The noise is uniform with peak Isat * 2^-noise_shift,
// drawn from a 16-bit Galois LFSR (polynomial x^16 + x^14 + x^13 + x^11 + 1)
// that starts from LFSR_SEED, so a run is repeatable; noise_en = 0 turns it
// off.
//
// Timing: a new bias sample is taken whenever the divider is idle, and both
// outputs update together DIV_ITER * 2 + 5 clocks after the sample (37 with
// the default divider). A new current is produced every 35 clocks. A real
// plasma answers at once; this delay is the emulator's, and it limits how
// short the UFLP bias states can be when the two are connected.
// All plasma words use the UFLP formats (uflp_pkg): current 2^-17 A, Te
// 2^-9 eV, voltage 2^-7 V per LSB.
module pcr_top
  import uflp_pkg::*;
#(
  parameter int unsigned DIV_ITER  = 16,
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  word_t       adc_bias,     // UFLP bias, voltage format
  input  word_t       isat0,
  input  word_t       te0,
  input  word_t       vf0,
  input  word_t       isat_amp,     // sinusoid amplitudes, same formats
  input  word_t       te_amp,
  input  word_t       vf_amp,
  input  logic [31:0] phase_inc,
  input  logic        noise_en,
  input  logic [3:0]  noise_shift,  // noise peak = Isat * 2^-noise_shift
  output word_t       dac_i,        // probe current, current format
  output word_t       dac_v,        // probe voltage, voltage format
  output word_t       isat_now,
  output word_t       te_now,
  output word_t       vf_now
);

  // ---- parameter perturbation --------------------------------------------
  logic [31:0]        phase;
  logic [17:0]        sin_raw;
  logic signed [17:0] sin_q;

  func_lut #(.FUNC(4)) u_sine (.clk, .addr(phase[31:22]), .data(sin_raw));
  assign sin_q = $signed(sin_raw);

  function automatic word_t perturb(input word_t base, input word_t amp,
                                    input logic signed [17:0] s);
    logic signed [63:0] v;
    v = 64'(base) + ((64'(amp) * 64'(s)) >>> 11);
    return sat_word(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= '0;
      isat_now <= isat0;
      te_now   <= te0;
      vf_now   <= vf0;
    end else begin
      phase    <= phase + phase_inc;
      isat_now <= perturb(isat0, isat_amp, sin_q);
      te_now   <= (perturb(te0, te_amp, sin_q) < word_t'(1)) ? word_t'(1)
                                                            : perturb(te0, te_amp, sin_q);
      vf_now   <= perturb(vf0, vf_amp, sin_q);
    end
  end

  // ---- noise source ------------------------------------------------------
  logic [15:0] lfsr;
  always_ff @(posedge clk) begin
    if (rst) lfsr <= LFSR_SEED;
    else     lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  // ---- sample and divide ---------------------------------------------------
  logic        start, busy, div_done;
  logic [15:0] quot;
  logic        neg_l;
  word_t       bias_l, isat_l, vf_l;

  assign start = !busy && !div_done && !rst;

  always_ff @(posedge clk) begin
    if (rst) begin
      neg_l  <= 1'b0;
      bias_l <= '0;
      isat_l <= '0;
      vf_l   <= '0;
    end else if (start) begin
      neg_l  <= adc_bias[DW-1];
      bias_l <= adc_bias;
      isat_l <= isat_now;
      vf_l   <= vf_now;
    end
  end

  logic [15:0] num_abs;
  assign num_abs = adc_bias[DW-1] ? 16'(-$signed({adc_bias[DW-1], adc_bias}))
                                  : 16'(adc_bias);

  gold_div #(.NW(16), .DENW(16), .QW(16), .QF(8), .ITER(DIV_ITER)) u_div (
    .clk, .rst, .start, .num(num_abs), .den(16'(te_now)),
    .busy, .done(div_done), .quot);

  // ---- table and output ----------------------------------------------------
  // x = bias / Te; entry 768 is x = 0, 64 entries per unit of x
  // The next sample is taken on the clock after div_done, so the values of
  // this sample move on to bias_p / isat_p / vf_p for the output stage.
  logic [9:0]  addr;
  logic        addr_valid, lut_valid;
  logic [17:0] f_raw;
  word_t       bias_p, isat_p, vf_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr       <= '0;
      addr_valid <= 1'b0;
      lut_valid  <= 1'b0;
      bias_p     <= '0;
      isat_p     <= '0;
      vf_p       <= '0;
    end else begin
      addr_valid <= div_done;
      lut_valid  <= addr_valid;
      if (div_done) begin
        bias_p <= bias_l;
        isat_p <= isat_l;
        vf_p   <= vf_l;
        if (neg_l) addr <= (quot >= 16'd768) ? 10'd0 : 10'(16'd767 - quot);
        else       addr <= (quot >= 16'd255) ? 10'd1023 : 10'(16'd768 + quot);
      end
    end
  end

  func_lut #(.FUNC(3)) u_exp (.clk, .addr, .data(f_raw));

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_i <= '0;
      dac_v <= '0;
    end else if (lut_valid) begin
      logic signed [63:0] cur, nz;
      cur = (64'(isat_p) * 64'($signed(f_raw))) >>> LUT_FRAC;
      nz  = noise_en ? ((64'(isat_p) * 64'($signed(lfsr))) >>> (5'd15 + 5'(noise_shift)))
                     : 64'sd0;
      dac_i <= sat_word(cur + nz);
      dac_v <= sat_word(64'(bias_p) + 64'(vf_p));
    end
  end

endmodule
