// plasma_model: behavioural stand-in for the probe, the plasma and the analog
// front end, for simulation only (not synthesizable).
//
// Converts the bias DAC code into a probe voltage and returns the probe
// current and voltage as ADC codes in the calibrated number formats (unity
// calibration: 2^-7 V and 2^-17 A per code). The coupling capacitor is taken
// as ideal: the probe floats on the plasma floating potential, so
// V_probe = V_bias + Vf, and the current follows the planar probe equation
//     I = Isat * (1 - exp((V_probe - Vf) / Te)) + i_offset + noise
// where i_offset models a DC error current that imperfect AC coupling adds to
// every sample, and noise is uniform with peak noise_frac * Isat.
// The answer appears LATENCY clocks after the DAC code (amplifier, cable and
// converter delay). ADC codes saturate at the 14-bit limits.
module plasma_model #(
  parameter int unsigned LATENCY = 3
) (
  input  logic                  clk,
  input  logic signed [13:0]    dac_bias,
  input  real                   isat_a,
  input  real                   te_ev,
  input  real                   vf_v,
  input  real                   i_offset_a,
  input  real                   noise_frac,
  output logic signed [13:0]    adc_i,
  output logic signed [13:0]    adc_v
);

  logic signed [13:0] pipe_i [LATENCY];
  logic signed [13:0] pipe_v [LATENCY];

  function automatic logic signed [13:0] to_code(input real x);
    real r;
    r = (x >= 0.0) ? x + 0.5 : x - 0.5;
    if (r > 8191.0)  return 14'sd8191;
    if (r < -8192.0) return -14'sd8192;
    return 14'($rtoi(r));
  endfunction

  always_ff @(posedge clk) begin
    real vp, cur, nz;
    vp  = real'(dac_bias) / 128.0 + vf_v;
    cur = isat_a * (1.0 - $exp((vp - vf_v) / te_ev)) + i_offset_a;
    nz  = (real'($urandom_range(2000)) / 1000.0 - 1.0) * noise_frac * isat_a;
    pipe_i[0] <= to_code((cur + nz) * 131072.0);
    pipe_v[0] <= to_code(vp * 128.0);
    for (int k = 1; k < LATENCY; k++) begin
      pipe_i[k] <= pipe_i[k-1];
      pipe_v[k] <= pipe_v[k-1];
    end
  end

  assign adc_i = pipe_i[LATENCY-1];
  assign adc_v = pipe_v[LATENCY-1];

endmodule
