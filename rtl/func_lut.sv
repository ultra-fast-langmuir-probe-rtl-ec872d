// func_lut: read-only look-up table that evaluates one of the transcendental
// forms of the Langmuir probe equation in a single clock.
//
// The solver cores avoid computing exponentials and logarithms by looking them
// up. The table contents are computed at elaboration time from the formula
// selected by FUNC, so no data file is needed; synthesis maps the array to a
// ROM. Entry i is evaluated at the centre of its bin, x = X0 + (i + 0.5) * 2^-STEP_LOG2,
// and stored as a fixed-point number with LUT_FRAC (11) fractional bits,
// saturated to the output width.
//   FUNC 0 (INV_ONE_MINUS_EXP): 1 / (1 - exp(-a)),  a = (i+0.5)/64 in [0, 16)
//       used by the ion saturation current core, a = (Vf - V) / Te.
//   FUNC 1 (INV_LN1P):          1 / ln(1 + r),      r = (i+0.5)/128 in [0, 8)
//       used by the temperature core, r = -I / Isat.
//   FUNC 2 (LN1P):              ln(1 + r),          r = -1 + (i+0.5)/256 in [-1, 3)
//       used by the floating potential core (signed output).
//   FUNC 3 (ONE_MINUS_EXP):     1 - exp(x),         x = -12 + (i+0.5)/64 in [-12, 4)
//       used by the plasma emulator, x = (V - Vf) / Te (signed output).
//   FUNC 4 (SINE):              sin(2*pi*i/N),      one full period
//       used by the plasma emulator for its parameter perturbation (signed).
// The reference tables split the input range into regions with different
// power-of-two output scalings; here one uniform Q.11 scaling with an 18-bit
// word is used instead, which covers the same range.
//
// Interface: addr is sampled on a rising edge, data is valid on the next one.
module func_lut #(
  parameter int unsigned FUNC   = 0,
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 18
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  import uflp_pkg::*;

  localparam int unsigned N = 1 << ADDR_W;
  typedef logic [DATA_W-1:0] table_t [N];

  function automatic table_t build_table();
    table_t t;
    real    x, y, maxv, minv;
    maxv = real'((1 << (DATA_W - 1)) - 1);
    minv = -real'(1 << (DATA_W - 1));
    if (FUNC < 2) maxv = real'((1 << DATA_W) - 1);
    for (int i = 0; i < N; i++) begin
      case (FUNC)
        0: begin
          x = (real'(i) + 0.5) * 16.0 / real'(N);
          y = 1.0 / (1.0 - $exp(-x));
        end
        1: begin
          x = (real'(i) + 0.5) * 8.0 / real'(N);
          y = 1.0 / $ln(1.0 + x);
        end
        2: begin
          x = -1.0 + (real'(i) + 0.5) * 4.0 / real'(N);
          y = $ln(1.0 + x);
        end
        3: begin
          x = -12.0 + (real'(i) + 0.5) * 16.0 / real'(N);
          y = 1.0 - $exp(x);
        end
        default: begin
          y = $sin(2.0 * 3.14159265358979 * real'(i) / real'(N));
        end
      endcase
      y = y * real'(1 << LUT_FRAC);
      if (y > maxv) y = maxv;
      if (FUNC >= 2 && y < minv) y = minv;
      t[i] = DATA_W'($rtoi(y + ((y < 0.0) ? -0.5 : 0.5)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
