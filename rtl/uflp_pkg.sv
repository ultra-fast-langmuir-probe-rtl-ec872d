// uflp_pkg: shared types and number formats of the Ultra-Fast Langmuir Probe
// (UFLP) logic.
//
// All plasma quantities are carried as 14-bit two's-complement fixed-point
// words, the width of the Red Pitaya ADC and DAC. Each quantity has its own
// binary point, chosen so that 14 bits cover the range expected in a
// low-temperature magnetron plasma:
//   current / ion saturation current : LSB 2^-17 A  (+-62.5 mA)
//   electron temperature             : LSB 2^-9  eV (+-16 eV)
//   voltage / floating potential     : LSB 2^-7  V  (+-64 V)
// For a tokamak edge (2 A, 64 eV, 256 V) only the fractional-bit constants
// change (12, 7 and 5). The arithmetic in the solver cores depends only on the
// difference TE_FRAC - V_FRAC, which is 2 in both regimes.
//
// The bias sequence is negative, positive, zero; one pass through the three
// states is one solver iteration and yields one (Isat, Te, Vf) triple.
package uflp_pkg;

  localparam int unsigned DW      = 14;  // ADC / DAC / parameter word width
  localparam int unsigned I_FRAC  = 17;  // current LSB 2^-17 A
  localparam int unsigned TE_FRAC = 9;   // temperature LSB 2^-9 eV
  localparam int unsigned V_FRAC  = 7;   // voltage LSB 2^-7 V
  localparam int unsigned CAL_FRAC = 12; // calibration gains are Q4.12
  localparam int unsigned LUT_FRAC = 11; // look-up table outputs are Q.11

  typedef logic signed [DW-1:0] word_t;

  typedef enum logic [1:0] {
    ST_NEG  = 2'd0,
    ST_POS  = 2'd1,
    ST_ZERO = 2'd2
  } bias_state_e;

  // Output word layouts of the data stream
  typedef enum logic [1:0] {
    MODE_VI       = 2'd0,  // calibrated voltage / current, every clock
    MODE_PARAMS   = 2'd1,  // Isat / Te / Vf, once per iteration
    MODE_CURRENTS = 2'd2,  // current / zero-state average current
    MODE_ISAT_CAP = 2'd3   // Isat / capacitor code
  } out_mode_e;

  // Fields written by the host through the control register
  typedef struct packed {
    logic [15:0] state_cycles;  // clock cycles per bias state
    logic        dynamic_en;    // 1: bias follows computed Te, 0: static_te
    word_t       static_te;     // fixed Te for triple-probe mode (Te format)
    logic [13:0] ramp_step;     // bias slew limit per clock (V LSBs), 0 = step
    word_t       i_offset;      // ADC current offset (ADC codes)
    logic [15:0] i_scale;       // ADC current gain, Q4.12
    word_t       v_offset;      // ADC voltage offset (ADC codes)
    logic [15:0] v_scale;       // ADC voltage gain, Q4.12
    word_t       dac_offset;    // DAC offset (DAC codes), both channels
    logic [15:0] dac_scale;     // DAC gain, Q4.12, both channels
    logic [1:0]  aux_sel;       // second DAC: 0 Isat, 1 Te, 2 Vf, 3 current
    logic        zero_corr_en;  // subtract zero-state average current
    logic [3:0]  cap_shift;     // capacitor code = (Isat >> cap_shift) + 1
    out_mode_e   out_mode;      // data stream word layout
    logic [31:0] acq_cycles;    // acquisition length in clocks (count mode)
    logic        acq_gated;     // 1: acquire until trigger falls
    logic        sw_trigger;    // software trigger level
    logic        sw_reset;      // software reset request
  } ctl_t;

  // Fields read by the host through the status register
  typedef struct packed {
    word_t       isat;
    word_t       te;
    word_t       vf;
    logic [6:0]  cap_code;
    logic        te_fallback;   // last Te fell back to the initial guess
    logic        acq_active;
    logic [31:0] timestamp;
    logic [31:0] words_sent;
    logic [15:0] words_dropped;
    logic        reset_hang;
  } sts_t;

  function automatic word_t sat_word(input logic signed [63:0] x);
    if (x > 64'sd8191)       return word_t'(14'sd8191);
    else if (x < -64'sd8192) return word_t'(-14'sd8192);
    else                     return word_t'(x);
  endfunction

endpackage
