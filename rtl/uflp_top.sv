// uflp_top: Ultra-Fast Langmuir Probe (UFLP) signal processing for a single
// Langmuir probe, for a Zynq FPGA board with a 14-bit dual ADC and DAC
// (Red Pitaya STEMlab 125-14, 125 MHz).
//
// The probe is driven, through an amplifier and a switched decoupling
// capacitor, with a repeating three-level bias: negative, positive, zero. The
// capacitor makes the probe float at the plasma floating potential, so the
// applied levels are relative to it. After each state the averaged probe
// current and voltage are fed to one of three solver cores, each of which
// solves the planar probe equation I = Isat * (1 - exp((V - Vf) / Te)) for one
// unknown using the two most recent values of the others:
//   negative state -> isat_core   -> Isat
//   positive state -> temp_core   -> Te  (sets the next bias range)
//   zero state     -> vfloat_core -> Vf  (and the zero-state current offset)
// Each iteration therefore produces a fresh (Isat, Te, Vf) triple, and the
// next bias levels are scaled by the new Te so that the positive and negative
// states draw currents of equal magnitude. Isat also selects the decoupling
// capacitance (cap_gpio).
// Data path: adc_* -> data_acquire (2 clk) -> state_averager -> solver cores
// (39 clk each) -> bias_set -> data_out -> dac_bias. The solver latency must
// fit in one state; fet_switch enforces at least MIN_CYCLES clocks per state.
// At 83 clocks per state an iteration is 249 clocks, about 500 kHz output.
// Host side: ctl / sts stand for the control and status registers, and
// m_axis_* for the stream into the processor's memory; the register block, the
// ADC/DAC interface and the stream clock converter are board-vendor cores
// outside this design.
module uflp_top #(
  parameter int unsigned AVG_LOG2    = 6,
  parameter int unsigned MIN_CYCLES  = 64,
  parameter int unsigned DIV_ITER    = 16,
  parameter int          TE_INIT     = 5120,    // 10 eV first guess
  parameter int          TE_MIN      = 50,
  parameter int          ISAT_INIT   = 2560,
  parameter int unsigned CAP_HOLD    = 125000,  // 1 ms relay hold
  parameter int unsigned RST_CYCLES  = 16,
  parameter int unsigned HANG_CYCLES = 12500000
) (
  input  logic            clk,
  input  logic            rst_btn,
  input  uflp_pkg::ctl_t  ctl,
  output uflp_pkg::sts_t  sts,
  input  uflp_pkg::word_t adc_i,
  input  uflp_pkg::word_t adc_v,
  output uflp_pkg::word_t dac_bias,
  output uflp_pkg::word_t dac_aux,
  output logic [6:0]      cap_gpio,
  input  logic            gpio_trigger,
  output logic [31:0]     m_axis_tdata,
  output logic            m_axis_tvalid,
  input  logic            m_axis_tready,
  output logic            led_reset
);

  import uflp_pkg::*;

  logic        rst;
  bias_state_e state, avg_state;
  logic        state_first, state_last, avg_window, change_bias, cycle_done;
  word_t       i_cal, v_cal, i_uncorr, i_zero_offset;
  logic        avg_valid;
  word_t       i_avg, v_avg;
  word_t       isat, te, vf, i0_avg, bias, te_used;
  logic        isat_done, te_done, vf_done, i0_valid, te_fallback, slewing;
  logic        cap_changed, acq_start;
  logic [31:0] iterations;

  reset_gen #(.RST_CYCLES(RST_CYCLES), .HANG_CYCLES(HANG_CYCLES)) u_reset (
    .clk, .btn(rst_btn), .sw_reset(ctl.sw_reset), .rst, .rst_hang(led_reset));

  fet_switch #(.AVG_LOG2(AVG_LOG2), .MIN_CYCLES(MIN_CYCLES)) u_fet (
    .clk, .rst, .state_cycles(ctl.state_cycles), .state, .state_first,
    .state_last, .avg_window, .change_bias, .cycle_done);

  data_acquire u_acq (
    .clk, .rst, .adc_i, .adc_v,
    .i_offset(ctl.i_offset), .i_scale(ctl.i_scale),
    .v_offset(ctl.v_offset), .v_scale(ctl.v_scale),
    .zero_corr_en(ctl.zero_corr_en), .i0_avg, .i0_valid,
    .i_cal, .v_cal, .i_uncorr, .i_zero_offset);

  state_averager #(.AVG_LOG2(AVG_LOG2)) u_avg (
    .clk, .rst, .state, .state_first, .state_last, .avg_window,
    .i_in(i_cal), .v_in(v_cal), .avg_valid, .avg_state, .i_avg, .v_avg);

  isat_core #(.DIV_ITER(DIV_ITER), .ISAT_INIT(ISAT_INIT)) u_isat (
    .clk, .rst, .start(avg_valid && avg_state == ST_NEG),
    .i_avg, .v_avg, .vf_prev(vf), .te_prev(te), .isat, .done(isat_done));

  temp_core #(.DIV_ITER(DIV_ITER), .TE_INIT(TE_INIT), .TE_MIN(TE_MIN)) u_temp (
    .clk, .rst, .start(avg_valid && avg_state == ST_POS),
    .i_avg, .v_avg, .isat, .vf_prev(vf), .te, .te_fallback, .done(te_done));

  vfloat_core #(.DIV_ITER(DIV_ITER)) u_vf (
    .clk, .rst, .start(avg_valid && avg_state == ST_ZERO),
    .i_avg, .v_avg, .isat, .te, .vf, .done(vf_done), .i0_avg, .i0_valid);

  bias_set #(.TE_INIT(TE_INIT)) u_bias (
    .clk, .rst, .state, .change_bias, .te_calc(te), .te_static(ctl.static_te),
    .dynamic_en(ctl.dynamic_en), .ramp_step(ctl.ramp_step), .bias, .te_used,
    .slewing);

  data_out u_out (
    .clk, .rst, .bias, .isat, .te, .vf, .i_meas(i_cal), .aux_sel(ctl.aux_sel),
    .dac_scale(ctl.dac_scale), .dac_offset(ctl.dac_offset), .dac_bias, .dac_aux);

  cap_switch #(.HOLD_CYCLES(CAP_HOLD)) u_cap (
    .clk, .rst, .isat, .isat_valid(isat_done), .cap_shift(ctl.cap_shift),
    .cap_code(cap_gpio), .changed(cap_changed));

  data_collect u_collect (
    .clk, .rst, .mode(ctl.out_mode), .trig(ctl.sw_trigger || gpio_trigger),
    .acq_gated(ctl.acq_gated), .acq_cycles(ctl.acq_cycles), .cycle_done,
    .v_cal, .i_cal, .isat, .te, .vf, .i0_avg(i_zero_offset), .cap_code(cap_gpio),
    .tready(m_axis_tready), .tdata(m_axis_tdata), .tvalid(m_axis_tvalid),
    .acq_active(sts.acq_active), .acq_start, .words_sent(sts.words_sent),
    .words_dropped(sts.words_dropped));

  time_stamp #(.W(32)) u_time (
    .clk, .rst, .clear(acq_start), .iter_done(cycle_done),
    .cycles(sts.timestamp), .iterations);

  always_comb begin
    sts.isat        = isat;
    sts.te          = te;
    sts.vf          = vf;
    sts.cap_code    = cap_gpio;
    sts.te_fallback = te_fallback;
    sts.reset_hang  = led_reset;
  end

endmodule
