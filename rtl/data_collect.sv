// data_collect: packs results into 32-bit words and streams them to memory.
//
// The words leave on an AXI4-Stream style interface (tdata / tvalid /
// tready) that feeds a clock converter and RAM on the processor side. The
// host selects the word layout with out_mode:
//   0 voltage / current:  {v_cal[15:0], i_cal[15:0]} (sign-extended), one
//                         word every clock, to record the bias waveform
//   1 Isat / Te / Vf:     {isat[13:3], te[13:3], vf[13:5], 1'b0}: the 11, 11
//                         and 9 most significant bits, sign bits included
//   2 current / average:  {i_cal[15:0], i0_avg[15:0]} (zero-state average)
//   3 Isat / capacitor:   {isat[15:0], 9'b0, cap_code[6:0]}
// Modes 1 to 3 give one word per completed bias iteration (cycle_done).
// Full precision is kept inside the design; only the stream is truncated.
// Bit placement inside each word, and the per-clock rate of mode 0, are this
// implementation's choices.
// Acquisition starts on a rising edge of trig and lasts acq_cycles clocks
// (acq_gated = 0) or until trig falls (acq_gated = 1). Words are produced only
// while acquiring; the computation itself never stops.
// Flow control: one output register. A word that arrives while the previous
// one is still waiting for tready is dropped and counted in words_dropped.
module data_collect (
  input  logic                 clk,
  input  logic                 rst,
  input  uflp_pkg::out_mode_e  mode,
  input  logic                 trig,
  input  logic                 acq_gated,
  input  logic [31:0]          acq_cycles,
  input  logic                 cycle_done,
  input  uflp_pkg::word_t      v_cal,
  input  uflp_pkg::word_t      i_cal,
  input  uflp_pkg::word_t      isat,
  input  uflp_pkg::word_t      te,
  input  uflp_pkg::word_t      vf,
  input  uflp_pkg::word_t      i0_avg,
  input  logic [6:0]           cap_code,
  input  logic                 tready,
  output logic [31:0]          tdata,
  output logic                 tvalid,
  output logic                 acq_active,
  output logic                 acq_start,
  output logic [31:0]          words_sent,
  output logic [15:0]          words_dropped
);

  import uflp_pkg::*;

  logic        trig_q;
  logic [31:0] remaining;
  logic        produce;
  logic [31:0] word;

  always_comb begin
    acq_start = trig && !trig_q && !acq_active;
    produce   = acq_active && ((mode == MODE_VI) || cycle_done);
    unique case (mode)
      MODE_VI:       word = {16'(v_cal), 16'(i_cal)};
      MODE_PARAMS:   word = {isat[DW-1:3], te[DW-1:3], vf[DW-1:5], 1'b0};
      MODE_CURRENTS: word = {16'(i_cal), 16'(i0_avg)};
      default:       word = {16'(isat), 9'd0, cap_code};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q        <= 1'b0;
      acq_active    <= 1'b0;
      remaining     <= '0;
      tvalid        <= 1'b0;
      tdata         <= '0;
      words_sent    <= '0;
      words_dropped <= '0;
    end else begin
      trig_q <= trig;
      // acquisition window
      if (acq_start) begin
        acq_active <= acq_gated || (acq_cycles != '0);
        remaining  <= acq_cycles;
      end else if (acq_active) begin
        if (acq_gated) begin
          if (!trig) acq_active <= 1'b0;
        end else begin
          remaining <= remaining - 1'b1;
          if (remaining == 32'd1) acq_active <= 1'b0;
        end
      end
      // output register
      if (tvalid && tready) begin
        tvalid     <= 1'b0;
        words_sent <= words_sent + 1'b1;
      end
      if (produce) begin
        if (!tvalid || tready) begin
          tdata  <= word;
          tvalid <= 1'b1;
        end else if (words_dropped != '1) begin
          words_dropped <= words_dropped + 1'b1;
        end
      end
    end
  end

  // A word on the stream stays unchanged until it is accepted
  a_stream_stable: assert property (@(posedge clk) disable iff (rst)
    (tvalid && !tready) |=> (tvalid && $stable(tdata)));

endmodule
