// vfloat_core: solves the planar-probe equation for the floating potential and
// reports the average current of the zero-bias state.
//
// Runs once per iteration on the averaged current and voltage of the zero
// bias state, using the Isat and Te just produced by the other two cores:
//     r0 = -I / Isat[k+1]
//     Vf[k+1] = V - Te[k+1] * ln(1 + r0)
// |I| / Isat comes from the Goldschmidt divider with 8 fractional bits; with
// the sign of I it addresses the ln(1 + r0) table, which covers r0 in [-1, 3)
// with 256 entries per unit (values outside are clamped to the end entries).
// Because the zero state should draw no current, ln(1 + r0) is a small
// correction to the measured voltage.
// The zero-state average current is also passed on (i0_avg, i0_valid) to the
// acquisition core, which uses it to cancel the current offset that AC
// coupling through the probe capacitor produces.
// Interface: start pulses with i_avg / v_avg valid; isat / te must hold until
// done. Latency 39 clocks (default divider). vf resets to 0 V.
module vfloat_core #(
  parameter int unsigned DIV_ITER = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  uflp_pkg::word_t i_avg,
  input  uflp_pkg::word_t v_avg,
  input  uflp_pkg::word_t isat,
  input  uflp_pkg::word_t te,
  output uflp_pkg::word_t vf,
  output logic            done,
  output uflp_pkg::word_t i0_avg,
  output logic            i0_valid
);

  import uflp_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_LUT, S_LUTW, S_MUL} state_e;
  state_e state;

  word_t              i_hold, v_hold;
  logic [DW:0]        i_mag;
  logic               div_start, div_done;
  logic [15:0]        q;
  logic [9:0]         addr;
  logic [17:0]        l;            // ln(1+r0), signed Q6.11
  logic signed [35:0] prod;

  always_comb i_mag = (i_hold < 0) ? (DW+1)'(-(DW+1)'(i_hold)) : (DW+1)'(i_hold);

  gold_div #(.NW(16), .DENW(16), .QW(16), .QF(8), .ITER(DIV_ITER)) u_div (
    .clk, .rst, .start(div_start),
    .num(16'(i_mag)), .den(16'(isat[DW-2:0])),
    .busy(), .done(div_done), .quot(q));

  // Table index of r0 = -I/Isat: entry 256 is r0 = 0
  always_comb begin
    if (i_hold > 0) addr = (q > 16'd255)  ? 10'd0    : 10'(16'd255 - q);
    else            addr = (q > 16'd767)  ? 10'd1023 : 10'(16'd256 + q);
  end

  func_lut #(.FUNC(2), .ADDR_W(10), .DATA_W(18)) u_lut (.clk, .addr, .data(l));

  always_comb prod = 36'(te) * 36'($signed(l));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      vf        <= '0;
      done      <= 1'b0;
      div_start <= 1'b0;
      i_hold    <= '0;
      v_hold    <= '0;
      i0_avg    <= '0;
      i0_valid  <= 1'b0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      i0_valid  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_hold    <= i_avg;
          v_hold    <= v_avg;
          i0_avg    <= i_avg;
          i0_valid  <= 1'b1;
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV:  if (div_done) state <= S_LUT;
        S_LUT:  state <= S_LUTW;
        S_LUTW: state <= S_MUL;
        S_MUL: begin
          vf    <= sat_word(64'(v_hold) - 64'(prod >>> (LUT_FRAC + TE_FRAC - V_FRAC)));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
