// isat_core: solves the planar-probe equation for the ion saturation current.
//
// Runs once per iteration on the averaged current and voltage of the negative
// bias state. With the previous floating potential Vf[k] and temperature
// Te[k] it forms a = (Vf[k] - V) / Te[k] and
//     Isat[k+1] = I / (1 - exp(-a)),
// the probe equation I = Isat * (1 - exp((V - Vf) / Te)) rearranged, with ion
// current counted positive. The ratio a is computed by the Goldschmidt
// divider with 8 fractional bits, which is directly the address of the
// 1/(1 - exp(-a)) table (64 entries per unit of a, a < 16); the table output
// multiplies the measured current.
// Guards (choices of this implementation): if V is not below Vf[k] the
// equation has no positive solution and Isat is left unchanged; a result
// below one LSB is raised to one LSB, so later divisions by Isat stay defined.
// Interface: start pulses with i_avg / v_avg valid; vf_prev / te_prev must
// hold until done. done pulses when isat is updated (also when it is kept).
// Latency: 39 clocks from start with the default 16-iteration divider.
// isat resets to ISAT_INIT.
module isat_core #(
  parameter int unsigned DIV_ITER  = 16,
  parameter int          ISAT_INIT = 2560   // 19.5 mA at 2^-17 A per LSB
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  uflp_pkg::word_t i_avg,
  input  uflp_pkg::word_t v_avg,
  input  uflp_pkg::word_t vf_prev,
  input  uflp_pkg::word_t te_prev,
  output uflp_pkg::word_t isat,
  output logic            done
);

  import uflp_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_LUT, S_LUTW, S_MUL} state_e;
  state_e state;

  logic signed [DW:0] num;          // Vf[k] - V, one bit wider than a word
  word_t              i_hold;
  logic               div_start, div_done;
  logic [15:0]        q;
  logic [9:0]         addr;
  logic [17:0]        g;            // 1/(1-exp(-a)), Q7.11
  logic signed [35:0] prod;

  always_comb num = (DW+1)'(vf_prev) - (DW+1)'(v_avg);

  // te_prev is positive by construction of the temperature core
  gold_div #(.NW(16), .DENW(16), .QW(16), .QF(8), .ITER(DIV_ITER)) u_div (
    .clk, .rst, .start(div_start),
    .num(16'(num)), .den(16'(te_prev[DW-2:0])),
    .busy(), .done(div_done), .quot(q));

  always_comb addr = (q > 16'd1023) ? 10'd1023 : q[9:0];

  func_lut #(.FUNC(0), .ADDR_W(10), .DATA_W(18)) u_lut (.clk, .addr, .data(g));

  always_comb prod = 36'(i_hold) * $signed({1'b0, g});

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      isat      <= word_t'(ISAT_INIT);
      done      <= 1'b0;
      div_start <= 1'b0;
      i_hold    <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_hold <= i_avg;
          if (num > 0) begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end else begin
            done <= 1'b1;
          end
        end
        S_DIV:  if (div_done) state <= S_LUT;
        S_LUT:  state <= S_LUTW;   // address registered into the ROM
        S_LUTW: state <= S_MUL;    // ROM data valid
        S_MUL: begin
          if ((prod >>> LUT_FRAC) < 36'sd1) isat <= word_t'(1);
          else                              isat <= sat_word(64'(prod >>> LUT_FRAC));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
