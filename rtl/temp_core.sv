// temp_core: solves the planar-probe equation for the electron temperature.
//
// Runs once per iteration on the averaged current and voltage of the positive
// bias state, using the ion saturation current just produced by isat_core and
// the previous floating potential Vf[k]:
//     r = -I / Isat[k+1]           (electron current is negative)
//     Te[k+1] = (V - Vf[k]) / ln(1 + r)
// r comes from the Goldschmidt divider with 7 fractional bits, which is the
// address of the 1/ln(1 + r) table (128 entries per unit of r, r < 8, larger
// r is clamped); the table output multiplies V - Vf[k], so the second
// division costs only a multiplication.
// Protection against collapse of the bias range: a result below TE_MIN LSBs
// (50, as in the reference design) is replaced by the initial guess TE_INIT,
// and so is any input for which the equation has no solution (no electron
// current, or V not above Vf[k]); te_fallback flags these iterations.
// Interface: start pulses with i_avg / v_avg valid; isat / vf_prev must hold
// until done. done pulses when te is updated. Latency 39 clocks (default
// divider). te resets to TE_INIT, a deliberately large first guess so that the
// first bias sweep spans a wide range.
module temp_core #(
  parameter int unsigned DIV_ITER = 16,
  parameter int          TE_INIT  = 5120,  // 10 eV at 2^-9 eV per LSB
  parameter int          TE_MIN   = 50
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  uflp_pkg::word_t i_avg,
  input  uflp_pkg::word_t v_avg,
  input  uflp_pkg::word_t isat,
  input  uflp_pkg::word_t vf_prev,
  output uflp_pkg::word_t te,
  output logic            te_fallback,
  output logic            done
);

  import uflp_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_LUT, S_LUTW, S_MUL} state_e;
  state_e state;

  logic signed [DW:0] dv;           // V - Vf[k]
  logic signed [DW:0] dv_hold;
  logic               div_start, div_done;
  logic [15:0]        q;
  logic [9:0]         addr;
  logic [17:0]        h;            // 1/ln(1+r), Q7.11
  logic signed [35:0] prod, te_raw;

  always_comb dv = (DW+1)'(v_avg) - (DW+1)'(vf_prev);

  gold_div #(.NW(16), .DENW(16), .QW(16), .QF(7), .ITER(DIV_ITER)) u_div (
    .clk, .rst, .start(div_start),
    .num(16'(-(DW+1)'(i_avg))), .den(16'(isat[DW-2:0])),
    .busy(), .done(div_done), .quot(q));

  always_comb addr = (q > 16'd1023) ? 10'd1023 : q[9:0];

  func_lut #(.FUNC(1), .ADDR_W(10), .DATA_W(18)) u_lut (.clk, .addr, .data(h));

  always_comb begin
    prod   = 36'(dv_hold) * $signed({1'b0, h});
    te_raw = prod >>> (LUT_FRAC + V_FRAC - TE_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      te          <= word_t'(TE_INIT);
      te_fallback <= 1'b0;
      done        <= 1'b0;
      div_start   <= 1'b0;
      dv_hold     <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dv_hold <= dv;
          if (i_avg < 0 && dv > 0) begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end else begin
            te          <= word_t'(TE_INIT);
            te_fallback <= 1'b1;
            done        <= 1'b1;
          end
        end
        S_DIV:  if (div_done) state <= S_LUT;
        S_LUT:  state <= S_LUTW;
        S_LUTW: state <= S_MUL;
        S_MUL: begin
          if (te_raw < 36'(TE_MIN)) begin
            te          <= word_t'(TE_INIT);
            te_fallback <= 1'b1;
          end else begin
            te          <= sat_word(64'(te_raw));
            te_fallback <= 1'b0;
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
