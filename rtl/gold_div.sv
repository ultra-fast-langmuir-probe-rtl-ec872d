// gold_div: unsigned fixed-point divider using the Goldschmidt iteration.
//
// Computes quot = floor(num * 2^QF / den), saturated to QW bits, for a fixed
// number of iterations that trades accuracy against latency. Both the
// numerator and the denominator are multiplied by a common factor
// F = 2 - D each iteration, so D converges to one and N converges to the
// quotient. One iteration takes two clocks: the factor F is formed in one
// clock and the two products N*F and D*F in the next, as in the reference
// design, whose default of 32 iteration clocks (16 iterations) is kept.
//
// Design choice: before iterating, the denominator is normalised into
// [0.5, 1) by a leading-one shift (the numerator is shifted by the same
// amount) and the first factor is 2 - D. This makes the error square every
// iteration for every denominator, instead of only for denominators near the
// square root of the seed scaling. den = 0 returns the saturated maximum.
//
// Interface: pulse start for one clock with num/den valid; done pulses one
// clock when quot is valid; quot holds until the next done. busy is high from
// start to done; a start while busy is ignored.
// Timing: done comes 2*ITER + 2 clocks after start (34 for ITER = 16).
module gold_div #(
  parameter int unsigned NW   = 16,  // numerator width
  parameter int unsigned DENW = 16,  // denominator width
  parameter int unsigned QW   = 16,  // quotient width
  parameter int unsigned QF   = 8,   // fractional bits of the quotient
  parameter int unsigned FB   = 24,  // fractional bits used while iterating
  parameter int unsigned ITER = 16   // Goldschmidt iterations
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [NW-1:0]   num,
  input  logic [DENW-1:0] den,
  output logic            busy,
  output logic            done,
  output logic [QW-1:0]   quot
);

  localparam int unsigned NRW = NW + FB;   // N register: integer part + fraction
  localparam int unsigned DRW = FB + 1;    // D register: value < 1, plus margin
  localparam int unsigned FRW = FB + 2;    // F register: value in (1, 1.5]
  localparam int unsigned CW  = $clog2(ITER + 1);

  typedef enum logic [1:0] {S_IDLE, S_FACTOR, S_MULT, S_DONE} state_e;
  state_e state;

  logic [NRW-1:0] n_q;
  logic [DRW-1:0] d_q;
  logic [FRW-1:0] f_q;
  logic [CW-1:0]  iter_q;
  logic           zero_q;

  // Leading-one position of the denominator
  function automatic int unsigned msb_pos(input logic [DENW-1:0] v);
    int unsigned p;
    p = 0;
    for (int unsigned i = 0; i < DENW; i++) if (v[i]) p = i;
    return p;
  endfunction

  // Normalisation: den * 2^FB / 2^(p+1) lies in [2^(FB-1), 2^FB)
  logic [NRW+DENW-1:0] n_norm;
  logic [FB+DENW-1:0]  d_norm;
  int unsigned         sh;
  always_comb begin
    sh     = msb_pos(den) + 1;
    n_norm = ({{DENW{1'b0}}, num, {FB{1'b0}}}) >> sh;
    d_norm = ({{FB{1'b0}}, den} << FB) >> sh;
  end

  // Products of one iteration, rounded to nearest
  logic [NRW+FRW-1:0] n_prod;
  logic [DRW+FRW-1:0] d_prod;
  logic [NRW+FRW-1:0] n_next;
  logic [DRW+FRW-1:0] d_next;
  always_comb begin
    n_prod = NRW'(n_q) * FRW'(f_q);
    d_prod = DRW'(d_q) * FRW'(f_q);
    n_next = (n_prod + (1 << (FB - 1))) >> FB;
    d_next = (d_prod + (1 << (FB - 1))) >> FB;
  end

  // Final scaling to QF fractional bits with saturation
  logic [NRW-1:0] q_full;
  always_comb q_full = n_q >> (FB - QF);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      quot   <= '0;
      n_q    <= '0;
      d_q    <= '0;
      f_q    <= '0;
      iter_q <= '0;
      zero_q <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_q    <= NRW'(n_norm);
          d_q    <= DRW'(d_norm);
          zero_q <= (den == '0);
          iter_q <= '0;
          state  <= S_FACTOR;
        end
        S_FACTOR: begin
          f_q   <= FRW'(2 << FB) - FRW'(d_q);
          state <= S_MULT;
        end
        S_MULT: begin
          n_q    <= NRW'(n_next);
          d_q    <= DRW'(d_next);
          iter_q <= iter_q + 1'b1;
          state  <= (iter_q == CW'(ITER - 1)) ? S_DONE : S_FACTOR;
        end
        S_DONE: begin
          if (zero_q || (q_full >> QW) != '0) quot <= '1;
          else                                quot <= QW'(q_full);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
