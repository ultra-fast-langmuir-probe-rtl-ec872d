// time_stamp: time base for the recorded data set.
//
// Counts clocks since reset or since the last acquisition start (clear), so
// that every output word can be placed in time on the host: at 125 MHz one
// count is 8 ns and 32 bits last 34 s. It also counts completed bias
// iterations (iter_done) since the same event. Both counters saturate rather
// than wrap. The width and the clear-on-acquisition rule are choices of this
// implementation.
module time_stamp #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         iter_done,
  output logic [W-1:0] cycles,
  output logic [W-1:0] iterations
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cycles     <= '0;
      iterations <= '0;
    end else begin
      if (cycles != '1) cycles <= cycles + 1'b1;
      if (iter_done && iterations != '1) iterations <= iterations + 1'b1;
    end
  end

endmodule
