// routing_timer: timing circuitry of the routing channel.
//
// Counts the phase of the column period, 0 .. 3L-1, on the shift-register
// clock. In the document one batch spends L cycles filling a column, 2L
// cycles circulating in it (reading, processing, writing), and then moves on
// to the next column while the next batch fills in, so the pipeline delay
// between columns is 3L. Every column is at the same phase, each holding a
// different batch, so one counter serves the whole array. fill_o is high in
// the first L cycles, when each column takes its input from upstream;
// otherwise it circulates. period_end_o marks the last cycle of a period.
// Synchronous active-high reset to phase 0.
module routing_timer
  import solar_pkg::*;
#(
  parameter int unsigned L = 20
) (
  input  logic   clk,
  input  logic   rst,
  output phase_t phase_o,
  output logic   fill_o,
  output logic   period_end_o
);

  localparam int unsigned PERIOD = 3 * L;

  always_ff @(posedge clk) begin
    if (rst)               phase_o <= '0;
    else if (period_end_o) phase_o <= '0;
    else                   phase_o <= phase_o + 1'b1;
  end

  assign period_end_o = (phase_o == phase_t'(PERIOD - 1));
  assign fill_o       = (phase_o < phase_t'(L));

endmodule
