// fir_delay_line: the tapped delay line of a direct-form FIR filter.
//
// A chain of DEPTH sample registers. On each rising clock edge the input
// sample moves into the first register and every register passes its value
// to the next, so after the edge taps[0] holds x(n-1), taps[1] holds x(n-2),
// and so on, where x(n) is the sample present at din during the edge.
// The register chain follows the filter structure; the synchronous,
// active-high reset that clears all registers to zero is this design's
// choice.
//
// Interface: clk, reset, din (W bits) in; taps (DEPTH words of W bits) out.
// Timing: one clock of delay per register.
module fir_delay_line #(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned W     = 8
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [W-1:0]              din,
  output logic [DEPTH-1:0][W-1:0]   taps
);
  always_ff @(posedge clk) begin
    if (reset) begin
      taps <= '0;
    end else begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end
endmodule
