// select_generator: produces the select lines of the read tag module.
//
// A counter steps once per system clock through 0,1,...,N-1 (00,01,10,11 for
// the four tags of a read cycle, as in the design's output waveform) and then
// wraps. Slot s selects the s-th smallest ID of the current group.
//
// Reset is synchronous and active high and sets the count to 0. The clock
// divider resets to phase 0 on the same edge, so the select count equals the
// tag clock phase: slot N-1 is the cycle that ends with the tag clock rising.
// That alignment is a choice of this implementation.
module select_generator #(
  parameter int unsigned N = fdaca_pkg::N_TAGS
) (
  input  logic                 clk,
  input  logic                 reset,
  output logic [$clog2(N)-1:0] sel
);
  localparam int unsigned SW = $clog2(N);
  localparam logic [SW-1:0] LAST = SW'(N - 1);

  always_ff @(posedge clk) begin
    if (reset)            sel <= '0;
    else if (sel == LAST) sel <= '0;
    else                  sel <= sel + 1'b1;
  end
endmodule
