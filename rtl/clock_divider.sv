// clock_divider: derives the tag clock from the system clock.
//
// The tag clock has a period of DIV system clocks (four by default, as the
// design specifies); one tag clock period is one read cycle, in which four
// tags are identified. A free-running phase counter counts 0..DIV-1; the tag
// clock is high for the first half of the count and low for the second.
//
// Rather than clocking other modules with tag_clk, the rest of the design
// stays on the system clock and uses two one-cycle enables (a choice of this
// implementation, to keep a single clock domain):
//   tag_rise - high in the system clock cycle that ends with tag_clk rising
//              (phase DIV-1); logic enabled by it updates on that same edge.
//   tag_fall - high in the cycle that ends with tag_clk falling
//              (phase DIV/2-1).
// reset is synchronous and active high; it returns the phase to 0, which
// makes tag_clk high.
module clock_divider #(
  parameter int unsigned DIV = fdaca_pkg::TAG_DIV
) (
  input  logic                   clk,
  input  logic                   reset,
  output logic                   tag_clk,
  output logic                   tag_rise,
  output logic                   tag_fall,
  output logic [$clog2(DIV)-1:0] phase
);
  localparam int unsigned PW = $clog2(DIV);
  localparam logic [PW-1:0] LAST = PW'(DIV - 1);
  localparam logic [PW-1:0] HALF = PW'(DIV / 2);

  always_ff @(posedge clk) begin
    if (reset)              phase <= '0;
    else if (phase == LAST) phase <= '0;
    else                    phase <= phase + 1'b1;
  end

  assign tag_clk  = (phase < HALF);
  assign tag_rise = (phase == LAST);
  assign tag_fall = (phase == HALF - 1'b1);

  initial begin
    assert (DIV >= 2 && (DIV % 2) == 0)
      else $error("clock_divider: DIV must be even and at least 2");
  end
endmodule
