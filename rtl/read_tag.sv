// read_tag: serial output stage of the FDACA reader.
//
// The four ordered IDs from the fast search are copied into four input
// registers once per read cycle and then shown one per system clock, from
// the smallest to the largest, so the reader delivers one identified tag per
// system clock.
//
// Timing: sel comes from the select generator and counts 0..N-1. On the
// clock edge that ends slot N-1 the input registers take tags_in (the fast
// search output, stable since the preceding tag clock fall). On every edge
// data_out takes the input register chosen by sel, and sel_out takes sel,
// so data_out and sel_out change together one clock after sel: sel_out=0
// comes with the smallest ID of the group, sel_out=N-1 with the largest.
// Loading on the last select slot is a choice of this implementation; the
// design only states that the registers are loaded from the fast search and
// read out one per system clock under the select lines. reset is
// synchronous and active high and clears all registers. An assertion checks
// that sel steps by one every clock.
module read_tag #(
  parameter int unsigned ID_WIDTH = fdaca_pkg::ID_W_DEFAULT
) (
  input  logic                                        clk,
  input  logic                                        reset,
  input  fdaca_pkg::sel_t                             sel,
  input  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  tags_in,
  output logic [ID_WIDTH-1:0]                         data_out,
  output fdaca_pkg::sel_t                             sel_out
);
  localparam fdaca_pkg::sel_t LAST = fdaca_pkg::sel_t'(fdaca_pkg::N_TAGS - 1);

  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0] in_reg;

  always_ff @(posedge clk) begin
    if (reset) begin
      in_reg   <= '0;
      data_out <= '0;
      sel_out  <= '0;
    end else begin
      if (sel == LAST) in_reg <= tags_in;
      data_out <= in_reg[sel];
      sel_out  <= sel;
    end
  end

  // Input contract: outside reset, the select lines step by one (mod N)
  // every clock, as the select generator drives them.
  logic was_reset;
  always_ff @(posedge clk) was_reset <= reset;

  a_sel_steps: assert property (@(posedge clk) disable iff (reset || was_reset)
    sel == fdaca_pkg::sel_t'(sel_out + 1'b1));
endmodule
