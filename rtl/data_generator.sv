// data_generator: stand-in for the tags in the reading zone.
//
// At every rising edge of the tag clock it presents four new tag IDs at once,
// one per output lane. The design uses this block only to exercise the
// reader on an FPGA; on the chip the four IDs arrive from outside.
//
// The IDs follow the pattern of the design's example waveforms: with a group
// counter k that steps by one per read cycle, the four lanes carry
//   tags[0] = 8*k, tags[1] = k, tags[2] = 4*k, tags[3] = 12*k   (mod 2^ID_WIDTH)
// e.g. k=3 gives 18,03,0C,24 (hex) and k=4 gives 20,04,10,30. The lanes are
// deliberately out of order so that the search has work to do, and the
// modulo wrap of the 12*k lane makes the order change from group to group.
// The generator is a deterministic counter, not a random source; the
// counter's reset value (0) is a choice of this implementation. As 8*k and
// 4*k are multiples of 8 and 4, the low three bits of lane 0 and the low two
// bits of lane 2 are always zero and synthesis turns them into constants.
//
// Interface: load is the one-cycle tag_rise enable from the clock divider;
// outputs are registered and change on the system clock edge where load is
// high. reset is synchronous, active high, and clears k and the outputs.
module data_generator #(
  parameter int unsigned ID_WIDTH = fdaca_pkg::ID_W_DEFAULT
) (
  input  logic                                        clk,
  input  logic                                        reset,
  input  logic                                        load,
  output logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  tags
);
  typedef logic [ID_WIDTH-1:0] id_t;

  id_t k;
  id_t k_next;

  function automatic logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0] ids_of(id_t g);
    logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0] r;
    r[0] = g << 3;                  // 8*k
    r[1] = g;                       // k
    r[2] = g << 2;                  // 4*k
    r[3] = (g << 3) + (g << 2);     // 12*k
    return r;
  endfunction

  assign k_next = k + 1'b1;

  always_ff @(posedge clk) begin
    if (reset) begin
      k    <= '0;
      tags <= '0;
    end else if (load) begin
      k    <= k_next;
      tags <= ids_of(k_next);
    end
  end
endmodule
