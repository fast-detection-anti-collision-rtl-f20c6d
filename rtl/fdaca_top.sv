// fdaca_top: complete FDACA system as built for FPGA verification.
//
// The FDACA core (clock divider, fast search, select generator, read tag)
// is fed by the data generator, which stands in for the tags and presents
// four new IDs at every rising edge of the tag clock. The result appears on
// data_out: the four IDs of each group, smallest first, one per system
// clock, with sel_out giving the slot (0..3) and tag_clk the read cycle.
//
// The data generator updates on the same edge on which the fast search
// samples, so the search captures the group presented in the previous read
// cycle: a group generated at edge G is shown on data_out in the clocks
// G+9 .. G+12 (4 cycles to be sampled, then 5 to 8 more as described in
// fdaca_core). reset is synchronous and active high.
module fdaca_top #(
  parameter int unsigned ID_WIDTH = fdaca_pkg::ID_W_DEFAULT
) (
  input  logic                clk,
  input  logic                reset,
  output logic                tag_clk,
  output fdaca_pkg::sel_t     sel_out,
  output logic [ID_WIDTH-1:0] data_out
);
  logic                                        tag_rise;
  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  tags;

  data_generator #(.ID_WIDTH(ID_WIDTH)) u_data_generator (
    .clk, .reset, .load(tag_rise), .tags
  );

  fdaca_core #(.ID_WIDTH(ID_WIDTH)) u_core (
    .clk, .reset,
    .data0(tags[0]), .data1(tags[1]), .data2(tags[2]), .data3(tags[3]),
    .data_out, .sel_out, .tag_clk, .tag_rise
  );
endmodule
