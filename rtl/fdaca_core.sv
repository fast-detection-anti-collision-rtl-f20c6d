// fdaca_core: the FDACA reader as placed on the chip.
//
// Four tag IDs enter in parallel on data0..data3. Once per read cycle (four
// system clocks) they are captured, ordered from the smallest to the largest
// and then shown on data_out, one ID per system clock, so one tag is
// identified per system clock. It holds the clock divider, the fast search,
// the select generator and the read tag module, all on the system clock;
// this matches the design's synthesized block diagram, which has clk, reset,
// data0..data3 and data_out as its ports. tag_clk, tag_rise and sel_out are
// brought out in addition for observation and to pace an ID source.
//
// Timing (system clocks, edge E = the edge on which tag_rise is high):
//   E      data0..3 are sampled (they must be stable before E)
//   E+2    the ordered group is stored in the fast search (tag clock fall)
//   E+4    the group enters the read tag input registers
//   E+5..E+8  data_out shows the IDs smallest first, sel_out = 0,1,2,3
// A new group can be sampled every four clocks, so the pipeline runs at one
// ID per clock without gaps. reset is synchronous and active high.
module fdaca_core #(
  parameter int unsigned ID_WIDTH = fdaca_pkg::ID_W_DEFAULT
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [ID_WIDTH-1:0]   data0,
  input  logic [ID_WIDTH-1:0]   data1,
  input  logic [ID_WIDTH-1:0]   data2,
  input  logic [ID_WIDTH-1:0]   data3,
  output logic [ID_WIDTH-1:0]   data_out,
  output fdaca_pkg::sel_t       sel_out,
  output logic                  tag_clk,
  output logic                  tag_rise
);
  logic                                        tag_fall;
  logic [$clog2(fdaca_pkg::TAG_DIV)-1:0]       phase;
  fdaca_pkg::sel_t                             sel;
  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  ids_in;
  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  ids_sorted;

  assign ids_in = {data3, data2, data1, data0};

  clock_divider #(.DIV(fdaca_pkg::TAG_DIV)) u_tag_clk (
    .clk, .reset, .tag_clk, .tag_rise, .tag_fall, .phase
  );

  fast_search #(.ID_WIDTH(ID_WIDTH)) u_fast_search (
    .clk, .reset, .load(tag_rise), .store(tag_fall),
    .tags_in(ids_in), .min(ids_sorted)
  );

  select_generator #(.N(fdaca_pkg::N_TAGS)) u_select_generator (
    .clk, .reset, .sel
  );

  read_tag #(.ID_WIDTH(ID_WIDTH)) u_read_tag (
    .clk, .reset, .sel, .tags_in(ids_sorted), .data_out, .sel_out
  );

  // The select count and the tag clock phase run in lock step.
  a_sel_phase: assert property (@(posedge clk) disable iff (reset)
    sel == fdaca_pkg::sel_t'(phase));
endmodule
