// fast_search: the collision-free search at the heart of the FDACA reader.
//
// Four tag IDs that answer at the same time are not read bit by bit: the
// whole group is captured at once and ordered from the smallest ID to the
// largest, so every tag of the group is identified within one read cycle.
//
// Operation per read cycle:
//   1. load (tag clock rising): the four IDs are copied into four input
//      registers.
//   2. A two-level compare tree orders them. Level 1 has a left branch that
//      orders IDs 0 and 1 and a right branch that orders IDs 2 and 3, each an
//      if-else compare. Level 2 takes the smaller of the two branch minima as
//      the smallest ID and the larger of the two branch maxima as the largest,
//      and orders the remaining two to give the middle pair.
//   3. store (tag clock falling, two system clocks after load): the four
//      ordered IDs are written into the output registers min[0..3],
//      min[0] being the smallest.
// The tree is combinational between the input and output registers and so
// has half a tag clock (two system clocks) to settle; a static timing
// constraint of two cycles applies to it.
//
// The load/store edges, the two branches and the smallest-to-largest order
// follow the design. The exact level-2 merge (a five-comparator network) is
// this implementation's way of completing the tree. Equal IDs are kept; the
// reset values (all zero) are a choice of this implementation.
module fast_search #(
  parameter int unsigned ID_WIDTH = fdaca_pkg::ID_W_DEFAULT
) (
  input  logic                                        clk,
  input  logic                                        reset,
  input  logic                                        load,
  input  logic                                        store,
  input  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  tags_in,
  output logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0]  min
);
  typedef logic [ID_WIDTH-1:0] id_t;

  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0] tag_q;
  logic [fdaca_pkg::N_TAGS-1:0][ID_WIDTH-1:0] ordered;

  // Level 1 results.
  id_t l_min, l_max, r_min, r_max;
  // Level 2 intermediates.
  id_t mid_lo, mid_hi;

  always_ff @(posedge clk) begin
    if (reset)     tag_q <= '0;
    else if (load) tag_q <= tags_in;
  end

  // Level 1: left branch (IDs 0,1) and right branch (IDs 2,3).
  always_comb begin
    if (tag_q[0] <= tag_q[1]) begin l_min = tag_q[0]; l_max = tag_q[1]; end
    else                      begin l_min = tag_q[1]; l_max = tag_q[0]; end
    if (tag_q[2] <= tag_q[3]) begin r_min = tag_q[2]; r_max = tag_q[3]; end
    else                      begin r_min = tag_q[3]; r_max = tag_q[2]; end
  end

  // Level 2: smallest, largest, and the ordered middle pair.
  always_comb begin
    if (l_min <= r_min) begin ordered[0] = l_min; mid_lo = r_min; end
    else                begin ordered[0] = r_min; mid_lo = l_min; end
    if (l_max <= r_max) begin ordered[3] = r_max; mid_hi = l_max; end
    else                begin ordered[3] = l_max; mid_hi = r_max; end
    if (mid_lo <= mid_hi) begin ordered[1] = mid_lo; ordered[2] = mid_hi; end
    else                  begin ordered[1] = mid_hi; ordered[2] = mid_lo; end
  end

  always_ff @(posedge clk) begin
    if (reset)      min <= '0;
    else if (store) min <= ordered;
  end

  // The stored group is always in ascending order.
  a_sorted: assert property (@(posedge clk) disable iff (reset)
    (min[0] <= min[1]) && (min[1] <= min[2]) && (min[2] <= min[3]));
endmodule
