// fdaca_pkg: constants and helpers shared by the FDACA (Fast Detection
// Anti-Collision Algorithm) modules.
//
// The FDACA reader handles tags in groups of four: every read cycle (one
// period of the tag clock, four system clocks long) four tag IDs are taken in
// parallel, ordered from smallest to largest by a two-level compare tree and
// then shown one per system clock. The group size of four and the 4:1 ratio
// between the tag clock and the system clock come from the design; the ID
// generator pattern is read off its example waveforms (see gen_ids).
package fdaca_pkg;

  // Tags handled per read cycle (four leaves of the two-level tree).
  localparam int unsigned N_TAGS = 4;
  // Width of the slot / select index that walks through one group.
  localparam int unsigned SEL_W = $clog2(N_TAGS);
  // System clocks per tag clock period (= per read cycle).
  localparam int unsigned TAG_DIV = 4;
  // Default tag ID width in bits.
  localparam int unsigned ID_W_DEFAULT = 8;

  typedef logic [SEL_W-1:0] sel_t;

endpackage
