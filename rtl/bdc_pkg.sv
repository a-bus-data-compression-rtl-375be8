// bdc_pkg: types and constants shared by the bus data compression blocks.
//
// The compression scheme sends a byte stream over a narrow phase-based bus.
// A byte whose upper nibble equals the upper nibble of the byte before it is
// sent as a half-byte 'H' (its lower nibble only); any other byte is sent as a
// full byte 'B' (lower nibble first, then upper nibble).  The nibbles are packed
// back to back into the bus word, so a full byte may be split over two beats.
// Each bus nibble slot therefore carries one of three kinds of nibble (tag_e):
//   TAG_H  the lower nibble of a half-byte,
//   TAG_L  the lower nibble of a full byte,
//   TAG_U  the upper nibble of a full byte (always right after its TAG_L,
//          possibly in slot 0 of the next beat).
// The sequence of tags in one beat is the "pattern"; its index, the pattern
// indicator (PI), travels on the PHASE lines, which are idle during data phases.
//
// Pattern numbering (this design's own, the source fixes no code values): with
// n free slots the patterns are counted by N(0)=1, N(1)=2 (H, or a split L),
// N(n)=N(n-1)+N(n-2).  A beat that starts with the upper half of a split byte
// has SLOTS-1 free slots, any other beat SLOTS.  Within a beat, items are ranked
// with H before B, so a full byte that starts with n free slots adds N(n-1) to
// the PI.  For a 16-bit bus (4 nibble slots) this gives 8 + 5 patterns and a
// 3-bit PI; for a 32-bit bus 55 + 34 patterns and a 6-bit PI; for an 8-bit bus
// 3 + 2 patterns and a 2-bit PI.
package bdc_pkg;

  typedef enum logic [1:0] {
    TAG_H = 2'd0,
    TAG_L = 2'd1,
    TAG_U = 2'd2
  } tag_e;

  // PHASE line codes outside data phases; during data phases PHASE holds the PI.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_CTRL = 3'd1,
    PH_ADDR = 3'd2
  } phase_e;

  localparam int unsigned PHASE_W = 3;

  // Traffic types in the control word.
  localparam logic [1:0] TR_WRITE = 2'd0;  // data phases follow on this channel
  localparam logic [1:0] TR_READ  = 2'd1;  // header only; data returns on the slave channel

  // Control phase word (16 bits, one beat of the 16-bit channel).
  typedef struct packed {
    logic       cmp_en;     // compression on for this burst
    logic       wide_word;  // word size: 0 = one byte, 1 = two bytes
    logic [1:0] traffic;    // traffic type
    logic [1:0] burst;      // burst type
    logic [1:0] cache;      // cache control
    logic [7:0] len_m1;     // burst length in words, minus one
  } ctrl_word_t;

  localparam int unsigned MAX_SLOTS = 16;

  // Number of slot fillings for n free slots, n = 0..MAX_SLOTS.
  function automatic logic [MAX_SLOTS:0][15:0] pat_table();
    logic [MAX_SLOTS:0][15:0] t;
    t[0] = 16'd1;
    t[1] = 16'd2;
    for (int i = 2; i <= MAX_SLOTS; i++) t[i] = t[i-1] + t[i-2];
    return t;
  endfunction

  localparam logic [MAX_SLOTS:0][15:0] PAT_N = pat_table();

  // PI width for a bus of 'slots' nibble slots.
  function automatic int unsigned pi_width(int unsigned slots);
    return (PAT_N[slots] <= 16'd2) ? 1 : $clog2(PAT_N[slots]);
  endfunction

endpackage
