// bdc_comparator: decides, for each word of an input group, whether it can be
// sent as a half-word.
//
// A word is a half-word (is_half=1) when compression is enabled and its upper
// half equals the upper half of the word before it in the stream.  The word
// before word 0 of a group is the last word of the previous group, held by the
// caller in prev_hi/prev_valid; the first word of a burst has no predecessor
// (prev_valid=0) and is always sent whole.  The comparison of the upper bits of
// the previous and current word is the source's; comparing up to NWORDS words at
// once (NWORDS=4 matches the 32-bit buffer interfaces of the modified cores) is
// this design's choice.  Purely combinational.
module bdc_comparator #(
  parameter int unsigned NWORDS = 4,
  parameter int unsigned WORD_W = 8,
  localparam int unsigned HW    = WORD_W / 2,
  localparam int unsigned CNT_W = $clog2(NWORDS + 1)
) (
  input  logic                     enable,
  input  logic [NWORDS*WORD_W-1:0] words,      // word i at [i*WORD_W +: WORD_W]
  input  logic [CNT_W-1:0]         nvalid,     // words 0..nvalid-1 are valid
  input  logic                     prev_valid,
  input  logic [HW-1:0]            prev_hi,
  output logic [NWORDS-1:0]        is_half,
  output logic                     last_valid, // predecessor for the next group
  output logic [HW-1:0]            last_hi
);

  always_comb begin
    logic          ref_valid;
    logic [HW-1:0] ref_hi;
    ref_valid = prev_valid;
    ref_hi    = prev_hi;
    is_half   = '0;
    for (int i = 0; i < NWORDS; i++) begin
      if (CNT_W'(i) < nvalid) begin
        is_half[i] = enable && ref_valid &&
                     (words[i*WORD_W+HW +: HW] == ref_hi);
        ref_valid  = 1'b1;
        ref_hi     = words[i*WORD_W+HW +: HW];
      end
    end
    last_valid = ref_valid;
    last_hi    = ref_hi;
  end

endmodule
