// bdc_pi_decoder: turns a received pattern indicator back into the tag of
// each nibble slot of the bus word.
//
// 'split_in' says the previous beat ended with the lower half of a split word,
// so slot 0 of this beat is that word's upper half (TAG_U) and the PI ranks the
// remaining SLOTS-1 slots.  The ranking is the inverse of bdc_aligner's: at a
// slot with n free slots left, a remaining rank below N(n-1) means a half-word,
// otherwise a full word starts there.  'pi_ok' is low for a PI that names no
// pattern.  'split_out' is the split state for the next beat.  The decoder and
// its role follow the source; the code assignment is this design's own.
// Purely combinational.
module bdc_pi_decoder
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  localparam int unsigned PI_W = pi_width(SLOTS)
) (
  input  logic [PI_W-1:0]  pi,
  input  logic             split_in,
  output tag_e [SLOTS-1:0] tags,
  output logic             split_out,
  output logic             pi_ok
);

  always_comb begin
    logic [15:0] rank;
    logic        upper_next;
    rank       = 16'(pi);
    upper_next = split_in;
    for (int p = 0; p < SLOTS; p++) begin
      if (upper_next) begin
        tags[p]    = TAG_U;
        upper_next = 1'b0;
      end else if (rank < PAT_N[SLOTS-1-p]) begin
        tags[p]    = TAG_H;
      end else begin
        rank       = rank - PAT_N[SLOTS-1-p];
        tags[p]    = TAG_L;
        upper_next = 1'b1;
      end
    end
    split_out = (tags[SLOTS-1] == TAG_L);
    pi_ok     = 16'(pi) < (split_in ? PAT_N[SLOTS-1] : PAT_N[SLOTS]);
  end

endmodule
