// bdc_reshaper: the duplicator/re-shaper of the receiver.  Rebuilds whole
// words from one beat of nibbles and their tags.
//
// A TAG_H slot becomes a word whose upper half is duplicated from the word
// before it; a TAG_U slot completes a full word with the TAG_L nibble just
// before it, which for slot 0 is the nibble kept from the previous beat.  A
// TAG_L in the last slot is kept for the next beat.  The rebuilt words of the
// current beat appear combinationally on 'words' (stream order, word 0 first)
// with their number in 'nwords'; the carried state (last upper half, pending
// lower half) is updated when 'beat' is high.  'start' clears that state at the
// start of a burst, whose first word is always full.  Behaviour follows the
// source; interface and timing are this design's choice.
module bdc_reshaper
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS  = 4,
  parameter int unsigned WORD_W = 8,
  localparam int unsigned HW    = WORD_W / 2,
  localparam int unsigned OW    = $clog2(SLOTS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        beat,
  input  logic [SLOTS*HW-1:0]         bus_word,
  input  tag_e [SLOTS-1:0]            tags,
  output logic [SLOTS-1:0][WORD_W-1:0] words,
  output logic [OW-1:0]               nwords
);

  logic [HW-1:0] prev_hi, pend_lo;
  logic [HW-1:0] hi_after;

  always_comb begin
    logic [HW-1:0] hi, nib, lo;
    int unsigned   k;
    hi    = prev_hi;
    k     = 0;
    words = '0;
    for (int p = 0; p < SLOTS; p++) begin
      nib = bus_word[p*HW +: HW];
      lo  = (p == 0) ? pend_lo : bus_word[((p == 0) ? 0 : p-1)*HW +: HW];
      case (tags[p])
        TAG_H: begin
          words[k] = {hi, nib};
          k        = k + 1;
        end
        TAG_U: begin
          words[k] = {nib, lo};
          hi       = nib;
          k        = k + 1;
        end
        default: ;
      endcase
    end
    nwords   = OW'(k);
    hi_after = hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_hi <= '0;
      pend_lo <= '0;
    end else if (start) begin
      prev_hi <= '0;
      pend_lo <= '0;
    end else if (beat) begin
      prev_hi <= hi_after;
      if (tags[SLOTS-1] == TAG_L) pend_lo <= bus_word[(SLOTS-1)*HW +: HW];
    end
  end

endmodule
