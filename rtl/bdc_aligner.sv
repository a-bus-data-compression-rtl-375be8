// bdc_aligner: places the nibbles waiting at the head of the transmitter
// register into one bus word and computes the pattern indicator (PI).
//
// Inputs are the first SLOTS entries of the register (each a tag_e and a
// nibble), how many entries the register holds, and 'flush', which says no more
// entries will arrive in this burst.  A beat can be sent (fire=1) when the
// register holds a full bus word, or when it holds anything at all and the
// burst input is complete.  A short last beat is padded with TAG_H slots of
// nibble 0; the receiver knows the burst length and drops the words those
// slots would yield.  Slot p of the bus word is bits [p*HW +: HW], slot 0 being
// the first in stream order.
//
// The PI is the rank of the beat's tag sequence among all sequences possible
// after the previous beat (see bdc_pkg): a beat whose slot 0 holds TAG_U
// continues a split word and is ranked over SLOTS-1 slots.  'split_out' says the
// beat ends with the lower half of a split word.  Purely combinational, so
// compression adds no latency, as the source requires.
module bdc_aligner
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  parameter int unsigned HW    = 4,
  parameter int unsigned CW    = 5,            // width of 'count'
  localparam int unsigned PI_W = pi_width(SLOTS),
  localparam int unsigned EW   = 2 + HW,
  localparam int unsigned OW   = $clog2(SLOTS + 1)
) (
  input  logic [SLOTS-1:0][EW-1:0] head,      // {tag, nibble} per entry
  input  logic [CW-1:0]            count,
  input  logic                     flush,
  output logic                     fire,
  output logic [SLOTS*HW-1:0]      bus_word,
  output logic [PI_W-1:0]          pi,
  output logic [OW-1:0]            pop_n,
  output logic                     split_out,
  output logic                     padded,     // beat carries padding slots
  output logic [OW-1:0]            n_half      // half-word slots in the beat
);

  tag_e [SLOTS-1:0] tags;

  always_comb begin
    fire   = (int'(count) >= SLOTS) || (flush && count != '0);
    padded = int'(count) < SLOTS;
    pop_n  = padded ? OW'(count) : OW'(SLOTS);
    n_half = '0;
    for (int p = 0; p < SLOTS; p++) begin
      if (p < int'(count)) begin
        tags[p]                = tag_e'(head[p][EW-1 -: 2]);
        bus_word[p*HW +: HW]   = head[p][HW-1:0];
      end else begin
        tags[p]                = TAG_H;
        bus_word[p*HW +: HW]   = '0;
      end
      if (p < int'(count) && tags[p] == TAG_H) n_half = n_half + 1'b1;
    end
    split_out = (tags[SLOTS-1] == TAG_L);
  end

  // Rank of the tag sequence.
  always_comb begin
    logic [15:0] rank;
    logic        skip;
    rank = '0;
    skip = (tags[0] == TAG_U);
    for (int p = 0; p < SLOTS; p++) begin
      if (skip) begin
        skip = 1'b0;
      end else if (tags[p] == TAG_L) begin
        rank = rank + PAT_N[SLOTS-1-p];
        skip = 1'b1;
      end
    end
    pi = rank[PI_W-1:0];
  end

endmodule
