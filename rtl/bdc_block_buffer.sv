// bdc_block_buffer: the 32-bit wide block buffer of the DMA controller, which
// takes the restored data from the receiver at full rate and hands it to the
// 16-bit external memory side.
//
// Write side: one group of IN_WORDS words per handshake (wr_valid/wr_ready),
// with the number of valid words and a last-of-burst flag, stored as one entry
// of a DEPTH-entry circular memory.  Read side: OUT_WORDS words per handshake
// (rd_valid/rd_ready); an entry is read out as consecutive OUT_WORDS-word
// pieces, skipping pieces with no valid word, so rd_nwords can be short only
// on the last piece of a partial group.  rd_last marks the final piece of a
// burst.  The source gives the buffer's purpose and its 32-bit width; depth,
// ports and the split into 16-bit pieces are this design's own.  Writes and
// reads may happen in the same cycle; data written is readable the next cycle.
module bdc_block_buffer #(
  parameter int unsigned WORD_W    = 8,
  parameter int unsigned IN_WORDS  = 4,
  parameter int unsigned OUT_WORDS = 2,
  parameter int unsigned DEPTH     = 64,
  localparam int unsigned ICW      = $clog2(IN_WORDS + 1),
  localparam int unsigned OCW      = $clog2(OUT_WORDS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_valid,
  output logic                        wr_ready,
  input  logic [IN_WORDS*WORD_W-1:0]  wr_data,
  input  logic [ICW-1:0]              wr_nwords,
  input  logic                        wr_last,
  output logic                        rd_valid,
  input  logic                        rd_ready,
  output logic [OUT_WORDS*WORD_W-1:0] rd_data,
  output logic [OCW-1:0]              rd_nwords,
  output logic                        rd_last,
  output logic [$clog2(DEPTH+1)-1:0]  level
);

  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned PIECES = IN_WORDS / OUT_WORDS;
  localparam int unsigned PW     = (PIECES > 1) ? $clog2(PIECES) : 1;
  localparam int unsigned EW     = IN_WORDS * WORD_W + ICW + 1;

  logic [EW-1:0]  mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [PW-1:0]  piece;
  logic [EW-1:0]  entry;
  logic [IN_WORDS*WORD_W-1:0] e_data;
  logic [ICW-1:0] e_n;
  logic           e_last;
  logic           wr_fire, rd_fire, entry_done;
  int unsigned    left;

  assign wr_ready = (int'(level) < DEPTH);
  assign wr_fire  = wr_valid && wr_ready;

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wptr] <= {wr_last, wr_nwords, wr_data};
  end

  assign entry  = mem[rptr];
  assign e_data = entry[IN_WORDS*WORD_W-1:0];
  assign e_n    = entry[IN_WORDS*WORD_W +: ICW];
  assign e_last = entry[EW-1];

  always_comb begin
    left       = int'(e_n) - int'(piece) * OUT_WORDS;
    rd_valid   = (level != '0);
    rd_data    = e_data[int'(piece)*OUT_WORDS*WORD_W +: OUT_WORDS*WORD_W];
    rd_nwords  = (left >= OUT_WORDS) ? OCW'(OUT_WORDS) : OCW'(left);
    entry_done = (left <= OUT_WORDS) || (int'(piece) == PIECES - 1);
    rd_last    = rd_valid && e_last && entry_done;
  end

  assign rd_fire = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      piece <= '0;
      level <= '0;
    end else begin
      if (wr_fire) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (rd_fire) begin
        if (entry_done) begin
          piece <= '0;
          rptr  <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
        end else begin
          piece <= piece + 1'b1;
        end
      end
      level <= level + $bits(level)'(wr_fire) - $bits(level)'(rd_fire && entry_done);
    end
  end

endmodule
