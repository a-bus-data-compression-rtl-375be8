// bdc_sram_writer: write engine of the SRAM controller for compressed write
// data.  The controller's receiver restores the words of a write burst; this
// engine writes them into the SRAM through its 32-bit port.
//
// A write header (hdr_valid with a traffic code other than TR_READ) sets the
// SRAM word address to the burst's byte address divided by the group size.
// Each restored group (in_valid/in_ready, IN_WORDS words, in_nwords of them
// valid, in_last on the burst's final group) then becomes one SRAM write with
// a per-word mask, and the address steps by one.  The SRAM port is shared with
// the read engine, which has priority: a group is taken only in a cycle where
// grant is high, i.e. no read is issued.  The receiver's queue absorbs the
// wait.  Write data and mask go straight from the receiver's group to the SRAM
// port, which registers them at its clock edge.  Groups start at word 0, so a
// burst is assumed to start on a group boundary.  That the SRAM takes
// decompressed write data through a 32-bit port follows the source; the
// sharing rule, the mask and the alignment are this design's own.
module bdc_sram_writer
  import bdc_pkg::*;
#(
  parameter int unsigned WORD_W   = 8,
  parameter int unsigned IN_WORDS = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned SRAM_AW  = 12,
  localparam int unsigned GW      = IN_WORDS * WORD_W,
  localparam int unsigned GCW     = $clog2(IN_WORDS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // write header from the controller's receiver
  input  logic                hdr_valid,
  input  ctrl_word_t          hdr_ctrl,
  input  logic [ADDR_W-1:0]   hdr_addr,
  // restored groups from the controller's receiver
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [GW-1:0]       in_data,
  input  logic [GCW-1:0]      in_nwords,
  input  logic                in_last,
  // SRAM write port
  input  logic                grant,
  output logic                sram_we,
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [GW-1:0]       sram_wdata,
  output logic [IN_WORDS-1:0] sram_wmask,
  output logic                busy
);

  localparam int unsigned GB_SHIFT = $clog2(GW / 8);   // bytes per group, log2

  logic               active;
  logic [SRAM_AW-1:0] waddr;

  assign in_ready   = active && grant;
  assign sram_we    = in_valid && in_ready;
  assign sram_addr  = waddr;
  assign sram_wdata = in_data;
  assign busy       = active;

  always_comb begin
    for (int i = 0; i < IN_WORDS; i++) sram_wmask[i] = (i < int'(in_nwords));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      waddr  <= '0;
    end else if (hdr_valid && hdr_ctrl.traffic != TR_READ) begin
      active <= 1'b1;
      waddr  <= SRAM_AW'(hdr_addr >> GB_SHIFT);
    end else if (sram_we) begin
      waddr <= waddr + 1'b1;
      if (in_last) active <= 1'b0;
    end
  end

  // The receiver sends the header before any group of its burst.
  a_group_in_burst: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> active);

endmodule
