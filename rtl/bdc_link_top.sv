// bdc_link_top: the compressed transfers of a video decoder's loop filter and
// motion compensation on a 16-bit phase-based on-chip bus.
//
// Write path (loop filter to external memory): the core hands bursts of data
// words to a transmitter, which compresses them on the fly (half-words where the
// upper half repeats) and sends them over a phase-based master channel
// (snp_if: CHANNEL, PHASE, VALID, READY) with the pattern indicator on PHASE.
// A receiver in the DMA controller restores the words and writes them, 32 bits
// at a time, into the DMA controller's block buffer, which the 16-bit external
// memory side reads (sd_* ports).
//
// Read path (internal SRAM to loop filter): the core issues a read request
// (rq_*); a second master channel carries it as a header (control and address
// beats) to the SRAM controller.  There bdc_sram_reader reads the SRAM through
// its 32-bit port (sram_* ports; the SRAM macro itself is outside) and a
// transmitter returns the data compressed, as data beats only, on the slave
// channel.  The core's receiver, armed with the request's control word when
// the request is sent, restores the words on the rdat_* port.  A new read
// request is taken once the previous read data has been delivered.
//
// SRAM write path (motion compensation to internal SRAM): the MC core's bursts
// (mc_* ports) are compressed by a transmitter on the MC's master channel; the
// SRAM controller's second receiver restores them and bdc_sram_writer writes
// them through the SRAM's 32-bit port with a word mask.  The read engine and
// the write engine share the single SRAM port; a read has priority and the
// write waits a cycle (sram_addr belongs to whichever strobe is high).
//
// Channel signals are brought out (mch_*, sch_*) so bus occupancy can be
// observed; err is the OR of the four receivers' error flags.  Defaults are
// the source's main configuration: 16-bit channels, one-byte words, 3-bit PI,
// 32-bit core-side data.  Queue and buffer depths, the 32-bit address in two
// address beats, the SRAM address width and the control word layout are this
// design's own.
module bdc_link_top
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS     = 4,
  parameter int unsigned WORD_W    = 8,
  parameter int unsigned IN_WORDS  = 4,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned TX_QDEPTH = 16,
  parameter int unsigned RX_QDEPTH = 8,
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned SRAM_AW   = 12,
  localparam int unsigned HW       = WORD_W / 2,
  localparam int unsigned BUS_W    = SLOTS * HW,
  localparam int unsigned PI_W     = pi_width(SLOTS),
  localparam int unsigned PH_W     = (PI_W > PHASE_W) ? PI_W : PHASE_W,
  localparam int unsigned GW       = IN_WORDS * WORD_W,
  localparam int unsigned SD_WORDS = IN_WORDS / 2,
  localparam int unsigned GCW      = $clog2(IN_WORDS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // core: write bursts
  input  logic                       req_valid,
  output logic                       req_ready,
  input  ctrl_word_t                 req_ctrl,
  input  logic [ADDR_W-1:0]          req_addr,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [GW-1:0]              in_data,
  // DMA controller: burst header and block buffer, external memory side
  output logic                       hdr_valid,
  output ctrl_word_t                 hdr_ctrl,
  output logic [ADDR_W-1:0]          hdr_addr,
  output logic                       sd_valid,
  input  logic                       sd_ready,
  output logic [SD_WORDS*WORD_W-1:0] sd_data,
  output logic [$clog2(SD_WORDS+1)-1:0] sd_nwords,
  output logic                       sd_last,
  // core: read requests (traffic type is forced to TR_READ) and read data
  input  logic                       rq_valid,
  output logic                       rq_ready,
  input  ctrl_word_t                 rq_ctrl,
  input  logic [ADDR_W-1:0]          rq_addr,
  output logic                       rdat_valid,
  input  logic                       rdat_ready,
  output logic [GW-1:0]              rdat_data,
  output logic [GCW-1:0]             rdat_nwords,
  output logic                       rdat_last,
  // motion compensation core: write bursts into the SRAM
  input  logic                       mc_req_valid,
  output logic                       mc_req_ready,
  input  ctrl_word_t                 mc_req_ctrl,
  input  logic [ADDR_W-1:0]          mc_req_addr,
  input  logic                       mc_in_valid,
  output logic                       mc_in_ready,
  input  logic [GW-1:0]              mc_in_data,
  // SRAM port of the SRAM controller (one access per cycle)
  output logic                       sram_re,
  output logic                       sram_we,
  output logic [SRAM_AW-1:0]         sram_addr,
  output logic [GW-1:0]              sram_wdata,
  output logic [IN_WORDS-1:0]        sram_wmask,
  input  logic [GW-1:0]              sram_rdata,
  // channel observation and status
  output logic                       mch_valid,
  output logic                       mch_ready,
  output logic [BUS_W-1:0]           mch_channel,
  output logic [PH_W-1:0]            mch_phase,
  output logic                       sch_valid,
  output logic                       sch_ready,
  output logic [BUS_W-1:0]           sch_channel,
  output logic [PH_W-1:0]            sch_phase,
  output logic                       tx_busy,
  output logic                       err
);

  // ---------------- write path ----------------
  snp_if #(.BUS_W(BUS_W), .PH_W(PH_W)) mch (.clk(clk), .rst_n(rst_n));

  logic           rx_valid, rx_ready, rx_last, wr_err;
  logic [GW-1:0]  rx_data;
  logic [GCW-1:0] rx_n;

  bdc_transmitter #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .IN_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(TX_QDEPTH)
  ) u_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (req_valid),
    .req_ready    (req_ready),
    .req_ctrl     (req_ctrl),
    .req_addr     (req_addr),
    .req_data_only(1'b0),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .in_data      (in_data),
    .m_valid      (mch.valid),
    .m_ready      (mch.ready),
    .m_channel    (mch.channel),
    .m_phase      (mch.phase),
    .busy         (tx_busy)
  );

  bdc_receiver #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .OUT_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(RX_QDEPTH)
  ) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (mch.valid),
    .s_ready   (mch.ready),
    .s_channel (mch.channel),
    .s_phase   (mch.phase),
    .arm_valid (1'b0),
    .arm_ready (),
    .arm_ctrl  ('0),
    .hdr_valid (hdr_valid),
    .hdr_ctrl  (hdr_ctrl),
    .hdr_addr  (hdr_addr),
    .out_valid (rx_valid),
    .out_ready (rx_ready),
    .out_data  (rx_data),
    .out_nwords(rx_n),
    .out_last  (rx_last),
    .err       (wr_err)
  );

  bdc_block_buffer #(
    .WORD_W(WORD_W), .IN_WORDS(IN_WORDS), .OUT_WORDS(SD_WORDS), .DEPTH(BUF_DEPTH)
  ) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (rx_valid),
    .wr_ready (rx_ready),
    .wr_data  (rx_data),
    .wr_nwords(rx_n),
    .wr_last  (rx_last),
    .rd_valid (sd_valid),
    .rd_ready (sd_ready),
    .rd_data  (sd_data),
    .rd_nwords(sd_nwords),
    .rd_last  (sd_last),
    .level    ()
  );

  assign mch_valid   = mch.valid;
  assign mch_ready   = mch.ready;
  assign mch_channel = mch.channel;
  assign mch_phase   = mch.phase;

  // ---------------- read path ----------------
  snp_if #(.BUS_W(BUS_W), .PH_W(PH_W)) rch (.clk(clk), .rst_n(rst_n));  // requests
  snp_if #(.BUS_W(BUS_W), .PH_W(PH_W)) sch (.clk(clk), .rst_n(rst_n));  // read data

  ctrl_word_t       rq_ctrl_rd, srx_ctrl, rd_req_ctrl;
  logic             rtx_ready, arm_ready, srx_hdr, rd_req_valid, rd_req_ready;
  logic [ADDR_W-1:0] srx_addr;
  logic             rd_in_valid, rd_in_ready;
  logic [GW-1:0]    rd_in_data;
  logic             srx_err, lrx_err;
  logic [SRAM_AW-1:0] sram_raddr;

  always_comb begin
    rq_ctrl_rd         = rq_ctrl;
    rq_ctrl_rd.traffic = TR_READ;
  end

  // The request and the arming of the core's receiver happen together.
  assign rq_ready = rtx_ready && arm_ready;

  bdc_transmitter #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .IN_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(TX_QDEPTH)
  ) u_rq_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (rq_valid && arm_ready),
    .req_ready    (rtx_ready),
    .req_ctrl     (rq_ctrl_rd),
    .req_addr     (rq_addr),
    .req_data_only(1'b0),
    .in_valid     (1'b0),
    .in_ready     (),
    .in_data      ('0),
    .m_valid      (rch.valid),
    .m_ready      (rch.ready),
    .m_channel    (rch.channel),
    .m_phase      (rch.phase),
    .busy         ()
  );

  bdc_receiver #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .OUT_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(RX_QDEPTH)
  ) u_sram_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (rch.valid),
    .s_ready   (rch.ready),
    .s_channel (rch.channel),
    .s_phase   (rch.phase),
    .arm_valid (1'b0),
    .arm_ready (),
    .arm_ctrl  ('0),
    .hdr_valid (srx_hdr),
    .hdr_ctrl  (srx_ctrl),
    .hdr_addr  (srx_addr),
    .out_valid (),
    .out_ready (1'b1),
    .out_data  (),
    .out_nwords(),
    .out_last  (),
    .err       (srx_err)
  );

  bdc_sram_reader #(
    .WORD_W(WORD_W), .IN_WORDS(IN_WORDS), .ADDR_W(ADDR_W), .SRAM_AW(SRAM_AW)
  ) u_sram_rd (
    .clk         (clk),
    .rst_n       (rst_n),
    .hdr_valid   (srx_hdr),
    .hdr_ctrl    (srx_ctrl),
    .hdr_addr    (srx_addr),
    .tx_req_valid(rd_req_valid),
    .tx_req_ready(rd_req_ready),
    .tx_req_ctrl (rd_req_ctrl),
    .tx_in_valid (rd_in_valid),
    .tx_in_ready (rd_in_ready),
    .tx_in_data  (rd_in_data),
    .sram_re     (sram_re),
    .sram_addr   (sram_raddr),
    .sram_rdata  (sram_rdata),
    .busy        ()
  );

  bdc_transmitter #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .IN_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(TX_QDEPTH)
  ) u_sram_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (rd_req_valid),
    .req_ready    (rd_req_ready),
    .req_ctrl     (rd_req_ctrl),
    .req_addr     ('0),
    .req_data_only(1'b1),
    .in_valid     (rd_in_valid),
    .in_ready     (rd_in_ready),
    .in_data      (rd_in_data),
    .m_valid      (sch.valid),
    .m_ready      (sch.ready),
    .m_channel    (sch.channel),
    .m_phase      (sch.phase),
    .busy         ()
  );

  bdc_receiver #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .OUT_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(RX_QDEPTH)
  ) u_lf_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (sch.valid),
    .s_ready   (sch.ready),
    .s_channel (sch.channel),
    .s_phase   (sch.phase),
    .arm_valid (rq_valid && rtx_ready),
    .arm_ready (arm_ready),
    .arm_ctrl  (rq_ctrl_rd),
    .hdr_valid (),
    .hdr_ctrl  (),
    .hdr_addr  (),
    .out_valid (rdat_valid),
    .out_ready (rdat_ready),
    .out_data  (rdat_data),
    .out_nwords(rdat_nwords),
    .out_last  (rdat_last),
    .err       (lrx_err)
  );

  assign sch_valid   = sch.valid;
  assign sch_ready   = sch.ready;
  assign sch_channel = sch.channel;
  assign sch_phase   = sch.phase;

  // ---------------- SRAM write path ----------------
  snp_if #(.BUS_W(BUS_W), .PH_W(PH_W)) wch (.clk(clk), .rst_n(rst_n));  // MC writes

  ctrl_word_t         w_hdr_ctrl;
  logic               w_hdr_valid, w_valid, w_ready, w_last, wrx_err;
  logic [ADDR_W-1:0]  w_hdr_addr;
  logic [GW-1:0]      w_data;
  logic [GCW-1:0]     w_n;
  logic [SRAM_AW-1:0] sram_waddr;

  bdc_transmitter #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .IN_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(TX_QDEPTH)
  ) u_mc_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (mc_req_valid),
    .req_ready    (mc_req_ready),
    .req_ctrl     (mc_req_ctrl),
    .req_addr     (mc_req_addr),
    .req_data_only(1'b0),
    .in_valid     (mc_in_valid),
    .in_ready     (mc_in_ready),
    .in_data      (mc_in_data),
    .m_valid      (wch.valid),
    .m_ready      (wch.ready),
    .m_channel    (wch.channel),
    .m_phase      (wch.phase),
    .busy         ()
  );

  bdc_receiver #(
    .SLOTS(SLOTS), .WORD_W(WORD_W), .OUT_WORDS(IN_WORDS),
    .ADDR_W(ADDR_W), .QDEPTH(RX_QDEPTH)
  ) u_sramw_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (wch.valid),
    .s_ready   (wch.ready),
    .s_channel (wch.channel),
    .s_phase   (wch.phase),
    .arm_valid (1'b0),
    .arm_ready (),
    .arm_ctrl  ('0),
    .hdr_valid (w_hdr_valid),
    .hdr_ctrl  (w_hdr_ctrl),
    .hdr_addr  (w_hdr_addr),
    .out_valid (w_valid),
    .out_ready (w_ready),
    .out_data  (w_data),
    .out_nwords(w_n),
    .out_last  (w_last),
    .err       (wrx_err)
  );

  bdc_sram_writer #(
    .WORD_W(WORD_W), .IN_WORDS(IN_WORDS), .ADDR_W(ADDR_W), .SRAM_AW(SRAM_AW)
  ) u_sram_wr (
    .clk       (clk),
    .rst_n     (rst_n),
    .hdr_valid (w_hdr_valid),
    .hdr_ctrl  (w_hdr_ctrl),
    .hdr_addr  (w_hdr_addr),
    .in_valid  (w_valid),
    .in_ready  (w_ready),
    .in_data   (w_data),
    .in_nwords (w_n),
    .in_last   (w_last),
    .grant     (!sram_re),
    .sram_we   (sram_we),
    .sram_addr (sram_waddr),
    .sram_wdata(sram_wdata),
    .sram_wmask(sram_wmask),
    .busy      ()
  );

  assign sram_addr = sram_we ? sram_waddr : sram_raddr;

  assign err = wr_err || srx_err || lrx_err || wrx_err;

endmodule
