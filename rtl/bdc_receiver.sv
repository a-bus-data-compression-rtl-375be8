// bdc_receiver: receiver side of a compressed burst on a phase-based channel:
// PI decoder and duplicator/re-shaper plus the phase sequencing.
//
// The receiver expects a control beat (PHASE=PH_CTRL), ADDR_BEATS address beats
// (PHASE=PH_ADDR) and then data beats whose PHASE lines carry the PI. After the
// last address beat hdr_valid pulses for one cycle with the control word and
// address.  It decodes each data beat into words, keeps only as many as the
// burst length (len_m1+1) asks for, so padding in the last beat is dropped, and
// gathers them into groups of OUT_WORDS words on the out_* port (valid / ready;
// word 0 in the low bits; out_nwords words valid; out_last on the burst's final
// group).  READY is withheld in a data phase while the output queue, after the
// group leaving in the same cycle, cannot take a full beat (so READY depends
// combinationally on out_ready), and in the idle state until the previous burst
// has left the queue.  err is a sticky protocol flag: a beat with an unexpected
// phase, a PI that names no pattern, or a control word whose word size does not
// match WORD_W.  A read request (traffic TR_READ) is a header only: hdr_valid
// pulses and the receiver is idle again.  For read data on a slave channel,
// which has no control or address beats, the requesting side arms the receiver
// (arm_valid/arm_ready, with the control word of its own request) and the next
// beats are taken as data.  Decoder and re-shaper follow the source; the queue,
// error flag and phase codes are this design's choices.
module bdc_receiver
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS     = 4,
  parameter int unsigned WORD_W    = 8,
  parameter int unsigned OUT_WORDS = 4,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned QDEPTH    = 8,
  localparam int unsigned HW       = WORD_W / 2,
  localparam int unsigned BUS_W    = SLOTS * HW,
  localparam int unsigned PI_W     = pi_width(SLOTS),
  localparam int unsigned PH_W     = (PI_W > PHASE_W) ? PI_W : PHASE_W,
  localparam int unsigned ADDR_BEATS = (ADDR_W + BUS_W - 1) / BUS_W,
  localparam int unsigned OUT_W    = OUT_WORDS * WORD_W,
  localparam int unsigned OCW      = $clog2(OUT_WORDS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // phase-based channel
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [BUS_W-1:0]  s_channel,
  input  logic [PH_W-1:0]   s_phase,
  // data-only burst expected (read data on a slave channel)
  input  logic              arm_valid,
  output logic              arm_ready,
  input  ctrl_word_t        arm_ctrl,
  // burst header
  output logic              hdr_valid,
  output ctrl_word_t        hdr_ctrl,
  output logic [ADDR_W-1:0] hdr_addr,
  // restored data
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data,
  output logic [OCW-1:0]    out_nwords,
  output logic              out_last,
  // status
  output logic              err
);

  localparam int unsigned QCW = $clog2(QDEPTH + 1);
  localparam int unsigned SW  = $clog2(SLOTS + 1);
  localparam int unsigned ABW = (ADDR_BEATS > 1) ? $clog2(ADDR_BEATS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;

  // A data beat is taken only when SLOTS words fit, and a group leaves only
  // when OUT_WORDS words are ready, so a smaller queue could lock up.
  if (QDEPTH < SLOTS + OUT_WORDS - 1) begin : g_depth_check
    $error("bdc_receiver: QDEPTH must be at least SLOTS + OUT_WORDS - 1");
  end

  state_e                      state;
  ctrl_word_t                  ctrl;
  logic [ADDR_BEATS*BUS_W-1:0] addr;
  logic [ABW-1:0]              abeat;
  logic [8:0]                  words_left;
  logic                        split;

  tag_e [SLOTS-1:0]            tags;
  logic                        dec_split, pi_ok;
  logic [SLOTS-1:0][WORD_W-1:0] rs_words;
  logic [SW-1:0]               rs_n;

  logic                        beat, hs;
  logic [15:0]                 ch16;
  logic [SW-1:0]               push_n;
  logic [OCW-1:0]              pop_n;
  logic [QCW-1:0]              qcount;
  logic [OUT_WORDS-1:0][WORD_W-1:0] qhead;

  assign ch16 = 16'(s_channel);
  assign hs   = s_valid && s_ready;
  assign beat = hs && (state == S_DATA);

  bdc_pi_decoder #(.SLOTS(SLOTS)) u_dec (
    .pi       (s_phase[PI_W-1:0]),
    .split_in (split),
    .tags     (tags),
    .split_out(dec_split),
    .pi_ok    (pi_ok)
  );

  bdc_reshaper #(.SLOTS(SLOTS), .WORD_W(WORD_W)) u_rs (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (state == S_IDLE),
    .beat    (beat),
    .bus_word(s_channel),
    .tags    (tags),
    .words   (rs_words),
    .nwords  (rs_n)
  );

  assign push_n = !beat ? '0 :
                  (9'(rs_n) > words_left) ? SW'(words_left) : rs_n;

  bdc_queue #(.EW(WORD_W), .DEPTH(QDEPTH), .NIN(SLOTS), .NOUT(OUT_WORDS)) u_outq (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .push_n   (push_n),
    .push_data(rs_words),
    .pop_n    (pop_n),
    .count    (qcount),
    .head     (qhead)
  );

  always_comb begin
    case (state)
      S_IDLE:  s_ready = (qcount == '0) && !arm_valid;
      S_ADDR:  s_ready = 1'b1;
      // counts the group leaving in this cycle, so a full-rate burst
      // never waits on the queue while the consumer keeps up
      default: s_ready = (int'(qcount) - int'(pop_n) + SLOTS <= QDEPTH);
    endcase
  end

  assign out_valid  = (int'(qcount) >= OUT_WORDS) || (state != S_DATA && qcount != '0);
  assign out_nwords = (int'(qcount) >= OUT_WORDS) ? OCW'(OUT_WORDS) : OCW'(qcount);
  assign out_last   = out_valid && (state != S_DATA) && (int'(qcount) <= OUT_WORDS);
  assign pop_n      = (out_valid && out_ready) ? out_nwords : '0;
  always_comb begin
    for (int i = 0; i < OUT_WORDS; i++) out_data[i*WORD_W +: WORD_W] = qhead[i];
  end

  assign arm_ready = (state == S_IDLE) && (qcount == '0);
  assign hdr_ctrl  = ctrl;
  assign hdr_addr = addr[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ctrl       <= '0;
      addr       <= '0;
      abeat      <= '0;
      words_left <= '0;
      split      <= 1'b0;
      hdr_valid  <= 1'b0;
      err        <= 1'b0;
    end else begin
      hdr_valid <= 1'b0;
      case (state)
        S_IDLE: if (arm_valid && arm_ready) begin
          ctrl       <= arm_ctrl;
          words_left <= 9'(arm_ctrl.len_m1) + 9'd1;
          split      <= 1'b0;
          state      <= S_DATA;
        end else if (hs) begin
          if (s_phase == PH_W'(PH_CTRL)) begin
            ctrl       <= ctrl_word_t'(ch16);
            words_left <= 9'(ch16[7:0]) + 9'd1;
            abeat      <= '0;
            split      <= 1'b0;
            state      <= S_ADDR;
            if (ch16[14] != (WORD_W == 16)) err <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end
        S_ADDR: if (hs) begin
          if (s_phase != PH_W'(PH_ADDR)) err <= 1'b1;
          addr[abeat*BUS_W +: BUS_W] <= s_channel;
          abeat <= abeat + 1'b1;
          if (int'(abeat) == ADDR_BEATS - 1) begin
            state     <= (ctrl.traffic == TR_READ) ? S_IDLE : S_DATA;
            hdr_valid <= 1'b1;
          end
        end
        S_DATA: if (beat) begin
          if (!pi_ok) err <= 1'b1;
          split      <= dec_split;
          words_left <= words_left - 9'(push_n);
          if (words_left == 9'(push_n)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
