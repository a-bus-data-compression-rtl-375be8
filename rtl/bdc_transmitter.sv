// bdc_transmitter: sender side of a compressed burst on a phase-based
// (SNP-style) channel: register, comparator and aligner of the compression
// scheme, plus the phase sequencing.
//
// A burst is requested with req_ctrl (a ctrl_word_t) and req_addr.  The channel
// then carries one control beat (PHASE=PH_CTRL, CHANNEL=control word),
// ADDR_BEATS address beats (PHASE=PH_ADDR, low part first) and the data beats.
// In data beats the PHASE lines carry the pattern indicator, which is the
// time-multiplexing of PI and control signals the source describes.  PHASE is 3
// lines wide, or PI_W lines where the PI needs more (6 on a 32-bit bus).  Every
// beat uses VALID/READY: a beat is taken on a clock edge where both are high,
// and VALID, CHANNEL and PHASE hold while READY is low.
//
// Data words arrive IN_WORDS at a time on in_data (word 0 in the low bits); the
// last group of a burst may be partial, the transmitter takes only as many
// words as the burst still needs.  The comparator marks half-words, their
// nibbles enter the register (bdc_queue), and the aligner sends SLOTS nibbles
// per beat. Input is accepted from the control phase on, so the register fills
// while the sender waits for the channel, as the source intends ("compress
// during the waiting time").  With cmp_en=0 every word is sent whole, which is
// the uncompressed bus.  A read request (traffic TR_READ) sends only the control
// and address beats.  With req_data_only=1 the burst is sent as data beats only,
// as a slave returns read data on its own channel; the receiver then knows the
// length from its read request.  One beat per clock while the register holds a
// bus word; the burst ends with the handshake of its last data beat, and a new
// request is accepted in the following cycle.  Register depth, input width, the
// control word layout and the two address beats are this design's choices.
module bdc_transmitter
  import bdc_pkg::*;
#(
  parameter int unsigned SLOTS    = 4,
  parameter int unsigned WORD_W   = 8,
  parameter int unsigned IN_WORDS = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned QDEPTH   = 16,
  localparam int unsigned HW      = WORD_W / 2,
  localparam int unsigned BUS_W   = SLOTS * HW,
  localparam int unsigned PI_W    = pi_width(SLOTS),
  localparam int unsigned ADDR_BEATS = (ADDR_W + BUS_W - 1) / BUS_W,
  localparam int unsigned IN_W    = IN_WORDS * WORD_W,
  localparam int unsigned PH_W    = (PI_W > PHASE_W) ? PI_W : PHASE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // burst request
  input  logic              req_valid,
  output logic              req_ready,
  input  ctrl_word_t        req_ctrl,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_data_only,  // slave channel: data phases only
  // data to send
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  // phase-based channel
  output logic              m_valid,
  input  logic              m_ready,
  output logic [BUS_W-1:0]  m_channel,
  output logic [PH_W-1:0]   m_phase,
  // status
  output logic              busy
);

  localparam int unsigned EW  = 2 + HW;
  localparam int unsigned NIN = 2 * IN_WORDS;
  localparam int unsigned QCW = $clog2(QDEPTH + 1);
  localparam int unsigned ICW = $clog2(IN_WORDS + 1);
  localparam int unsigned OW  = $clog2(SLOTS + 1);
  localparam int unsigned ABW = (ADDR_BEATS > 1) ? $clog2(ADDR_BEATS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_CTRL, S_ADDR, S_DATA} state_e;

  // Input is taken only when a whole group's nibbles fit, and a beat leaves
  // only when SLOTS nibbles are held, so a smaller register could lock up.
  if (QDEPTH < SLOTS + NIN - 1) begin : g_depth_check
    $error("bdc_transmitter: QDEPTH must be at least SLOTS + 2*IN_WORDS - 1");
  end

  state_e                    state;
  ctrl_word_t                ctrl;
  logic [ADDR_BEATS*BUS_W-1:0] addr;
  logic [ABW-1:0]            abeat;
  logic [8:0]                words_left;   // words still to accept
  logic                      prev_valid;
  logic [HW-1:0]             prev_hi;

  // comparator
  logic [ICW-1:0]      nvalid;
  logic [IN_WORDS-1:0] is_half;
  logic                last_valid;
  logic [HW-1:0]       last_hi;

  // register
  logic [$clog2(NIN+1)-1:0]  push_n;
  logic [NIN-1:0][EW-1:0]    push_data;
  logic [OW-1:0]             pop_n;
  logic [QCW-1:0]            qcount;
  logic [SLOTS-1:0][EW-1:0]  qhead;

  // aligner
  logic              al_fire, al_split, al_padded;
  logic [BUS_W-1:0]  al_word;
  logic [PI_W-1:0]   al_pi;
  logic [OW-1:0]     al_pop, al_nhalf;

  logic in_fire, data_fire, flush;

  assign nvalid = (words_left >= 9'(IN_WORDS)) ? ICW'(IN_WORDS) : ICW'(words_left);

  bdc_comparator #(.NWORDS(IN_WORDS), .WORD_W(WORD_W)) u_cmp (
    .enable    (ctrl.cmp_en),
    .words     (in_data),
    .nvalid    (nvalid),
    .prev_valid(prev_valid),
    .prev_hi   (prev_hi),
    .is_half   (is_half),
    .last_valid(last_valid),
    .last_hi   (last_hi)
  );

  // Tagged nibbles of the accepted group, packed in stream order.
  always_comb begin
    int unsigned k;
    k         = 0;
    push_data = '0;
    for (int i = 0; i < IN_WORDS; i++) begin
      if (i < int'(nvalid)) begin
        push_data[k] = {(is_half[i] ? TAG_H : TAG_L), in_data[i*WORD_W +: HW]};
        k = k + 1;
        if (!is_half[i]) begin
          push_data[k] = {TAG_U, in_data[i*WORD_W+HW +: HW]};
          k = k + 1;
        end
      end
    end
    push_n = in_fire ? ($clog2(NIN+1))'(k) : '0;
  end

  assign in_ready = (state != S_IDLE) && (words_left != '0) &&
                    (int'(qcount) + NIN <= QDEPTH);
  assign in_fire  = in_valid && in_ready;
  assign flush    = (words_left == '0);

  bdc_queue #(.EW(EW), .DEPTH(QDEPTH), .NIN(NIN), .NOUT(SLOTS)) u_reg (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .push_n   (push_n),
    .push_data(push_data),
    .pop_n    (pop_n),
    .count    (qcount),
    .head     (qhead)
  );

  bdc_aligner #(.SLOTS(SLOTS), .HW(HW), .CW(QCW)) u_align (
    .head     (qhead),
    .count    (qcount),
    .flush    (flush),
    .fire     (al_fire),
    .bus_word (al_word),
    .pi       (al_pi),
    .pop_n    (al_pop),
    .split_out(al_split),
    .padded   (al_padded),
    .n_half   (al_nhalf)
  );

  // Channel multiplexer: control, address or data with PI on PHASE.
  always_comb begin
    m_valid   = 1'b0;
    m_channel = '0;
    m_phase   = PH_W'(PH_IDLE);
    case (state)
      S_CTRL: begin
        m_valid   = 1'b1;
        m_channel = BUS_W'(ctrl);
        m_phase   = PH_W'(PH_CTRL);
      end
      S_ADDR: begin
        m_valid   = 1'b1;
        m_channel = addr[abeat*BUS_W +: BUS_W];
        m_phase   = PH_W'(PH_ADDR);
      end
      S_DATA: begin
        m_valid   = al_fire;
        m_channel = al_word;
        m_phase   = PH_W'(al_pi);
      end
      default: ;
    endcase
  end

  assign data_fire = (state == S_DATA) && m_valid && m_ready;
  assign pop_n     = data_fire ? al_pop : '0;
  assign req_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ctrl       <= '0;
      addr       <= '0;
      abeat      <= '0;
      words_left <= '0;
      prev_valid <= 1'b0;
      prev_hi    <= '0;
    end else begin
      if (in_fire) begin
        words_left <= words_left - 9'(nvalid);
        prev_valid <= last_valid;
        prev_hi    <= last_hi;
      end
      case (state)
        S_IDLE: if (req_valid) begin
          state      <= req_data_only ? S_DATA : S_CTRL;
          ctrl       <= req_ctrl;
          addr       <= (ADDR_BEATS*BUS_W)'(req_addr);
          abeat      <= '0;
          // a read request is a header only
          words_left <= (!req_data_only && req_ctrl.traffic == TR_READ) ? 9'd0 :
                        9'(req_ctrl.len_m1) + 9'd1;
          prev_valid <= 1'b0;
        end
        S_CTRL: if (m_ready) state <= S_ADDR;
        S_ADDR: if (m_ready) begin
          if (int'(abeat) == ADDR_BEATS - 1)
            state <= (ctrl.traffic == TR_READ) ? S_IDLE : S_DATA;
          abeat <= abeat + 1'b1;
        end
        S_DATA: if (data_fire && flush && (qcount == QCW'(al_pop))) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Beats hold still while the receiver is not ready.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_channel) && $stable(m_phase));

endmodule
