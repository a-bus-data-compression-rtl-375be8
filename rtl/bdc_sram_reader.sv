// bdc_sram_reader: read engine of the SRAM controller for compressed read
// data.  It turns a read request received on the master channel into a
// data-only compressed burst on the slave channel.
//
// When the slave's receiver reports a read header (hdr_valid with traffic
// TR_READ), the engine asks its transmitter for a data-only burst with the
// request's control word (so the requester's compression enable and length
// apply).  It then reads ceil(len / IN_WORDS) consecutive 32-bit groups from
// the SRAM, starting at the request's byte address divided by the group size.
// The SRAM port is synchronous: sram_rdata is valid the cycle after sram_re.
// Reads are issued only while the two-entry holding queue has room for the
// data in flight, so one group per cycle flows into the transmitter when it
// keeps up; a write engine sharing the SRAM port waits while reads are issued.
// A read header that arrives while a read is in progress is not
// taken (asserted); the requester waits for its data first.  That the SRAM
// controller compresses its read data through a 32-bit port follows the
// source; this engine, its port timing and the SRAM address width are this
// design's own.
module bdc_sram_reader
  import bdc_pkg::*;
#(
  parameter int unsigned WORD_W   = 8,
  parameter int unsigned IN_WORDS = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned SRAM_AW  = 12,
  localparam int unsigned GW      = IN_WORDS * WORD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // read header from the slave's receiver
  input  logic               hdr_valid,
  input  ctrl_word_t         hdr_ctrl,
  input  logic [ADDR_W-1:0]  hdr_addr,
  // to the slave's transmitter
  output logic               tx_req_valid,
  input  logic               tx_req_ready,
  output ctrl_word_t         tx_req_ctrl,
  output logic               tx_in_valid,
  input  logic               tx_in_ready,
  output logic [GW-1:0]      tx_in_data,
  // SRAM port
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_addr,
  input  logic [GW-1:0]      sram_rdata,
  output logic               busy
);

  localparam int unsigned GB_SHIFT = $clog2(GW / 8);   // bytes per group, log2

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_READ} state_e;

  state_e             state;
  ctrl_word_t         ctrl;
  logic [SRAM_AW-1:0] raddr;
  logic [8:0]         to_issue;
  logic               pending;
  logic [1:0][GW-1:0] hold;
  logic [1:0]         hcount;
  logic               push, pop;

  assign tx_req_valid = (state == S_REQ);
  assign tx_req_ctrl  = ctrl;
  assign busy         = (state != S_IDLE);

  assign sram_re   = (state == S_READ) && (to_issue != '0) &&
                     (int'(hcount) + int'(pending) - int'(pop) < 2);
  assign sram_addr = raddr;

  assign push        = pending;
  assign tx_in_valid = (hcount != '0);
  assign tx_in_data  = hold[0];
  assign pop         = tx_in_valid && tx_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ctrl     <= '0;
      raddr    <= '0;
      to_issue <= '0;
      pending  <= 1'b0;
      hold     <= '0;
      hcount   <= '0;
    end else begin
      pending <= sram_re;
      if (sram_re) begin
        raddr    <= raddr + 1'b1;
        to_issue <= to_issue - 1'b1;
      end
      // holding queue: pop from the front, push behind
      case ({push, pop})
        2'b10: begin
          hold[hcount[0]] <= sram_rdata;
          hcount          <= hcount + 1'b1;
        end
        2'b01: begin
          hold[0] <= hold[1];
          hcount  <= hcount - 1'b1;
        end
        2'b11: begin
          if (hcount == 2'd1) hold[0] <= sram_rdata;
          else begin
            hold[0] <= hold[1];
            hold[1] <= sram_rdata;
          end
        end
        default: ;
      endcase
      case (state)
        S_IDLE: if (hdr_valid && hdr_ctrl.traffic == TR_READ) begin
          ctrl     <= hdr_ctrl;
          raddr    <= SRAM_AW'(hdr_addr >> GB_SHIFT);
          to_issue <= 9'((int'(hdr_ctrl.len_m1) + IN_WORDS) / IN_WORDS);
          state    <= S_REQ;
        end
        S_REQ: if (tx_req_ready) state <= S_READ;
        S_READ: if (to_issue == '0 && !pending && hcount == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    hdr_valid && hdr_ctrl.traffic == TR_READ |-> state == S_IDLE);
  a_hold_room: assert property (@(posedge clk) disable iff (!rst_n)
    int'(hcount) + int'(push) - int'(pop) <= 2);

endmodule
