// snp_if: one phase-based (SNP-style) channel, the bundle that links a sender
// to a receiver: CHANNEL carries control, address or data, PHASE says which
// (or, in data phases of a compressed burst, carries the pattern indicator),
// VALID marks a beat and READY, the only signal running back, accepts it.
// A beat is transferred on a clock edge where VALID and READY are both high.
// The interface checks the handshake rule that an offered beat stays offered,
// unchanged, until it is taken.  The signal set follows the source; the
// assertion states this design's reading of VALID/READY.
interface snp_if #(
  parameter int unsigned BUS_W = 16,
  parameter int unsigned PH_W  = 3
) (
  input logic clk,
  input logic rst_n
);
  logic             valid;
  logic             ready;
  logic [BUS_W-1:0] channel;
  logic [PH_W-1:0]  phase;

  modport sender   (output valid, output channel, output phase, input ready);
  modport receiver (input valid, input channel, input phase, output ready);

  a_valid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !ready |=> valid && $stable(channel) && $stable(phase));

endinterface
