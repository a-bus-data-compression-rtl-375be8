// bdc_queue: in-order element queue with multi-element push and pop.
//
// Used as the transmitter register (elements are tagged nibbles waiting to be
// placed on the bus; whatever a beat cannot carry stays and is re-arrayed in
// order at the head) and as the receiver's word assembler.  Storage is a shift
// array: the head is always element 0, so the first NOUT elements are visible
// on 'head' with no pointer logic.  In one clock edge pop_n elements leave the
// head and push_n elements are appended behind the ones that stay.  The caller
// must keep pop_n <= count and push_n <= DEPTH - count + pop_n (asserted).
// 'clear' empties the queue.  Depth and port widths are this design's choice.
module bdc_queue #(
  parameter int unsigned EW    = 6,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NIN   = 8,
  parameter int unsigned NOUT  = 4,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned IW   = $clog2(NIN + 1),
  localparam int unsigned OW   = $clog2(NOUT + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [IW-1:0]           push_n,
  input  logic [NIN-1:0][EW-1:0]  push_data,
  input  logic [OW-1:0]           pop_n,
  output logic [CW-1:0]           count,
  output logic [NOUT-1:0][EW-1:0] head
);

  logic [DEPTH-1:0][EW-1:0] q, q_next;
  logic [CW-1:0]            count_next;

  always_comb begin
    int unsigned base;
    for (int i = 0; i < DEPTH; i++) begin
      q_next[i] = (i + int'(pop_n) < DEPTH) ? q[i + int'(pop_n)] : '0;
    end
    base = int'(count) - int'(pop_n);
    for (int j = 0; j < NIN; j++) begin
      if (j < int'(push_n) && base + j < DEPTH) q_next[base + j] = push_data[j];
    end
    count_next = CW'(base + int'(push_n));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      count <= '0;
    end else if (clear) begin
      q     <= '0;
      count <= '0;
    end else begin
      q     <= q_next;
      count <= count_next;
    end
  end

  always_comb begin
    for (int i = 0; i < NOUT; i++) head[i] = q[i];
  end

  a_pop_le_count: assert property (@(posedge clk) disable iff (!rst_n || clear)
    int'(pop_n) <= int'(count));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || clear)
    int'(count) - int'(pop_n) + int'(push_n) <= DEPTH);

endmodule
