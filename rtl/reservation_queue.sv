// reservation_queue: FIFO of the procIds that asked to reserve an
// accelerator. The entry at the head is the owning process; the others wait
// for ownership in arrival order.
//
// Entries are kept in a shift array (entry 0 is the head) so that every
// entry can be compared with a search key in parallel: `found` tells whether
// search_id is anywhere in the queue and `found_head` whether it is the
// owner. push appends id at the tail and is ignored when the queue is full
// (the reservation request is then discarded); pop removes the head. Both
// may happen in the same cycle. All outputs are combinational from the
// registered contents; the update takes effect at the next clock edge.
// FIFO order, owner at the head, discard when full and four 32-bit entries
// follow the framework; the shift-array structure and the same-cycle
// push/pop rule are this design's choices.
module reservation_queue #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_id,
  input  logic                       pop,
  input  logic [W-1:0]               search_id,
  output logic                       found,
  output logic                       found_head,
  output logic [W-1:0]               head,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  q_q [DEPTH];
  logic [CW-1:0] cnt_q;

  assign count = cnt_q;
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == CW'(DEPTH));
  assign head  = q_q[0];

  always_comb begin
    found = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if ((CW'(i) < cnt_q) && (q_q[i] == search_id)) found = 1'b1;
    found_head = !empty && (q_q[0] == search_id);
  end

  logic          do_pop, do_push;
  logic [CW-1:0] base;   // tail slot after a pop
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign base    = do_pop ? cnt_q - CW'(1) : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q_q[i] <= '0;
    end else begin
      if (do_pop)
        for (int unsigned i = 0; i + 1 < DEPTH; i++) q_q[i] <= q_q[i+1];
      if (do_push) q_q[base[$clog2(DEPTH)-1:0]] <= push_id;
      cnt_q <= base + (do_push ? CW'(1) : CW'(0));
    end
  end

endmodule
