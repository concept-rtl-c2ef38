// concept_tq: transaction queue of the CONCEPT controller.
//
// Holds the decoded transactions (valid bit, opcode, bank, Row1, column and the
// 512-bit data field that also carries Row2/Row3 of PIM instructions) until the
// back end issues them. The queue is kept in age order: slot 0 is always the oldest
// entry. The scheduler may remove any slot (`deq_idx`); the younger slots then move
// down by one in the same clock edge, so age order is preserved without age
// counters. A new entry is written behind the youngest one. Enqueue and dequeue may
// happen in the same cycle.
//
// Interface: valid/ready enqueue (`enq_ready` low when full); `deq_valid`/`deq_idx`
// remove an entry at the clock edge; all slots and the fill level are visible to
// the scheduler. Reset (active low, synchronous) empties the queue.
// The entry layout follows the document; the depth (16) and the collapsing
// organisation are this design's choices.
module concept_tq
  import concept_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enq_valid,
  input  tq_entry_t                 enq_entry,
  output logic                      enq_ready,
  input  logic                      deq_valid,
  input  logic [$clog2(DEPTH)-1:0]  deq_idx,
  output tq_entry_t                 slots [DEPTH],
  output logic [$clog2(DEPTH+1)-1:0] count
);

  tq_entry_t q [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign enq_ready = (cnt < ($clog2(DEPTH+1))'(DEPTH));
  assign count     = cnt;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) slots[i] = q[i];
  end

  logic do_enq, do_deq;
  assign do_enq = enq_valid && enq_ready;
  assign do_deq = deq_valid && (32'(deq_idx) < 32'(cnt)) && q[deq_idx].v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      cnt <= '0;
    end else begin
      if (do_deq) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (i >= int'(deq_idx)) begin
            if (i + 1 < DEPTH) q[i] <= q[i+1];
            else               q[i] <= '0;
          end
        end
      end
      if (do_enq) begin
        q[do_deq ? int'(cnt) - 1 : int'(cnt)] <= enq_entry;
      end
      cnt <= cnt + ($bits(cnt))'(do_enq) - ($bits(cnt))'(do_deq);
    end
  end

  // An entry may only be removed if it holds a transaction.
  a_deq_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                deq_valid |-> (32'(deq_idx) < 32'(cnt)));

endmodule
