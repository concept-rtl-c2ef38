// concept_scheduler: request scheduler of the CONCEPT controller back end.
//
// Chooses, each cycle, the transaction to send next. The queue presents its entries
// oldest first. An entry may go when
//   - it is the oldest queued entry of its bank (operations to one bank stay in
//     order, which keeps reads, writes and MAGIC operations on the same rows in
//     program order; a restricted closed-page policy needs nothing more),
//   - its bank is free (previous operation finished and precharged),
//   - for an operation that drives the array (anything but a read hitting the narrow
//     row buffer) the tRRD / tFAW activation limits allow one now,
//   - for a read, the write-to-read turnaround has passed,
//   - its data-bus window (read burst or write data) is free,
//   - the command/address bus is idle.
// Among the eligible entries the oldest wins (first-ready, first-come first-served
// over banks). Purely combinational.
//
// The document names the scheduler but does not give its policy: the per-bank
// in-order, oldest-ready-first rule is this design's choice.
module concept_scheduler
  import concept_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NB    = NBANKS
) (
  input  tq_entry_t                slots [DEPTH],
  input  logic [DEPTH-1:0]         slot_hit,
  input  logic [NB-1:0]            bank_ready,
  input  logic                     act_ok,
  input  logic                     rd_ok,
  input  logic                     free_miss,
  input  logic                     free_hit,
  input  logic                     free_wr,
  input  logic                     seq_ready,
  output logic                     grant_valid,
  output logic [$clog2(DEPTH)-1:0] grant_idx,
  output logic                     grant_hit,
  output logic [DEPTH-1:0]         eligible
);

  logic [NB-1:0] bank_seen;
  logic          first_of_bank, is_rd, hit, ok;

  always_comb begin
    first_of_bank = 1'b0;
    is_rd       = 1'b0;
    hit         = 1'b0;
    ok          = 1'b0;
    bank_seen   = '0;
    eligible    = '0;
    grant_valid = 1'b0;
    grant_idx   = '0;
    grant_hit   = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (slots[i].v) begin
        first_of_bank = !bank_seen[slots[i].bank];
        is_rd = (slots[i].op == OP_READ);
        hit   = is_rd && slot_hit[i];
        ok    = first_of_bank && bank_ready[slots[i].bank] && seq_ready;
        if (!hit)                           ok = ok && act_ok;
        if (is_rd)                          ok = ok && rd_ok && (hit ? free_hit : free_miss);
        if (slots[i].op == OP_WRITE)        ok = ok && free_wr;
        eligible[i] = ok;
        bank_seen[slots[i].bank] = 1'b1;
        if (ok && !grant_valid) begin
          grant_valid = 1'b1;
          grant_idx   = ($clog2(DEPTH))'(i);
          grant_hit   = hit;
        end
      end
    end
  end

endmodule
