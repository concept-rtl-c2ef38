// concept_top: CONCEPT, a column-oriented memory controller for RRAM main memory
// with processing-in-memory (MAGIC NOR / NOT) support.
//
// Front end: the instruction decoder turns a host instruction (READ, WRITE, MAGIC
// NOR, MAGIC NOT with one to three physical addresses) into one transaction-queue
// entry; PIM instructions keep their extra row addresses in the unused data field.
// A PIM instruction whose operands are not in one bank is refused (`req_reject`).
// Back end: each cycle the scheduler picks the oldest queue entry that may issue
// given the bank timers, the rank-level tRRD/tFAW/tWTR limits, the narrow row-buffer
// state and the data-bus reservations; the sequencer sends it as an R-DDR command
// with its time-multiplexed addresses (and write data). Read data returns a fixed
// number of cycles later and is handed back as one 64-byte response tagged with its
// physical address. Writes and PIM operations complete silently; later reads of the
// same bank observe their result because operations to one bank issue in order.
//
// Interface: valid/ready request port; registered response port; an R-DDR memory
// port with separate command/bank, address, write-data and read-data signals. All
// timing is in controller clock cycles (one cycle = one DDR4-2400 clock, 0.833 ns).
// Synchronous active-low reset.
// The structure (front end, transaction queue, R-DDR back end) and all timing values
// follow the document; the queue depth, row-buffer segment size, scheduling policy
// and bus widths are this design's choices.
module concept_top
  import concept_pkg::*;
#(
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned SEG_COL_BITS = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  // host requests
  input  logic               req_valid,
  output logic               req_ready,
  input  op_e                req_op,
  input  logic [PADDR_W-1:0] req_addr1,
  input  logic [PADDR_W-1:0] req_addr2,
  input  logic [PADDR_W-1:0] req_addr3,
  input  logic [DATA_W-1:0]  req_wdata,
  output logic               req_reject,
  // read responses
  output logic               rsp_valid,
  output logic [PADDR_W-1:0] rsp_addr,
  output logic [DATA_W-1:0]  rsp_data,
  // R-DDR memory port
  output logic               mem_cmd_valid,
  output op_e                mem_cmd_op,
  output logic [BANK_W-1:0]  mem_cmd_bank,
  output logic               mem_addr_valid,
  output logic [ABUS_W-1:0]  mem_addr,
  output logic               mem_wd_valid,
  output logic [BEAT_W-1:0]  mem_wd,
  input  logic [BEAT_W-1:0]  mem_rd
);

  localparam int unsigned TAG_W = BANK_W + ROW_W + COL_W;
  localparam int unsigned IW    = $clog2(DEPTH);

  // ---------------- front end ----------------
  tq_entry_t dec_entry;
  logic      dec_bank_err;

  concept_instr_decoder u_dec (
    .in_op    (req_op),
    .in_addr1 (req_addr1),
    .in_addr2 (req_addr2),
    .in_addr3 (req_addr3),
    .in_wdata (req_wdata),
    .entry    (dec_entry),
    .bank_err (dec_bank_err)
  );

  tq_entry_t slots [DEPTH];
  logic      tq_ready;
  logic [$clog2(DEPTH+1)-1:0] tq_count;
  logic      grant_valid, grant_hit;
  logic [IW-1:0] grant_idx;

  assign req_ready  = tq_ready;
  assign req_reject = req_valid && tq_ready && dec_bank_err;

  concept_tq #(.DEPTH(DEPTH)) u_tq (
    .clk       (clk),
    .rst_n     (rst_n),
    .enq_valid (req_valid && !dec_bank_err),
    .enq_entry (dec_entry),
    .enq_ready (tq_ready),
    .deq_valid (grant_valid),
    .deq_idx   (grant_idx),
    .slots     (slots),
    .count     (tq_count)
  );

  // ---------------- back end ----------------
  logic [BANK_W-1:0] lk_bank [DEPTH];
  logic [ROW_W-1:0]  lk_row  [DEPTH];
  logic [COL_W-1:0]  lk_col  [DEPTH];
  logic [DEPTH-1:0]  slot_hit;

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      lk_bank[i] = slots[i].bank;
      lk_row[i]  = slots[i].row1;
      lk_col[i]  = slots[i].col;
    end
  end

  tq_entry_t iss_entry;
  logic      iss_valid;
  assign iss_valid = grant_valid;
  assign iss_entry = slots[grant_idx];

  concept_row_buffer #(.SEG_COL_BITS(SEG_COL_BITS), .NLOOK(DEPTH)) u_rb (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd_valid (iss_valid),
    .upd_op    (iss_entry.op),
    .upd_bank  (iss_entry.bank),
    .upd_row   (iss_entry.row1),
    .upd_col   (iss_entry.col),
    .lk_bank   (lk_bank),
    .lk_row    (lk_row),
    .lk_col    (lk_col),
    .lk_hit    (slot_hit)
  );

  logic [NBANKS-1:0] bank_ready;
  logic act_ok, rd_ok;

  concept_timing u_tim (
    .clk        (clk),
    .rst_n      (rst_n),
    .iss_valid  (iss_valid),
    .iss_op     (iss_entry.op),
    .iss_hit    (grant_hit),
    .iss_bank   (iss_entry.bank),
    .bank_ready (bank_ready),
    .act_ok     (act_ok),
    .rd_ok      (rd_ok)
  );

  logic free_miss, free_hit, free_wr;
  logic [TAG_W-1:0] rsp_tag;

  concept_dbus #(.TAG_W(TAG_W)) u_dbus (
    .clk       (clk),
    .rst_n     (rst_n),
    .iss_valid (iss_valid),
    .iss_op    (iss_entry.op),
    .iss_hit   (grant_hit),
    .iss_tag   ({iss_entry.row1, iss_entry.bank, iss_entry.col}),
    .free_miss (free_miss),
    .free_hit  (free_hit),
    .free_wr   (free_wr),
    .rd_beat   (mem_rd),
    .rsp_valid (rsp_valid),
    .rsp_tag   (rsp_tag),
    .rsp_data  (rsp_data)
  );

  // Tag back to a physical address: row | bank | column | byte offset 0.
  assign rsp_addr = {rsp_tag, {OFFS_W{1'b0}}};

  logic seq_ready;
  logic [DEPTH-1:0] eligible;

  concept_scheduler #(.DEPTH(DEPTH)) u_sched (
    .slots       (slots),
    .slot_hit    (slot_hit),
    .bank_ready  (bank_ready),
    .act_ok      (act_ok),
    .rd_ok       (rd_ok),
    .free_miss   (free_miss),
    .free_hit    (free_hit),
    .free_wr     (free_wr),
    .seq_ready   (seq_ready),
    .grant_valid (grant_valid),
    .grant_idx   (grant_idx),
    .grant_hit   (grant_hit),
    .eligible    (eligible)
  );

  concept_sequencer u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .iss_valid  (iss_valid),
    .iss_entry  (iss_entry),
    .ready      (seq_ready),
    .cmd_valid  (mem_cmd_valid),
    .cmd_op     (mem_cmd_op),
    .cmd_bank   (mem_cmd_bank),
    .addr_valid (mem_addr_valid),
    .addr       (mem_addr),
    .wd_valid   (mem_wd_valid),
    .wd_beat    (mem_wd)
  );

endmodule
