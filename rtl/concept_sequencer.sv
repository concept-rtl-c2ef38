// concept_sequencer: R-DDR command sequencer of the CONCEPT controller.
//
// R-DDR is column oriented: an access starts with the command that says what it is
// (READ, WRITE, L1 = MAGIC NOR, L2 = MAGIC NOT) rather than a generic activate, so
// the memory can bias its wordlines and bitlines for that operation. The command
// goes out together with the bank and the first address; the remaining addresses
// follow on the address bus in the next cycles (RA, CA for reads and writes; three
// row addresses for NOR; two for NOT). A write also sends its 64 bytes as four
// beats on the data bus, starting in the command cycle.
//
// Interface: when idle (`ready` high) and `iss_valid` is high, the command appears on
// the bus in the same cycle (combinational from `iss_entry`); the entry is then held
// internally for the remaining address and data cycles, during which `ready` is low.
// Busy time is the number of address cycles, or four cycles for a write.
// Reset (active low, synchronous) returns to idle.
// The command/address ordering follows the document's timing diagrams; the
// single-rate 128-bit data beats and sending bank with the command are own choices.
module concept_sequencer
  import concept_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               iss_valid,
  input  tq_entry_t          iss_entry,
  output logic               ready,
  output logic               cmd_valid,
  output op_e                cmd_op,
  output logic [BANK_W-1:0]  cmd_bank,
  output logic               addr_valid,
  output logic [ABUS_W-1:0]  addr,
  output logic               wd_valid,
  output logic [BEAT_W-1:0]  wd_beat
);

  tq_entry_t  cur;
  logic       busy;
  logic [1:0] phase;      // address phase of the next cycle
  logic [2:0] remain;     // busy cycles left after this one
  logic       addr_done;

  tq_entry_t  sel;
  logic [1:0] sel_phase;
  logic [ABUS_W-1:0] mux_addr;
  logic       mux_last;

  assign ready = !busy;
  assign sel       = busy ? cur : iss_entry;
  assign sel_phase = busy ? phase : 2'd0;

  concept_addr_mux u_amux (
    .entry (sel),
    .phase (sel_phase),
    .addr  (mux_addr),
    .last  (mux_last)
  );

  function automatic logic [2:0] busy_cycles(op_e op);
    return (op == OP_WRITE) ? 3'(T_BURST) : 3'(addr_cycles(op));
  endfunction

  logic start;
  assign start = !busy && iss_valid;

  always_comb begin
    cmd_valid  = start;
    cmd_op     = sel.op;
    cmd_bank   = sel.bank;
    addr_valid = start || (busy && !addr_done);
    addr       = addr_valid ? mux_addr : '0;
    wd_valid   = (start || busy) && sel.op == OP_WRITE;
    wd_beat    = wd_valid ? sel.data[int'(sel_phase) * BEAT_W +: BEAT_W] : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cur       <= '0;
      phase     <= '0;
      remain    <= '0;
      addr_done <= 1'b0;
    end else if (start) begin
      cur       <= iss_entry;
      phase     <= 2'd1;
      remain    <= busy_cycles(iss_entry.op) - 1'b1;
      busy      <= busy_cycles(iss_entry.op) > 1;
      addr_done <= 1'b0;
    end else if (busy) begin
      phase     <= phase + 1'b1;
      remain    <= remain - 1'b1;
      if (mux_last) addr_done <= 1'b1;
      if (remain == 3'd1) busy <= 1'b0;
    end
  end

endmodule
