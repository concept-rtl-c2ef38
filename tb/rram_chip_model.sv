// rram_chip_model: behavioural model of an RRAM main-memory rank driven over R-DDR.
// Not synthesizable; used only by the testbenches.
//
// Stores rows of 1024 columns x 64 bits (8 KB) per bank in a sparse array (unwritten
// rows read as zero). It decodes the command bus: a command with its bank and first
// address, then the remaining addresses (RA, CA for READ/WRITE; three rows for L1 =
// MAGIC NOR; two rows for L2 = MAGIC NOT), plus four 128-bit write beats starting in
// the command cycle. Counting from the last address cycle it
//   - returns read data after tDEC + tCHARGE + tREAD + CL = 30 cycles, or after
//     CL = 17 cycles when the read hits the narrow row buffer (same row, same 32-column
//     segment as the bank's last read, no write or MAGIC operation since),
//   - executes NOR (row3 = ~(row1 | row2)) and NOT (row2 = ~row1) on whole rows.
// It checks the protocol and counts every violation in `violations`: a command to a
// busy bank, tRRD (4) or tFAW (4 activations per 16 cycles) broken, overlapping data
// bursts. The numbers are written out here on purpose, independently of the
// controller's package. Outside of a read burst the read-data bus carries random
// values, so data sampled at the wrong cycle does not go unnoticed.
module rram_chip_model
  import concept_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  input  op_e                cmd_op,
  input  logic [BANK_W-1:0]  cmd_bank,
  input  logic               addr_valid,
  input  logic [ABUS_W-1:0]  addr,
  input  logic               wd_valid,
  input  logic [BEAT_W-1:0]  wd,
  output logic [BEAT_W-1:0]  rd,
  output int                 violations,
  output int                 n_hits,
  output int                 n_ops
);

  localparam int ROWBITS  = 1024 * 64;
  localparam longint L_MISS   = 1 + 1 + 11 + 17;
  localparam longint L_HIT    = 17;
  localparam longint H_MISS   = 1 + 1 + 11 + 1;     // bank free after a read miss
  localparam longint H_HIT    = 1;
  localparam longint H_WRITE  = 1 + 2 * 1 + 27 + 27 + 1;
  localparam longint H_MAGIC  = 1 + 1 + 35 + 1;

  logic [ROWBITS-1:0] mem [int];
  longint cyc;
  longint bank_free [16];
  longint last_act;
  longint acts [$];
  logic   rb_v [16];
  logic [14:0] rb_row [16];
  logic [4:0]  rb_seg [16];

  // operation being received
  logic        rx_act;
  op_e         rx_op;
  logic [3:0]  rx_bank;
  logic [14:0] rx_a [3];
  int          rx_n, rx_need;
  logic [511:0] rx_data;
  int          rx_beats;

  typedef struct { longint start; logic [511:0] data; } burst_t;
  burst_t bursts [$];
  longint wr_busy_until;

  function automatic int key(logic [3:0] b, logic [14:0] r);
    return {13'd0, b, r};
  endfunction

  function automatic logic [ROWBITS-1:0] row_of(logic [3:0] b, logic [14:0] r);
    if (mem.exists(key(b, r))) return mem[key(b, r)];
    return '0;
  endfunction

  task automatic execute(longint a);
    logic [ROWBITS-1:0] r1, r2, rowv;
    logic [9:0] col;
    logic hit;
    burst_t bt;
    n_ops++;
    case (rx_op)
      OP_READ: begin
        col = rx_a[1][9:0];
        hit = rb_v[rx_bank] && rb_row[rx_bank] == rx_a[0] && rb_seg[rx_bank] == col[9:5];
        if (hit) n_hits++;
        rowv = row_of(rx_bank, rx_a[0]);
        bt.start = a + (hit ? L_HIT : L_MISS);
        bt.data  = rowv[int'(col) * 64 +: 512];
        foreach (bursts[i])
          if (bt.start < bursts[i].start + 4 && bursts[i].start < bt.start + 4) begin
            violations++;
            $display("MODEL: overlapping read bursts at %0d", bt.start);
          end
        if (bt.start < wr_busy_until) begin
          violations++;
          $display("MODEL: read burst over write data at %0d", bt.start);
        end
        bursts.push_back(bt);
        rb_v[rx_bank] = 1'b1; rb_row[rx_bank] = rx_a[0]; rb_seg[rx_bank] = col[9:5];
        bank_free[rx_bank] = a + (hit ? H_HIT : H_MISS);
      end
      OP_WRITE: begin
        col = rx_a[1][9:0];
        rowv = row_of(rx_bank, rx_a[0]);
        rowv[int'(col) * 64 +: 512] = rx_data;
        mem[key(rx_bank, rx_a[0])] = rowv;
        rb_v[rx_bank] = 1'b0;
        bank_free[rx_bank] = a + H_WRITE;
      end
      OP_NOR: begin
        r1 = row_of(rx_bank, rx_a[0]);
        r2 = row_of(rx_bank, rx_a[1]);
        mem[key(rx_bank, rx_a[2])] = ~(r1 | r2);
        rb_v[rx_bank] = 1'b0;
        bank_free[rx_bank] = a + H_MAGIC;
      end
      default: begin
        r1 = row_of(rx_bank, rx_a[0]);
        mem[key(rx_bank, rx_a[1])] = ~r1;
        rb_v[rx_bank] = 1'b0;
        bank_free[rx_bank] = a + H_MAGIC;
      end
    endcase
  endtask

  initial begin
    violations = 0; n_hits = 0; n_ops = 0;
    cyc = 0; last_act = -100; rx_act = 0; wr_busy_until = 0;
    rx_n = 0; rx_need = 0; rx_beats = 0; rx_data = '0; rx_op = OP_READ; rx_bank = '0;
    for (int b = 0; b < 16; b++) begin
      bank_free[b] = 0; rb_v[b] = 0; rb_row[b] = '0; rb_seg[b] = '0;
    end
    for (int k = 0; k < 3; k++) rx_a[k] = '0;
    rd = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      // ---- command bus, sampled for period `cyc` ----
      if (cmd_valid) begin
        logic hitc;
        if (rx_act) begin
          violations++;
          $display("MODEL: command while addresses of the previous one pending");
        end
        if (cyc < bank_free[cmd_bank]) begin
          violations++;
          $display("MODEL: bank %0d busy until %0d, command at %0d", cmd_bank,
                   bank_free[cmd_bank], cyc);
        end
        rx_act  = 1'b1;
        rx_op   = cmd_op;
        rx_bank = cmd_bank;
        rx_n    = 0;
        rx_need = (cmd_op == OP_NOR) ? 3 : 2;
        rx_beats = 0;
        // activation unless the read will hit (decided on the column later); count
        // non-reads here, reads when their column is known
        hitc = 1'b0;
        if (cmd_op != OP_READ) begin
          if (cyc - last_act < 4) begin violations++; $display("MODEL: tRRD at %0d", cyc); end
          while (acts.size() > 0 && acts[0] <= cyc - 16) void'(acts.pop_front());
          if (acts.size() >= 4) begin violations++; $display("MODEL: tFAW at %0d", cyc); end
          acts.push_back(cyc);
          last_act = cyc;
        end
        if (cmd_op == OP_WRITE) begin
          if (cyc < wr_busy_until) violations++;
          foreach (bursts[i])
            if (cyc < bursts[i].start + 4 && bursts[i].start < cyc + 4) begin
              violations++;
              $display("MODEL: write data over read burst at %0d", cyc);
            end
          wr_busy_until = cyc + 4;
        end
      end
      if (rx_act && addr_valid) begin
        rx_a[rx_n] = addr;
        rx_n++;
        if (rx_n == 2 && rx_op == OP_READ) begin
          // the command cycle was the activation (unless it hits)
          logic [9:0] c;
          c = rx_a[1][9:0];
          if (!(rb_v[rx_bank] && rb_row[rx_bank] == rx_a[0] && rb_seg[rx_bank] == c[9:5])) begin
            if (cyc - 1 - last_act < 4) begin violations++; $display("MODEL: tRRD (read) at %0d", cyc); end
            while (acts.size() > 0 && acts[0] <= cyc - 1 - 16) void'(acts.pop_front());
            if (acts.size() >= 4) begin violations++; $display("MODEL: tFAW (read) at %0d", cyc); end
            acts.push_back(cyc - 1);
            last_act = cyc - 1;
          end
        end
      end
      if (wd_valid && rx_op == OP_WRITE) begin
        rx_data[rx_beats * 128 +: 128] = wd;
        rx_beats++;
      end
      if (rx_act && rx_n == rx_need && (rx_op != OP_WRITE || rx_beats == 4)) begin
        // latencies count from the last address cycle, which was cyc - (beats after it)
        execute(rx_op == OP_WRITE ? cyc - 2 : cyc);
        rx_act = 1'b0;
      end
      // ---- read data bus for period cyc + 1 ----
      rd <= {$urandom, $urandom, $urandom, $urandom};
      foreach (bursts[i]) begin
        if (cyc + 1 >= bursts[i].start && cyc + 1 < bursts[i].start + 4)
          rd <= bursts[i].data[int'(cyc + 1 - bursts[i].start) * 128 +: 128];
      end
      while (bursts.size() > 0 && bursts[0].start + 4 <= cyc + 1) void'(bursts.pop_front());
      cyc <= cyc + 1;
    end
  end

endmodule
