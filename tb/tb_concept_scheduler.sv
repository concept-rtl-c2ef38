// tb_concept_scheduler: checks the request scheduler.
// Random queue contents (valid entries packed at the bottom, oldest first, few banks
// so that banks repeat) and random constraint inputs are applied; the testbench's
// reference picks the oldest entry that is the first of its bank, whose bank is
// ready, that respects the activation limit unless it is a row-buffer hit, the
// write-to-read turnaround for reads, its data-bus window, and an idle sequencer.
// Grant, index, hit flag and the eligible vector are compared.
module tb_concept_scheduler;
  import concept_pkg::*;

  tq_entry_t slots [16];
  logic [15:0] slot_hit, bank_ready, eligible;
  logic act_ok, rd_ok, free_miss, free_hit, free_wr, seq_ready;
  logic grant_valid, grant_hit;
  logic [3:0] grant_idx;
  int checks = 0, failures = 0, grants = 0, ooo = 0;

  concept_scheduler dut (.slots, .slot_hit, .bank_ready, .act_ok, .rd_ok, .free_miss,
                         .free_hit, .free_wr, .seq_ready, .grant_valid, .grant_idx,
                         .grant_hit, .eligible);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int cnt;
      logic [15:0] e_elig;
      bit seen [16];
      int e_idx;
      cnt = $urandom_range(0, 16);
      for (int i = 0; i < 16; i++) begin
        slots[i] = '0;
        if (i < cnt) begin
          slots[i].v = 1;
          slots[i].op = op_e'($urandom_range(0, 3));
          slots[i].bank = 4'($urandom_range(0, 5));
        end
        seen[i] = 0;
      end
      slot_hit = 16'($urandom); bank_ready = 16'($urandom) | 16'($urandom);
      act_ok = $urandom_range(0, 3) != 0; rd_ok = $urandom_range(0, 5) != 0;
      free_miss = $urandom_range(0, 3) != 0; free_hit = $urandom_range(0, 3) != 0;
      free_wr = $urandom_range(0, 3) != 0; seq_ready = $urandom_range(0, 5) != 0;
      #1;
      e_elig = 0; e_idx = -1;
      for (int i = 0; i < cnt; i++) begin
        bit ok, hit;
        hit = slots[i].op == OP_READ && slot_hit[i];
        ok = !seen[slots[i].bank] && bank_ready[slots[i].bank] && seq_ready;
        if (!hit) ok &= act_ok;
        if (slots[i].op == OP_READ) ok &= rd_ok && (hit ? free_hit : free_miss);
        if (slots[i].op == OP_WRITE) ok &= free_wr;
        seen[slots[i].bank] = 1;
        e_elig[i] = ok;
        if (ok && e_idx < 0) e_idx = i;
      end
      checks++;
      if (eligible !== e_elig) begin failures++; $display("FAIL: eligible %h exp %h", eligible, e_elig); end
      checks++;
      if (grant_valid !== (e_idx >= 0) || (e_idx >= 0 && (grant_idx != 4'(e_idx) ||
          grant_hit !== (slots[e_idx].op == OP_READ && slot_hit[e_idx])))) begin
        failures++; $display("FAIL: grant %b idx %0d exp %0d", grant_valid, grant_idx, e_idx);
      end
      if (e_idx >= 0) grants++;
      if (e_idx > 0) ooo++;
    end
    checks++;
    if (grants == 0 || ooo == 0) begin failures++; $display("FAIL: no (out-of-order) grant seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
