// tb_concept_tq: checks the age-ordered transaction queue.
// Random enqueues and out-of-order dequeues (also both in one cycle) are applied to
// the queue and to a reference list kept in the testbench; after every clock edge
// all slots, the fill level and the ready flag are compared with the reference.
// The queue is filled to its depth of 16 to check that it refuses a 17th entry.
module tb_concept_tq;
  import concept_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst_n;
  always #1 clk = ~clk;

  logic enq_valid, enq_ready, deq_valid;
  tq_entry_t enq_entry;
  logic [3:0] deq_idx;
  tq_entry_t slots [DEPTH];
  logic [4:0] count;
  int checks = 0, failures = 0;
  int full_seen = 0;

  concept_tq #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .enq_valid, .enq_entry, .enq_ready,
                                   .deq_valid, .deq_idx, .slots, .count);

  tq_entry_t model [$];

  function automatic tq_entry_t rnd_entry();
    tq_entry_t e;
    e = '0;
    e.v = 1; e.op = op_e'($urandom_range(0, 3)); e.bank = 4'($urandom);
    e.row1 = 15'($urandom); e.col = 10'($urandom);
    for (int k = 0; k < 16; k++) e.data[k * 32 +: 32] = $urandom;
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq_valid = 0; deq_valid = 0; deq_idx = 0; enq_entry = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit fill;
      @(negedge clk);
      fill = (n % 600) < 300;
      enq_valid = ($urandom_range(0, 99) < (fill ? 80 : 30));
      enq_entry = rnd_entry();
      deq_valid = (model.size() > 0) && ($urandom_range(0, 99) < (fill ? 25 : 70));
      deq_idx   = deq_valid ? 4'($urandom_range(0, model.size() - 1)) : 4'd0;
      checks++;
      if (enq_ready !== (model.size() < DEPTH)) begin
        failures++; $display("FAIL: ready %b with %0d entries", enq_ready, model.size());
      end
      if (model.size() == DEPTH) full_seen++;
      @(posedge clk);
      if (deq_valid) model.delete(int'(deq_idx));
      if (enq_valid && enq_ready) model.push_back(enq_entry);
      #0.1;
      checks++;
      if (int'(count) != model.size()) begin
        failures++; $display("FAIL: count %0d exp %0d", count, model.size());
      end
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (i < model.size() ? (slots[i] !== model[i]) : (slots[i].v !== 1'b0)) begin
          failures++; $display("FAIL: slot %0d differs", i);
        end
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
