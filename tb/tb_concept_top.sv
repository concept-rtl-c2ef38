// tb_concept_top: end-to-end test of the CONCEPT controller with an RRAM rank model.
//
// Runs the controller at its default parameters against rram_chip_model and a
// reference memory kept in the testbench. Phases:
//   1. single read miss and single row-buffer hit, with their cycle counts checked
//      (request accepted -> response: 1 + 2 address cycles + 30 + 4 beats, and
//      1 + 2 + 17 + 4 for a hit, from the R-DDR latencies);
//   2. MAGIC NOR and NOT on whole rows, read back and compared;
//   3. a PIM instruction with operands in two banks, which must be refused;
//   4. random mixed traffic (reads, writes, NOR, NOT) over all banks, issued back to
//      back so that the queue fills and the timing limits bind.
// Every read response is compared with the reference. The model counts protocol
// violations (busy bank, tRRD, tFAW, data-bus collisions), which must stay zero.
// The test also counts how often each mechanism happened (row-buffer hit, busy-bank
// stall, activation-limit stall, data-bus stall, full queue, out-of-order issue,
// refused instruction, each operation type) and fails if one never did.
module tb_concept_top;
  import concept_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #1 clk = ~clk;

  logic               req_valid, req_ready, req_reject;
  op_e                req_op;
  logic [PADDR_W-1:0] req_addr1, req_addr2, req_addr3;
  logic [DATA_W-1:0]  req_wdata;
  logic               rsp_valid;
  logic [PADDR_W-1:0] rsp_addr;
  logic [DATA_W-1:0]  rsp_data;
  logic               mem_cmd_valid, mem_addr_valid, mem_wd_valid;
  op_e                mem_cmd_op;
  logic [BANK_W-1:0]  mem_cmd_bank;
  logic [ABUS_W-1:0]  mem_addr;
  logic [BEAT_W-1:0]  mem_wd, mem_rd;
  int                 violations, model_hits, model_ops;

  concept_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr1, .req_addr2, .req_addr3,
    .req_wdata, .req_reject, .rsp_valid, .rsp_addr, .rsp_data,
    .mem_cmd_valid, .mem_cmd_op, .mem_cmd_bank, .mem_addr_valid, .mem_addr,
    .mem_wd_valid, .mem_wd, .mem_rd
  );

  rram_chip_model mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_op(mem_cmd_op), .cmd_bank(mem_cmd_bank),
    .addr_valid(mem_addr_valid), .addr(mem_addr), .wd_valid(mem_wd_valid), .wd(mem_wd),
    .rd(mem_rd), .violations(violations), .n_hits(model_hits), .n_ops(model_ops)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference memory ----------------
  localparam int ROWBITS = 1024 * 64;
  logic [ROWBITS-1:0] refm [int];
  typedef struct { logic [31:0] addr; logic [511:0] data; longint t_acc; } exp_t;
  exp_t exp_list [$];
  int   n_rsp = 0;
  longint last_latency = 0;

  function automatic int rkey(logic [3:0] b, logic [14:0] r);
    return {13'd0, b, r};
  endfunction
  function automatic logic [ROWBITS-1:0] rrow(logic [3:0] b, logic [14:0] r);
    if (refm.exists(rkey(b, r))) return refm[rkey(b, r)];
    return '0;
  endfunction
  function automatic logic [31:0] pa(logic [14:0] r, logic [3:0] b, logic [9:0] c);
    return {r, b, c, 3'b000};
  endfunction

  // ---------------- mechanism counters ----------------
  int c_hit, c_bank_stall, c_act_stall, c_dbus_stall, c_full, c_ooo, c_reject;
  int c_rd, c_wr, c_nor, c_not;
  always @(posedge clk) if (rst_n) begin
    if (dut.grant_valid && dut.grant_hit) c_hit++;
    if (dut.grant_valid && dut.grant_idx != 0) c_ooo++;
    if (dut.u_tq.count != 0 && !dut.grant_valid && dut.seq_ready) begin
      if (!dut.bank_ready[dut.slots[0].bank]) c_bank_stall++;
      if (!dut.act_ok && dut.bank_ready[dut.slots[0].bank]) c_act_stall++;
      if (dut.slots[0].op == OP_READ && dut.bank_ready[dut.slots[0].bank] &&
          !(dut.slot_hit[0] ? dut.free_hit : dut.free_miss)) c_dbus_stall++;
    end
    if (req_valid && !req_ready) c_full++;
    if (req_reject) c_reject++;
    if (mem_cmd_valid) begin
      case (mem_cmd_op)
        OP_READ:  c_rd++;
        OP_WRITE: c_wr++;
        OP_NOR:   c_nor++;
        default:  c_not++;
      endcase
    end
  end

  // ---------------- response checker ----------------
  always @(posedge clk) if (rst_n && rsp_valid) begin
    int idx;
    idx = -1;
    foreach (exp_list[i]) if (idx < 0 && exp_list[i].addr == rsp_addr) idx = i;
    checks++;
    if (idx < 0) begin
      failures++;
      $display("FAIL: unexpected response for %h", rsp_addr);
    end else begin
      if (exp_list[idx].data !== rsp_data) begin
        failures++;
        $display("FAIL: data mismatch at %h", rsp_addr);
      end
      last_latency = cyc - exp_list[idx].t_acc;
      exp_list.delete(idx);
    end
    n_rsp++;
  end

  // ---------------- driver ----------------
  task automatic send(op_e op, logic [31:0] a1, logic [31:0] a2, logic [31:0] a3,
                      logic [511:0] d);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_addr1 = a1; req_addr2 = a2; req_addr3 = a3;
    req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    // accepted at this edge: update the reference in program order
    begin
      logic [3:0] b1, b2, b3; logic [14:0] r1, r2, r3; logic [9:0] c1;
      logic [ROWBITS-1:0] rv;
      exp_t e;
      {r1, b1, c1} = a1[31:3];
      {r2, b2} = a2[31:13];
      {r3, b3} = a3[31:13];
      case (op)
        OP_READ: begin
          rv = rrow(b1, r1);
          e.addr = a1; e.data = rv[int'(c1) * 64 +: 512]; e.t_acc = cyc;
          exp_list.push_back(e);
        end
        OP_WRITE: begin
          rv = rrow(b1, r1);
          rv[int'(c1) * 64 +: 512] = d;
          refm[rkey(b1, r1)] = rv;
        end
        OP_NOR: if (b2 == b1 && b3 == b1) refm[rkey(b1, r3)] = ~(rrow(b1, r1) | rrow(b1, r2));
        default: if (b2 == b1) refm[rkey(b1, r2)] = ~rrow(b1, r1);
      endcase
    end
    req_valid <= 1'b0;
  endtask

  function automatic logic [511:0] rnd512();
    logic [511:0] v;
    for (int k = 0; k < 16; k++) v[k * 32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic drain();
    int guard;
    guard = 0;
    while ((exp_list.size() != 0 || dut.u_tq.count != 0 || !dut.seq_ready) && guard < 20000) begin
      @(posedge clk); guard++;
    end
    repeat (80) @(posedge clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint LAT_MISS = 1 + 1 + (1 + 1 + 11 + 17) + 4;  // 36
  localparam longint LAT_HIT  = 1 + 1 + 17 + 4;                 // 23

  initial begin
    req_valid = 0; req_op = OP_READ; req_addr1 = '0; req_addr2 = '0; req_addr3 = '0;
    req_wdata = '0;
    rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // ---- 1. latencies ----
    send(OP_WRITE, pa(15'd7, 4'd3, 10'd64), '0, '0, rnd512());
    drain();
    send(OP_READ, pa(15'd7, 4'd3, 10'd64), '0, '0, '0);
    drain();
    check(last_latency == LAT_MISS, $sformatf("read miss latency %0d, expected %0d",
                                              last_latency, LAT_MISS));
    send(OP_READ, pa(15'd7, 4'd3, 10'd72), '0, '0, '0);
    drain();
    check(last_latency == LAT_HIT, $sformatf("read hit latency %0d, expected %0d",
                                             last_latency, LAT_HIT));

    // ---- 2. MAGIC NOR / NOT ----
    for (int c = 0; c < 1024; c += 8) begin
      send(OP_WRITE, pa(15'd100, 4'd5, 10'(c)), '0, '0, rnd512());
      send(OP_WRITE, pa(15'd101, 4'd5, 10'(c)), '0, '0, rnd512());
    end
    send(OP_NOR, pa(15'd100, 4'd5, 0), pa(15'd101, 4'd5, 0), pa(15'd102, 4'd5, 0), '0);
    send(OP_NOT, pa(15'd102, 4'd5, 0), pa(15'd103, 4'd5, 0), '0, '0);
    for (int c = 0; c < 1024; c += 64) begin
      send(OP_READ, pa(15'd102, 4'd5, 10'(c)), '0, '0, '0);
      send(OP_READ, pa(15'd103, 4'd5, 10'(c)), '0, '0, '0);
    end
    drain();

    // ---- 3. refused PIM instruction ----
    begin
      int n_rej0;
      n_rej0 = c_reject;
      send(OP_NOR, pa(15'd1, 4'd1, 0), pa(15'd2, 4'd2, 0), pa(15'd3, 4'd1, 0), '0);
      @(posedge clk);
      check(c_reject == n_rej0 + 1, "PIM with operands in two banks not refused");
      send(OP_READ, pa(15'd3, 4'd1, 0), '0, '0, '0);
      drain();
    end

    // ---- 4. random traffic ----
    for (int n = 0; n < 1500; n++) begin
      int sel;
      logic [3:0] b; logic [14:0] r1, r2, r3; logic [9:0] c;
      sel = $urandom_range(0, 99);
      b  = 4'($urandom_range(0, 15));
      r1 = 15'($urandom_range(0, 3));
      r2 = 15'($urandom_range(0, 3));
      r3 = 15'($urandom_range(4, 5));
      c  = 10'($urandom_range(0, 7) * 8);
      if (sel < 55)      send(OP_READ,  pa(r1, b, c), '0, '0, '0);
      else if (sel < 85) send(OP_WRITE, pa(r1, b, c), '0, '0, rnd512());
      else if (sel < 93) send(OP_NOR,   pa(r1, b, 0), pa(r2, b, 0), pa(r3, b, 0), '0);
      else               send(OP_NOT,   pa(r3, b, 0), pa(r1, b, 0), '0, '0);
    end
    drain();

    check(exp_list.size() == 0, $sformatf("%0d reads never answered", exp_list.size()));
    check(violations == 0, $sformatf("%0d R-DDR protocol violations", violations));
    check(model_hits == c_hit, "controller and memory disagree on row-buffer hits");
    check(c_hit > 0,        "no row-buffer hit");
    check(c_bank_stall > 0, "no busy-bank stall");
    check(c_act_stall > 0,  "no tRRD/tFAW stall");
    check(c_dbus_stall > 0, "no data-bus stall");
    check(c_full > 0,       "queue never full");
    check(c_ooo > 0,        "no out-of-order issue");
    check(c_reject > 0,     "no refused instruction");
    check(c_rd > 0 && c_wr > 0 && c_nor > 0 && c_not > 0, "an operation type never issued");
    $display("mechanisms: hit=%0d bank_stall=%0d act_stall=%0d dbus_stall=%0d full=%0d ooo=%0d reject=%0d rd=%0d wr=%0d nor=%0d not=%0d responses=%0d cycles=%0d",
             c_hit, c_bank_stall, c_act_stall, c_dbus_stall, c_full, c_ooo, c_reject,
             c_rd, c_wr, c_nor, c_not, n_rsp, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
