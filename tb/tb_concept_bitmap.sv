// tb_concept_bitmap: bitmap-index database queries executed in memory through the
// controller's MAGIC NOR / NOT instructions.
//
// The database keeps one bitmap per day (bit i = user i logged in that day) and one
// gender bitmap (bit i = user i is male). For the past w weeks it answers
//   Q1: how many users were active in every one of the w weeks, and
//   Q2: for each week, how many male users were active in it.
// That takes 6w ORs (7 day bitmaps into one weekly bitmap), 2w-1 ANDs and w+1 bit
// counts. ORs and ANDs run inside the memory, built from the two MAGIC instructions:
// OR(a,b) = NOT(NOR(a,b)), AND(a,b) = NOR(NOT a, NOT b); the bit counts are done here,
// on data read back through the controller, as a processor would.
//
// Size run here: NCH row-sized chunks of users (65,536 users each, one chunk per bank
// so that the banks work in parallel) and w = 2, 3 and 4. The evaluated sizes (8 and
// 16 million users) differ only in the number of chunks. The bitmaps are random; the
// expected counts are computed directly from them. The test also checks that the
// number of MAGIC operations the controller sent matches the query plan.
module tb_concept_bitmap;
  import concept_pkg::*;

  localparam int NCH = 2;
  localparam int ROWBITS = 1024 * 64;
  localparam int MAXW = 4;

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

  // Row map inside each chunk's bank.
  localparam logic [14:0] R_DAY0 = 0, R_MALE = 28, R_WEEK0 = 40, R_T1 = 60, R_T2 = 61,
                          R_Q1 = 80, R_Q2_0 = 81;

  logic [ROWBITS-1:0] day  [NCH][7 * MAXW];
  logic [ROWBITS-1:0] male [NCH];

  int n_pim = 0, n_rsp = 0;
  logic [DATA_W-1:0] rdbuf [int];
  always @(posedge clk) begin
    if (mem_cmd_valid && (mem_cmd_op == OP_NOR || mem_cmd_op == OP_NOT)) n_pim++;
    if (rsp_valid) begin rdbuf[int'(rsp_addr)] = rsp_data; n_rsp++; end
  end

  function automatic logic [31:0] pa(logic [14:0] r, logic [3:0] b, logic [9:0] c);
    return {r, b, c, 3'b000};
  endfunction

  task automatic send(op_e op, logic [31:0] a1, logic [31:0] a2, logic [31:0] a3,
                      logic [511:0] d);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_addr1 = a1; req_addr2 = a2; req_addr3 = a3;
    req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    req_valid <= 1'b0;
  endtask

  task automatic p_nor(int b, logic [14:0] x, logic [14:0] y, logic [14:0] z);
    send(OP_NOR, pa(x, 4'(b), 0), pa(y, 4'(b), 0), pa(z, 4'(b), 0), '0);
  endtask
  task automatic p_not(int b, logic [14:0] x, logic [14:0] z);
    send(OP_NOT, pa(x, 4'(b), 0), pa(z, 4'(b), 0), '0, '0);
  endtask
  task automatic p_or(int b, logic [14:0] x, logic [14:0] y, logic [14:0] z);
    p_nor(b, x, y, R_T1); p_not(b, R_T1, z);
  endtask
  task automatic p_and(int b, logic [14:0] x, logic [14:0] y, logic [14:0] z);
    p_not(b, x, R_T1); p_not(b, y, R_T2); p_nor(b, R_T1, R_T2, z);
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while ((dut.u_tq.count != 0 || !dut.seq_ready || dut.u_dbus.ret_v != 0 ||
            dut.u_dbus.cap_act) && guard < 100000) begin
      @(posedge clk); guard++;
    end
    repeat (80) @(posedge clk);
  endtask

  task automatic write_row(int b, logic [14:0] r, logic [ROWBITS-1:0] v);
    for (int c = 0; c < 1024; c += 8) send(OP_WRITE, pa(r, 4'(b), 10'(c)), '0, '0, v[c * 64 +: 512]);
  endtask

  function automatic int popcount_row(int b, logic [14:0] r);
    int n;
    n = 0;
    for (int c = 0; c < 1024; c += 8) begin
      int k;
      k = int'(pa(r, 4'(b), 10'(c)));
      if (!rdbuf.exists(k)) return -1;
      n += $countones(rdbuf[k]);
    end
    return n;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_op = OP_READ; req_addr1 = '0; req_addr2 = '0; req_addr3 = '0;
    req_wdata = '0;
    for (int ch = 0; ch < NCH; ch++) begin
      for (int d = 0; d < 7 * MAXW; d++)
        for (int k = 0; k < ROWBITS / 32; k++) day[ch][d][k * 32 +: 32] = $urandom & $urandom;
      for (int k = 0; k < ROWBITS / 32; k++) male[ch][k * 32 +: 32] = $urandom;
    end
    rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // load the database, chunks interleaved so both banks fill in parallel
    for (int d = 0; d <= 7 * MAXW; d++)
      for (int c = 0; c < 1024; c += 8)
        for (int ch = 0; ch < NCH; ch++)
          send(OP_WRITE, pa(d < 7 * MAXW ? R_DAY0 + 15'(d) : R_MALE, 4'(ch), 10'(c)), '0, '0,
               d < 7 * MAXW ? day[ch][d][c * 64 +: 512] : male[ch][c * 64 +: 512]);
    drain();

    for (int w = 2; w <= MAXW; w++) begin
      longint t0;
      int pim0, exp_pim;
      int e_q1, e_q2 [MAXW];
      t0 = cyc; pim0 = n_pim;
      rdbuf.delete();
      for (int ch = 0; ch < NCH; ch++) begin
        // weekly activity: 6 ORs per week
        for (int k = 0; k < w; k++) begin
          p_or(ch, R_DAY0 + 15'(7 * k), R_DAY0 + 15'(7 * k + 1), R_WEEK0 + 15'(k));
          for (int j = 2; j < 7; j++) p_or(ch, R_WEEK0 + 15'(k), R_DAY0 + 15'(7 * k + j), R_WEEK0 + 15'(k));
        end
        // Q1: active in every week (w-1 ANDs)
        p_and(ch, R_WEEK0, R_WEEK0 + 1, R_Q1);
        for (int k = 2; k < w; k++) p_and(ch, R_Q1, R_WEEK0 + 15'(k), R_Q1);
        // Q2: male and active, per week (w ANDs)
        for (int k = 0; k < w; k++) p_and(ch, R_MALE, R_WEEK0 + 15'(k), R_Q2_0 + 15'(k));
      end
      // read the w+1 result bitmaps for the bit counts
      for (int c = 0; c < 1024; c += 8)
        for (int ch = 0; ch < NCH; ch++) begin
          send(OP_READ, pa(R_Q1, 4'(ch), 10'(c)), '0, '0, '0);
          for (int k = 0; k < w; k++) send(OP_READ, pa(R_Q2_0 + 15'(k), 4'(ch), 10'(c)), '0, '0, '0);
        end
      drain();

      // expected answers straight from the bitmaps
      e_q1 = 0;
      for (int k = 0; k < w; k++) e_q2[k] = 0;
      for (int ch = 0; ch < NCH; ch++) begin
        logic [ROWBITS-1:0] wk [MAXW];
        logic [ROWBITS-1:0] all;
        all = '1;
        for (int k = 0; k < w; k++) begin
          wk[k] = '0;
          for (int j = 0; j < 7; j++) wk[k] |= day[ch][7 * k + j];
          all &= wk[k];
          e_q2[k] += $countones(wk[k] & male[ch]);
        end
        e_q1 += $countones(all);
      end
      begin
        int g_q1, g;
        g_q1 = 0;
        for (int ch = 0; ch < NCH; ch++) g_q1 += popcount_row(ch, R_Q1);
        checks++;
        if (g_q1 != e_q1) begin failures++; $display("FAIL: w=%0d Q1 %0d expected %0d", w, g_q1, e_q1); end
        for (int k = 0; k < w; k++) begin
          g = 0;
          for (int ch = 0; ch < NCH; ch++) g += popcount_row(ch, R_Q2_0 + 15'(k));
          checks++;
          if (g != e_q2[k]) begin failures++; $display("FAIL: w=%0d Q2 week %0d: %0d expected %0d", w, k, g, e_q2[k]); end
        end
      end
      // 6w ORs x 2 + (2w-1) ANDs x 3 MAGIC operations per chunk
      exp_pim = NCH * (6 * w * 2 + (2 * w - 1) * 3);
      checks++;
      if (n_pim - pim0 != exp_pim) begin failures++; $display("FAIL: %0d MAGIC ops, expected %0d", n_pim - pim0, exp_pim); end
      $display("w=%0d users=%0d: Q1=%0d, %0d MAGIC ops, %0d cycles incl. read-out", w,
               NCH * ROWBITS, e_q1, n_pim - pim0, cyc - t0);
    end
    checks++;
    if (violations != 0) begin failures++; $display("FAIL: %0d protocol violations", violations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
