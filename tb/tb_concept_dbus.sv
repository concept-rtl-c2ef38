// tb_concept_dbus: checks the data-bus reservation and read-return unit.
// Random reads (miss or hit) and writes are issued whenever the testbench's own
// reservation map says their window is free; every cycle the free_miss / free_hit /
// free_wr outputs are compared with that map. A read issued in cycle t owns the bus
// in cycles t+31..t+34 (miss: 1 address cycle + tDEC + tCHARGE + tREAD + CL) or
// t+18..t+21 (hit: 1 + CL); a write in t..t+3. The testbench drives the expected
// beats of each burst on rd_beat at exactly those cycles (random values otherwise)
// and checks that every response arrives one cycle after its last beat with the
// right tag and the four beats in order.
module tb_concept_dbus;
  import concept_pkg::*;

  logic clk = 0, rst_n;
  always #1 clk = ~clk;

  logic iss_valid, iss_hit;
  op_e  iss_op;
  logic [28:0] iss_tag;
  logic free_miss, free_hit, free_wr;
  logic [127:0] rd_beat;
  logic rsp_valid;
  logic [28:0] rsp_tag;
  logic [511:0] rsp_data;

  concept_dbus dut (.clk, .rst_n, .iss_valid, .iss_op, .iss_hit, .iss_tag, .free_miss,
                    .free_hit, .free_wr, .rd_beat, .rsp_valid, .rsp_tag, .rsp_data);

  int checks = 0, failures = 0, n_rsp = 0, n_hit = 0, n_block = 0;
  longint cyc;
  bit busy [longint];
  typedef struct { longint start; logic [28:0] tag; logic [511:0] data; } burst_t;
  burst_t bursts [$];

  function automatic bit win_free(longint s);
    for (longint k = s; k < s + 4; k++) if (busy.exists(k)) return 0;
    return 1;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss_valid = 0; iss_hit = 0; iss_op = OP_READ; iss_tag = 0; rd_beat = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      // check the response produced at the last edge
      if (rsp_valid) begin
        checks++;
        n_rsp++;
        if (bursts.size() == 0 || bursts[0].start + 4 != cyc || bursts[0].tag != rsp_tag
            || bursts[0].data != rsp_data) begin
          failures++; $display("FAIL: response at %0d", cyc);
        end
        if (bursts.size() > 0) void'(bursts.pop_front());
      end else if (bursts.size() > 0 && bursts[0].start + 4 == cyc) begin
        checks++; failures++; $display("FAIL: response missing at %0d", cyc);
        void'(bursts.pop_front());
      end
      checks += 3;
      if (free_miss !== win_free(cyc + 31)) begin failures++; $display("FAIL: free_miss at %0d", cyc); end
      if (free_hit  !== win_free(cyc + 18)) begin failures++; $display("FAIL: free_hit at %0d", cyc); end
      if (free_wr   !== win_free(cyc))      begin failures++; $display("FAIL: free_wr at %0d", cyc); end
      // drive the bus for this cycle
      rd_beat = {$urandom, $urandom, $urandom, $urandom};
      foreach (bursts[i])
        if (cyc >= bursts[i].start && cyc < bursts[i].start + 4)
          rd_beat = bursts[i].data[int'(cyc - bursts[i].start) * 128 +: 128];
      // random issue
      iss_op  = ($urandom_range(0, 99) < 75) ? OP_READ : OP_WRITE;
      iss_hit = (iss_op == OP_READ) && $urandom_range(0, 2) == 0;
      iss_tag = 29'($urandom);
      iss_valid = 0;
      if ($urandom_range(0, 2) == 0) begin
        longint s;
        s = (iss_op == OP_WRITE) ? cyc : cyc + (iss_hit ? 18 : 31);
        if (win_free(s)) begin
          iss_valid = 1;
          for (longint k = s; k < s + 4; k++) busy[k] = 1;
          if (iss_op == OP_READ) begin
            burst_t b;
            b.start = s; b.tag = iss_tag;
            for (int k = 0; k < 16; k++) b.data[k * 32 +: 32] = $urandom;
            // keep the list ordered by start
            begin
              int pos;
              pos = bursts.size();
              for (int i = 0; i < bursts.size(); i++) if (pos == bursts.size() && bursts[i].start > s) pos = i;
              bursts.insert(pos, b);
            end
            if (iss_hit) n_hit++;
          end
        end else n_block++;
      end
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (n_rsp < 100 || n_hit == 0 || n_block == 0) begin
      failures++; $display("FAIL: too little traffic: rsp %0d hit %0d blocked %0d", n_rsp, n_hit, n_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
