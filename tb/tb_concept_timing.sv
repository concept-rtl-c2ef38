// tb_concept_timing: checks the bank and rank timing checker.
// Two instances run side by side: one with the default timing, one with tRRD = 1 so
// that the four-activation window tFAW = 16 becomes the binding limit (with the
// default tRRD = 4 it never binds on its own). Each cycle a random operation is
// issued if the testbench's own reference allows it; every cycle the outputs
// (bank_ready per bank, act_ok, rd_ok) are compared with the reference, which keeps
// absolute times: a bank is free again 15 cycles after a read miss command, 2 after a
// read hit, 59 after a write, 40 after a NOR and 39 after a NOT (Table 2 sums counted
// from the last address cycle); activations at least tRRD apart, at most four in any
// 16 cycles; a read not before 4 + tWTR cycles after a write command.
module tb_concept_timing;
  import concept_pkg::*;

  logic clk = 0, rst_n;
  always #1 clk = ~clk;

  logic       iv [2];
  op_e        iop [2];
  logic       ihit [2];
  logic [3:0] ibank [2];
  logic [15:0] bready [2];
  logic       actok [2], rdok [2];

  concept_timing dut0 (.clk, .rst_n, .iss_valid(iv[0]), .iss_op(iop[0]), .iss_hit(ihit[0]),
                       .iss_bank(ibank[0]), .bank_ready(bready[0]), .act_ok(actok[0]), .rd_ok(rdok[0]));
  concept_timing #(.TRRD(1)) dut1 (.clk, .rst_n, .iss_valid(iv[1]), .iss_op(iop[1]), .iss_hit(ihit[1]),
                       .iss_bank(ibank[1]), .bank_ready(bready[1]), .act_ok(actok[1]), .rd_ok(rdok[1]));

  int checks = 0, failures = 0;
  int faw_block = 0, rrd_block = 0, bank_block = 0;
  longint cyc;
  longint freeat [2][16];
  longint lastact [2];
  longint lastwr [2];
  longint acts [2][$];
  int rrd [2] = '{4, 1};

  function automatic bit ref_act_ok(int d, longint t);
    int n;
    n = 0;
    foreach (acts[d][i]) if (acts[d][i] > t - 16) n++;
    return (t - lastact[d] >= rrd[d]) && (n < 4);
  endfunction

  function automatic bit ref_faw_only(int d, longint t);
    int n;
    n = 0;
    foreach (acts[d][i]) if (acts[d][i] > t - 16) n++;
    return n >= 4;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++) begin
      iv[d] = 0; iop[d] = OP_READ; ihit[d] = 0; ibank[d] = 0;
      lastact[d] = -100; lastwr[d] = -100;
      for (int b = 0; b < 16; b++) freeat[d][b] = 0;
    end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        bit want, act, ok;
        // compare outputs with the reference
        for (int b = 0; b < 16; b++) begin
          checks++;
          if (bready[d][b] !== (cyc >= freeat[d][b])) begin
            failures++; $display("FAIL: dut%0d bank %0d ready %b at %0d (free at %0d)", d, b, bready[d][b], cyc, freeat[d][b]);
          end
        end
        checks++;
        if (actok[d] !== ref_act_ok(d, cyc)) begin failures++; $display("FAIL: dut%0d act_ok %b at %0d", d, actok[d], cyc); end
        checks++;
        if (rdok[d] !== (cyc >= lastwr[d] + 4)) begin failures++; $display("FAIL: dut%0d rd_ok at %0d", d, cyc); end
        if (ref_faw_only(d, cyc) && (cyc - lastact[d] >= rrd[d])) faw_block++;
        if (cyc - lastact[d] < rrd[d]) rrd_block++;
        // random issue that respects the reference
        iop[d]   = op_e'($urandom_range(0, 99) < 60 ? 0 : $urandom_range(1, 3));
        ihit[d]  = (iop[d] == OP_READ) && $urandom_range(0, 2) == 0;
        ibank[d] = 4'($urandom_range(0, 15));
        act = !(iop[d] == OP_READ && ihit[d]);
        want = $urandom_range(0, 1);
        ok = (cyc >= freeat[d][ibank[d]]) && (!act || ref_act_ok(d, cyc))
             && (iop[d] != OP_READ || cyc >= lastwr[d] + 4);
        if (want && cyc < freeat[d][ibank[d]]) bank_block++;
        iv[d] = want && ok;
        if (iv[d]) begin
          case (iop[d])
            OP_READ:  freeat[d][ibank[d]] = cyc + (ihit[d] ? 2 : 15);
            OP_WRITE: begin freeat[d][ibank[d]] = cyc + 59; lastwr[d] = cyc; end
            OP_NOR:   freeat[d][ibank[d]] = cyc + 40;
            default:  freeat[d][ibank[d]] = cyc + 39;
          endcase
          if (act) begin lastact[d] = cyc; acts[d].push_back(cyc); end
        end
      end
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (faw_block == 0 || rrd_block == 0 || bank_block == 0) begin
      failures++; $display("FAIL: a constraint never bound: faw %0d rrd %0d bank %0d", faw_block, rrd_block, bank_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
