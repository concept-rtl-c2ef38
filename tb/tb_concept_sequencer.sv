// tb_concept_sequencer: checks the R-DDR command sequencer.
// Random entries are offered whenever the sequencer is ready. For each one the
// testbench records the bus cycle by cycle and compares it with the expected R-DDR
// sequence: command, opcode and bank in the first cycle together with the first
// address; then the remaining addresses (RA, CA / Row1, Row2, Row3 / Row1, Row2);
// for a write the four 128-bit data beats in the first four cycles. It also checks
// how long `ready` stays low: 2 cycles for READ and NOT, 3 for NOR, 4 for WRITE.
module tb_concept_sequencer;
  import concept_pkg::*;

  logic clk = 0, rst_n;
  always #1 clk = ~clk;

  logic iss_valid, ready, cmd_valid, addr_valid, wd_valid;
  tq_entry_t iss_entry;
  op_e cmd_op;
  logic [3:0] cmd_bank;
  logic [14:0] addr;
  logic [127:0] wd_beat;

  concept_sequencer dut (.clk, .rst_n, .iss_valid, .iss_entry, .ready, .cmd_valid, .cmd_op,
                         .cmd_bank, .addr_valid, .addr, .wd_valid, .wd_beat);

  int checks = 0, failures = 0;
  int nops [4] = '{0, 0, 0, 0};

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss_valid = 0; iss_entry = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      tq_entry_t e;
      logic [14:0] seq [3];
      int na, nb;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        iss_valid = 0;
        #0.1;
        chk(!cmd_valid && !addr_valid && !wd_valid, "bus idle without issue");
        continue;
      end
      e = '0; e.v = 1; e.op = op_e'($urandom_range(0, 3)); e.bank = 4'($urandom);
      e.row1 = 15'($urandom); e.col = 10'($urandom);
      for (int k = 0; k < 16; k++) e.data[k * 32 +: 32] = $urandom;
      nops[e.op]++;
      case (e.op)
        OP_NOR: begin na = 3; seq[0] = e.row1; seq[1] = e.data[511:497]; seq[2] = e.data[496:482]; end
        OP_NOT: begin na = 2; seq[0] = e.row1; seq[1] = e.data[511:497]; seq[2] = 0; end
        default: begin na = 2; seq[0] = e.row1; seq[1] = {5'd0, e.col}; seq[2] = 0; end
      endcase
      nb = (e.op == OP_WRITE) ? 4 : na;
      iss_valid = 1; iss_entry = e;
      #0.1;
      chk(ready, "ready before issue");
      for (int c = 0; c < nb; c++) begin
        chk(cmd_valid == (c == 0), $sformatf("cmd_valid in cycle %0d", c));
        if (c == 0) chk(cmd_op == e.op && cmd_bank == e.bank, "opcode / bank");
        chk(addr_valid == (c < na), $sformatf("addr_valid in cycle %0d", c));
        if (c < na) chk(addr == seq[c], $sformatf("address %0d of op %0d", c, e.op));
        chk(wd_valid == (e.op == OP_WRITE), "wd_valid");
        if (e.op == OP_WRITE) chk(wd_beat == e.data[c * 128 +: 128], $sformatf("write beat %0d", c));
        if (c > 0) chk(!ready, $sformatf("busy in cycle %0d", c));
        @(posedge clk);
        @(negedge clk);
        iss_valid = 0;
        iss_entry = '0;
        #0.1;
      end
      chk(ready, "ready after the sequence");
    end
    chk(nops[0] > 0 && nops[1] > 0 && nops[2] > 0 && nops[3] > 0, "all opcodes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
