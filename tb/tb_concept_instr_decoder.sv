// tb_concept_instr_decoder: checks the front-end instruction decoder.
// Random READ, WRITE, NOR and NOT instructions are decoded; the testbench builds the
// expected queue entry on its own (row = address bits 31:17, bank = 16:13, column =
// 12:3; Row2 in data bits 511:497, Row3 in 496:482 for PIM) and compares it field by
// field, together with the bank-mismatch flag.
module tb_concept_instr_decoder;
  import concept_pkg::*;

  op_e          op;
  logic [31:0]  a1, a2, a3;
  logic [511:0] wd;
  tq_entry_t    e;
  logic         berr;
  int checks = 0, failures = 0;

  concept_instr_decoder dut (.in_op(op), .in_addr1(a1), .in_addr2(a2), .in_addr3(a3),
                             .in_wdata(wd), .entry(e), .bank_err(berr));

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [511:0] exp_d;
      bit exp_err;
      op = op_e'($urandom_range(0, 3));
      a1 = $urandom; a2 = $urandom; a3 = $urandom;
      if ($urandom_range(0, 1)) begin a2[16:13] = a1[16:13]; a3[16:13] = a1[16:13]; end
      for (int k = 0; k < 16; k++) wd[k * 32 +: 32] = $urandom;
      #1;
      exp_d = '0; exp_err = 0;
      case (op)
        OP_WRITE: exp_d = wd;
        OP_NOR: begin
          exp_d[511:497] = a2[31:17]; exp_d[496:482] = a3[31:17];
          exp_err = (a2[16:13] != a1[16:13]) || (a3[16:13] != a1[16:13]);
        end
        OP_NOT: begin
          exp_d[511:497] = a2[31:17];
          exp_err = (a2[16:13] != a1[16:13]);
        end
        default: ;
      endcase
      chk(e.v == 1'b1, "valid bit");
      chk(e.op == op, "opcode");
      chk(e.bank == a1[16:13], "bank");
      chk(e.row1 == a1[31:17], "row1");
      chk(e.col == ((op == OP_READ || op == OP_WRITE) ? a1[12:3] : 10'd0), "column");
      chk(e.data == exp_d, $sformatf("data field, op %0d", op));
      chk(berr == exp_err, "bank mismatch flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
