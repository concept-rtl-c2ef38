// tb_concept_addr_mux: checks the address-bus multiplexer.
// For random entries of each opcode, steps the phase and compares the driven address
// and the last flag with the sequence RA, CA (READ/WRITE), Row1, Row2, Row3 (NOR) or
// Row1, Row2 (NOT), where Row2/Row3 sit in data bits 511:497 and 496:482.
module tb_concept_addr_mux;
  import concept_pkg::*;

  tq_entry_t  e;
  logic [1:0] ph;
  logic [14:0] a;
  logic        last;
  int checks = 0, failures = 0;

  concept_addr_mux dut (.entry(e), .phase(ph), .addr(a), .last(last));

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [14:0] seq [3];
      int len;
      e = '0;
      e.v = 1; e.op = op_e'($urandom_range(0, 3)); e.bank = 4'($urandom);
      e.row1 = 15'($urandom); e.col = 10'($urandom);
      for (int k = 0; k < 16; k++) e.data[k * 32 +: 32] = $urandom;
      case (e.op)
        OP_NOR: begin len = 3; seq[0] = e.row1; seq[1] = e.data[511:497]; seq[2] = e.data[496:482]; end
        OP_NOT: begin len = 2; seq[0] = e.row1; seq[1] = e.data[511:497]; seq[2] = 0; end
        default: begin len = 2; seq[0] = e.row1; seq[1] = {5'd0, e.col}; seq[2] = 0; end
      endcase
      for (int p = 0; p < len; p++) begin
        ph = 2'(p);
        #1;
        checks++;
        if (a !== seq[p] || last !== (p == len - 1)) begin
          failures++;
          $display("FAIL: op %0d phase %0d addr %h exp %h last %b", e.op, p, a, seq[p], last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
