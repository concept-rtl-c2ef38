// tb_concept_row_buffer: checks the narrow row-buffer tracker.
// Random issued operations update the tracker and a reference (per bank: valid, row,
// column segment = column bits 9:5); after each update 16 random lookups, biased
// towards recently read rows and segments, are compared with the reference. A read
// loads the buffer, a write or MAGIC operation to the bank invalidates it.
module tb_concept_row_buffer;
  import concept_pkg::*;

  logic clk = 0, rst_n;
  always #1 clk = ~clk;

  logic upd_valid;
  op_e upd_op;
  logic [3:0] upd_bank;
  logic [14:0] upd_row;
  logic [9:0] upd_col;
  logic [3:0] lk_bank [16];
  logic [14:0] lk_row [16];
  logic [9:0] lk_col [16];
  logic [15:0] lk_hit;
  int checks = 0, failures = 0, hits = 0;

  concept_row_buffer dut (.clk, .rst_n, .upd_valid, .upd_op, .upd_bank, .upd_row, .upd_col,
                          .lk_bank, .lk_row, .lk_col, .lk_hit);

  bit r_v [16]; logic [14:0] r_row [16]; logic [4:0] r_seg [16];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_op = OP_READ; upd_bank = 0; upd_row = 0; upd_col = 0;
    for (int i = 0; i < 16; i++) begin lk_bank[i] = 0; lk_row[i] = 0; lk_col[i] = 0; r_v[i] = 0; end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      upd_valid = $urandom_range(0, 3) != 0;
      upd_op   = ($urandom_range(0, 99) < 70) ? OP_READ : op_e'($urandom_range(1, 3));
      upd_bank = 4'($urandom_range(0, 3));
      upd_row  = 15'($urandom_range(0, 2));
      upd_col  = 10'($urandom_range(0, 127));
      @(posedge clk);
      if (upd_valid) begin
        if (upd_op == OP_READ) begin
          r_v[upd_bank] = 1; r_row[upd_bank] = upd_row; r_seg[upd_bank] = upd_col[9:5];
        end else r_v[upd_bank] = 0;
      end
      @(negedge clk);
      upd_valid = 0;
      for (int i = 0; i < 16; i++) begin
        lk_bank[i] = 4'($urandom_range(0, 3));
        lk_row[i]  = 15'($urandom_range(0, 2));
        lk_col[i]  = 10'($urandom_range(0, 127));
      end
      #0.1;
      for (int i = 0; i < 16; i++) begin
        bit e;
        e = r_v[lk_bank[i]] && r_row[lk_bank[i]] == lk_row[i] && r_seg[lk_bank[i]] == lk_col[i][9:5];
        if (e) hits++;
        checks++;
        if (lk_hit[i] !== e) begin failures++; $display("FAIL: lookup %0d hit %b exp %b", i, lk_hit[i], e); end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL: no hit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
