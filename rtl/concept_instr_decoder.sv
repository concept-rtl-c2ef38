// concept_instr_decoder: front-end instruction decoder of the CONCEPT controller.
//
// Takes one host instruction of the extended ISA (READ addr; WRITE addr, data;
// MAGIC NOR addr1, addr2, addr3; MAGIC NOT addr1, addr2) and builds the
// transaction-queue entry for it. Each physical address is split into memory
// coordinates with the upper bits as row, the middle bits as bank and the lower bits
// as column. READ and WRITE keep bank, row and column of addr1 and (for WRITE) the
// 512-bit data. A PIM instruction has no data, so the row of addr2 and, for NOR, the
// row of addr3 are written into the top of the otherwise unused data field; only the
// bank of addr1 is kept, because MAGIC operates on rows of a single bank.
// `bank_err` flags a PIM instruction whose operands are not all in one bank; such an
// instruction cannot be executed in memory and the queue should refuse it.
//
// Purely combinational. The address split itself (row [31:17], bank [16:13], column
// [12:3], byte [2:0]) and the error flag are this design's choices; the field layout
// of the entry follows the document.
module concept_instr_decoder
  import concept_pkg::*;
(
  input  op_e                in_op,
  input  logic [PADDR_W-1:0] in_addr1,
  input  logic [PADDR_W-1:0] in_addr2,
  input  logic [PADDR_W-1:0] in_addr3,
  input  logic [DATA_W-1:0]  in_wdata,
  output tq_entry_t          entry,
  output logic               bank_err
);

  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [BANK_W-1:0] bank;
    logic [COL_W-1:0]  col;
  } coord_t;

  function automatic coord_t split(logic [PADDR_W-1:0] pa);
    coord_t c;
    c.col  = pa[OFFS_W +: COL_W];
    c.bank = pa[OFFS_W + COL_W +: BANK_W];
    c.row  = pa[OFFS_W + COL_W + BANK_W +: ROW_W];
    return c;
  endfunction

  coord_t c1, c2, c3;

  always_comb begin
    c1 = split(in_addr1);
    c2 = split(in_addr2);
    c3 = split(in_addr3);

    entry      = '0;
    entry.v    = 1'b1;
    entry.op   = in_op;
    entry.bank = c1.bank;
    entry.row1 = c1.row;
    bank_err   = 1'b0;

    unique case (in_op)
      OP_READ: begin
        entry.col = c1.col;
      end
      OP_WRITE: begin
        entry.col  = c1.col;
        entry.data = in_wdata;
      end
      OP_NOR: begin
        entry.data[ROW2_LSB +: ROW_W] = c2.row;
        entry.data[ROW3_LSB +: ROW_W] = c3.row;
        bank_err = (c2.bank != c1.bank) || (c3.bank != c1.bank);
      end
      OP_NOT: begin
        entry.data[ROW2_LSB +: ROW_W] = c2.row;
        bank_err = (c2.bank != c1.bank);
      end
      default: ;
    endcase
  end

endmodule
