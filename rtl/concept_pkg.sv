// concept_pkg: types and constants shared by the CONCEPT RRAM memory controller.
//
// The field widths follow the transaction-queue entry of a 4 Gb x8 DDR4-class part:
// 1 valid bit, a 2-bit opcode, 4 bank bits, a 15-bit row, a 10-bit column and a
// 512-bit (64-byte) data field. A PIM instruction carries no data, so its second and
// third row addresses are stored in the top 30 bits of the data field (Row2 in the
// top 15 bits, Row3 right below). The timing constants are the clock-cycle values
// of the R-DDR protocol (one cycle = 0.833 ns, DDR4-2400 I/O clock).
//
// Own choices: the 512-bit transfer is modelled as four 128-bit single-rate beats
// (tBURST = 4 cycles); the physical address map puts the byte offset in bits [2:0],
// the column in [12:3], the bank in [16:13] and the row in [31:17].
package concept_pkg;

  localparam int unsigned ROW_W    = 15;
  localparam int unsigned COL_W    = 10;
  localparam int unsigned BANK_W   = 4;
  localparam int unsigned NBANKS   = 1 << BANK_W;
  localparam int unsigned DATA_W   = 512;
  localparam int unsigned PADDR_W  = 32;
  localparam int unsigned OFFS_W   = 3;   // byte within one 64-bit bus word
  localparam int unsigned BEAT_W   = 128; // data bus width per clock
  localparam int unsigned T_BURST  = 4;   // clock cycles per 64-byte transfer
  localparam int unsigned ABUS_W   = ROW_W; // address bus carries RA or CA

  // Bit positions of Row2 / Row3 inside the data field (Figure 2(b)).
  localparam int unsigned ROW2_LSB = DATA_W - ROW_W;       // 497
  localparam int unsigned ROW3_LSB = DATA_W - 2 * ROW_W;   // 482

  // Opcodes of the extended ISA.
  typedef enum logic [1:0] {
    OP_READ  = 2'b00,
    OP_WRITE = 2'b01,
    OP_NOR   = 2'b10,   // L1: addr3 <= NOR(addr1, addr2), whole rows
    OP_NOT   = 2'b11    // L2: addr2 <= NOT(addr1), whole rows
  } op_e;

  // One transaction-queue entry (544 bits).
  typedef struct packed {
    logic              v;
    op_e               op;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row1;
    logic [COL_W-1:0]  col;
    logic [DATA_W-1:0] data;
  } tq_entry_t;

  // R-DDR timing, in clock cycles (nCK).
  localparam int unsigned T_DEC       = 1;
  localparam int unsigned T_CHARGE    = 1;
  localparam int unsigned T_READ      = 11;
  localparam int unsigned T_SET       = 27;
  localparam int unsigned T_RESET     = 27;
  localparam int unsigned T_MAGIC_NOR = 35;
  localparam int unsigned T_MAGIC_NOT = 35;
  localparam int unsigned T_PRE       = 1;
  localparam int unsigned T_CL        = 17;
  localparam int unsigned T_WTR       = 0;
  localparam int unsigned T_RRD       = 4;
  localparam int unsigned T_FAW       = 16;

  // Number of address-bus cycles an operation needs.
  function automatic int unsigned addr_cycles(op_e op);
    case (op)
      OP_NOR:  return 3;
      default: return 2;
    endcase
  endfunction

  // Second row address of a PIM instruction, stored in the data field.
  function automatic logic [ROW_W-1:0] row2_of(logic [DATA_W-1:0] d);
    return d[ROW2_LSB +: ROW_W];
  endfunction

  function automatic logic [ROW_W-1:0] row3_of(logic [DATA_W-1:0] d);
    return d[ROW3_LSB +: ROW_W];
  endfunction

endpackage
