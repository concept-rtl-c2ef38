// concept_addr_mux: address-bus multiplexer of the CONCEPT controller.
//
// R-DDR sends the addresses of one operation one after another on a single address
// bus, to keep the pin count low. For READ and WRITE the bus carries the row address
// (RA) and then the column address (CA); for MAGIC NOR it carries the three row
// addresses Row1, Row2, Row3; for MAGIC NOT it carries Row1 and Row2. Row2 and Row3
// are taken from the top of the entry's data field, where the front end stored them.
// `phase` selects which address of the sequence is driven; `last` is high on the
// final address of the sequence. A column address is zero-extended to the bus width.
//
// Purely combinational. The order of the addresses follows the timing diagrams of
// the document; a phase beyond the end of a sequence drives zero (own choice).
module concept_addr_mux
  import concept_pkg::*;
(
  input  tq_entry_t          entry,
  input  logic [1:0]         phase,
  output logic [ABUS_W-1:0]  addr,
  output logic               last
);

  always_comb begin
    addr = '0;
    last = 1'b0;
    unique case (entry.op)
      OP_READ, OP_WRITE: begin
        unique case (phase)
          2'd0:    addr = entry.row1;
          2'd1:    begin addr = {{(ABUS_W-COL_W){1'b0}}, entry.col}; last = 1'b1; end
          default: addr = '0;
        endcase
      end
      OP_NOR: begin
        unique case (phase)
          2'd0:    addr = entry.row1;
          2'd1:    addr = row2_of(entry.data);
          2'd2:    begin addr = row3_of(entry.data); last = 1'b1; end
          default: addr = '0;
        endcase
      end
      OP_NOT: begin
        unique case (phase)
          2'd0:    addr = entry.row1;
          2'd1:    begin addr = row2_of(entry.data); last = 1'b1; end
          default: addr = '0;
        endcase
      end
      default: ;
    endcase
  end

endmodule
