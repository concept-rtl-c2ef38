// concept_row_buffer: narrow row-buffer tracker of the CONCEPT controller.
//
// An RRAM bank multiplexes many bitlines onto few sense amplifiers, so a read only
// brings a narrow segment of the row into the bank's row buffer, not the full row.
// Reads that hit that segment again can be served from the buffer at reduced
// latency (partial row-buffer locality). This block mirrors, per bank, which row and
// which column segment the buffer holds. A read that is issued loads the buffer with
// its row and segment; a write or a MAGIC operation to the bank precharges the array
// and may change the stored data, so it invalidates the buffer.
//
// Interface: `upd_*` reports each issued operation (one per cycle); NLOOK lookup ports
// (bank, row, column) return `lk_hit` combinationally from the current state, so the
// scheduler can evaluate every queued read at once. State changes at the clock edge;
// reset (active low, synchronous) invalidates all buffers.
// The segment width (SEG_COL_BITS = 5: 32 column addresses, i.e. four 64-byte
// bursts) is this design's choice: the document gives no row-buffer width.
module concept_row_buffer
  import concept_pkg::*;
#(
  parameter int unsigned NB           = NBANKS,
  parameter int unsigned SEG_COL_BITS = 5,
  parameter int unsigned NLOOK        = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    upd_valid,
  input  op_e                     upd_op,
  input  logic [$clog2(NB)-1:0]   upd_bank,
  input  logic [ROW_W-1:0]        upd_row,
  input  logic [COL_W-1:0]        upd_col,
  input  logic [$clog2(NB)-1:0]   lk_bank [NLOOK],
  input  logic [ROW_W-1:0]        lk_row  [NLOOK],
  input  logic [COL_W-1:0]        lk_col  [NLOOK],
  output logic [NLOOK-1:0]        lk_hit
);

  localparam int unsigned SEG_W = COL_W - SEG_COL_BITS;

  logic [NB-1:0]     rb_v;
  logic [ROW_W-1:0]  rb_row [NB];
  logic [SEG_W-1:0]  rb_seg [NB];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rb_v <= '0;
      for (int b = 0; b < NB; b++) begin
        rb_row[b] <= '0;
        rb_seg[b] <= '0;
      end
    end else if (upd_valid) begin
      if (upd_op == OP_READ) begin
        rb_v[upd_bank]   <= 1'b1;
        rb_row[upd_bank] <= upd_row;
        rb_seg[upd_bank] <= upd_col[COL_W-1 -: SEG_W];
      end else begin
        rb_v[upd_bank]   <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NLOOK; i++) begin
      lk_hit[i] = rb_v[lk_bank[i]] && (rb_row[lk_bank[i]] == lk_row[i])
               && (rb_seg[lk_bank[i]] == lk_col[i][COL_W-1 -: SEG_W]);
    end
  end

endmodule
