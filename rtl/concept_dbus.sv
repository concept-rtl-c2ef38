// concept_dbus: data-bus reservation and read-return unit of the CONCEPT controller.
//
// In R-DDR the data of a read appears on the data bus a fixed time after the last
// address cycle (tDEC + tCHARGE + tREAD + CL for a read that senses the array, CL
// alone for a read served from the row buffer) and lasts tBURST cycles; write data
// is sent in the tBURST cycles starting with the write command. Because reads of
// different latency may be in flight to different banks at once, the unit keeps a
// reservation map of the next HORIZON cycles of the data bus (bit k = busy k cycles
// from now) and reports whether the window a read miss, a read hit or a write would
// occupy is still free. When an operation is issued its window is marked busy and,
// for a read, its tag is placed in a delay line at the cycle its burst begins. When
// the tag reaches the head, the unit collects the tBURST beats from the bus and
// returns them as one 512-bit response with the tag, one cycle after the last beat.
//
// Interface: `iss_*` marks the operation whose command is on the bus this cycle;
// `free_miss`, `free_hit`, `free_wr` are combinational from the map; `rd_beat` is
// sampled at the expected beats; `rsp_*` is registered. Reset (active low,
// synchronous) clears the map and the delay line.
// The latencies follow the document; the hit latency of CL alone and the single-rate
// 128-bit beats are this design's choices.
module concept_dbus
  import concept_pkg::*;
#(
  parameter int unsigned TAG_W   = BANK_W + ROW_W + COL_W,
  parameter int unsigned OFF_MISS = 1 + T_DEC + T_CHARGE + T_READ + T_CL, // 31
  parameter int unsigned OFF_HIT  = 1 + T_CL,                             // 18
  parameter int unsigned TBURST   = T_BURST,
  parameter int unsigned HORIZON  = OFF_MISS + TBURST + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               iss_valid,
  input  op_e                iss_op,
  input  logic               iss_hit,
  input  logic [TAG_W-1:0]   iss_tag,
  output logic               free_miss,
  output logic               free_hit,
  output logic               free_wr,
  input  logic [BEAT_W-1:0]  rd_beat,
  output logic               rsp_valid,
  output logic [TAG_W-1:0]   rsp_tag,
  output logic [DATA_W-1:0]  rsp_data
);

  logic [HORIZON-1:0] busy;
  logic [HORIZON-1:0] ret_v;
  logic [TAG_W-1:0]   ret_tag [HORIZON];

  // Collection of the beats of the current burst.
  logic                      cap_act;
  logic [$clog2(TBURST)-1:0] cap_beat;
  logic [TAG_W-1:0]          cap_tag;
  logic [DATA_W-1:0]         cap_data;

  function automatic logic [HORIZON-1:0] window(int unsigned off);
    logic [HORIZON-1:0] w;
    w = '0;
    for (int k = 0; k < int'(TBURST); k++) w[off + k] = 1'b1;
    return w;
  endfunction

  localparam logic [HORIZON-1:0] W_MISS = window(OFF_MISS);
  localparam logic [HORIZON-1:0] W_HIT  = window(OFF_HIT);
  localparam logic [HORIZON-1:0] W_WR   = window(0);

  assign free_miss = (busy & W_MISS) == '0;
  assign free_hit  = (busy & W_HIT)  == '0;
  assign free_wr   = (busy & W_WR)   == '0;

  logic [HORIZON-1:0] new_busy;
  always_comb begin
    new_busy = busy;
    if (iss_valid) begin
      unique case (iss_op)
        OP_READ:  new_busy = busy | (iss_hit ? W_HIT : W_MISS);
        OP_WRITE: new_busy = busy | W_WR;
        default:  ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= '0;
      ret_v    <= '0;
      for (int k = 0; k < int'(HORIZON); k++) ret_tag[k] <= '0;
      cap_act  <= 1'b0;
      cap_beat <= '0;
      cap_tag  <= '0;
      cap_data <= '0;
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
    end else begin
      // Advance the map and the delay line by one cycle.
      busy <= new_busy >> 1;
      for (int k = 0; k < int'(HORIZON) - 1; k++) begin
        ret_v[k]   <= ret_v[k+1];
        ret_tag[k] <= ret_tag[k+1];
      end
      ret_v[HORIZON-1] <= 1'b0;
      if (iss_valid && iss_op == OP_READ) begin
        // The slot is written one below the offset since the line shifts now.
        ret_v  [(iss_hit ? OFF_HIT : OFF_MISS) - 1] <= 1'b1;
        ret_tag[(iss_hit ? OFF_HIT : OFF_MISS) - 1] <= iss_tag;
      end

      rsp_valid <= 1'b0;
      if (ret_v[0]) begin
        cap_act  <= 1'b1;
        cap_beat <= 1;
        cap_tag  <= ret_tag[0];
        cap_data[0 +: BEAT_W] <= rd_beat;
      end else if (cap_act) begin
        cap_data[int'(cap_beat) * BEAT_W +: BEAT_W] <= rd_beat;
        cap_beat <= cap_beat + 1'b1;
        if (int'(cap_beat) == int'(TBURST) - 1) begin
          cap_act   <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_tag   <= cap_tag;
          rsp_data  <= cap_data;
          rsp_data[(TBURST-1) * BEAT_W +: BEAT_W] <= rd_beat;
        end
      end
    end
  end

  // Reservations never collide: the scheduler checks the window before issuing.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (iss_valid && iss_op == OP_READ) |-> (iss_hit ? free_hit : free_miss));
  a_wr_free:    assert property (@(posedge clk) disable iff (!rst_n)
    (iss_valid && iss_op == OP_WRITE) |-> free_wr);

endmodule
