// concept_timing: bank and rank timing checker of the CONCEPT controller.
//
// Keeps the R-DDR timing constraints. Latencies are counted from the last address
// cycle of an operation, as in the protocol's timing diagrams:
//   read (miss)  tDEC + tCHARGE + tREAD + tPRE           until the bank is free again
//   read (hit)   none: served from the row buffer, the bank is free after its addresses
//   write        tDEC + 2*tCHARGE + tSET + tRESET + tPRE (SET then RESET phase)
//   MAGIC NOR    tDEC + tCHARGE + tMAGIC_NOR + tPRE
//   MAGIC NOT    tDEC + tCHARGE + tMAGIC_NOT + tPRE
// Every operation that drives the array (all but a read hit) counts as an activation
// for the rank-level limits: consecutive activations are at least tRRD apart and at
// most four fall in any tFAW window. A read command waits tWTR after the last write
// data beat.
//
// Interface: `iss_*` reports the operation whose command is on the bus this cycle;
// `bank_ready[b]` says whether bank b may take a command now, `act_ok` whether an
// activation may be issued now and `rd_ok` whether a read may. All outputs are
// registered state compared with zero. Reset (active low, synchronous) frees all.
// The latency sums follow the document; holding a bank for tREAD + tPRE after a read
// miss and treating a read hit as no activation are this design's reading of it.
module concept_timing
  import concept_pkg::*;
#(
  parameter int unsigned NB          = NBANKS,
  parameter int unsigned TDEC        = T_DEC,
  parameter int unsigned TCHARGE     = T_CHARGE,
  parameter int unsigned TREAD       = T_READ,
  parameter int unsigned TSET        = T_SET,
  parameter int unsigned TRESET      = T_RESET,
  parameter int unsigned TMAGIC_NOR  = T_MAGIC_NOR,
  parameter int unsigned TMAGIC_NOT  = T_MAGIC_NOT,
  parameter int unsigned TPRE        = T_PRE,
  parameter int unsigned TWTR        = T_WTR,
  parameter int unsigned TRRD        = T_RRD,
  parameter int unsigned TFAW        = T_FAW,
  parameter int unsigned TBURST      = T_BURST
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   iss_valid,
  input  op_e                    iss_op,
  input  logic                   iss_hit,
  input  logic [$clog2(NB)-1:0]  iss_bank,
  output logic [NB-1:0]          bank_ready,
  output logic                   act_ok,
  output logic                   rd_ok
);

  localparam int unsigned CW = 8;

  // Cycles from the command cycle until the bank may take its next command.
  function automatic logic [CW-1:0] bank_hold(op_e op, logic hit);
    int unsigned last_addr;
    last_addr = addr_cycles(op) - 1;
    case (op)
      OP_READ:  return hit ? CW'(last_addr + 1)
                           : CW'(last_addr + TDEC + TCHARGE + TREAD + TPRE);
      OP_WRITE: return CW'(last_addr + TDEC + 2 * TCHARGE + TSET + TRESET + TPRE);
      OP_NOR:   return CW'(last_addr + TDEC + TCHARGE + TMAGIC_NOR + TPRE);
      default:  return CW'(last_addr + TDEC + TCHARGE + TMAGIC_NOT + TPRE);
    endcase
  endfunction

  logic [CW-1:0]   bank_cnt [NB];
  logic [CW-1:0]   rrd_cnt;
  logic [CW-1:0]   wtr_cnt;
  logic [TFAW-1:0] faw_hist;   // bit k: an activation k+1 cycles ago
  logic            is_act;
  int unsigned     faw_recent;

  assign is_act = iss_valid && !(iss_op == OP_READ && iss_hit);

  always_comb begin
    for (int b = 0; b < NB; b++) bank_ready[b] = (bank_cnt[b] == '0);
    faw_recent = 0;
    for (int k = 0; k < int'(TFAW) - 1; k++) faw_recent += 32'(faw_hist[k]);
    act_ok = (rrd_cnt == '0) && (faw_recent < 4);
    rd_ok  = (wtr_cnt == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) bank_cnt[b] <= '0;
      rrd_cnt  <= '0;
      wtr_cnt  <= '0;
      faw_hist <= '0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        if (iss_valid && iss_bank == ($clog2(NB))'(b))
          bank_cnt[b] <= bank_hold(iss_op, iss_hit) - 1'b1;
        else if (bank_cnt[b] != '0)
          bank_cnt[b] <= bank_cnt[b] - 1'b1;
      end
      if (is_act && TRRD > 0)  rrd_cnt <= CW'(TRRD - 1);
      else if (rrd_cnt != '0)  rrd_cnt <= rrd_cnt - 1'b1;
      if (iss_valid && iss_op == OP_WRITE && (TBURST + TWTR) > 0)
        wtr_cnt <= CW'(TBURST + TWTR - 1);
      else if (wtr_cnt != '0)
        wtr_cnt <= wtr_cnt - 1'b1;
      faw_hist <= {faw_hist[TFAW-2:0], is_act};
    end
  end

  // The scheduler must honour every constraint reported here.
  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
                                iss_valid |-> bank_ready[iss_bank]);
  a_act_free:  assert property (@(posedge clk) disable iff (!rst_n)
                                is_act |-> act_ok);
  a_rd_free:   assert property (@(posedge clk) disable iff (!rst_n)
                                (iss_valid && iss_op == OP_READ) |-> rd_ok);

endmodule
