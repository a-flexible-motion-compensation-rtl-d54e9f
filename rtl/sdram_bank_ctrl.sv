// sdram_bank_ctrl: state of one SDRAM bank as seen by an access controller.
// It holds the row address (RA) register of the activated row and counts the
// command latencies of the timing unit: ACTIVE to READ/WRITE (tRCD),
// PRECHARGE period (tRP), ACTIVE to PRECHARGE (tRAS) and write recovery
// (tWR). The scheduler tells it which command it issued to this bank
// (one-cycle strobes, precharge-all included) and reads back whether an
// ACTIVE, a PRECHARGE or a column access may be issued this cycle, and
// whether an incoming row address hits the open row. The counting style
// (one NOP counter per latency instead of many wait states) follows the
// document; the exact set of timers is this design's choice.
module sdram_bank_ctrl
  import mc_pkg::*;
#(
  parameter int TRCD = T_RCD,
  parameter int TRP  = T_RP,
  parameter int TRAS = T_RAS,
  parameter int TWR  = T_WR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             do_act,
  input  logic [ROW_W-1:0] act_row,
  input  logic             do_pre,
  input  logic             do_rd,
  input  logic             do_wr,
  input  logic [ROW_W-1:0] cmp_row,
  output logic             is_open,
  output logic [ROW_W-1:0] open_row,
  output logic             row_hit,
  output logic             can_act,
  output logic             can_pre,
  output logic             can_cas
);
  logic [3:0] rcd_cnt, rp_cnt, ras_cnt, wr_cnt;

  assign row_hit = is_open && (open_row == cmp_row);
  assign can_act = !is_open && (rp_cnt == 0);
  assign can_pre = is_open && (ras_cnt == 0) && (wr_cnt == 0);
  assign can_cas = is_open && (rcd_cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_open <= 1'b0; open_row <= '0;
      rcd_cnt <= '0; rp_cnt <= '0; ras_cnt <= '0; wr_cnt <= '0;
    end else begin
      if (rcd_cnt != 0) rcd_cnt <= rcd_cnt - 1'b1;
      if (rp_cnt  != 0) rp_cnt  <= rp_cnt  - 1'b1;
      if (ras_cnt != 0) ras_cnt <= ras_cnt - 1'b1;
      if (wr_cnt  != 0) wr_cnt  <= wr_cnt  - 1'b1;
      if (do_act) begin
        is_open  <= 1'b1;
        open_row <= act_row;
        rcd_cnt  <= 4'(TRCD - 1);
        ras_cnt  <= 4'(TRAS - 1);
      end
      if (do_pre) begin
        is_open <= 1'b0;
        rp_cnt  <= 4'(TRP - 1);
      end
      if (do_wr) wr_cnt <= 4'(TWR - 1);
    end
  end

  // Commands must only be issued when the bank is ready for them.
  a_act: assert property (@(posedge clk) disable iff (!rst_n) do_act |-> can_act);
  a_pre: assert property (@(posedge clk) disable iff (!rst_n) do_pre && is_open |-> can_pre);
  a_cas: assert property (@(posedge clk) disable iff (!rst_n) (do_rd || do_wr) |-> can_cas);
endmodule
