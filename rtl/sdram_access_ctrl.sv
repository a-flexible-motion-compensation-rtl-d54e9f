// sdram_access_ctrl: one channel (read or write) of the frame memory access
// controller. Requests enter an in-order address queue (with the write data
// for the write channel). Each queue entry is compared with the row address
// register of its bank controller, which classifies it as row-hit, row-miss
// or an idle bank. A master scheduler issues at most one SDRAM command per
// cycle with this priority:
//   1. the column access (READ/WRITE) of the queue head, once its row is open;
//   2. the PRECHARGE or ACTIVE that the oldest not-yet-ready entry needs,
//      provided no older entry still uses the same bank.
// Rule 2 lets row preparation of later accesses to other banks overlap the
// column accesses and CAS latency of earlier ones while data still leaves in
// request order, so no reorder buffer is needed. A later row-miss in the same
// bank is prepared as soon as the older access to that bank has had its
// column access, which is the overlap two access FSMs per bank would give.
// Manual precharge is used, never auto precharge. With SCHED = 0 the
// controller runs unscheduled: only the head is prepared and a read waits
// until the previous read data has returned (the baseline of the document).
// After reset the channel issues PRECHARGE ALL and MODE REGISTER SET (burst
// length 1, sequential, CAS latency T_CL). close_all makes an idle channel
// precharge every bank, which the frame memory arbiter uses before swapping
// frame memories. Read data returns T_CL cycles after the READ command
// reaches the SDRAM and is kept in the read data buffer (valid/ready) for
// the motion compensation receive FSM; a READ is only issued while the
// buffer has room for it. Refresh is not generated. The read channel
// (IS_WRITE = 0) never drives data, so sd_dq_out and sd_dq_oe stay 0 there.
module sdram_access_ctrl
  import mc_pkg::*;
#(
  parameter bit IS_WRITE = 1'b0,
  parameter bit SCHED    = 1'b1,
  parameter int QDEPTH   = 4,
  parameter int RDBUF    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // request side
  input  logic             req_valid,
  output logic             req_ready,
  input  sd_addr_t         req_addr,
  input  logic [DQ_W-1:0]  req_wdata,
  // read data buffer output
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [DQ_W-1:0]  rd_data,
  // frame swap support
  input  logic             close_all,
  output logic             closed,
  output logic             init_done,
  // SDRAM pins
  output sd_cmd_e          sd_cmd,
  output logic [BA_W-1:0]  sd_ba,
  output logic [10:0]      sd_a,
  output logic [DQ_W-1:0]  sd_dq_out,
  output logic             sd_dq_oe,
  input  logic [DQ_W-1:0]  sd_dq_in,
  // events for statistics
  output logic             ev_cas,
  output logic             ev_overlap,
  output logic             ev_rowmiss
);
  localparam int QAW = $clog2(QDEPTH);

  // ---------------- address queue ----------------
  sd_addr_t        q_addr [QDEPTH];
  logic [DQ_W-1:0] q_data [QDEPTH];
  logic [QAW-1:0]  q_head, q_tail;
  logic [QAW:0]    q_cnt;
  logic            q_push, q_pop;

  assign req_ready = (q_cnt != (QAW+1)'(QDEPTH)) && init_done;
  assign q_push    = req_valid && req_ready;

  always_ff @(posedge clk) if (q_push) begin
    q_addr[q_tail] <= req_addr;
    q_data[q_tail] <= req_wdata;
  end

  // ---------------- bank controllers ----------------
  logic [BANKS-1:0] b_act, b_pre, b_rd, b_wr;
  logic [BANKS-1:0] b_open, b_can_act, b_can_pre, b_can_cas;
  logic [ROW_W-1:0] b_row [BANKS];
  logic [ROW_W-1:0] act_row;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sdram_bank_ctrl u_bank (
      .clk, .rst_n,
      .do_act(b_act[b]), .act_row(act_row), .do_pre(b_pre[b]),
      .do_rd(b_rd[b]), .do_wr(b_wr[b]), .cmp_row('0),
      .is_open(b_open[b]), .open_row(b_row[b]), .row_hit(),
      .can_act(b_can_act[b]), .can_pre(b_can_pre[b]), .can_cas(b_can_cas[b])
    );
  end

  // ---------------- read return pipeline and data buffer ----------------
  logic [T_CL:0] rd_pipe;
  logic [$clog2(RDBUF):0] buf_cnt;
  logic [3:0]    outstanding;
  logic          buf_room;

  sync_fifo #(.W(DQ_W), .DEPTH(RDBUF)) u_rdbuf (
    .clk, .rst_n,
    .in_valid(rd_pipe[T_CL]), .in_ready(), .in_data(sd_dq_in),
    .out_valid(rd_valid), .out_ready(rd_ready), .out_data(rd_data),
    .count(buf_cnt)
  );
  always_comb begin
    outstanding = '0;
    for (int k = 0; k <= T_CL; k++) outstanding += 4'(rd_pipe[k]);
  end
  assign buf_room = (32'(buf_cnt) + 32'(outstanding)) < RDBUF;

  // ---------------- init sequence ----------------
  typedef enum logic [2:0] { I_PALL, I_WAIT, I_MRS, I_MWAIT, I_RUN } init_e;
  init_e      ist;
  logic [3:0] iwait;
  assign init_done = (ist == I_RUN);

  // ---------------- scheduler ----------------
  sd_cmd_e          nxt_cmd;
  logic [BA_W-1:0]  nxt_ba;
  logic [10:0]      nxt_a;
  logic             nxt_oe;
  logic             prep_found, prep_nonhead, pall;

  always_comb begin
    nxt_cmd = CMD_NOP; nxt_ba = '0; nxt_a = '0; nxt_oe = 1'b0;
    b_act = '0; b_pre = '0; b_rd = '0; b_wr = '0; act_row = '0;
    q_pop = 1'b0; prep_found = 1'b0; prep_nonhead = 1'b0; pall = 1'b0;
    ev_rowmiss = 1'b0;
    if (ist == I_PALL) begin
      nxt_cmd = CMD_PRE; nxt_a[10] = 1'b1; b_pre = '1;
    end else if (ist == I_MRS) begin
      nxt_cmd = CMD_MRS; nxt_a = 11'({3'(T_CL), 1'b0, 3'b000});
    end else if (ist == I_RUN) begin
      // 1. column access of the head
      if (q_cnt != 0) begin
        automatic sd_addr_t h = q_addr[q_head];
        if (b_open[h.ba] && b_row[h.ba] == h.row && b_can_cas[h.ba] &&
            (IS_WRITE || (buf_room && (SCHED || rd_pipe == '0)))) begin
          nxt_cmd = IS_WRITE ? CMD_WRITE : CMD_READ;
          nxt_ba  = h.ba;
          nxt_a   = 11'(h.col);
          nxt_oe  = IS_WRITE;
          if (IS_WRITE) b_wr[h.ba] = 1'b1; else b_rd[h.ba] = 1'b1;
          q_pop   = 1'b1;
        end
      end
      // 2. row preparation of the oldest entry that needs it
      if (!q_pop) begin
        automatic logic [BANKS-1:0] used = '0;
        for (int i = 0; i < QDEPTH; i++) begin
          automatic logic [QAW-1:0] idx = q_head + QAW'(i);
          automatic sd_addr_t e = q_addr[idx];
          if (i < int'(q_cnt) && !prep_found && (SCHED || i == 0) && !used[e.ba]) begin
            if (!(b_open[e.ba] && b_row[e.ba] == e.row)) begin
              prep_found = 1'b1;
              if (b_open[e.ba]) begin
                if (b_can_pre[e.ba]) begin
                  nxt_cmd = CMD_PRE; nxt_ba = e.ba; b_pre[e.ba] = 1'b1;
                  prep_nonhead = (i != 0); ev_rowmiss = 1'b1;
                end
              end else if (b_can_act[e.ba]) begin
                nxt_cmd = CMD_ACT; nxt_ba = e.ba; nxt_a = 11'(e.row);
                act_row = e.row; b_act[e.ba] = 1'b1; prep_nonhead = (i != 0);
              end
            end
          end
          if (i < int'(q_cnt)) used[e.ba] = 1'b1;
        end
      end
      // 3. precharge all banks before a frame memory swap
      if (!q_pop && !prep_found && q_cnt == 0 && close_all && (b_open != '0) &&
          ((b_can_pre | ~b_open) == '1)) begin
        nxt_cmd = CMD_PRE; nxt_a[10] = 1'b1; b_pre = '1; pall = 1'b1;
      end
    end
  end

  assign closed     = init_done && (q_cnt == 0) && (b_open == '0) && (rd_pipe == '0);
  assign ev_cas     = q_pop;
  assign ev_overlap = prep_nonhead && (nxt_cmd != CMD_NOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_head <= '0; q_tail <= '0; q_cnt <= '0;
      rd_pipe <= '0;
      ist <= I_PALL; iwait <= '0;
      sd_cmd <= CMD_NOP; sd_ba <= '0; sd_a <= '0; sd_dq_out <= '0; sd_dq_oe <= 1'b0;
    end else begin
      if (q_push) q_tail <= q_tail + 1'b1;
      if (q_pop)  q_head <= q_head + 1'b1;
      q_cnt   <= q_cnt + (QAW+1)'(q_push) - (QAW+1)'(q_pop);
      rd_pipe <= {rd_pipe[T_CL-1:0], (!IS_WRITE && q_pop)};
      case (ist)
        I_PALL: begin ist <= I_WAIT; iwait <= 4'(T_RP); end
        I_WAIT: if (iwait == 0) ist <= I_MRS; else iwait <= iwait - 1'b1;
        I_MRS:  begin ist <= I_MWAIT; iwait <= 4'd1; end
        I_MWAIT: if (iwait == 0) ist <= I_RUN; else iwait <= iwait - 1'b1;
        default: ;
      endcase
      sd_cmd    <= nxt_cmd;
      sd_ba     <= nxt_ba;
      sd_a      <= nxt_a;
      sd_dq_oe  <= nxt_oe;
      if (nxt_oe) sd_dq_out <= q_data[q_head];
    end
  end

  a_noovf: assert property (@(posedge clk) disable iff (!rst_n) rd_pipe[T_CL] |-> u_rdbuf.in_ready);
endmodule
