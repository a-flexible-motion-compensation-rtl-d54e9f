// mc_top: dual-standard (H.264 Baseline / MPEG-2 Simple Profile) motion
// compensation engine with its dual-channel SDRAM frame memory access
// controller.
//   mv_gen_h264 / mv_gen_mpeg2  motion vectors of the macroblock
//   mc_ctrl                     request / receive / output FSMs, address
//                               generator and reconfigurable interpolator
//   sdram_access_ctrl (x2)      read channel (reference frame, scheduled) and
//                               write channel (reconstructed frame)
//   frame_mem_arbiter           ping-pong assignment of the two SDRAM chips
//   residual_adder              prediction + residual, 4 pixels per beat
// Sequencing of one macroblock: for H.264 the MVDs are written first
// (mvd_we), then mb_start runs the MV generator, then the motion
// compensation of all luma and chroma blocks, then the line MV store update;
// for MPEG-2 the vector is decoded with m2_valid before mb_start. mb_done
// pulses when the macroblock is finished. Each prediction beat (4 pixels of
// one column) leaves on pred_* and, one cycle later, the reconstructed beat
// on recon_*, using the residual presented with pred_valid. The de-blocking
// filter (H.264) lies outside: reconstructed or filtered data comes back
// through the wr_* port, which maps pixel coordinates to SDRAM addresses and
// queues them on the write channel. swap_req exchanges reference and current
// frame memories at a frame boundary; it must be raised while no macroblock
// is in flight. The SDRAM chips are outside, one bus each (index 0 and 1).
module mc_top
  import mc_pkg::*;
#(
  parameter int MAX_MB_W = 120,
  parameter bit SCHED    = 1'b1,
  parameter int QDEPTH   = 4,
  parameter int RDBUF    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // picture format
  input  logic [11:0]      pic_w,
  input  logic [6:0]       pic_w_mb,
  input  logic [6:0]       pic_h_mb,
  // H.264 side information
  input  logic             mvd_we,
  input  logic [3:0]       mvd_idx,
  input  mv_t              mvd,
  input  mbtype_e          mb_type,
  input  subtype_e [3:0]   sub_type,
  // MPEG-2 side information
  input  logic             m2_pmv_reset,
  input  logic             m2_valid,
  input  logic [3:0]       m2_f_code_x,
  input  logic [3:0]       m2_f_code_y,
  input  logic signed [5:0] m2_motion_code_x,
  input  logic signed [5:0] m2_motion_code_y,
  input  logic [7:0]       m2_residual_x,
  input  logic [7:0]       m2_residual_y,
  // macroblock control
  input  logic             mb_start,
  input  logic             std_mpeg2,
  input  logic [6:0]       mb_x,
  input  logic [6:0]       mb_y,
  output logic             mb_busy,
  output logic             mb_done,
  // prediction and reconstruction
  output logic             pred_valid,
  output logic [3:0][7:0]  pred_pix,
  output comp_e            pred_comp,
  output logic [3:0]       pred_blk,
  output logic [2:0]       pred_col,
  output logic             pred_half,
  input  logic signed [3:0][8:0] resid,
  output logic             recon_valid,
  output logic [3:0][7:0]  recon_pix,
  // reconstructed frame write port
  input  logic             wr_valid,
  output logic             wr_ready,
  input  comp_e            wr_comp,
  input  logic [10:0]      wr_x,
  input  logic [8:0]       wr_wy,
  input  logic [DQ_W-1:0]  wr_data,
  // frame memory swap
  input  logic             swap_req,
  output logic             swap_ack,
  output logic             ref_sel,
  // SDRAM chips
  output sd_cmd_e          sd_cmd    [2],
  output logic [BA_W-1:0]  sd_ba     [2],
  output logic [10:0]      sd_a      [2],
  output logic [DQ_W-1:0]  sd_dq_out [2],
  output logic             sd_dq_oe  [2],
  input  logic [DQ_W-1:0]  sd_dq_in  [2],
  // events
  output logic             ev_swap,
  output logic             ev_reuse,
  output logic             ev_overlap,
  output logic             ev_rowmiss,
  output logic             ev_rd_cas
);
  // ---------------- motion vector generators ----------------
  logic h_start, h_done, h_end, h_idle;
  mv_t  mv_all [16];
  mv_t  m2_mv, m2_mvc;

  mv_gen_h264 #(.MAX_MB_W(MAX_MB_W)) u_mvh (
    .clk, .rst_n, .pic_w_mb,
    .mvd_we, .mvd_idx, .mvd,
    .mb_start(h_start), .mb_x, .mb_y, .mb_type, .sub_type,
    .done(h_done), .mb_end(h_end), .idle(h_idle), .mv_all(mv_all)
  );

  mv_gen_mpeg2 u_mvm (
    .clk, .rst_n, .pmv_reset(m2_pmv_reset), .in_valid(m2_valid),
    .f_code_x(m2_f_code_x), .f_code_y(m2_f_code_y),
    .motion_code_x(m2_motion_code_x), .motion_code_y(m2_motion_code_y),
    .motion_residual_x(m2_residual_x), .motion_residual_y(m2_residual_y),
    .mv_valid(), .mv(m2_mv), .mv_chroma(m2_mvc)
  );

  // ---------------- macroblock sequencer ----------------
  typedef enum logic [2:0] { Q_IDLE, Q_MV, Q_MC_GO, Q_MC, Q_END } q_e;
  q_e   qs;
  logic mc_start, mc_busy, mc_done, std_q;
  logic [6:0] mbx_q, mby_q;

  assign h_start  = (qs == Q_IDLE) && mb_start && !std_mpeg2;
  assign mc_start = (qs == Q_MC_GO);
  assign h_end    = (qs == Q_END);
  assign mb_busy  = (qs != Q_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_IDLE; mb_done <= 1'b0; std_q <= 1'b0; mbx_q <= '0; mby_q <= '0;
    end else begin
      mb_done <= 1'b0;
      case (qs)
        Q_IDLE: if (mb_start) begin
          std_q <= std_mpeg2; mbx_q <= mb_x; mby_q <= mb_y;
          qs <= std_mpeg2 ? Q_MC_GO : Q_MV;
        end
        Q_MV:    if (h_done) qs <= Q_MC_GO;
        Q_MC_GO: qs <= Q_MC;
        Q_MC:    if (mc_done) begin
                   if (std_q) begin qs <= Q_IDLE; mb_done <= 1'b1; end
                   else qs <= Q_END;
                 end
        Q_END:   begin qs <= Q_IDLE; mb_done <= 1'b1; end
        default: qs <= Q_IDLE;
      endcase
    end
  end

  // ---------------- motion compensation controller ----------------
  logic            rq_valid, rq_ready, rd_valid, rd_ready;
  sd_addr_t        rq_addr;
  logic [DQ_W-1:0] rd_data;

  mc_ctrl u_mc (
    .clk, .rst_n, .pic_w, .pic_h_mb,
    .mb_start(mc_start), .std_mpeg2(std_q), .mb_x(mbx_q), .mb_y(mby_q),
    .mv_all(mv_all), .mpeg2_mv(m2_mv), .mpeg2_mvc(m2_mvc),
    .busy(mc_busy), .mb_done(mc_done),
    .rq_valid, .rq_ready, .rq_addr, .rd_valid, .rd_ready, .rd_data,
    .out_valid(pred_valid), .out_pix(pred_pix), .out_comp(pred_comp), .out_blk(pred_blk),
    .out_col(pred_col), .out_half(pred_half),
    .ev_swap, .ev_reuse
  );

  residual_adder u_radd (
    .clk, .rst_n, .in_valid(pred_valid), .pred(pred_pix), .resid(resid),
    .out_valid(recon_valid), .recon(recon_pix)
  );

  // ---------------- dual-channel frame memory access controller ----------------
  sd_addr_t        wr_addr;
  sd_cmd_e         r_cmd, w_cmd;
  logic [BA_W-1:0] r_ba, w_ba;
  logic [10:0]     r_a, w_a;
  logic [DQ_W-1:0] r_dq_in, w_dq_out, r_dq_unused;
  logic            w_dq_oe, r_dq_oe_unused, r_closed, w_closed, close_all;

  frame_addr_map u_wmap (
    .comp(wr_comp), .x(wr_x), .wy(wr_wy), .pic_w(pic_w), .pic_h_mb(pic_h_mb), .addr(wr_addr)
  );

  sdram_access_ctrl #(.IS_WRITE(1'b0), .SCHED(SCHED), .QDEPTH(QDEPTH), .RDBUF(RDBUF)) u_rd (
    .clk, .rst_n,
    .req_valid(rq_valid), .req_ready(rq_ready), .req_addr(rq_addr), .req_wdata('0),
    .rd_valid, .rd_ready, .rd_data,
    .close_all, .closed(r_closed), .init_done(),
    .sd_cmd(r_cmd), .sd_ba(r_ba), .sd_a(r_a), .sd_dq_out(r_dq_unused), .sd_dq_oe(r_dq_oe_unused),
    .sd_dq_in(r_dq_in),
    .ev_cas(ev_rd_cas), .ev_overlap(ev_overlap), .ev_rowmiss(ev_rowmiss)
  );

  sdram_access_ctrl #(.IS_WRITE(1'b1), .SCHED(SCHED), .QDEPTH(QDEPTH), .RDBUF(RDBUF)) u_wr (
    .clk, .rst_n,
    .req_valid(wr_valid), .req_ready(wr_ready), .req_addr(wr_addr), .req_wdata(wr_data),
    .rd_valid(), .rd_ready(1'b1), .rd_data(),
    .close_all, .closed(w_closed), .init_done(),
    .sd_cmd(w_cmd), .sd_ba(w_ba), .sd_a(w_a), .sd_dq_out(w_dq_out), .sd_dq_oe(w_dq_oe),
    .sd_dq_in('0),
    .ev_cas(), .ev_overlap(), .ev_rowmiss()
  );

  frame_mem_arbiter u_arb (
    .clk, .rst_n, .swap_req, .swap_ack, .ref_sel, .close_all,
    .rd_closed(r_closed), .wr_closed(w_closed),
    .rd_cmd(r_cmd), .rd_ba(r_ba), .rd_a(r_a), .rd_dq_in(r_dq_in),
    .wr_cmd(w_cmd), .wr_ba(w_ba), .wr_a(w_a), .wr_dq_out(w_dq_out), .wr_dq_oe(w_dq_oe),
    .m_cmd(sd_cmd), .m_ba(sd_ba), .m_a(sd_a), .m_dq_out(sd_dq_out), .m_dq_oe(sd_dq_oe),
    .m_dq_in(sd_dq_in)
  );

  a_swap_idle: assert property (@(posedge clk) disable iff (!rst_n) swap_req |-> !mb_busy);
endmodule
