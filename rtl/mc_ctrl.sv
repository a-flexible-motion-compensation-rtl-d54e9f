// mc_ctrl: main controller of the motion compensation engine. It contains
// the request FSM, the receive FSM and the output stage around one
// interpolator, and the address generator (frame_addr_map).
//
// Block order. For an H.264 macroblock the 16 luma 4x4 blocks are processed
// in the standard 2x2 raster (z) order, the same order as the residual
// decoder, followed by the 16 Cb and the 16 Cr 2x2 blocks. For MPEG-2 the four
// luma 8x8 blocks and then the Cb and Cr 8x8 blocks are processed, all with a
// 9x9 window and the shared bilinear filters.
//
// Extended 2x2 raster scan. The interpolator shift array keeps the last five
// window columns of the previous luma block, tagged with the window origin.
// A luma block whose window starts exactly four columns to the right at the
// same height (same motion vector, horizontally adjacent) reuses them and
// fetches only 4 of its 9 columns. After blocks 1, 3, 5, 9, 11 and 13 a
// content-swap (one cycle) exchanges the shift array with the content
// buffer when the neighbour check holds:
//   1: MV1==MV4   3: MV1==MV4 || MV3==MV6   5: MV3==MV6
//   9: MV9==MV12 11: MV9==MV12 || MV11==MV14 13: MV11==MV14
// so that blocks 4, 6, 12 and 14 can reuse the columns of blocks 1, 3, 9 and
// 11 although other blocks were decoded in between. With one vector per
// macroblock this fetches 12 x 36 + 4 x 81 = 756 luma pixels instead of 936.
//
// Request FSM: per block it builds a descriptor (mode, fractions, reuse,
// swap, window offset) into a small FIFO, then sends one read request per
// 4-pixel SDRAM word, column by column (3 words for a 9-row window, 2 for a
// 4x4 integer block or a 3x3 chroma window). Receive FSM: assembles the words
// of a column, masks out the 9 rows of the window (the word row offset) and
// hands the column to the interpolator. The receive side and the
// interpolator side are decoupled: while the interpolator still outputs the
// last columns of one block, the receive side already assembles the first
// column of the next, and the read buffer may deliver a word in the same
// cycle a finished column is handed over. Output stage: forwards interpolated
// (or, for integer vectors, copied) columns with their component and block
// number, and performs the content-swap after the block.
// Reference windows are assumed to lie inside the stored picture (no edge
// padding). Interface: mb_start with std (0 H.264, 1 MPEG-2) and the
// macroblock position; mv_all holds the 16 H.264 vectors (quarter sample),
// mpeg2_mv / mpeg2_mvc the MPEG-2 luma and chroma vectors (half sample).
// mb_done pulses after the last output beat of the macroblock.
module mc_ctrl
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [11:0]      pic_w,
  input  logic [6:0]       pic_h_mb,
  input  logic             mb_start,
  input  logic             std_mpeg2,
  input  logic [6:0]       mb_x,
  input  logic [6:0]       mb_y,
  input  mv_t              mv_all [16],
  input  mv_t              mpeg2_mv,
  input  mv_t              mpeg2_mvc,
  output logic             busy,
  output logic             mb_done,
  // read requests to the SDRAM read controller
  output logic             rq_valid,
  input  logic             rq_ready,
  output sd_addr_t         rq_addr,
  // read data buffer
  input  logic             rd_valid,
  output logic             rd_ready,
  input  logic [DQ_W-1:0]  rd_data,
  // prediction output
  output logic             out_valid,
  output logic [3:0][7:0]  out_pix,
  output comp_e            out_comp,
  output logic [3:0]       out_blk,
  output logic [2:0]       out_col,
  output logic             out_half,
  // events
  output logic             ev_swap,
  output logic             ev_reuse
);
  typedef struct packed {
    imode_e     mode;
    logic [2:0] xf, yf;
    logic       reuse;
    logic       swap;
    logic [1:0] nwords;
    logic [1:0] off;
    logic [3:0] ncols;
    comp_e      comp;
    logic [3:0] blk;
  } desc_t;

  // ---------------- request side ----------------
  typedef enum logic [1:0] { R_IDLE, R_DESC, R_REQ } rst_e;
  rst_e        rs;
  logic        std_q;
  logic [6:0]  mbx_q, mby_q;
  logic [5:0]  t, t_total;
  logic [3:0]  rcol;
  logic [1:0]  rw;
  desc_t       d_new, d_req;
  logic signed [12:0] ox_new, oy_new, ox_q, oy_q;
  logic signed [12:0] tag_x, tag_y, ctag_x, ctag_y;
  logic        tag_v, ctag_v;
  logic        df_in_ready, df_out_valid, df_pop;
  desc_t       df_out;

  function automatic logic mveq(input mv_t a, input mv_t b);
    return a == b;
  endfunction

  // descriptor of task t
  always_comb begin
    automatic logic [3:0] b = t[3:0];
    automatic logic [1:0] x4 = {b[2], b[0]};
    automatic logic [1:0] y4 = {b[3], b[1]};
    automatic logic signed [12:0] px, py;
    automatic mv_t mv;
    d_new = '0; ox_new = '0; oy_new = '0;
    d_new.blk = b;
    if (!std_q) begin
      mv = mv_all[b];
      if (t < 16) begin
        d_new.comp = COMP_Y;
        px = 13'(mbx_q) * 16 + 13'(x4) * 4;
        py = 13'(mby_q) * 16 + 13'(y4) * 4;
        px = px + 13'(mv.x >>> 2);
        py = py + 13'(mv.y >>> 2);
        d_new.xf = {1'b0, mv.x[1:0]};
        d_new.yf = {1'b0, mv.y[1:0]};
        if (mv.x[1:0] == 0 && mv.y[1:0] == 0) begin
          d_new.mode = IM_COPY; d_new.ncols = 4; d_new.nwords = 2;
          ox_new = px; oy_new = py;
        end else begin
          d_new.mode = IM_LUMA; d_new.ncols = 9; d_new.nwords = 3;
          ox_new = px - 2; oy_new = py - 2;
          d_new.reuse = tag_v && (tag_y == oy_new) && (tag_x + 4 == ox_new);
        end
        case (b)
          4'd1:  d_new.swap = mveq(mv_all[1], mv_all[4]);
          4'd3:  d_new.swap = mveq(mv_all[1], mv_all[4]) || mveq(mv_all[3], mv_all[6]);
          4'd5:  d_new.swap = mveq(mv_all[3], mv_all[6]);
          4'd9:  d_new.swap = mveq(mv_all[9], mv_all[12]);
          4'd11: d_new.swap = mveq(mv_all[9], mv_all[12]) || mveq(mv_all[11], mv_all[14]);
          4'd13: d_new.swap = mveq(mv_all[11], mv_all[14]);
          default: d_new.swap = 1'b0;
        endcase
      end else begin
        d_new.comp = (t < 32) ? COMP_CB : COMP_CR;
        px = 13'(mbx_q) * 8 + 13'(x4) * 2 + 13'(mv.x >>> 3);
        py = 13'(mby_q) * 8 + 13'(y4) * 2 + 13'(mv.y >>> 3);
        d_new.xf = mv.x[2:0]; d_new.yf = mv.y[2:0];
        d_new.mode = IM_CHROMA; d_new.ncols = 3; d_new.nwords = 2;
        ox_new = px; oy_new = py;
      end
    end else begin
      d_new.mode = IM_MPEG2; d_new.ncols = 9; d_new.nwords = 3;
      if (t < 4) begin
        d_new.comp = COMP_Y;
        px = 13'(mbx_q) * 16 + 13'(t[0]) * 8 + 13'(mpeg2_mv.x >>> 1);
        py = 13'(mby_q) * 16 + 13'(t[1]) * 8 + 13'(mpeg2_mv.y >>> 1);
        d_new.xf = {2'b0, mpeg2_mv.x[0]}; d_new.yf = {2'b0, mpeg2_mv.y[0]};
      end else begin
        d_new.comp = (t == 4) ? COMP_CB : COMP_CR;
        px = 13'(mbx_q) * 8 + 13'(mpeg2_mvc.x >>> 1);
        py = 13'(mby_q) * 8 + 13'(mpeg2_mvc.y >>> 1);
        d_new.xf = {2'b0, mpeg2_mvc.x[0]}; d_new.yf = {2'b0, mpeg2_mvc.y[0]};
      end
      ox_new = px; oy_new = py;
    end
    d_new.off = oy_new[1:0];
  end

  assign t_total = std_q ? 6'd6 : 6'd48;

  frame_addr_map u_map (
    .comp(d_req.comp), .x(11'(ox_q + 13'(rcol))), .wy(9'((oy_q >>> 2) + 13'(rw))),
    .pic_w(pic_w), .pic_h_mb(pic_h_mb), .addr(rq_addr)
  );
  assign rq_valid = (rs == R_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; std_q <= 1'b0; mbx_q <= '0; mby_q <= '0; t <= '0;
      rcol <= '0; rw <= '0; d_req <= '0; ox_q <= '0; oy_q <= '0;
      tag_v <= 1'b0; ctag_v <= 1'b0; tag_x <= '0; tag_y <= '0; ctag_x <= '0; ctag_y <= '0;
    end else begin
      case (rs)
        R_IDLE: if (mb_start) begin
          rs <= R_DESC; std_q <= std_mpeg2; mbx_q <= mb_x; mby_q <= mb_y; t <= '0;
          tag_v <= 1'b0; ctag_v <= 1'b0;
        end
        R_DESC: if (df_in_ready) begin
          d_req <= d_new; ox_q <= ox_new; oy_q <= oy_new;
          rcol  <= d_new.reuse ? 4'd5 : 4'd0;
          rw    <= '0;
          rs    <= R_REQ;
          // register tag bookkeeping (mirrors the interpolator contents)
          if (d_new.mode == IM_LUMA) begin
            if (d_new.swap) begin
              tag_v <= ctag_v; tag_x <= ctag_x; tag_y <= ctag_y;
              ctag_v <= 1'b1; ctag_x <= ox_new; ctag_y <= oy_new;
            end else begin
              tag_v <= 1'b1; tag_x <= ox_new; tag_y <= oy_new;
            end
          end else if (d_new.swap) begin
            tag_v <= ctag_v; tag_x <= ctag_x; tag_y <= ctag_y;
            ctag_v <= 1'b0;
          end else begin
            tag_v <= 1'b0;
          end
        end
        R_REQ: if (rq_ready) begin
          if (rw == d_req.nwords - 1) begin
            rw <= '0;
            if (rcol == d_req.ncols - 1) begin
              t  <= t + 1'b1;
              rs <= (t + 1'b1 == t_total) ? R_IDLE : R_DESC;
            end else rcol <= rcol + 1'b1;
          end else rw <= rw + 1'b1;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // descriptor FIFO between the request and receive sides
  logic [$bits(desc_t)-1:0] df_out_bits;
  desc_t d_push;
  always_comb begin
    d_push = d_new;
    if (d_new.reuse) d_push.ncols = 4'd4;   // columns still to be received
  end
  sync_fifo #(.W($bits(desc_t)), .DEPTH(4)) u_df (
    .clk, .rst_n,
    .in_valid(rs == R_DESC && df_in_ready), .in_ready(df_in_ready),
    .in_data(d_push),
    .out_valid(df_out_valid), .out_ready(df_pop), .out_data(df_out_bits), .count()
  );
  assign df_out = desc_t'(df_out_bits);

  // ---------------- receive side and output stage ----------------
  // receive side: assembles the columns of the block in rxd; it may start
  // on the next block while the interpolator still drains the previous one
  typedef enum logic [1:0] { I_IDLE, I_RUN, I_SWAP } ist_e;
  ist_e        ist;
  desc_t       cur, rxd;
  logic        rx_act, rx_started;
  logic [3:0]  cols_left;
  logic [1:0]  wcnt;
  logic        col_full, col_take, rx_end;
  logic [11:0][7:0] colbuf;
  logic [8:0][7:0]  col_pix;
  logic        col_ready, i_done, i_busy, i_start;

  assign df_pop   = !rx_act && df_out_valid;
  assign i_start  = (ist == I_IDLE) && rx_act && !rx_started;
  assign col_take = rx_started && col_full && col_ready;
  // a word may enter while the previous column is handed over
  assign rd_ready = rx_act && (cols_left != 0) && (!col_full || col_take);
  assign rx_end   = rx_act && (cols_left == 0) && (!col_full || col_take);

  always_comb begin
    for (int r = 0; r < 9; r++) begin
      automatic int idx = int'(rxd.off) + r;
      col_pix[r] = (idx < 12) ? colbuf[idx] : 8'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_act <= 1'b0; rx_started <= 1'b0; rxd <= '0; cols_left <= '0; wcnt <= '0;
      col_full <= 1'b0; colbuf <= '0;
    end else begin
      if (df_pop) begin
        rx_act <= 1'b1; rx_started <= 1'b0; rxd <= df_out; cols_left <= df_out.ncols;
        wcnt <= '0; col_full <= 1'b0;
      end else begin
        if (i_start) rx_started <= 1'b1;
        if (col_take) col_full <= 1'b0;
        // cols_left counts columns still to be received
        if (rd_valid && rd_ready) begin
          for (int i = 0; i < 4; i++) colbuf[4*wcnt + i] <= rd_data[8*i +: 8];
          if (wcnt == rxd.nwords - 1) begin
            wcnt <= '0; col_full <= 1'b1; cols_left <= cols_left - 1'b1;
          end else wcnt <= wcnt + 1'b1;
        end
        if (rx_end) begin rx_act <= 1'b0; rx_started <= 1'b0; end
      end
    end
  end

  // interpolator side: one block at a time, content-swap after it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist <= I_IDLE; cur <= '0;
    end else begin
      case (ist)
        I_IDLE: if (i_start) begin ist <= I_RUN; cur <= rxd; end
        I_RUN:  if (i_done) ist <= cur.swap ? I_SWAP : I_IDLE;
        I_SWAP: ist <= I_IDLE;
        default: ist <= I_IDLE;
      endcase
    end
  end

  interpolator u_interp (
    .clk, .rst_n,
    .blk_start(i_start), .mode(rxd.mode), .xf(rxd.xf), .yf(rxd.yf), .reuse(rxd.reuse),
    .col_valid(rx_started && col_full), .col_ready(col_ready), .col_pix(col_pix),
    .swap(ist == I_SWAP),
    .out_valid(out_valid), .out_pix(out_pix), .out_col(out_col), .out_half(out_half),
    .blk_done(i_done), .busy(i_busy)
  );

  assign out_comp = cur.comp;
  assign out_blk  = cur.blk;
  assign ev_swap  = (ist == I_SWAP);
  assign ev_reuse = i_start && rxd.reuse;
  assign busy     = (rs != R_IDLE) || rx_act || (ist != I_IDLE) || df_out_valid;

  logic busy_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) busy_d <= 1'b0; else busy_d <= busy;
  assign mb_done = busy_d && !busy;
endmodule
