// tb_mc_top: end-to-end test of the dual-standard motion compensation
// engine with two SDRAM chip models, all parameters at their defaults.
//   Frame 0 (reference) is preloaded into chip 0 in the row-major
//   arrangement. Frame 1 is decoded as H.264 P macroblocks (16x16, one
//   MVD each, quarter-sample vectors incl. integer ones): every vector is
//   predicted from its neighbours, every predicted and reconstructed pixel
//   is compared with the 2-D reference equations, and the reconstructed
//   frame is written back through the write channel into chip 1 while the
//   read channel fetches from chip 0. The written chip is then compared
//   word by word with the reconstructed frame. A frame swap exchanges the
//   chips, and frame 2 is decoded as MPEG-2 macroblocks (half-sample
//   vectors decoded from motion codes) predicting from frame 1, written
//   back and checked the same way, followed by a second swap.
// The mechanisms are counted and each must occur: content-swap of the
// interpolator, reuse of interpolation columns, overlap of PRE/ACT with
// data transfer, row misses, frame swaps and MPEG-2 mode. Cycles per
// macroblock and the read bus utilisation are checked against the
// real-time budgets (720p H.264 and 1080 MPEG-2 at 30 frames/s).
module tb_mc_top;
  import mc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int PW = 128, PH = 48, WMB = PW / 16, HMB = PH / 16;

  logic [11:0] pic_w = PW;
  logic [6:0] pic_w_mb = WMB, pic_h_mb = HMB;
  logic mvd_we = 0;
  logic [3:0] mvd_idx = 0;
  mv_t mvd = '0;
  mbtype_e mb_type = MB_16x16;
  subtype_e [3:0] sub_type = '0;
  logic m2_pmv_reset = 0, m2_valid = 0;
  logic [3:0] m2_f_code_x = 1, m2_f_code_y = 1;
  logic signed [5:0] m2_motion_code_x = 0, m2_motion_code_y = 0;
  logic [7:0] m2_residual_x = 0, m2_residual_y = 0;
  logic mb_start = 0, std_mpeg2 = 0, mb_busy, mb_done;
  logic [6:0] mb_x = 0, mb_y = 0;
  logic pred_valid, pred_half, recon_valid;
  logic [3:0][7:0] pred_pix, recon_pix;
  comp_e pred_comp;
  logic [3:0] pred_blk;
  logic [2:0] pred_col;
  logic signed [3:0][8:0] resid = '0;
  logic wr_valid = 0, wr_ready;
  comp_e wr_comp = COMP_Y;
  logic [10:0] wr_x = 0;
  logic [8:0] wr_wy = 0;
  logic [DQ_W-1:0] wr_data = '0;
  logic swap_req = 0, swap_ack, ref_sel;
  sd_cmd_e sd_cmd [2];
  logic [BA_W-1:0] sd_ba [2];
  logic [10:0] sd_a [2];
  logic [DQ_W-1:0] sd_dq_out [2], sd_dq_in [2];
  logic sd_dq_oe [2];
  logic ev_swap, ev_reuse, ev_overlap, ev_rowmiss, ev_rd_cas;

  mc_top dut (.*);

  sdram_model m0 (.clk, .cmd(sd_cmd[0]), .ba(sd_ba[0]), .a(sd_a[0]), .dq_in(sd_dq_out[0]), .dq_oe(sd_dq_oe[0]), .dq_out(sd_dq_in[0]));
  sdram_model m1 (.clk, .cmd(sd_cmd[1]), .ba(sd_ba[1]), .a(sd_a[1]), .dq_in(sd_dq_out[1]), .dq_oe(sd_dq_oe[1]), .dq_out(sd_dq_in[1]));

  int checks = 0, failures = 0;
  int p_acc = 0, p_stall = 0, p_idle = 0, p_full = 0;
  int n_cswap = 0, n_reuse = 0, n_overlap = 0, n_rowmiss = 0, n_fswap = 0, n_m2 = 0, n_h264 = 0, n_cas = 0;
  byte unsigned RY [PH][PW], RCB [PH/2][PW/2], RCR [PH/2][PW/2];   // reconstructed frame
  int got [3][16][8][8];
  int gmvx [HMB][WMB], gmvy [HMB][WMB];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("%0t %s", $time, what); end
  endtask

  // ---- row-major arrangement (written out independently of the RTL) ----
  task automatic place(int comp, int x, int wy, output int ba, output int row, output int col);
    int lin;
    if (comp == 0) begin ba = wy % 4; lin = (wy / 4) * PW + x; end
    else begin ba = (comp == 2 ? 2 : 0) + wy % 2; lin = HMB * PW + (wy / 2) * (PW / 2) + x; end
    row = lin / 256; col = lin % 256;
  endtask

  function automatic logic [31:0] rword(int comp, int x, int wy);
    logic [31:0] w;
    for (int i = 0; i < 4; i++)
      w[8*i +: 8] = comp == 0 ? RY[4*wy+i][x] : comp == 1 ? RCB[4*wy+i][x] : RCR[4*wy+i][x];
    return w;
  endfunction

  // ---- event counters, residual, reconstruction check ----
  logic [3:0][7:0] exp_recon;
  logic exp_rv = 0;
  int rv_comp, rv_blk, rv_col, rv_half;
  bit cur_m2 = 0;
  int cur_mbx = 0, cur_mby = 0;
  always @(posedge clk) begin
    if (!rst_n) exp_rv <= 0;
    else begin
      if (ev_swap) n_cswap++;
      if (ev_reuse) n_reuse++;
      if (ev_overlap) n_overlap++;
      if (ev_rowmiss) n_rowmiss++;
      if (ev_rd_cas) n_cas++;
      if (mb_busy) begin
        if (dut.rq_valid && dut.rq_ready) p_acc++; else if (dut.rq_valid) p_stall++; else p_idle++;
        if (dut.u_rd.rd_valid && !dut.rd_ready) p_full++;
      end
      if (swap_ack) n_fswap++;
      if (exp_rv) begin
        chk(recon_valid && recon_pix == exp_recon, $sformatf("recon got %h exp %h", recon_pix, exp_recon));
      end else chk(!recon_valid, "unexpected recon_valid");
      if (exp_rv) store_recon();
      exp_rv <= pred_valid;
      if (pred_valid) begin
        for (int i = 0; i < 4; i++) begin
          int v;
          v = int'(pred_pix[i]) + int'(signed'(resid[i]));
          exp_recon[i] <= 8'(v < 0 ? 0 : v > 255 ? 255 : v);
          got[pred_comp][pred_blk][pred_col][(pred_half ? 4 : 0) + i] = int'(pred_pix[i]);
        end
        rv_comp <= int'(pred_comp); rv_blk <= int'(pred_blk); rv_col <= int'(pred_col); rv_half <= int'(pred_half);
      end
    end
  end
  always @(negedge clk)
    for (int i = 0; i < 4; i++) resid[i] <= 9'($urandom % 121) - 9'sd60;

  // place a reconstructed beat into the frame store
  task automatic store_recon();
    int x, y, n;
    if (!cur_m2) begin
      int x4 = (rv_blk & 1) | ((rv_blk >> 1) & 2), y4 = ((rv_blk >> 1) & 1) | ((rv_blk >> 2) & 2);
      if (rv_comp == 0) begin x = cur_mbx*16 + x4*4 + rv_col; y = cur_mby*16 + y4*4; n = 4; end
      else begin x = cur_mbx*8 + x4*2 + rv_col; y = cur_mby*8 + y4*2; n = 2; end
    end else begin
      if (rv_comp == 0) begin x = cur_mbx*16 + (rv_blk & 1)*8 + rv_col; y = cur_mby*16 + (rv_blk >> 1)*8 + rv_half*4; end
      else begin x = cur_mbx*8 + rv_col; y = cur_mby*8 + rv_half*4; end
      n = 4;
    end
    for (int i = 0; i < n; i++)
      if (rv_comp == 0) RY[y+i][x] = recon_pix[i];
      else if (rv_comp == 1) RCB[y+i][x] = recon_pix[i];
      else RCR[y+i][x] = recon_pix[i];
  endtask

  // ---- write channel feeder ----
  typedef struct { int comp, x, wy; } wjob_t;
  wjob_t wq [$];
  always @(posedge clk) if (wr_valid && wr_ready) void'(wq.pop_front());
  always @(negedge clk) begin
    if (wq.size() > 0 && ($urandom % 8) != 0) begin
      wr_valid <= 1; wr_comp <= comp_e'(wq[0].comp); wr_x <= 11'(wq[0].x); wr_wy <= 9'(wq[0].wy);
      wr_data <= rword(wq[0].comp, wq[0].x, wq[0].wy);
    end else wr_valid <= 0;
  end

  task automatic queue_mb_writes(int mx, int my);
    for (int s = 0; s < 4; s++) for (int x = 0; x < 16; x++) wq.push_back('{0, mx*16 + x, my*4 + s});
    for (int c = 1; c < 3; c++) for (int s = 0; s < 2; s++) for (int x = 0; x < 8; x++) wq.push_back('{c, mx*8 + x, my*2 + s});
  endtask

  // ---- H.264 16x16 vector prediction (MB level) ----
  function automatic int med3(int a, int b, int c);
    int mx = a > b ? a : b, mn = a < b ? a : b;
    mx = mx > c ? mx : c; mn = mn < c ? mn : c;
    return a + b + c - mx - mn;
  endfunction
  task automatic mvp16(int mx, int my, output int px, output int py);
    bit av_a = mx > 0, av_b = my > 0, av_c = my > 0 && mx < WMB - 1, av_d = my > 0 && mx > 0;
    int ax = 0, ay = 0, bx = 0, by = 0, cx = 0, cy = 0;
    if (av_a) begin ax = gmvx[my][mx-1]; ay = gmvy[my][mx-1]; end
    if (av_b) begin bx = gmvx[my-1][mx]; by = gmvy[my-1][mx]; end
    if (av_c) begin cx = gmvx[my-1][mx+1]; cy = gmvy[my-1][mx+1]; end
    else if (av_d) begin av_c = 1; cx = gmvx[my-1][mx-1]; cy = gmvy[my-1][mx-1]; end
    if (int'(av_a) + int'(av_b) + int'(av_c) == 1) begin
      px = av_a ? ax : av_b ? bx : cx; py = av_a ? ay : av_b ? by : cy;
    end else begin px = med3(ax, bx, cx); py = med3(ay, by, cy); end
  endtask

  function automatic int rnd(int lo, int hi); return lo + int'($urandom % (hi - lo + 1)); endfunction

  int mb_cycles_h = 0, mb_cycles_m = 0, cas_h = 0;

  task automatic run_mb(bit m2, int mx, int my, output int cycles);
    int t0;
    foreach (got[a, b, c, d]) got[a][b][c][d] = -1;
    cur_m2 = m2; cur_mbx = mx; cur_mby = my;
    @(negedge clk);
    mb_start = 1; std_mpeg2 = m2; mb_x = 7'(mx); mb_y = 7'(my);
    t0 = cyc;
    @(negedge clk); mb_start = 0;
    while (!mb_done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
  endtask

  task automatic check_frame_in_chip(int chip);
    int bad = 0;
    for (int c = 0; c < 3; c++) begin
      int pw = c == 0 ? PW : PW / 2, ns = c == 0 ? PH / 4 : PH / 8;
      for (int s = 0; s < ns; s++) for (int x = 0; x < pw; x++) begin
        int ba, row, col;
        logic [31:0] w;
        place(c, x, s, ba, row, col);
        w = chip == 0 ? m0.peek(ba, row, col) : m1.peek(ba, row, col);
        checks++;
        if (w != rword(c, x, s)) begin bad++; failures++; end
      end
    end
    if (bad) $display("chip %0d: %0d words differ from the reconstructed frame", chip, bad);
  endtask

  task automatic frame_swap();
    while (wq.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    swap_req = 1; @(negedge clk); swap_req = 0;
    while (!swap_ack) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int cyc_mb, c0;
    init_pic(PW, PH, 7);
    // frame 0 into chip 0
    for (int c = 0; c < 3; c++) begin
      automatic int pw = c == 0 ? PW : PW / 2, ns = c == 0 ? PH / 4 : PH / 8;
      for (int s = 0; s < ns; s++) for (int x = 0; x < pw; x++) begin
        int ba, row, col;
        place(c, x, s, ba, row, col);
        m0.poke(ba, row, col, word(c, x, s));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);

    // ---------------- frame 1: H.264 ----------------
    for (int my = 0; my < HMB; my++)
      for (int mx = 0; mx < WMB; mx++) begin
        int px, py, vx, vy;
        mvp16(mx, my, px, py);
        vx = 4 * rnd((2 - mx*16) < -8 ? -8 : 2 - mx*16, (PW - 19 - mx*16) > 8 ? 8 : PW - 19 - mx*16);
        vy = 4 * rnd((2 - my*16) < -8 ? -8 : 2 - my*16, (PH - 19 - my*16) > 8 ? 8 : PH - 19 - my*16);
        if ((mx + my) % 5 != 0) begin vx += rnd(0, 3); vy += rnd(0, 3); end
        gmvx[my][mx] = vx; gmvy[my][mx] = vy;
        @(negedge clk);
        mvd_we = 1; mvd_idx = 0; mvd.x = mvc_t'(vx - px); mvd.y = mvc_t'(vy - py);
        mb_type = MB_16x16;
        @(negedge clk); mvd_we = 0;
        c0 = n_cas;
        run_mb(0, mx, my, cyc_mb);
        mb_cycles_h += cyc_mb; cas_h += n_cas - c0; n_h264++;
        for (int b = 0; b < 16; b++) begin
          automatic int x4 = (b & 1) | ((b >> 1) & 2), y4 = ((b >> 1) & 1) | ((b >> 2) & 2);
          for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
            chk(got[0][b][c][r] == luma(mx*16 + x4*4 + c + (vx >>> 2), my*16 + y4*4 + r + (vy >>> 2), vx & 3, vy & 3),
                $sformatf("H.264 MB(%0d,%0d) mv %0d,%0d Y blk %0d c%0d r%0d: %0d exp %0d", mx, my, vx, vy, b, c, r, got[0][b][c][r], luma(mx*16 + x4*4 + c + (vx >>> 2), my*16 + y4*4 + r + (vy >>> 2), vx & 3, vy & 3)));
          for (int comp = 1; comp < 3; comp++)
            for (int c = 0; c < 2; c++) for (int r = 0; r < 2; r++)
              chk(got[comp][b][c][r] == chroma(comp, mx*8 + x4*2 + c + (vx >>> 3), my*8 + y4*2 + r + (vy >>> 3), vx & 7, vy & 7),
                  $sformatf("H.264 MB(%0d,%0d) C%0d blk %0d", mx, my, comp, b));
        end
        queue_mb_writes(mx, my);
      end
    frame_swap();
    chk(ref_sel == 1, "after the first swap chip 1 holds the reference");
    check_frame_in_chip(1);

    // ---------------- frame 2: MPEG-2, predicted from frame 1 ----------------
    for (int r = 0; r < PH; r++) for (int c = 0; c < PW; c++) Y[r][c] = RY[r][c];
    for (int r = 0; r < PH/2; r++) for (int c = 0; c < PW/2; c++) begin CB[r][c] = RCB[r][c]; CR[r][c] = RCR[r][c]; end
    for (int my = 0; my < HMB; my++)
      for (int mx = 0; mx < WMB; mx++) begin
        int vx, vy, cx, cy;
        vx = rnd(-2*mx*16 < -16 ? -16 : -2*mx*16, 2*(PW - 17 - mx*16) > 15 ? 15 : 2*(PW - 17 - mx*16));
        vy = rnd(-2*my*16 < -16 ? -16 : -2*my*16, 2*(PH - 17 - my*16) > 15 ? 15 : 2*(PH - 17 - my*16));
        cx = vx / 2; cy = vy / 2;
        @(negedge clk); m2_pmv_reset = 1;
        @(negedge clk); m2_pmv_reset = 0;
        m2_valid = 1; m2_f_code_x = 1; m2_f_code_y = 1;
        m2_motion_code_x = 6'(vx); m2_motion_code_y = 6'(vy);
        @(negedge clk); m2_valid = 0;
        @(negedge clk);
        run_mb(1, mx, my, cyc_mb);
        mb_cycles_m += cyc_mb; n_m2++;
        for (int t = 0; t < 6; t++)
          for (int c = 0; c < 8; c++) for (int r = 0; r < 8; r++) begin
            int e;
            if (t < 4) e = mpeg2(0, mx*16 + (t & 1)*8 + c + (vx >>> 1), my*16 + (t >> 1)*8 + r + (vy >>> 1), vx & 1, vy & 1);
            else e = mpeg2(t - 3, mx*8 + c + (cx >>> 1), my*8 + r + (cy >>> 1), cx & 1, cy & 1);
            chk(got[t < 4 ? 0 : t - 3][t][c][r] == e, $sformatf("MPEG-2 MB(%0d,%0d) blk %0d c%0d r%0d", mx, my, t, c, r));
          end
        queue_mb_writes(mx, my);
      end
    frame_swap();
    chk(ref_sel == 0, "after the second swap chip 0 holds the reference");
    check_frame_in_chip(0);

    // ---------------- rates and mechanisms ----------------
    $display("H.264: %0d cycles per MB, read bus busy %0d%%; MPEG-2: %0d cycles per MB",
             mb_cycles_h / n_h264, 100 * cas_h / mb_cycles_h, mb_cycles_m / n_m2);
    $display("content-swaps %0d reuses %0d overlaps %0d row-misses %0d frame swaps %0d MPEG-2 MBs %0d",
             n_cswap, n_reuse, n_overlap, n_rowmiss, n_fswap, n_m2);
    $display("read requests: accepted %0d, stalled %0d, none %0d cycles; read buffer waiting %0d cycles", p_acc, p_stall, p_idle, p_full);
    // 720p30 H.264: 3600 MB x 30 /s in 100 MHz -> 925 cycles per MB;
    // 1080p30 MPEG-2: 8160 MB x 30 /s -> 408 cycles per MB
    chk(mb_cycles_h / n_h264 <= 925, "H.264 macroblock exceeds the 720p30 budget");
    chk(mb_cycles_m / n_m2 <= 408, "MPEG-2 macroblock exceeds the 1080p30 budget");
    chk(n_cswap > 0, "no content-swap happened");
    chk(n_reuse > 0, "no column reuse happened");
    chk(n_overlap > 0, "no command overlap happened");
    chk(n_rowmiss > 0, "no row miss happened");
    chk(n_fswap == 2, "frame swaps");
    chk(n_m2 > 0, "no MPEG-2 macroblock");
    chk(m0.errors == 0 && m1.errors == 0, "SDRAM timing violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
