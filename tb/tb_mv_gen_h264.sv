// tb_mv_gen_h264: decodes a 5 x 3 macroblock picture several times with
// random partitions (16x16, 16x8, 8x16, 8x8 with 8x8/8x4/4x8/4x4
// sub-partitions, and skip) and random MVDs. The reference derives the
// neighbours A, B, C, D from block coordinates and a picture-wide map of
// already decoded vectors (no look-up table), applies the availability,
// directional and median rules, and every one of the 16 vectors of each
// macroblock is compared. It also checks the MV generation time per
// macroblock.
module tb_mv_gen_h264;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int WMB = 5, HMB = 3;
  logic [6:0] pic_w_mb = WMB;
  logic mvd_we = 0;
  logic [3:0] mvd_idx = 0;
  mv_t mvd = '0;
  logic mb_start = 0, mb_end = 0, done, idle;
  logic [6:0] mb_x = 0, mb_y = 0;
  mbtype_e mb_type = MB_16x16;
  subtype_e [3:0] sub_type = '0;
  mv_t mv_all [16];
  mv_gen_h264 #(.MAX_MB_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int mvx [HMB*4][WMB*4], mvy [HMB*4][WMB*4];
  bit dec [HMB*4][WMB*4];
  int cov [8];
  int n_skip0 = 0, n_skip1 = 0;   // P_SKIP forced to zero / predicted

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit av(int x, int y);
    if (x < 0 || y < 0 || x >= WMB*4 || y >= HMB*4) return 0;
    return dec[y][x];
  endfunction
  function automatic int med(int a, int b, int c);
    int mx = a > b ? a : b, mn = a < b ? a : b;
    mx = mx > c ? mx : c; mn = mn < c ? mn : c;
    return a + b + c - mx - mn;
  endfunction

  // reference prediction of a partition at 4x4 position (px,py), size (w,h); dir 0 median, 1 A, 2 B, 3 C
  task automatic ref_pred(int px, int py, int w, int dir, output int ox, output int oy);
    bit aa, ab, ac;
    int ax = 0, ay = 0, bx = 0, by = 0, cx = 0, cy = 0;
    aa = av(px-1, py); if (aa) begin ax = mvx[py][px-1]; ay = mvy[py][px-1]; end
    ab = av(px, py-1); if (ab) begin bx = mvx[py-1][px]; by = mvy[py-1][px]; end
    ac = av(px+w, py-1);
    if (ac) begin cx = mvx[py-1][px+w]; cy = mvy[py-1][px+w]; end
    else begin
      ac = av(px-1, py-1);
      if (ac) begin cx = mvx[py-1][px-1]; cy = mvy[py-1][px-1]; end
    end
    if (dir == 1 && aa) begin ox = ax; oy = ay; end
    else if (dir == 2 && ab) begin ox = bx; oy = by; end
    else if (dir == 3 && ac) begin ox = cx; oy = cy; end
    else if (!ab && !ac && aa) begin ox = ax; oy = ay; end
    else if (int'(aa) + int'(ab) + int'(ac) == 1) begin
      ox = aa ? ax : (ab ? bx : cx); oy = aa ? ay : (ab ? by : cy);
    end else begin ox = med(ax, bx, cx); oy = med(ay, by, cy); end
  endtask

  function automatic int zidx(int x4, int y4);  // 4x4 position in MB -> z-order index
    return ((y4 / 2) * 2 + (x4 / 2)) * 4 + (y4 % 2) * 2 + (x4 % 2);
  endfunction

  task automatic do_mb(int mx, int my);
    int parts [$][5];  // x4, y4, w, h, dir
    mbtype_e t;
    subtype_e [3:0] st;
    int t0;
    t = mbtype_e'($urandom % 5);
    for (int q = 0; q < 4; q++) st[q] = subtype_e'($urandom % 4);
    cov[int'(t)]++;
    case (t)
      MB_SKIP, MB_16x16: parts.push_back('{0,0,4,4,0});
      MB_16x8: begin parts.push_back('{0,0,4,2,2}); parts.push_back('{0,2,4,2,1}); end
      MB_8x16: begin parts.push_back('{0,0,2,4,1}); parts.push_back('{2,0,2,4,3}); end
      default:
        for (int q = 0; q < 4; q++) begin
          int qx = (q % 2) * 2, qy = (q / 2) * 2;
          cov[4 + int'(st[q])]++;
          case (st[q])
            SUB_8x8: parts.push_back('{qx,qy,2,2,0});
            SUB_8x4: begin parts.push_back('{qx,qy,2,1,0}); parts.push_back('{qx,qy+1,2,1,0}); end
            SUB_4x8: begin parts.push_back('{qx,qy,1,2,0}); parts.push_back('{qx+1,qy,1,2,0}); end
            default: for (int k = 0; k < 4; k++) parts.push_back('{qx + k % 2, qy + k / 2, 1, 1, 0});
          endcase
        end
    endcase
    // load MVDs and compute reference
    foreach (parts[i]) begin
      int dx = int'($urandom % 41) - 20, dy = int'($urandom % 41) - 20;
      int px = mx*4 + parts[i][0], py = my*4 + parts[i][1];
      int ox, oy;
      if (t == MB_SKIP) begin dx = 0; dy = 0; end
      @(negedge clk);
      mvd_we = 1; mvd_idx = 4'(zidx(parts[i][0], parts[i][1]));
      mvd.x = mvc_t'(t == MB_SKIP ? 13 : dx); mvd.y = mvc_t'(dy);
      ref_pred(px, py, parts[i][2], parts[i][4], ox, oy);
      // P_SKIP: zero when A or B is unavailable or zero
      if (t == MB_SKIP && (!av(px - 1, py) || !av(px, py - 1) ||
          (mvx[py][px-1] == 0 && mvy[py][px-1] == 0) || (mvx[py-1][px] == 0 && mvy[py-1][px] == 0))) begin
        ox = 0; oy = 0; n_skip0++;
      end else if (t == MB_SKIP) n_skip1++;
      for (int yy = 0; yy < parts[i][3]; yy++)
        for (int xx = 0; xx < parts[i][2]; xx++) begin
          mvx[py+yy][px+xx] = ox + dx; mvy[py+yy][px+xx] = oy + dy; dec[py+yy][px+xx] = 1;
        end
    end
    @(negedge clk);
    mvd_we = 0; mb_start = 1; mb_x = 7'(mx); mb_y = 7'(my); mb_type = t; sub_type = st;
    t0 = cyc;
    @(negedge clk); mb_start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 > 20) begin failures++; $display("MV generation took %0d cycles", cyc - t0); end
    for (int y4 = 0; y4 < 4; y4++)
      for (int x4 = 0; x4 < 4; x4++) begin
        mv_t g = mv_all[zidx(x4, y4)];
        checks++;
        if (int'(g.x) != mvx[my*4+y4][mx*4+x4] || int'(g.y) != mvy[my*4+y4][mx*4+x4]) begin
          failures++;
          if (failures < 10) $display("MB(%0d,%0d) type %0d blk(%0d,%0d): got %0d,%0d exp %0d,%0d", mx, my, t, x4, y4,
            g.x, g.y, mvx[my*4+y4][mx*4+x4], mvy[my*4+y4][mx*4+x4]);
        end
      end
    mb_end = 1; @(negedge clk); mb_end = 0;
    while (!idle) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pic = 0; pic < 6; pic++) begin
      foreach (dec[y, x]) begin dec[y][x] = 0; mvx[y][x] = 0; mvy[y][x] = 0; end
      for (int my = 0; my < HMB; my++)
        for (int mx = 0; mx < WMB; mx++) do_mb(mx, my);
    end
    for (int i = 0; i < 8; i++) begin
      checks++; if (cov[i] == 0) begin failures++; $display("partition kind %0d never used", i); end
    end
    checks++; if (n_skip0 == 0 || n_skip1 == 0) begin failures++; $display("P_SKIP cases: zero %0d predicted %0d", n_skip0, n_skip1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
