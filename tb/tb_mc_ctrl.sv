// tb_mc_ctrl: runs whole macroblocks through the motion compensation
// controller with a simple in-order memory responder (random request
// back-pressure, 3-cycle data latency) that serves the reference picture
// in the SDRAM word layout. Every predicted pixel of every luma and chroma
// block is compared with the 2-D reference equations. It also checks the
// number of luma window columns fetched (84 instead of 144 with one vector
// per macroblock, i.e. 756 pixels), the six content-swaps of the extended
// 2x2 raster scan, the Fig. 3.12-like case with pairwise-equal vectors,
// integer vectors, and an MPEG-2 macroblock.
module tb_mc_ctrl;
  import mc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [11:0] pic_w = 64;
  logic [6:0] pic_h_mb = 3;
  logic mb_start = 0, std_mpeg2 = 0, busy, mb_done;
  logic [6:0] mb_x = 1, mb_y = 1;
  mv_t mv_all [16];
  mv_t mpeg2_mv = '0, mpeg2_mvc = '0;
  logic rq_valid, rq_ready = 0, rd_valid = 0, rd_ready;
  sd_addr_t rq_addr;
  logic [31:0] rd_data = '0;
  logic out_valid, out_half, ev_swap, ev_reuse;
  logic [3:0][7:0] out_pix;
  comp_e out_comp;
  logic [3:0] out_blk;
  logic [2:0] out_col;
  mc_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [int];
  int got [3][16][8][8];
  int n_req, n_swap, n_reuse;
  int latq_t [$];
  logic [31:0] latq_d [$];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int akey(int ba, int row, int col); return (ba << 20) | (row << 8) | col; endfunction

  task automatic build_mem();
    for (int c = 0; c < 3; c++) begin
      int pw = (c == 0) ? W : W/2, ns = (c == 0) ? H/4 : H/8;
      for (int s = 0; s < ns; s++)
        for (int x = 0; x < pw; x++) begin
          int ba, lin;
          if (c == 0) begin ba = s % 4; lin = (s / 4) * W + x; end
          else begin ba = (c == 2 ? 2 : 0) + s % 2; lin = (H/16) * W + (s / 2) * (W/2) + x; end
          mem[akey(ba, lin / 256, lin % 256)] = word(c, x, s);
        end
    end
  endtask

  // memory responder
  always @(posedge clk) begin
    if (rq_valid && rq_ready) begin
      int k;
      k = akey(rq_addr.ba, rq_addr.row, rq_addr.col);
      n_req++;
      latq_t.push_back(cyc + 3);
      latq_d.push_back(mem.exists(k) ? mem[k] : 32'hDEAD_BEEF);
    end
    if (rd_valid && rd_ready) begin void'(latq_t.pop_front()); void'(latq_d.pop_front()); end
    if (ev_swap) n_swap++;
    if (ev_reuse) n_reuse++;
    if (out_valid)
      for (int i = 0; i < 4; i++) got[out_comp][out_blk][out_col][(out_half ? 4 : 0) + i] = int'(out_pix[i]);
  end
  always @(negedge clk) begin
    rq_ready <= ($urandom % 4) != 0;
    if (latq_t.size() > 0 && latq_t[0] <= cyc) begin rd_valid <= 1; rd_data <= latq_d[0]; end
    else rd_valid <= 0;
  end

  task automatic run_mb(bit m2);
    n_req = 0; n_swap = 0; n_reuse = 0;
    foreach (got[a, b, c, d]) got[a][b][c][d] = -1;
    @(negedge clk); mb_start = 1; std_mpeg2 = m2;
    @(negedge clk); mb_start = 0;
    @(posedge clk);
    while (!mb_done) @(posedge clk);
  endtask

  task automatic chk(int g, int e, string what);
    checks++;
    if (g != e) begin failures++; if (failures < 12) $display("%s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic check_h264();
    int bx = int'(mb_x) * 16, by = int'(mb_y) * 16;
    for (int b = 0; b < 16; b++) begin
      int x4 = (b & 1) | ((b >> 1) & 2), y4 = ((b >> 1) & 1) | ((b >> 2) & 2);
      int mx = int'(mv_all[b].x), my = int'(mv_all[b].y);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          chk(got[0][b][c][r], luma(bx + x4*4 + c + (mx >>> 2), by + y4*4 + r + (my >>> 2), mx & 3, my & 3),
              $sformatf("Y blk %0d c%0d r%0d", b, c, r));
      for (int comp = 1; comp < 3; comp++)
        for (int c = 0; c < 2; c++)
          for (int r = 0; r < 2; r++)
            chk(got[comp][b][c][r], chroma(comp, bx/2 + x4*2 + c + (mx >>> 3), by/2 + y4*2 + r + (my >>> 3), mx & 7, my & 7),
                $sformatf("C%0d blk %0d c%0d r%0d", comp, b, c, r));
    end
  endtask

  task automatic set_uniform(int x, int y);
    for (int b = 0; b < 16; b++) begin mv_all[b].x = mvc_t'(x); mv_all[b].y = mvc_t'(y); end
  endtask

  initial begin
    init_pic(64, 48, 11);
    build_mem();
    set_uniform(0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. one fractional vector for the whole macroblock: extended 2x2 raster scan
    set_uniform(-9, 6);
    run_mb(0);
    check_h264();
    // luma columns: 84 x 3 words; chroma: 32 blocks x 3 columns x 2 words
    chk(n_req, 84 * 3 + 32 * 3 * 2, "words fetched, one vector per MB");
    chk(n_swap, 6, "content swaps");
    chk(n_reuse, 12, "reused blocks");
    // 2. a different fractional vector per 4x4 block, with a different
    //    integer vertical offset per block: no window can be reused
    for (int b = 0; b < 16; b++) begin
      mv_all[b].x = mvc_t'(int'($urandom % 61) - 30 + 0); mv_all[b].y = mvc_t'(b * 4 - 29);
      if (mv_all[b].x[1:0] == 0 && mv_all[b].y[1:0] == 0) mv_all[b].x = mv_all[b].x + 1;
    end
    run_mb(0);
    check_h264();
    chk(n_reuse, 0, "no reuse for distinct vectors");
    // 3. pairs of 8x4 partitions with equal vectors in the upper and lower halves
    for (int b = 0; b < 16; b++) begin
      int y4 = ((b >> 1) & 1) | ((b >> 2) & 2);
      mv_all[b].x = mvc_t'(5 + 4 * y4); mv_all[b].y = mvc_t'(-3 + y4);
    end
    run_mb(0);
    check_h264();
    chk(n_swap, 6, "swaps with row-equal vectors");
    // 4. integer vectors: straight copy
    for (int b = 0; b < 16; b++) begin mv_all[b].x = mvc_t'(4 * (b % 5) - 8); mv_all[b].y = mvc_t'(-4 * (b % 3)); end
    run_mb(0);
    check_h264();
    chk(n_req, 16 * 4 * 2 + 32 * 3 * 2, "words fetched for integer vectors");
    // 5. one integer vector for the whole macroblock (copy with swaps)
    set_uniform(8, -12);
    run_mb(0);
    check_h264();
    // 6. MPEG-2 macroblocks, each half-sample case
    for (int k = 0; k < 4; k++) begin
      int mx = 2 * (k % 2 ? 3 : -5) + (k & 1), my = 2 * (k < 2 ? 2 : -3) + (k >> 1);
      int cx = mx / 2, cy = my / 2;
      mpeg2_mv.x = mvc_t'(mx); mpeg2_mv.y = mvc_t'(my);
      mpeg2_mvc.x = mvc_t'(cx); mpeg2_mvc.y = mvc_t'(cy);
      run_mb(1);
      for (int t = 0; t < 6; t++)
        for (int c = 0; c < 8; c++)
          for (int r = 0; r < 8; r++) begin
            int e;
            if (t < 4) e = mpeg2(0, 16 + (t & 1) * 8 + c + (mx >>> 1), 16 + (t >> 1) * 8 + r + (my >>> 1), mx & 1, my & 1);
            else e = mpeg2(t - 3, 8 + c + (cx >>> 1), 8 + r + (cy >>> 1), cx & 1, cy & 1);
            chk(got[t < 4 ? 0 : t - 3][t][c][r], e, $sformatf("MPEG-2 blk %0d c%0d r%0d", t, c, r));
          end
      chk(n_req, 6 * 9 * 3, "MPEG-2 words fetched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
