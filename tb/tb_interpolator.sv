// tb_interpolator: self-checking test of the reconfigurable interpolator.
// Blocks of every mode and every fractional position are fed column by
// column from a random reference picture and each output pixel is compared
// with the 2-D reference equations of tb_ref_pkg. It also checks column
// reuse between horizontally adjacent blocks, the content-swap (a parked
// block's columns reused after another block ran in between) and the
// 9-cycle 4x4 luma block time.
module tb_interpolator;
  import mc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic blk_start = 0, reuse = 0, col_valid = 0, col_ready, swap = 0;
  imode_e mode = IM_LUMA;
  logic [2:0] xf = 0, yf = 0;
  logic [8:0][7:0] col_pix = '0;
  logic out_valid, out_half, blk_done, busy;
  logic [3:0][7:0] out_pix;
  logic [2:0] out_col;

  interpolator dut (.*);

  int checks = 0, failures = 0;
  int got [8][8];
  int nbeats;
  int t_start, t_done;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window origin (ox, oy) in component plane; block of mode
  task automatic run_block(imode_e m, int comp, int ox, int oy, int fx, int fy, bit ru);
    int ncols, c0;
    ncols = (m == IM_COPY) ? 4 : (m == IM_CHROMA) ? 3 : 9;
    c0 = (ru && m == IM_LUMA) ? 5 : 0;
    @(negedge clk);
    blk_start = 1; mode = m; xf = 3'(fx); yf = 3'(fy); reuse = ru;
    @(negedge clk);
    blk_start = 0;
    t_start = cyc;
    nbeats = 0;
    fork
      begin
        for (int c = c0; c < ncols; c++) begin
          for (int r = 0; r < 9; r++)
            col_pix[r] = (oy + r < (comp == 0 ? H : H/2)) ? 8'(pix(comp, ox + c, oy + r)) : 8'd0;
          col_valid = 1;
          @(posedge clk);
          while (!col_ready) @(posedge clk);
          #1;
        end
        col_valid = 0;
      end
      begin
        bit fin = 0;
        while (!fin) begin
          @(posedge clk);
          if (out_valid) begin
            for (int i = 0; i < 4; i++) got[out_col][(out_half ? 4 : 0) + i] = int'(out_pix[i]);
            nbeats++;
            if (blk_done) begin fin = 1; t_done = cyc; end
          end
        end
      end
    join
  endtask

  task automatic check_block(imode_e m, int comp, int ox, int oy, int fx, int fy);
    int nc, nr, e;
    nc = (m == IM_MPEG2) ? 8 : (m == IM_CHROMA) ? 2 : 4;
    nr = nc;
    for (int c = 0; c < nc; c++)
      for (int r = 0; r < nr; r++) begin
        case (m)
          IM_COPY:   e = pix(0, ox + c, oy + r);
          IM_LUMA:   e = luma(ox + 2 + c, oy + 2 + r, fx, fy);
          IM_CHROMA: e = chroma(comp, ox + c, oy + r, fx, fy);
          default:   e = mpeg2(comp, ox + c, oy + r, fx, fy);
        endcase
        checks++;
        if (got[c][r] != e) begin
          failures++;
          if (failures < 10) $display("mismatch mode %0d f=(%0d,%0d) c%0d r%0d got %0d exp %0d", m, fx, fy, c, r, got[c][r], e);
        end
      end
  endtask

  initial begin
    init_pic(64, 48, 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every luma fractional position, fresh windows
    for (int fx = 0; fx < 4; fx++)
      for (int fy = 0; fy < 4; fy++) begin
        int ox = 4 + (fx * 7 + fy * 3) % 40, oy = 2 + (fx + fy * 5) % 30;
        if (fx == 0 && fy == 0) begin
          run_block(IM_COPY, 0, ox, oy, 0, 0, 0);
          check_block(IM_COPY, 0, ox, oy, 0, 0);
        end else begin
          run_block(IM_LUMA, 0, ox, oy, fx, fy, 0);
          check_block(IM_LUMA, 0, ox, oy, fx, fy);
          checks++;
          if (t_done - t_start > 10) begin failures++; $display("luma block took %0d cycles", t_done - t_start); end
        end
      end
    // reuse: adjacent block 4 columns to the right with same fraction
    run_block(IM_LUMA, 0, 10, 10, 1, 3, 0);
    check_block(IM_LUMA, 0, 10, 10, 1, 3);
    run_block(IM_LUMA, 0, 14, 10, 2, 1, 1);
    check_block(IM_LUMA, 0, 14, 10, 2, 1);
    checks++;
    if (t_done - t_start > 5) begin failures++; $display("reuse block took %0d cycles", t_done - t_start); end
    // content swap: park block at x=20, run another block, swap back, reuse at x=24
    run_block(IM_LUMA, 0, 20, 20, 3, 3, 0);
    check_block(IM_LUMA, 0, 20, 20, 3, 3);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    run_block(IM_LUMA, 0, 30, 5, 2, 2, 0);
    check_block(IM_LUMA, 0, 30, 5, 2, 2);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    run_block(IM_LUMA, 0, 24, 20, 1, 1, 1);
    check_block(IM_LUMA, 0, 24, 20, 1, 1);
    // chroma all 1/8 positions (subset)
    for (int fx = 0; fx < 8; fx += 3)
      for (int fy = 0; fy < 8; fy += 2) begin
        run_block(IM_CHROMA, 1 + (fx & 1), 3 + fx, 4 + fy, fx, fy, 0);
        check_block(IM_CHROMA, 1 + (fx & 1), 3 + fx, 4 + fy, fx, fy);
      end
    // MPEG-2 half-sample, luma and chroma
    for (int k = 0; k < 4; k++) begin
      run_block(IM_MPEG2, 0, 5 + 9*k, 7 + 3*k, k & 1, k >> 1, 0);
      check_block(IM_MPEG2, 0, 5 + 9*k, 7 + 3*k, k & 1, k >> 1);
      checks++;
      if (nbeats != 16) begin failures++; $display("MPEG-2 beats %0d", nbeats); end
    end
    run_block(IM_MPEG2, 2, 6, 5, 1, 1, 0);
    check_block(IM_MPEG2, 2, 6, 5, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
