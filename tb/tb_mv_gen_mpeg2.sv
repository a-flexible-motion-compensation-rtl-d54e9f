// tb_mv_gen_mpeg2: checks MPEG-2 motion vector reconstruction against an
// independent model of the standard's rule (PMV + delta with range folding)
// for random f_code, motion_code and motion_residual, plus PMV reset and the
// truncating chroma division.
module tb_mv_gen_mpeg2;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pmv_reset = 0, in_valid = 0, mv_valid;
  logic [3:0] f_code_x = 1, f_code_y = 1;
  logic signed [5:0] motion_code_x = 0, motion_code_y = 0;
  logic [7:0] motion_residual_x = 0, motion_residual_y = 0;
  mv_t mv, mv_chroma;
  mv_gen_mpeg2 dut (.*);

  int checks = 0, failures = 0;
  int px = 0, py = 0;
  int n_fold = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dec(int pred, int fc, int mc, int res, ref int folds);
    int f = 1 << (fc - 1);
    int d, v;
    if (f == 1 || mc == 0) d = mc;
    else d = (mc > 0) ? ((mc - 1) * f + res + 1) : -(((-mc) - 1) * f + res + 1);
    v = pred + d;
    if (v < -16 * f) begin v += 32 * f; folds++; end
    else if (v > 16 * f - 1) begin v -= 32 * f; folds++; end
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int fx = 1 + $urandom % 6, fy = 1 + $urandom % 6;
      int mx = int'($urandom % 33) - 16, my = int'($urandom % 33) - 16;
      int rx = $urandom % (1 << (fx - 1)), ry = $urandom % (1 << (fy - 1));
      @(negedge clk);
      if (i % 50 == 49) begin
        pmv_reset = 1; @(negedge clk); pmv_reset = 0; px = 0; py = 0;
      end
      in_valid = 1; f_code_x = 4'(fx); f_code_y = 4'(fy);
      motion_code_x = 6'(mx); motion_code_y = 6'(my);
      motion_residual_x = 8'(rx); motion_residual_y = 8'(ry);
      px = ref_dec(px, fx, mx, rx, n_fold);
      py = ref_dec(py, fy, my, ry, n_fold);
      @(negedge clk); in_valid = 0;
      checks += 3;
      if (!mv_valid) failures++;
      if (int'(mv.x) != px || int'(mv.y) != py) begin
        failures++; $display("mv %0d,%0d exp %0d,%0d", mv.x, mv.y, px, py);
      end
      if (int'(mv_chroma.x) != px / 2 || int'(mv_chroma.y) != py / 2) begin
        failures++; $display("chroma mv %0d,%0d exp %0d,%0d", mv_chroma.x, mv_chroma.y, px/2, py/2);
      end
    end
    checks++; if (n_fold == 0) begin failures++; $display("range folding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
