// mv_gen_mpeg2: MPEG-2 motion vector generator for frame prediction in P
// pictures. Each component is rebuilt from the prediction register (PMV),
// f_code, motion_code and motion_residual with the MPEG-2 reconstruction
// rule: with f = 1 << (f_code-1),
//   delta = motion_code                                   if f == 1 or motion_code == 0
//   delta = sign(mc) * ((|mc| - 1) * f + motion_residual + 1)  otherwise,
// vector = PMV + delta folded into [-16f, 16f-1], and PMV takes the new
// vector. pmv_reset clears the PMVs (start of slice, intra macroblock,
// skipped macroblock in a P picture). The vector is in half-sample units.
// The chroma vector (4:2:0) is the luma vector divided by two, truncated
// towards zero. One vector per cycle: in_valid loads both components and
// mv_valid follows one cycle later.
// That motion vectors come only from PMV and these side-information fields
// follows the document; the arithmetic is that of the MPEG-2 standard.
module mv_gen_mpeg2
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pmv_reset,
  input  logic        in_valid,
  input  logic [3:0]  f_code_x,
  input  logic [3:0]  f_code_y,
  input  logic signed [5:0] motion_code_x,   // -16..16
  input  logic signed [5:0] motion_code_y,
  input  logic [7:0]  motion_residual_x,
  input  logic [7:0]  motion_residual_y,
  output logic        mv_valid,
  output mv_t         mv,          // luma, half-sample units
  output mv_t         mv_chroma    // chroma, half-sample units
);
  mv_t pmv;

  function automatic mvc_t decode(input mvc_t pred, input logic [3:0] fcode,
                                  input logic signed [5:0] mc, input logic [7:0] res);
    int r_size, f, high, low, range, delta, v, amc;
    r_size = int'(fcode) - 1;
    f      = 1 << r_size;
    high   = 16 * f - 1;
    low    = -16 * f;
    range  = 32 * f;
    amc    = (mc < 0) ? -int'(mc) : int'(mc);
    if (f == 1 || mc == 0) delta = int'(mc);
    else begin
      delta = (amc - 1) * f + int'(res) + 1;
      if (mc < 0) delta = -delta;
    end
    v = int'(pred) + delta;
    if (v < low)  v = v + range;
    if (v > high) v = v - range;
    return mvc_t'(v);
  endfunction

  function automatic mvc_t half_toward_zero(input mvc_t v);
    return (v < 0) ? -((-v) >>> 1) : (v >>> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pmv <= '0; mv <= '0; mv_valid <= 1'b0;
    end else begin
      mv_valid <= 1'b0;
      if (pmv_reset) pmv <= '0;
      else if (in_valid) begin
        automatic mv_t n;
        n.x = decode(pmv.x, f_code_x, motion_code_x, motion_residual_x);
        n.y = decode(pmv.y, f_code_y, motion_code_y, motion_residual_y);
        pmv      <= n;
        mv       <= n;
        mv_valid <= 1'b1;
      end
    end
  end

  assign mv_chroma.x = half_toward_zero(mv.x);
  assign mv_chroma.y = half_toward_zero(mv.y);
endmodule
