// mv_gen_h264: H.264 motion vector generator (single reference frame, P
// macroblocks). It keeps a two-level store of neighbouring motion vectors:
//   - four line MV stores (one per 4x4 column of a macroblock), each
//     MAX_MB_W deep, hold the bottom row of vectors of the macroblock row
//     above (SRAM-like, one access per cycle);
//   - local registers hold the neighbours of the current macroblock: upper
//     MVU0..3, upper-right MVRU, upper-left MVLU and left MVL0..3;
//   - the 4x4 MV buffer holds the sixteen vectors of the current macroblock
//     and can be read by the rest of the engine (mv_all).
// Operation of one macroblock: while idle the MVDs are written into the 4x4
// MV buffer at the first 4x4 block of each partition (phase 1). mb_start
// reads the line stores into the upper registers (2 cycles), then phase 2
// walks the 16 blocks in decoding order, one per cycle; at the first block
// of each partition it picks the neighbours A, B, C, D from a look-up table
// indexed by partition size and position, forms the prediction (directional
// for 16x8/8x16, median otherwise), adds the MVD and writes the vector to
// every 4x4 block of the partition. done then stays high until mb_end, which
// writes the bottom row to the line store and moves the right column and
// the upper-right register into the left and upper-left registers (1 cycle).
// Availability: neighbours outside the picture are unavailable; an
// unavailable C is replaced by D; if B and C are both unavailable and A is
// available, A is used for both; if exactly one of A, B, C is available its
// vector is the prediction; unavailable vectors count as zero. A P_SKIP
// macroblock gets a zero vector when neighbour A or B is unavailable or has
// a zero vector, and otherwise the 16x16 prediction. The look-up tables,
// the line store organisation and the two phases follow the document; the
// availability rules come from the H.264 standard, which the document only
// alludes to. Single slice per picture is assumed.
module mv_gen_h264
  import mc_pkg::*;
#(
  parameter int MAX_MB_W = 120
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        pic_w_mb,
  // phase 1: MVD load
  input  logic              mvd_we,
  input  logic [3:0]        mvd_idx,
  input  mv_t               mvd,
  // macroblock control
  input  logic              mb_start,
  input  logic [6:0]        mb_x,
  input  logic [6:0]        mb_y,
  input  mbtype_e           mb_type,
  input  subtype_e [3:0]    sub_type,
  output logic              done,
  input  logic              mb_end,
  output logic              idle,
  // 4x4 MV buffer, readable by the rest of the engine
  output mv_t               mv_all [16]
);
  localparam int XW = $clog2(MAX_MB_W);

  mv_t line [4][MAX_MB_W];
  mv_t mvbuf [16];
  mv_t U [4];
  mv_t L [4];
  mv_t RU, LU;

  typedef enum logic [2:0] { S_IDLE, S_RD0, S_RD1, S_CALC, S_DONE, S_UPD } st_e;
  st_e        st;
  logic [3:0] k;
  logic [6:0] x_q, y_q;
  mbtype_e    t_q;
  subtype_e [3:0] s_q;

  assign done    = (st == S_DONE);
  assign idle    = (st == S_IDLE);
  always_comb for (int i = 0; i < 16; i++) mv_all[i] = mvbuf[i];

  // neighbour codes: 0..15 MVk, 16..19 MVL0..3, 20..23 MVU0..3, 24 MVLU, 25 MVRU
  localparam logic [4:0] T4 [16][4] = '{
    '{16,20,21,24}, '{ 0,21,22,20}, '{17, 0, 1,16}, '{ 2, 1, 0, 0},
    '{ 1,22,23,21}, '{ 4,23,25,22}, '{ 3, 4, 5, 1}, '{ 6, 5, 4, 4},
    '{18, 2, 3,17}, '{ 8, 3, 6, 2}, '{19, 8, 9,18}, '{10, 9, 8, 8},
    '{ 9, 6, 7, 3}, '{12, 7, 6, 6}, '{11,12,13, 9}, '{14,13,12,12}};
  localparam logic [4:0] T8 [4][4] = '{
    '{16,20,22,24}, '{ 1,22,25,21}, '{18, 2, 6,17}, '{ 9, 6, 3, 3}};
  localparam logic [4:0] T16   [4] = '{16,20,25,24};
  localparam logic [4:0] T16x8B[4] = '{18, 2,17,17};

  logic avl, avu, avru;
  assign avl  = (x_q != 0);
  assign avu  = (y_q != 0);
  assign avru = (y_q != 0) && (x_q != pic_w_mb - 7'd1);

  function automatic mv_t nb_val(input logic [4:0] c);
    if (c < 16)      return mvbuf[c[3:0]];
    else if (c < 20) return L[c[1:0]];
    else if (c < 24) return U[c[1:0]];
    else if (c == 24) return LU;
    else             return RU;
  endfunction
  function automatic logic nb_av(input logic [4:0] c);
    if (c < 16)      return 1'b1;
    else if (c < 20) return avl;
    else if (c < 24) return avu;
    else if (c == 24) return avl && avu;
    else             return avru;
  endfunction
  function automatic mvc_t med3(input mvc_t a, b, c);
    mvc_t mx, mn;
    mx = (a > b) ? a : b; mx = (mx > c) ? mx : c;
    mn = (a < b) ? a : b; mn = (mn < c) ? mn : c;
    return mvc_t'(a + b + c - mx - mn);
  endfunction

  // ---------------- phase 2 datapath ----------------
  logic        first;
  logic [15:0] pmask;
  logic [4:0]  ca, cb, cc, cd;
  logic [1:0]  dir;         // 0 median, 1 use A, 2 use B, 3 use C
  mv_t         va, vb, vc, mvp, mvnew, mvd_k;
  logic        aa, ab, ac;

  always_comb begin
    automatic logic [1:0] q = k[3:2];
    automatic logic [1:0] j = k[1:0];
    first = 1'b0; pmask = '0; dir = 2'd0;
    ca = T4[k][0]; cb = T4[k][1]; cc = T4[k][2]; cd = T4[k][3];
    case (t_q)
      MB_SKIP, MB_16x16: begin
        first = (k == 0); pmask = '1;
        ca = T16[0]; cb = T16[1]; cc = T16[2]; cd = T16[3];
      end
      MB_16x8: begin
        first = (k == 0) || (k == 8);
        pmask = (k == 0) ? 16'h00FF : 16'hFF00;
        if (k == 0) begin ca = T16[0]; cb = T16[1]; cc = T16[2]; cd = T16[3]; dir = 2'd2; end
        else begin ca = T16x8B[0]; cb = T16x8B[1]; cc = T16x8B[2]; cd = T16x8B[3]; dir = 2'd1; end
      end
      MB_8x16: begin
        first = (k == 0) || (k == 4);
        pmask = (k == 0) ? 16'h0F0F : 16'hF0F0;
        ca = T8[q][0]; cb = T8[q][1]; cc = T8[q][2]; cd = T8[q][3];
        dir = (k == 0) ? 2'd1 : 2'd3;
      end
      default: begin
        case (s_q[q])
          SUB_8x8: begin
            first = (j == 0); pmask = 16'hF << (4*q);
            ca = T8[q][0]; cb = T8[q][1]; cc = T8[q][2]; cd = T8[q][3];
          end
          SUB_8x4: begin
            first = (j == 0) || (j == 2); pmask = 16'h3 << k;
            cc = (j == 2 || q == 3) ? T4[k][3] : T4[k+1][2];
          end
          SUB_4x8: begin
            first = (j == 0) || (j == 1); pmask = 16'h5 << k;
          end
          default: begin
            first = 1'b1; pmask = 16'h1 << k;
          end
        endcase
      end
    endcase
    // neighbour values and availability, C replaced by D when unavailable
    va = nb_val(ca); aa = nb_av(ca);
    vb = nb_val(cb); ab = nb_av(cb);
    if (nb_av(cc)) begin vc = nb_val(cc); ac = 1'b1; end
    else begin vc = nb_val(cd); ac = nb_av(cd); end
    if (!aa) va = '0;
    if (!ab) vb = '0;
    if (!ac) vc = '0;
    // prediction
    if (dir == 2'd1 && aa)      mvp = va;
    else if (dir == 2'd2 && ab) mvp = vb;
    else if (dir == 2'd3 && ac) mvp = vc;
    else if (!ab && !ac && aa)  mvp = va;
    else if (32'(aa) + 32'(ab) + 32'(ac) == 1) mvp = aa ? va : (ab ? vb : vc);
    else begin
      mvp.x = med3(va.x, vb.x, vc.x);
      mvp.y = med3(va.y, vb.y, vc.y);
    end
    // P_SKIP: zero vector when A or B is unavailable or has a zero vector
    if (t_q == MB_SKIP && (!aa || !ab || va == '0 || vb == '0)) mvp = '0;
    mvd_k   = (t_q == MB_SKIP) ? '0 : mvbuf[k];
    mvnew.x = mvp.x + mvd_k.x;
    mvnew.y = mvp.y + mvd_k.y;
  end

  // ---------------- control and storage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; k <= '0; x_q <= '0; y_q <= '0; t_q <= MB_16x16; s_q <= '0;
      for (int i = 0; i < 4; i++) begin U[i] <= '0; L[i] <= '0; end
      RU <= '0; LU <= '0;
    end else begin
      case (st)
        S_IDLE: if (mb_start) begin
          st <= S_RD0; x_q <= mb_x; y_q <= mb_y; t_q <= mb_type; s_q <= sub_type;
        end
        S_RD0: begin
          for (int c = 0; c < 4; c++) U[c] <= line[c][XW'(x_q)];
          st <= S_RD1;
        end
        S_RD1: begin
          RU <= line[0][XW'((x_q + 7'd1 < 7'(MAX_MB_W)) ? x_q + 7'd1 : x_q)];
          st <= S_CALC; k <= '0;
        end
        S_CALC: begin
          k <= k + 1'b1;
          if (k == 4'd15) st <= S_DONE;
        end
        S_DONE: if (mb_end) st <= S_UPD;
        S_UPD: begin
          L[0] <= mvbuf[5]; L[1] <= mvbuf[7]; L[2] <= mvbuf[13]; L[3] <= mvbuf[15];
          LU   <= U[3];
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // line MV stores (written once per macroblock)
  always_ff @(posedge clk) begin
    if (st == S_UPD) begin
      line[0][XW'(x_q)] <= mvbuf[10];
      line[1][XW'(x_q)] <= mvbuf[11];
      line[2][XW'(x_q)] <= mvbuf[14];
      line[3][XW'(x_q)] <= mvbuf[15];
    end
  end

  // 4x4 MV buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) mvbuf[i] <= '0;
    end else if (st == S_IDLE && mvd_we) begin
      mvbuf[mvd_idx] <= mvd;
    end else if (st == S_CALC && first) begin
      for (int i = 0; i < 16; i++) if (pmask[i]) mvbuf[i] <= mvnew;
    end
  end
endmodule
