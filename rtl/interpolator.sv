// interpolator: reconfigurable fractional-sample interpolator for H.264 and
// MPEG-2 motion compensation, built as a 4-parallel separate 1-D filter.
// Reference pixels arrive one window column (9 vertically adjacent pixels,
// window rows 0..8) per cycle and shift into a 6-column x 9-row register
// array. From that array, every cycle, one output column of the block is
// produced (4 pixels, or 2 for H.264 chroma):
//   IM_LUMA   H.264 luma, 9x9 window for a 4x4 block. Nine horizontal and
//             eight vertical 6-tap (1,-5,20,20,-5,1) filters give the half
//             samples b, s, h, m, four second-stage vertical filters on the
//             unrounded b values give j, and bilinear averages give the
//             quarter samples. Output column k appears after window column
//             k+5 has entered: 9 cycles per 4x4 block (6 + 3).
//   IM_COPY   integer motion vector: the 4 columns of a 4x4 block pass
//             straight through.
//   IM_CHROMA H.264 chroma 2x2 block from a 3x3 window, 1/8 sample bilinear
//             ((8-x)[(8-y)A + yC] + x[(8-y)B + yD] + 32) >> 6, 2 pixels per
//             cycle.
//   IM_MPEG2  MPEG-2 8x8 block from a 9x9 window with the shared half-sample
//             bilinear filters; each 8-pixel column leaves as an upper and a
//             lower 4-pixel beat, so a column is accepted every second cycle.
// Content buffer: a second 6x9 register array. A one-cycle swap exchanges
// the shift register array and the content buffer, so the last five window
// columns of a block can be parked and brought back for a later horizontally
// adjacent block (extended 2x2 raster scan). A block started with reuse = 1
// skips the 5 columns already held and needs only 4 new ones.
// Interface: blk_start (one cycle, with mode, fractions and reuse) opens a
// block; columns are taken with col_valid/col_ready; out_valid marks each
// output beat with its column (out_col) and half (out_half, MPEG-2 only);
// blk_done marks the last beat. The output has no back-pressure.
// The architecture (4-parallel separate 1-D, 6x9 shift array, 54-pixel
// content buffer, one-cycle swap, two-stage MPEG-2 filtering) follows the
// document; the exact filter-to-row wiring and the handshake are this
// design's choices. Sample equations are those of the two video standards.
module interpolator
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             blk_start,
  input  imode_e           mode,
  input  logic [2:0]       xf,
  input  logic [2:0]       yf,
  input  logic             reuse,
  input  logic             col_valid,
  output logic             col_ready,
  input  logic [8:0][7:0]  col_pix,
  input  logic             swap,
  output logic             out_valid,
  output logic [3:0][7:0]  out_pix,
  output logic [2:0]       out_col,
  output logic             out_half,
  output logic             blk_done,
  output logic             busy
);
  logic [7:0] sr   [6][9];
  logic [7:0] cbuf [6][9];

  imode_e     m_q;
  logic [2:0] xf_q, yf_q;
  logic [3:0] cin;
  logic       active, pend, half;
  logic [2:0] ocol;
  logic [3:0] need, lag;
  logic [2:0] nout;
  logic       take, last_beat;

  always_comb begin
    case (m_q)
      IM_COPY:   begin need = 4; lag = 0; nout = 3; end
      IM_LUMA:   begin need = 9; lag = 5; nout = 3; end
      IM_CHROMA: begin need = 3; lag = 1; nout = 1; end
      default:   begin need = 9; lag = 1; nout = 7; end
    endcase
  end

  assign col_ready = active && (cin < need) && !(pend && m_q == IM_MPEG2 && !half);
  assign take      = col_valid && col_ready;
  assign out_valid = pend;
  assign out_col   = ocol;
  assign out_half  = half;
  assign last_beat = pend && (ocol == nout) && (m_q != IM_MPEG2 || half);
  assign blk_done  = last_beat;
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= IM_COPY; xf_q <= '0; yf_q <= '0; cin <= '0;
      active <= 1'b0; pend <= 1'b0; half <= 1'b0; ocol <= '0;
    end else begin
      if (blk_start) begin
        m_q <= mode; xf_q <= xf; yf_q <= yf;
        cin <= (reuse && mode == IM_LUMA) ? 4'd5 : 4'd0;
        active <= 1'b1; pend <= 1'b0; half <= 1'b0;
      end else begin
        if (last_beat) active <= 1'b0;
        // output beat bookkeeping
        if (pend && m_q == IM_MPEG2 && !half) half <= 1'b1;
        else if (pend) begin pend <= 1'b0; half <= 1'b0; end
        if (take) begin
          cin <= cin + 1'b1;
          if (cin >= lag) begin
            pend <= 1'b1; half <= 1'b0;
            ocol <= 3'(cin - lag);
          end
        end
      end
    end
  end

  // shift register array and content buffer
  always_ff @(posedge clk) begin
    if (swap) begin
      for (int c = 0; c < 6; c++)
        for (int r = 0; r < 9; r++) begin
          sr[c][r]   <= cbuf[c][r];
          cbuf[c][r] <= sr[c][r];
        end
    end else if (take) begin
      for (int c = 0; c < 5; c++)
        for (int r = 0; r < 9; r++) sr[c][r] <= sr[c+1][r];
      for (int r = 0; r < 9; r++) sr[5][r] <= col_pix[r];
    end
  end

  // ---------------- arithmetic ----------------
  function automatic logic [7:0] clip8(input logic signed [19:0] v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction
  function automatic logic signed [14:0] tap6(input logic signed [14:0] a, b, c, d, e, f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic logic [7:0] avg2(input logic [7:0] a, b);
    return 8'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  logic signed [14:0] b1 [9];      // horizontal half sample, unrounded, per window row
  logic signed [14:0] h1 [4];      // vertical half at column k, output rows 0..3
  logic signed [14:0] m1 [4];      // vertical half at column k+1
  logic signed [19:0] j1 [4];
  logic [7:0] lum [4];
  logic [7:0] chr [2];
  logic [7:0] mp2 [8];
  logic [7:0] rowsel [4];

  always_comb begin
    for (int r = 0; r < 9; r++)
      b1[r] = tap6(15'(sr[0][r]), 15'(sr[1][r]), 15'(sr[2][r]),
                   15'(sr[3][r]), 15'(sr[4][r]), 15'(sr[5][r]));
    for (int r = 0; r < 4; r++) begin
      h1[r] = tap6(15'(sr[2][r]), 15'(sr[2][r+1]), 15'(sr[2][r+2]),
                   15'(sr[2][r+3]), 15'(sr[2][r+4]), 15'(sr[2][r+5]));
      m1[r] = tap6(15'(sr[3][r]), 15'(sr[3][r+1]), 15'(sr[3][r+2]),
                   15'(sr[3][r+3]), 15'(sr[3][r+4]), 15'(sr[3][r+5]));
      j1[r] = 20'(b1[r]) - 20'sd5*20'(b1[r+1]) + 20'sd20*20'(b1[r+2]) +
              20'sd20*20'(b1[r+3]) - 20'sd5*20'(b1[r+4]) + 20'(b1[r+5]);
    end
    for (int r = 0; r < 4; r++) begin
      automatic logic [7:0] G = sr[2][r+2];
      automatic logic [7:0] H = sr[3][r+2];
      automatic logic [7:0] M = sr[2][r+3];
      automatic logic [7:0] b = clip8((20'(b1[r+2]) + 20'sd16) >>> 5);
      automatic logic [7:0] s = clip8((20'(b1[r+3]) + 20'sd16) >>> 5);
      automatic logic [7:0] h = clip8((20'(h1[r]) + 20'sd16) >>> 5);
      automatic logic [7:0] m = clip8((20'(m1[r]) + 20'sd16) >>> 5);
      automatic logic [7:0] j = clip8((j1[r] + 20'sd512) >>> 10);
      case ({xf_q[1:0], yf_q[1:0]})
        4'b00_00: lum[r] = G;
        4'b01_00: lum[r] = avg2(G, b);
        4'b10_00: lum[r] = b;
        4'b11_00: lum[r] = avg2(H, b);
        4'b00_01: lum[r] = avg2(G, h);
        4'b01_01: lum[r] = avg2(b, h);
        4'b10_01: lum[r] = avg2(b, j);
        4'b11_01: lum[r] = avg2(b, m);
        4'b00_10: lum[r] = h;
        4'b01_10: lum[r] = avg2(h, j);
        4'b10_10: lum[r] = j;
        4'b11_10: lum[r] = avg2(j, m);
        4'b00_11: lum[r] = avg2(M, h);
        4'b01_11: lum[r] = avg2(h, s);
        4'b10_11: lum[r] = avg2(j, s);
        default:  lum[r] = avg2(m, s);
      endcase
    end
    // H.264 chroma: separate vertical then horizontal weighting
    for (int r = 0; r < 2; r++) begin
      automatic logic [10:0] vl = 11'(4'd8 - 4'(yf_q)) * 11'(sr[4][r]) + 11'(yf_q) * 11'(sr[4][r+1]);
      automatic logic [10:0] vr = 11'(4'd8 - 4'(yf_q)) * 11'(sr[5][r]) + 11'(yf_q) * 11'(sr[5][r+1]);
      automatic logic [14:0] t  = 15'(4'd8 - 4'(xf_q)) * 15'(vl) + 15'(xf_q) * 15'(vr) + 15'd32;
      chr[r] = t[13:6];
    end
    // MPEG-2 half-sample bilinear
    for (int r = 0; r < 8; r++) begin
      automatic logic [9:0] A = 10'(sr[4][r]);
      automatic logic [9:0] B = 10'(sr[5][r]);
      automatic logic [9:0] C = 10'(sr[4][r+1]);
      automatic logic [9:0] D = 10'(sr[5][r+1]);
      case ({xf_q[0], yf_q[0]})
        2'b00: mp2[r] = A[7:0];
        2'b10: mp2[r] = 8'((A + B + 10'd1) >> 1);
        2'b01: mp2[r] = 8'((A + C + 10'd1) >> 1);
        default: mp2[r] = 8'((A + B + C + D + 10'd2) >> 2);
      endcase
    end
    for (int r = 0; r < 4; r++) begin
      case (m_q)
        IM_COPY:   rowsel[r] = sr[5][r];
        IM_LUMA:   rowsel[r] = lum[r];
        IM_CHROMA: rowsel[r] = (r < 2) ? chr[r] : 8'd0;
        default:   rowsel[r] = half ? mp2[r+4] : mp2[r];
      endcase
      out_pix[r] = rowsel[r];
    end
  end

  a_swap_idle: assert property (@(posedge clk) disable iff (!rst_n) swap |-> !take);
endmodule
