// tb_ref_pkg: reference picture and golden prediction models shared by the
// testbenches. The reference picture is a small 3-plane array filled with a
// pseudo-random pattern. The prediction functions follow the H.264 and
// MPEG-2 sample equations written directly in 2-D form (they do not share
// the separable structure of the RTL), so they check the RTL independently.
package tb_ref_pkg;
  int W = 64, H = 48;               // luma size of the test picture
  byte unsigned Y [][], CB [][], CR [][];

  function automatic void init_pic(int w, int h, int seed);
    int s = seed;
    W = w; H = h;
    Y = new[h]; CB = new[h/2]; CR = new[h/2];
    foreach (Y[r]) begin Y[r] = new[w]; foreach (Y[r][c]) begin s = s * 1103515245 + 12345; Y[r][c] = byte'(s >>> 16); end end
    foreach (CB[r]) begin CB[r] = new[w/2]; CR[r] = new[w/2];
      foreach (CB[r][c]) begin s = s * 1103515245 + 12345; CB[r][c] = byte'(s >>> 16); CR[r][c] = byte'(s >>> 8); end end
  endfunction

  function automatic int pix(int comp, int x, int y);
    if (comp == 0) return int'(Y[y][x]);
    else if (comp == 1) return int'(CB[y][x]);
    else return int'(CR[y][x]);
  endfunction

  // 4 vertically adjacent pixels of strip wy at column x, byte 0 = top
  function automatic logic [31:0] word(int comp, int x, int wy);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) w[8*i +: 8] = 8'(pix(comp, x, 4*wy + i));
    return w;
  endfunction

  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int tap(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int hb1(int x, int y); // unrounded half between (x,y) and (x+1,y)
    return tap(pix(0,x-2,y), pix(0,x-1,y), pix(0,x,y), pix(0,x+1,y), pix(0,x+2,y), pix(0,x+3,y));
  endfunction
  function automatic int vh1(int x, int y);
    return tap(pix(0,x,y-2), pix(0,x,y-1), pix(0,x,y), pix(0,x,y+1), pix(0,x,y+2), pix(0,x,y+3));
  endfunction
  // H.264 luma sample at integer (x,y) plus quarter fractions (xf,yf)
  function automatic int luma(int x, int y, int xf, int yf);
    int G, Hh, M, b, s, h, m, j, j1;
    G = pix(0,x,y); Hh = pix(0,x+1,y); M = pix(0,x,y+1);
    b = clip((hb1(x,y) + 16) >>> 5);
    s = clip((hb1(x,y+1) + 16) >>> 5);
    h = clip((vh1(x,y) + 16) >>> 5);
    m = clip((vh1(x+1,y) + 16) >>> 5);
    j1 = tap(hb1(x,y-2), hb1(x,y-1), hb1(x,y), hb1(x,y+1), hb1(x,y+2), hb1(x,y+3));
    j = clip((j1 + 512) >>> 10);
    case ({xf[1:0], yf[1:0]})
      4'b0000: return G;
      4'b0100: return (G+b+1)>>1;
      4'b1000: return b;
      4'b1100: return (Hh+b+1)>>1;
      4'b0001: return (G+h+1)>>1;
      4'b0101: return (b+h+1)>>1;
      4'b1001: return (b+j+1)>>1;
      4'b1101: return (b+m+1)>>1;
      4'b0010: return h;
      4'b0110: return (h+j+1)>>1;
      4'b1010: return j;
      4'b1110: return (j+m+1)>>1;
      4'b0011: return (M+h+1)>>1;
      4'b0111: return (h+s+1)>>1;
      4'b1011: return (j+s+1)>>1;
      default: return (m+s+1)>>1;
    endcase
  endfunction
  // H.264 chroma 1/8 sample
  function automatic int chroma(int comp, int x, int y, int xf, int yf);
    return ((8-xf)*(8-yf)*pix(comp,x,y) + xf*(8-yf)*pix(comp,x+1,y) +
            (8-xf)*yf*pix(comp,x,y+1) + xf*yf*pix(comp,x+1,y+1) + 32) >> 6;
  endfunction
  // MPEG-2 half sample
  function automatic int mpeg2(int comp, int x, int y, int xh, int yh);
    int A = pix(comp,x,y), B = pix(comp,x+1,y), C = pix(comp,x,y+1), D = pix(comp,x+1,y+1);
    if (xh && yh) return (A+B+C+D+2) >> 2;
    if (xh) return (A+B+1) >> 1;
    if (yh) return (A+C+1) >> 1;
    return A;
  endfunction
endpackage
