// frame_addr_map: address generator that maps a 4-pixel word of a frame onto
// SDRAM (bank, row, column) with the row-major data arrangement.
// A 32-bit SDRAM word holds four vertically adjacent pixels, so a picture is
// cut into horizontal 4-row strips. For luma, the four strips of a 16-row
// macroblock row go to banks 0..3; inside a bank the strips of successive
// macroblock rows are laid end to end, each one picture width long, so the
// linear word address is mb_row * pic_w + x and a 256-word SDRAM row holds
// part of, one or several macroblock rows depending on the picture width.
// Chroma uses the same scheme with 8-row macroblock rows: Cb strips go to
// banks 0/1 and Cr strips to banks 2/3, placed after the luma area of the
// bank. The bank split and the Cb/Cr bank pairs follow the document; the
// vertical word packing, the luma-then-chroma layout inside a bank and the
// strip-to-bank order are this design's choices.
// Purely combinational; the picture size is a run-time input so one mapping
// serves every frame format.
module frame_addr_map
  import mc_pkg::*;
(
  input  comp_e             comp,
  input  logic [10:0]       x,        // pixel column in the component plane
  input  logic [8:0]        wy,       // 4-row strip index in the component plane
  input  logic [11:0]       pic_w,    // luma picture width in pixels
  input  logic [6:0]        pic_h_mb, // picture height in macroblocks
  output sd_addr_t          addr
);
  logic [20:0] lin;
  logic [20:0] cbase;
  always_comb begin
    cbase = 21'(pic_h_mb) * 21'(pic_w);
    if (comp == COMP_Y) begin
      addr.ba = wy[1:0];
      lin     = 21'(wy[8:2]) * 21'(pic_w) + 21'(x);
    end else begin
      addr.ba = {comp == COMP_CR, wy[0]};
      lin     = cbase + 21'(wy[8:1]) * 21'(pic_w[11:1]) + 21'(x);
    end
    addr.row = lin[18:8];
    addr.col = lin[7:0];
  end
endmodule
