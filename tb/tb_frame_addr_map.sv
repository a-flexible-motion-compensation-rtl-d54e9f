// tb_frame_addr_map: checks the row-major SDRAM data arrangement. For luma
// and both chroma planes of a QCIF and a 1080-line picture it checks the
// bank of each 4-row strip, that the mapping is one-to-one inside each bank
// (no two words share a location) and that consecutive words of a strip sit
// in consecutive columns of a row, and a few addresses computed by hand.
module tb_frame_addr_map;
  import mc_pkg::*;
  comp_e comp;
  logic [10:0] x;
  logic [8:0] wy;
  logic [11:0] pic_w;
  logic [6:0] pic_h_mb;
  sd_addr_t addr;
  frame_addr_map dut (.*);

  int checks = 0, failures = 0;
  bit seen [int];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic sweep(int w, int hmb);
    int lin_prev;
    seen.delete();
    pic_w = 12'(w); pic_h_mb = 7'(hmb);
    for (int c = 0; c < 3; c++) begin
      int pw = (c == 0) ? w : w / 2;
      int strips = (c == 0) ? hmb * 4 : hmb * 2;
      for (int s = 0; s < strips; s += ((w > 200) ? 7 : 1)) begin
        for (int xx = 0; xx < pw; xx += ((w > 200) ? 13 : 1)) begin
          int k, expb;
          comp = comp_e'(c); x = 11'(xx); wy = 9'(s);
          #1;
          expb = (c == 0) ? s % 4 : ((c == 2) ? 2 : 0) + s % 2;
          chk(int'(addr.ba) == expb, $sformatf("bank c%0d s%0d", c, s));
          k = (int'(addr.ba) << 20) | (int'(addr.row) << 8) | int'(addr.col);
          chk(!seen.exists(k), $sformatf("collision c%0d x%0d s%0d", c, xx, s));
          seen[k] = 1;
          if (xx > 0 && w < 200) chk(((int'(addr.row) << 8) | int'(addr.col)) == lin_prev + 1, "not consecutive");
          lin_prev = (int'(addr.row) << 8) | int'(addr.col);
        end
      end
    end
  endtask

  initial begin
    // hand-computed: QCIF, luma strip 5 (MB row 1, bank 1), x=100 -> 176+100 = 276 -> row 1 col 20
    pic_w = 176; pic_h_mb = 9; comp = COMP_Y; x = 100; wy = 5; #1;
    chk(addr.ba == 1 && addr.row == 1 && addr.col == 20, "QCIF luma example");
    // QCIF Cr strip 3 (chroma MB row 1, bank 3), x=10 -> 9*176 + 88 + 10 = 1682 -> row 6 col 146
    comp = COMP_CR; x = 10; wy = 3; #1;
    chk(addr.ba == 3 && addr.row == 6 && addr.col == 146, "QCIF Cr example");
    sweep(176, 9);
    sweep(1920, 68);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
