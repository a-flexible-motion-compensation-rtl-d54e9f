// tb_sdram_bank_ctrl: drives random legal command sequences into one bank
// controller and checks, cycle by cycle, that ACTIVE, PRECHARGE and column
// access are allowed exactly at the earliest cycle permitted by tRCD, tRP,
// tRAS and tWR (2, 2, 5 and 2 cycles at 100 MHz), and that the row address
// register and the row-hit compare follow the activated row.
module tb_sdram_bank_ctrl;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic do_act = 0, do_pre = 0, do_rd = 0, do_wr = 0;
  logic [ROW_W-1:0] act_row = '0, cmp_row = '0;
  logic is_open, row_hit, can_act, can_pre, can_cas;
  logic [ROW_W-1:0] open_row;
  sdram_bank_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, t_act = -100, t_pre = -100, t_wr = -100;
  bit open_m = 0;
  logic [ROW_W-1:0] row_m = '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit g, bit e, string what);
    checks++;
    if (g !== e) begin failures++; if (failures < 10) $display("cycle %0d %s: got %b exp %b", cyc, what, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      bit e_act, e_pre, e_cas;
      @(negedge clk);
      do_act = 0; do_pre = 0; do_rd = 0; do_wr = 0;
      e_act = !open_m && (cyc - t_pre >= T_RP);
      e_pre = open_m && (cyc - t_act >= T_RAS) && (cyc - t_wr >= T_WR);
      e_cas = open_m && (cyc - t_act >= T_RCD);
      cmp_row = ($urandom % 2) ? row_m : ROW_W'($urandom);
      #1;
      chk(can_act, e_act, "can_act");
      chk(can_pre, e_pre, "can_pre");
      chk(can_cas, e_cas, "can_cas");
      chk(is_open, open_m, "is_open");
      if (open_m) begin
        chk(open_row == row_m, 1, "open_row");
        chk(row_hit, cmp_row == row_m, "row_hit");
      end else chk(row_hit, 0, "row_hit closed");
      // issue a random legal command (often the earliest legal one)
      case ($urandom % 4)
        0: if (e_act) begin do_act = 1; act_row = ROW_W'($urandom); row_m = act_row; open_m = 1; t_act = cyc; end
        1: if (e_pre) begin do_pre = 1; open_m = 0; t_pre = cyc; end
        2: if (e_cas) begin do_rd = 1; end
        3: if (e_cas) begin do_wr = 1; t_wr = cyc; end
      endcase
      @(posedge clk); cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
