// tb_frame_mem_arbiter: checks the ping-pong routing of the read and the
// write SDRAM controllers onto the two chips (reference chip to the read
// side, the other one to the write side, read data from the reference
// chip) under random command traffic, and the frame swap handshake:
// close_all is held until both controllers report all banks closed, the
// roles are exchanged no earlier than tRP after that, swap_ack pulses once,
// and the whole swap takes a bounded number of cycles.
module tb_frame_mem_arbiter;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap_req = 0, swap_ack, ref_sel, close_all, rd_closed = 0, wr_closed = 0;
  sd_cmd_e rd_cmd = CMD_NOP, wr_cmd = CMD_NOP;
  logic [BA_W-1:0] rd_ba = '0, wr_ba = '0;
  logic [10:0] rd_a = '0, wr_a = '0;
  logic [DQ_W-1:0] rd_dq_in, wr_dq_out = '0;
  logic wr_dq_oe = 0;
  sd_cmd_e m_cmd [2];
  logic [BA_W-1:0] m_ba [2];
  logic [10:0] m_a [2];
  logic [DQ_W-1:0] m_dq_out [2];
  logic m_dq_oe [2];
  logic [DQ_W-1:0] m_dq_in [2];
  frame_mem_arbiter dut (.*);

  int checks = 0, failures = 0, swaps = 0;
  bit sel_m = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%0t %s", $time, what); end
  endtask

  task automatic traffic();
    sd_cmd_e cmds [5] = '{CMD_NOP, CMD_ACT, CMD_READ, CMD_WRITE, CMD_PRE};
    rd_cmd = cmds[$urandom % 5]; wr_cmd = cmds[$urandom % 5];
    rd_ba = BA_W'($urandom); wr_ba = BA_W'($urandom);
    rd_a = 11'($urandom); wr_a = 11'($urandom);
    wr_dq_out = $urandom; wr_dq_oe = $urandom % 2;
    m_dq_in[0] = $urandom; m_dq_in[1] = $urandom;
    #1;
    chk(ref_sel == sel_m, "ref_sel");
    chk(m_cmd[sel_m] == rd_cmd && m_ba[sel_m] == rd_ba && m_a[sel_m] == rd_a, "read side routing");
    chk(m_dq_oe[sel_m] == 0, "reference chip never driven");
    chk(m_cmd[!sel_m] == wr_cmd && m_ba[!sel_m] == wr_ba && m_a[!sel_m] == wr_a, "write side routing");
    chk(m_dq_out[!sel_m] == wr_dq_out && m_dq_oe[!sel_m] == wr_dq_oe, "write data routing");
    chk(rd_dq_in == m_dq_in[sel_m], "read data from reference chip");
  endtask

  initial begin
    m_dq_in[0] = '0; m_dq_in[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int t_closed, t, dly;
      repeat ($urandom % 20 + 1) begin @(negedge clk); traffic(); chk(!swap_ack && !close_all, "idle"); end
      // request a swap
      @(negedge clk); swap_req = 1; traffic();
      @(negedge clk); swap_req = 0;
      // controllers close their banks after a random delay
      dly = $urandom % 6; t = 0;
      rd_closed = 0; wr_closed = 0;
      while (t < dly) begin #1; chk(close_all, "close_all held"); @(negedge clk); t++; end
      rd_closed = 1; wr_closed = ($urandom % 2);
      if (!wr_closed) begin #1; chk(close_all, "close_all held for write side"); @(negedge clk); wr_closed = 1; end
      t_closed = 0;
      // wait for the acknowledge while the commands are only NOPs
      rd_cmd = CMD_NOP; wr_cmd = CMD_NOP;
      while (!swap_ack && t_closed < 20) begin @(negedge clk); t_closed++; end
      // closed rises the cycle after the last PRECHARGE, so tRP is kept
      // only if the roles change at least T_RP + 1 cycles after it
      chk(t_closed >= T_RP + 1 && t_closed <= T_RP + 2, $sformatf("swap after closing: %0d cycles", t_closed));
      sel_m = !sel_m; swaps++;
      chk(ref_sel == sel_m, "roles exchanged");
      @(negedge clk); chk(!swap_ack, "swap_ack is one pulse");
      rd_closed = 0; wr_closed = 0;
    end
    chk(swaps == 40, "swap count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
