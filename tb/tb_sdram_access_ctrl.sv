// tb_sdram_access_ctrl: checks the read and write channels of the frame
// memory access controller against the behavioural SDRAM model.
//  - a scheduled and an unscheduled read controller each read the same
//    random address stream (row hits, bank misses, row misses) from their own
//    SDRAM model; data must come back complete and in request order;
//  - the scheduled one must be faster and must have overlapped row
//    preparation with earlier accesses;
//  - two row-miss reads to different banks (CL=2, BL=1) must finish within
//    the scheduled bound;
//  - a write controller writes a block of words that are read back from its
//    model;
//  - no SDRAM timing or protocol violation may be reported.
module tb_sdram_access_ctrl;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int N = 200;
  sd_addr_t addrs [N];
  logic [31:0] exp_data [N];

  // two read controllers (scheduled / unscheduled) and one write controller
  logic            rv [3], rr [3], dv [3], dr [3];
  sd_addr_t        ra [3];
  logic [31:0]     wd [3], dd [3];
  sd_cmd_e         cmd [3];
  logic [1:0]      ba [3];
  logic [10:0]     a  [3];
  logic [31:0]     dqo [3], dqi [3];
  logic            oe [3], closed [3], idone [3], evc [3], evo [3], evm [3];
  logic            close_all = 0;

  sdram_access_ctrl #(.IS_WRITE(0), .SCHED(1)) u_s (
    .clk, .rst_n, .req_valid(rv[0]), .req_ready(rr[0]), .req_addr(ra[0]), .req_wdata(wd[0]),
    .rd_valid(dv[0]), .rd_ready(dr[0]), .rd_data(dd[0]), .close_all, .closed(closed[0]), .init_done(idone[0]),
    .sd_cmd(cmd[0]), .sd_ba(ba[0]), .sd_a(a[0]), .sd_dq_out(dqo[0]), .sd_dq_oe(oe[0]), .sd_dq_in(dqi[0]),
    .ev_cas(evc[0]), .ev_overlap(evo[0]), .ev_rowmiss(evm[0]));
  sdram_access_ctrl #(.IS_WRITE(0), .SCHED(0)) u_u (
    .clk, .rst_n, .req_valid(rv[1]), .req_ready(rr[1]), .req_addr(ra[1]), .req_wdata(wd[1]),
    .rd_valid(dv[1]), .rd_ready(dr[1]), .rd_data(dd[1]), .close_all, .closed(closed[1]), .init_done(idone[1]),
    .sd_cmd(cmd[1]), .sd_ba(ba[1]), .sd_a(a[1]), .sd_dq_out(dqo[1]), .sd_dq_oe(oe[1]), .sd_dq_in(dqi[1]),
    .ev_cas(evc[1]), .ev_overlap(evo[1]), .ev_rowmiss(evm[1]));
  sdram_access_ctrl #(.IS_WRITE(1), .SCHED(1)) u_w (
    .clk, .rst_n, .req_valid(rv[2]), .req_ready(rr[2]), .req_addr(ra[2]), .req_wdata(wd[2]),
    .rd_valid(dv[2]), .rd_ready(dr[2]), .rd_data(dd[2]), .close_all, .closed(closed[2]), .init_done(idone[2]),
    .sd_cmd(cmd[2]), .sd_ba(ba[2]), .sd_a(a[2]), .sd_dq_out(dqo[2]), .sd_dq_oe(oe[2]), .sd_dq_in(dqi[2]),
    .ev_cas(evc[2]), .ev_overlap(evo[2]), .ev_rowmiss(evm[2]));

  for (genvar i = 0; i < 3; i++) begin : g_m
    sdram_model m (.clk, .cmd(cmd[i]), .ba(ba[i]), .a(a[i]), .dq_in(dqo[i]), .dq_oe(oe[i]), .dq_out(dqi[i]));
  end

  int checks = 0, failures = 0;
  int n_overlap = 0;
  always @(posedge clk) if (evo[0]) n_overlap++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_stream(int c, int n, output int cycles);
    int got = 0, t0;
    t0 = cyc;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk); rv[c] = 1; ra[c] = addrs[i];
          @(posedge clk); while (!rr[c]) @(posedge clk);
        end
        @(negedge clk); rv[c] = 0;
      end
      begin
        dr[c] = 1;
        while (got < n) begin
          @(posedge clk);
          if (dv[c]) begin
            checks++;
            if (dd[c] !== exp_data[got]) begin
              failures++;
              if (failures < 10) $display("ctrl %0d read %0d got %h exp %h", c, got, dd[c], exp_data[got]);
            end
            got++;
          end
        end
      end
    join
    cycles = cyc - t0;
  endtask

  initial begin
    int cs, cu, c2;
    for (int i = 0; i < 3; i++) begin rv[i] = 0; dr[i] = 0; ra[i] = '0; wd[i] = '0; end
    // address stream: mostly sequential columns over the 4 banks, some row changes
    for (int i = 0; i < N; i++) begin
      addrs[i].ba  = 2'(i % 4);
      addrs[i].row = 11'((i / 24) * 3 + ((i % 7 == 0) ? 1 : 0));
      addrs[i].col = 8'(i * 5);
      exp_data[i]  = $urandom;
    end
    for (int i = 0; i < N; i++) begin
      g_m[0].m.poke(addrs[i].ba, addrs[i].row, addrs[i].col, exp_data[i]);
      g_m[1].m.poke(addrs[i].ba, addrs[i].row, addrs[i].col, exp_data[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (idone[0] && idone[1] && idone[2]);
    read_stream(0, N, cs);
    read_stream(1, N, cu);
    $display("scheduled %0d cycles, unscheduled %0d cycles, overlaps %0d", cs, cu, n_overlap);
    checks++; if (!(cs < cu)) begin failures++; $display("scheduling gave no gain"); end
    checks++; if (n_overlap == 0) begin failures++; $display("no overlapped command"); end
    // two row misses to different banks
    addrs[0] = '{ba: 2'd0, row: 11'd500, col: 8'd1};
    addrs[1] = '{ba: 2'd1, row: 11'd501, col: 8'd2};
    exp_data[0] = 32'h1111_2222; exp_data[1] = 32'h3333_4444;
    g_m[0].m.poke(0, 500, 1, exp_data[0]); g_m[0].m.poke(1, 501, 2, exp_data[1]);
    read_stream(0, 2, c2);
    $display("two row-miss reads: %0d cycles", c2);
    checks++; if (c2 > 14) begin failures++; $display("two row-miss reads too slow"); end
    // write channel
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); rv[2] = 1;
      ra[2] = '{ba: 2'(i % 4), row: 11'(7 + i / 16), col: 8'(i)};
      wd[2] = 32'hA000_0000 + 32'(i * 77);
      @(posedge clk); while (!rr[2]) @(posedge clk);
    end
    @(negedge clk); rv[2] = 0;
    repeat (30) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (g_m[2].m.peek(i % 4, 7 + i / 16, i) !== 32'hA000_0000 + 32'(i * 77)) begin
        failures++; $display("write %0d not stored", i);
      end
    end
    // close all banks
    close_all = 1;
    repeat (20) @(posedge clk);
    checks++; if (!(closed[0] && closed[2])) begin failures++; $display("close_all did not close"); end
    checks++;
    if (g_m[0].m.errors + g_m[1].m.errors + g_m[2].m.errors != 0) begin
      failures++; $display("SDRAM timing errors %0d %0d %0d", g_m[0].m.errors, g_m[1].m.errors, g_m[2].m.errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
