// sdram_model: behavioural model (testbench only) of one 512K x 32 x 4-bank
// SDR SDRAM chip used as a frame memory. It decodes {cs_n, ras_n, cas_n,
// we_n} commands on the rising clock edge, keeps the open row of each bank,
// returns read data CL cycles after a READ (burst length 1) and stores
// write data given with the WRITE command. It checks the bank protocol and
// the tRCD, tRP, tRAS and tWR timing and counts every violation in
// `errors`. Storage is sparse, so only touched words use memory.
module sdram_model
  import mc_pkg::*;
(
  input  logic             clk,
  input  sd_cmd_e          cmd,
  input  logic [BA_W-1:0]  ba,
  input  logic [10:0]      a,
  input  logic [DQ_W-1:0]  dq_in,
  input  logic             dq_oe,
  output logic [DQ_W-1:0]  dq_out
);
  logic [DQ_W-1:0] mem [int];
  bit              open_b  [BANKS];
  int              row_b   [BANKS];
  longint          t_act   [BANKS];
  longint          t_pre   [BANKS];
  longint          t_wr    [BANKS];
  longint          cyc = 0;
  int              cl = -1;
  int              errors = 0;
  int              n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0;
  logic [DQ_W-1:0] pipe [8];
  bit              pv   [8];

  function automatic int key(input int b, input int r, input int c);
    return (b << 19) | (r << 8) | c;
  endfunction
  function automatic void poke(input int b, input int r, input int c, input logic [DQ_W-1:0] d);
    mem[key(b, r, c)] = d;
  endfunction
  function automatic logic [DQ_W-1:0] peek(input int b, input int r, input int c);
    if (mem.exists(key(b, r, c))) return mem[key(b, r, c)];
    return '0;
  endfunction

  initial begin
    for (int i = 0; i < BANKS; i++) begin
      open_b[i] = 0; row_b[i] = 0; t_act[i] = -100; t_pre[i] = -100; t_wr[i] = -100;
    end
    for (int i = 0; i < 8; i++) begin pipe[i] = '0; pv[i] = 0; end
    dq_out = '0;
  end

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < 7; i++) begin pipe[i] = pipe[i+1]; pv[i] = pv[i+1]; end
    pipe[7] = '0; pv[7] = 0;
    case (cmd)
      CMD_MRS: cl = int'(a[6:4]);
      CMD_ACT: begin
        n_act++;
        if (open_b[ba]) begin errors++; $display("SDRAM: ACT to open bank %0d", ba); end
        if (cyc - t_pre[ba] < T_RP) begin errors++; $display("SDRAM: tRP violated bank %0d", ba); end
        open_b[ba] = 1; row_b[ba] = int'(a); t_act[ba] = cyc;
      end
      CMD_PRE: begin
        n_pre++;
        for (int b = 0; b < BANKS; b++) if (a[10] || b == int'(ba)) begin
          if (open_b[b]) begin
            if (cyc - t_act[b] < T_RAS) begin errors++; $display("SDRAM: tRAS violated bank %0d", b); end
            if (cyc - t_wr[b] < T_WR)   begin errors++; $display("SDRAM: tWR violated bank %0d", b); end
          end
          open_b[b] = 0; t_pre[b] = cyc;
        end
      end
      CMD_READ, CMD_WRITE: begin
        if (!open_b[ba]) begin errors++; $display("SDRAM: column access to closed bank %0d", ba); end
        else if (cyc - t_act[ba] < T_RCD) begin errors++; $display("SDRAM: tRCD violated bank %0d", ba); end
        if (cl < 1) begin errors++; $display("SDRAM: access before mode register set"); end
        if (cmd == CMD_READ) begin
          n_rd++;
          if (cl >= 1 && cl <= 7) begin
            pipe[cl-1] = peek(int'(ba), row_b[ba], int'(a[7:0])); pv[cl-1] = 1;
          end
        end else begin
          n_wr++;
          if (!dq_oe) begin errors++; $display("SDRAM: WRITE without data"); end
          poke(int'(ba), row_b[ba], int'(a[7:0]), dq_in);
          t_wr[ba] = cyc;
        end
      end
      default: ;
    endcase
    dq_out <= pipe[0];
  end
endmodule
