// frame_mem_arbiter: connects the read and the write access controllers to
// the two ping-pong frame memories (two SDRAM chips on separate buses). One
// chip holds the reference frame and is read by motion compensation; the
// other receives the reconstructed current frame. At a frame boundary
// (swap_req) both controllers are asked to close all banks; once both report
// closed and a further tRP has passed, the roles of the two chips are
// exchanged and swap_ack pulses for one cycle. The arbiter holds no
// per-command state: command, address and write data are steered by the
// current role bit, and read data is taken from the reference chip.
// The ping-pong role exchange follows the document; the close-then-swap
// handshake is this design's choice.
module frame_mem_arbiter
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap_req,
  output logic             swap_ack,
  output logic             ref_sel,      // chip holding the reference frame
  output logic             close_all,
  input  logic             rd_closed,
  input  logic             wr_closed,
  // read controller
  input  sd_cmd_e          rd_cmd,
  input  logic [BA_W-1:0]  rd_ba,
  input  logic [10:0]      rd_a,
  output logic [DQ_W-1:0]  rd_dq_in,
  // write controller
  input  sd_cmd_e          wr_cmd,
  input  logic [BA_W-1:0]  wr_ba,
  input  logic [10:0]      wr_a,
  input  logic [DQ_W-1:0]  wr_dq_out,
  input  logic             wr_dq_oe,
  // two SDRAM chips
  output sd_cmd_e          m_cmd   [2],
  output logic [BA_W-1:0]  m_ba    [2],
  output logic [10:0]      m_a     [2],
  output logic [DQ_W-1:0]  m_dq_out[2],
  output logic             m_dq_oe [2],
  input  logic [DQ_W-1:0]  m_dq_in [2]
);
  typedef enum logic [1:0] { S_RUN, S_CLOSE, S_WAIT } st_e;
  st_e        st;
  logic [3:0] cnt;

  assign close_all = (st == S_CLOSE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_RUN; ref_sel <= 1'b0; swap_ack <= 1'b0; cnt <= '0;
    end else begin
      swap_ack <= 1'b0;
      case (st)
        S_RUN:   if (swap_req) st <= S_CLOSE;
        S_CLOSE: if (rd_closed && wr_closed) begin st <= S_WAIT; cnt <= 4'(T_RP); end
        S_WAIT:  if (cnt == 0) begin
                   st <= S_RUN; ref_sel <= ~ref_sel; swap_ack <= 1'b1;
                 end else cnt <= cnt - 1'b1;
        default: st <= S_RUN;
      endcase
    end
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      if (c == int'(ref_sel)) begin
        m_cmd[c] = rd_cmd; m_ba[c] = rd_ba; m_a[c] = rd_a;
        m_dq_out[c] = '0;  m_dq_oe[c] = 1'b0;
      end else begin
        m_cmd[c] = wr_cmd; m_ba[c] = wr_ba; m_a[c] = wr_a;
        m_dq_out[c] = wr_dq_out; m_dq_oe[c] = wr_dq_oe;
      end
    end
    rd_dq_in = m_dq_in[ref_sel];
  end
endmodule
