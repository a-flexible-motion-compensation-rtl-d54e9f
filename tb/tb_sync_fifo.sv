// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  logic [3:0] count;
  sync_fifo #(.W(16), .DEPTH(8)) dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int n_full = 0;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 100) < (i < 1500 ? 70 : 30);
      in_data = 16'($urandom);
      out_ready = ($urandom % 100) < (i < 1500 ? 30 : 70);
      checks++;
      if (int'(count) != q.size() || out_valid != (q.size() != 0) || in_ready != (q.size() != 8)) begin
        failures++; $display("flags wrong: count %0d model %0d", count, q.size());
      end
      if (!in_ready) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("data %h exp %h", out_data, q[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
