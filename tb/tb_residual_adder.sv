// tb_residual_adder: random predictions and residuals, including values that
// saturate at 0 and 255; checks the clipped sums and the one-cycle latency.
module tb_residual_adder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [3:0][7:0] pred = '0, recon;
  logic signed [3:0][8:0] resid = '0;
  residual_adder dut (.*);
  int checks = 0, failures = 0, n_sat = 0;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int e [4];
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++) begin
        int r = int'($urandom % 512) - 256;
        pred[k] = 8'($urandom);
        resid[k] = 9'(r);
        e[k] = int'(pred[k]) + r;
        if (e[k] < 0 || e[k] > 255) n_sat++;
        e[k] = e[k] < 0 ? 0 : (e[k] > 255 ? 255 : e[k]);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(recon[k]) != e[k]) begin failures++; $display("pix %0d got %0d exp %0d", k, recon[k], e[k]); end
      end
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
