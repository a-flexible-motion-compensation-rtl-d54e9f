// residual_adder: reconstruction stage that adds the decoded residual to the
// motion compensated prediction, four pixels in parallel (the output width
// of the shared 4-pixel IDCT / inverse integer transform and of the
// interpolator), and clips each sum to 0..255. One register stage: the sum
// of a beat accepted at in_valid appears with out_valid on the next cycle.
// The 4-pixel parallel add follows the document; the single pipeline stage
// and 9-bit signed residual are this design's choices.
module residual_adder (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [3:0][7:0]         pred,
  input  logic signed [3:0][8:0]  resid,
  output logic                    out_valid,
  output logic [3:0][7:0]         recon
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      recon     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 4; i++) begin
          automatic logic signed [10:0] s = 11'(signed'({1'b0, pred[i]})) + 11'(signed'(resid[i]));
          recon[i] <= (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : s[7:0];
        end
    end
  end
endmodule
