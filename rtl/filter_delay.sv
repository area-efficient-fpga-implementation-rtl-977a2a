// filter_delay: shift-register delay beside the 3x3 filters.
//
// The filters need N+1 clocks from a pixel's load to its result. The pixel
// stream's sideband (valid and start-of-frame) is pushed through DEPTH
// registers so that it leaves exactly when the matching filter results do.
// A plain register chain, reset to zero so that no stale valid leaves it.
module filter_delay #(
  parameter int DEPTH = 9,
  parameter int W     = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
