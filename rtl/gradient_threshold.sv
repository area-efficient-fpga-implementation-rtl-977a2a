// gradient_threshold: gradient magnitude and edge decision.
//
// Forms G = |Gx| + |Gy| (the sum-of-absolute-values form of the gradient
// size, used instead of the square root of the sum of squares) and marks the
// pixel as an edge when G is greater than 'threshold'. One register stage:
// outputs follow a valid input by one clock. The threshold is a run-time
// input because no fixed value is part of the design.
module gradient_threshold
  import sobel_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_sof,
  input  logic signed [GRAD_W-1:0] gx,
  input  logic signed [GRAD_W-1:0] gy,
  input  logic [GRAD_W-1:0]        threshold,
  output logic                     out_valid,
  output logic                     out_sof,
  output logic [GRAD_W-1:0]        mag,
  output logic                     edge_o
);

  logic [GRAD_W-1:0] ax, ay, g;

  always_comb begin
    ax = gx[GRAD_W-1] ? GRAD_W'(-gx) : GRAD_W'(gx);
    ay = gy[GRAD_W-1] ? GRAD_W'(-gy) : GRAD_W'(gy);
    g  = ax + ay;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      mag       <= '0;
      edge_o    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid && in_sof;
      if (in_valid) begin
        mag    <= g;
        edge_o <= g > threshold;
      end
    end
  end

endmodule
