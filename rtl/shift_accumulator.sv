// shift_accumulator: adder, register and 2^-1 scaler of a
// distributed-arithmetic multiplier.
//
// The multiplier word arrives LSB first, one bit per clock for N clocks, and
// each clock the look-up table gives the partial sum P_j for bit j. In the
// first bit clock ('first') the register is loaded with P_0 * 2^(N-1); in
// each later clock the register is scaled by 2^-1 and P_j * 2^(N-1) is added.
// After the N-th bit ('last') the register holds sum_j P_j * 2^j exactly,
// because every bit that the scaling would drop is still zero at that point.
// That value is copied to the product register 'c' and 'c_valid' is raised
// for one clock, one clock after 'last'. All pixel bits carry positive
// weight, so there is no sign-bit correction step. Adder, register and 2^-1
// feedback follow the published structure; the widths are this design's.
module shift_accumulator #(
  parameter int N    = 8,
  parameter int IN_W = 6,
  localparam int OUT_W = IN_W + N
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] c,
  output logic                    c_valid
);

  logic signed [OUT_W-1:0] acc, sum;

  always_comb begin
    sum = OUT_W'(din) <<< (N - 1);
    if (!first) sum = sum + (acc >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      c       <= '0;
      c_valid <= 1'b0;
    end else begin
      acc     <= sum;
      c_valid <= last;
      if (last) c <= sum;
    end
  end

endmodule
