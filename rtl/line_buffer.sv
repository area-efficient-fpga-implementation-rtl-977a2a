// line_buffer: one image line of delay for the pixel stream.
//
// Every clock with 'in_valid' the pixel 'din' is written and the pixel that
// was written LEN valid clocks earlier is shown on 'dout' in the same clock
// (asynchronous read of a LEN-word circular buffer, as a chain of
// shift-register LUTs would give). With LEN equal to the image width, 'dout'
// is the pixel directly above 'din'; two buffers in series give the pixel
// two lines above. Until LEN pixels have passed, 'dout' carries whatever the
// buffer held, which only ever reaches the border pixels of the output.
module line_buffer #(
  parameter int LEN    = 256,
  parameter int DATA_W = 8,
  localparam int AW    = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [LEN];
  logic [AW-1:0]     ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (in_valid)
      ptr <= (int'(ptr) == LEN - 1) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk)
    if (in_valid) mem[ptr] <= din;

  assign dout = mem[ptr];

endmodule
