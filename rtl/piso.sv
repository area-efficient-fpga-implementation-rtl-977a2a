// piso: parallel-in serial-out register of the distributed-arithmetic
// multiplier.
//
// On 'load' (one clock in every N, the clk/n rate) the N-bit word 'din' is
// captured; on every other clock the register shifts right by one, so
// 'sout' presents bit 0 in the first clock after the load, bit 1 in the
// second, and bit N-1 in the N-th. Zeros shift in behind the word. LSB-first
// order matches the 2^-1 scaling accumulator that follows. The block and its
// clk/n loading follow the published multiplier structure; LSB-first order
// and the reset are this design's reading of it.
module piso #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] din,
  output logic         sout
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= din;
    else           sr <= {1'b0, sr[N-1:1]};
  end

  assign sout = sr[0];

endmodule
