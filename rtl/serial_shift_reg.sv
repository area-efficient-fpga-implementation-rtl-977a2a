// serial_shift_reg: N-bit serial shift register of the distributed-arithmetic
// multiplier.
//
// Shifts one bit in at 'sin' every clock and presents at 'sout' the bit that
// entered N clocks earlier. Chained behind a parallel-in serial-out register
// that is reloaded every N clocks, it therefore replays the previous word's
// bits in step with the current word's bits: a one-word delay tap. The chain
// of such registers follows the published multiplier structure; the length
// of N bits is this design's choice that makes each one a word delay.
module serial_shift_reg #(
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sin,
  output logic sout
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sin, sr[N-1:1]};
  end

  assign sout = sr[0];

endmodule
