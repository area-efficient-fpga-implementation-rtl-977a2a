// load_strobe_gen: the clk/n load strobe of the bit-serial datapath.
//
// The distributed-arithmetic filters take one n-bit word every n clocks: the
// parallel-in serial-out registers are loaded at clk/n and shift at clk. This
// block counts clocks modulo N and raises 'load' for one clock every N
// clocks. 'restart' clears the count so that the first strobe after it
// comes exactly N clocks later; this gives the serializer a defined phase at
// the start of a frame. Counting modulo N (rather than a divided clock) keeps
// the whole design on one clock, which is this design's choice.
module load_strobe_gen #(
  parameter int N = 8,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  output logic load
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (restart)                 cnt <= '0;
    else if (int'(cnt) == N - 1)      cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign load = !restart && (int'(cnt) == N - 1);

endmodule
