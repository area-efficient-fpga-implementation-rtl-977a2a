// frame_ram: one image frame stored in raster order.
//
// Holds either the gray input image or the edge-detected output image of the
// detector. One write port and one read port, both on clk; the read is
// synchronous, so rdata shows the word at raddr one clock after raddr is
// presented. A write and a read of the same address in the same cycle return
// the old word. The frame store itself is this design's choice: the
// surrounding system only needs the image to be available as a serial pixel
// stream and collected back into an image.
module frame_ram #(
  parameter int DEPTH  = 65536,
  parameter int DATA_W = 8,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
