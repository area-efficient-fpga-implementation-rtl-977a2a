// image_deserializer: collects the result stream back into a frame.
//
// The result that arrives with the k-th stream pixel (k = 0 at 'in_sof')
// belongs to the window whose centre is raster pixel k - (IMG_W + 1). The
// first IMG_W + 1 results are therefore dropped and each later one is
// written to the output frame memory at the next raster address, until all
// IMG_W*IMG_H addresses are written; 'done' pulses in the clock after the
// last write.
// Pixels on the image border, whose 3x3 window would reach outside the
// image, are written as 0; inside, an edge is written as all ones and a
// non-edge as 0. Writing the border as 0 is this design's choice.
module image_deserializer #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int PIX_W = 8,
  localparam int NPIX = IMG_W * IMG_H,
  localparam int AW   = (NPIX > 1) ? $clog2(NPIX) : 1,
  localparam int XW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int SW   = $clog2(IMG_W + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_edge,
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [PIX_W-1:0] mem_wdata,
  output logic             active,
  output logic             done
);

  logic [SW-1:0] skip;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          border, last_px;

  assign border  = (x == '0) || (int'(x) == IMG_W - 1) ||
                   (y == '0) || (int'(y) == IMG_H - 1);
  assign last_px = (int'(x) == IMG_W - 1) && (int'(y) == IMG_H - 1);

  assign mem_we    = in_valid && !in_sof && active && (skip == '0);
  assign mem_wdata = (!border && in_edge) ? '1 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      done      <= 1'b0;
      skip      <= '0;
      x         <= '0;
      y         <= '0;
      mem_waddr <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid && in_sof) begin
        // result 0 is dropped here, IMG_W more follow
        active    <= 1'b1;
        skip      <= SW'(IMG_W);
        x         <= '0;
        y         <= '0;
        mem_waddr <= '0;
      end else if (in_valid && active) begin
        if (skip != '0) begin
          skip <= skip - 1'b1;
        end else begin
          mem_waddr <= mem_waddr + 1'b1;
          if (last_px) begin
            active <= 1'b0;
            done   <= 1'b1;
          end else if (int'(x) == IMG_W - 1) begin
            x <= '0;
            y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
      end
    end
  end

endmodule
