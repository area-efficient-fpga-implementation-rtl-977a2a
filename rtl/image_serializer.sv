// image_serializer: turns the stored gray frame into a raster pixel stream.
//
// After 'start' it reads the frame memory in raster order (left to right,
// top line first) and emits one pixel on each 'load' strobe (the clk/n rate
// of the bit-serial filters), 'pix_valid' high for that one clock and
// 'pix_sof' marking the first pixel. After the IMG_W*IMG_H image pixels it
// emits IMG_W+1 zero pixels so that the filter windows centred on the last
// line and the last pixel are completed. 'busy' is high from 'start' to the
// last padding pixel; 'start' while busy is ignored.
//
// The frame memory has a one-clock synchronous read. The read address
// changes right after a strobe and the next strobe comes N >= 2 clocks later,
// so the word is ready when it is needed. The caller restarts the strobe
// counter with 'start' so the first strobe is a full period later.
module image_serializer #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int PIX_W = 8,
  localparam int NPIX = IMG_W * IMG_H,
  localparam int AW   = (NPIX > 1) ? $clog2(NPIX) : 1,
  localparam int CW   = $clog2(NPIX + IMG_W + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             load,
  output logic [AW-1:0]    mem_raddr,
  input  logic [PIX_W-1:0] mem_rdata,
  output logic             busy,
  output logic             pix_valid,
  output logic             pix_sof,
  output logic [PIX_W-1:0] pix
);

  localparam int LAST = NPIX + IMG_W;  // index of the last padding pixel

  logic [CW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      idx       <= '0;
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      pix       <= '0;
    end else begin
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          idx  <= '0;
        end
      end else if (load) begin
        pix_valid <= 1'b1;
        pix_sof   <= (idx == '0);
        pix       <= (int'(idx) < NPIX) ? mem_rdata : '0;
        idx       <= idx + 1'b1;
        if (int'(idx) == LAST) busy <= 1'b0;
      end
    end
  end

  assign mem_raddr = AW'(idx);

endmodule
