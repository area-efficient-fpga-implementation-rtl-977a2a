// sobel_edge_detector: area-efficient Sobel edge detector, top level.
//
// A gray frame written into the input frame memory is, after 'start',
// serialized in raster order at one pixel per N = PIX_W clocks. Two line
// buffers delay the stream by one and two image lines so that three
// vertically adjacent pixels arrive together. Two bit-serial
// distributed-arithmetic 3x3 filters, one per Sobel mask, turn the three rows
// into Gx and Gy; each shifts its pixels out LSB first through
// parallel-in serial-out and serial shift registers, addresses a table of
// pre-computed coefficient sums with the nine window bits, and accumulates
// with 2^-1 scaling. A delay line carries the stream's valid and
// start-of-frame flags through the filters' N+1 clock latency. G = |Gx|+|Gy|
// is compared with 'threshold', and the deserializer writes the binary edge
// image (all ones = edge, border pixels 0) into the output frame memory.
//
// Interface: host write port of the gray frame (in_we/in_addr/in_data), a
// 'start' pulse, 'busy' while a frame is in flight, a 'done' pulse when the
// edge frame is complete, and a read port of the edge frame (out_data one
// clock after out_addr). The gradient stream (grad_valid, grad_mag,
// grad_edge) is also brought out, one result per N clocks.
//
// Timing: a frame takes N * (IMG_W*IMG_H + IMG_W + 1) clocks plus a few
// clocks of pipeline. The frame stores, the sizes and the handshake are this
// design's choices; the pipeline order and the filter structure follow the
// proposed architecture.
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  localparam int NPIX = IMG_W * IMG_H,
  localparam int AW   = (NPIX > 1) ? $clog2(NPIX) : 1,
  localparam int N    = PIX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // gray frame in
  input  logic              in_we,
  input  logic [AW-1:0]     in_addr,
  input  logic [PIX_W-1:0]  in_data,
  // control
  input  logic              start,
  input  logic [GRAD_W-1:0] threshold,
  output logic              busy,
  output logic              done,
  // edge frame out
  input  logic [AW-1:0]     out_addr,
  output logic [PIX_W-1:0]  out_data,
  // gradient stream
  output logic              grad_valid,
  output logic [GRAD_W-1:0] grad_mag,
  output logic              grad_edge
);

  // ---------------- gray image and serializer ----------------
  logic [AW-1:0]    ser_raddr;
  logic [PIX_W-1:0] ser_rdata;
  logic             ser_busy, load, restart;
  logic             pix_valid, pix_sof;
  logic [PIX_W-1:0] pix;

  frame_ram #(.DEPTH(NPIX), .DATA_W(PIX_W)) u_gray_ram (
    .clk, .we(in_we), .waddr(in_addr), .wdata(in_data),
    .raddr(ser_raddr), .rdata(ser_rdata)
  );

  assign restart = start && !busy;

  load_strobe_gen #(.N(N)) u_strobe (
    .clk, .rst_n, .restart, .load
  );

  image_serializer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_ser (
    .clk, .rst_n, .start(restart), .load,
    .mem_raddr(ser_raddr), .mem_rdata(ser_rdata),
    .busy(ser_busy), .pix_valid, .pix_sof, .pix
  );

  // ---------------- line buffers ----------------
  logic [PIX_W-1:0] line1, line2;

  line_buffer #(.LEN(IMG_W), .DATA_W(PIX_W)) u_lb1 (
    .clk, .rst_n, .in_valid(pix_valid), .din(pix), .dout(line1)
  );
  line_buffer #(.LEN(IMG_W), .DATA_W(PIX_W)) u_lb2 (
    .clk, .rst_n, .in_valid(pix_valid), .din(line1), .dout(line2)
  );

  // ---------------- 3x3 filters ----------------
  logic [2:0][PIX_W-1:0]    rows;
  logic signed [GRAD_W-1:0] gx, gy;
  logic                     gx_valid, gy_valid;

  assign rows = {pix, line1, line2};  // row 2 = newest line, row 0 = oldest

  da_filter_3x3 #(.N(N), .MASK(MASK_X)) u_filt_x (
    .clk, .rst_n, .load(pix_valid), .row_pix(rows),
    .result(gx), .result_valid(gx_valid)
  );
  da_filter_3x3 #(.N(N), .MASK(MASK_Y)) u_filt_y (
    .clk, .rst_n, .load(pix_valid), .row_pix(rows),
    .result(gy), .result_valid(gy_valid)
  );

  // ---------------- filter delay ----------------
  strm_tag_t tag_in, tag_out;
  assign tag_in = '{valid: pix_valid, sof: pix_sof};

  filter_delay #(.DEPTH(N + 1), .W($bits(strm_tag_t))) u_fdelay (
    .clk, .rst_n, .din(tag_in), .dout(tag_out)
  );

  // the delayed flags must line up with the filters' own result strobes
  a_delay_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    tag_out.valid == gx_valid && gx_valid == gy_valid);

  // ---------------- gradient and threshold ----------------
  logic g_sof;

  gradient_threshold u_grad (
    .clk, .rst_n, .in_valid(tag_out.valid), .in_sof(tag_out.sof),
    .gx, .gy, .threshold,
    .out_valid(grad_valid), .out_sof(g_sof), .mag(grad_mag), .edge_o(grad_edge)
  );

  // ---------------- deserializer and edge image ----------------
  logic             wr_en, des_active;
  logic [AW-1:0]    wr_addr;
  logic [PIX_W-1:0] wr_data;

  image_deserializer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_des (
    .clk, .rst_n, .in_valid(grad_valid), .in_sof(g_sof), .in_edge(grad_edge),
    .mem_we(wr_en), .mem_waddr(wr_addr), .mem_wdata(wr_data),
    .active(des_active), .done
  );

  frame_ram #(.DEPTH(NPIX), .DATA_W(PIX_W)) u_edge_ram (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .raddr(out_addr), .rdata(out_data)
  );

  // busy from start until the edge frame is complete
  logic in_flight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       in_flight <= 1'b0;
    else if (restart) in_flight <= 1'b1;
    else if (done)    in_flight <= 1'b0;
  end
  assign busy = in_flight || ser_busy || des_active;

endmodule
