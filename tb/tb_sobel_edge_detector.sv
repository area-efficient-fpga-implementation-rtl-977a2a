// tb_sobel_edge_detector: end-to-end test of the edge detector on small
// frames. Each frame is written through the host port, processed, and read
// back; every output pixel is compared with the reference model, every
// gradient of the result stream with the model's |Gx|+|Gy|, the result rate
// (one per N clocks) and the start-to-done time are checked. Frames: random
// noise, vertical and horizontal step edges (negative and positive
// gradients), a flat frame (no edges), and a random frame started straight
// after the previous one finished. A start pulse while busy must be ignored.
// The test counts how often each mechanism occurred and fails if one never
// did: edge written, inside non-edge written, border forced to 0, negative
// Gx, negative Gy, padding pixels, line-buffer wrap-around, ignored start.
module tb_sobel_edge_detector;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 16, H = 10, NP = W * H, AW = $clog2(NP), N = PIX_W;
  localparam int FRAME_CLKS = N * (NP + W + 1);

  logic clk = 0, rst_n = 0;
  logic in_we = 0, start = 0;
  logic [AW-1:0] in_addr = '0, out_addr = '0;
  logic [PIX_W-1:0] in_data = '0, out_data;
  logic [GRAD_W-1:0] threshold = '0;
  logic busy, done, grad_valid, grad_edge;
  logic [GRAD_W-1:0] grad_mag;

  sobel_edge_detector #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_edge = 0, n_flat = 0, n_border = 0, n_negx = 0, n_negy = 0;
  int n_pad = 0, n_wrap = 0, n_ignored = 0;
  img_t img;
  int k_res, last_res_cyc;
  bit in_frame;

  always @(posedge clk) cyc++;

  // mechanism counters from inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ser.pix_valid && int'(dut.u_ser.idx) > NP) n_pad++;
    if (dut.pix_valid && int'(dut.u_lb1.ptr) == W - 1) n_wrap++;
  end

  // gradient stream monitor: result k belongs to centre k - (W + 1)
  always @(negedge clk) if (rst_n && grad_valid && in_frame) begin
    int c, x, y, gx, gy;
    if (k_res > 0) begin
      checks++;
      if (cyc - last_res_cyc != N) begin
        failures++;
        $display("FAIL result spacing %0d", cyc - last_res_cyc);
      end
    end
    last_res_cyc = cyc;
    c = k_res - (W + 1);
    x = c % W;
    y = c / W;
    if (c >= 0 && !is_border(W, H, x, y)) begin
      grads(img, W, x, y, gx, gy);
      if (gx < 0) n_negx++;
      if (gy < 0) n_negy++;
      checks += 2;
      if (int'(grad_mag) != absi(gx) + absi(gy)) begin
        failures++;
        $display("FAIL mag at (%0d,%0d): %0d vs %0d", x, y, grad_mag, absi(gx) + absi(gy));
      end
      if (grad_edge !== (absi(gx) + absi(gy) > int'(threshold))) begin
        failures++;
        $display("FAIL edge flag at (%0d,%0d)", x, y);
      end
    end
    k_res++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_image(int kind);
    img = new[NP];
    for (int p = 0; p < NP; p++) begin
      int x, y;
      x = p % W; y = p / W;
      case (kind)
        0: img[p] = $urandom_range(0, 255);
        1: img[p] = (x < W / 2) ? 30 : 220;                       // vertical step
        2: img[p] = (y < H / 2) ? 240 : 10;                       // horizontal step
        3: img[p] = 77;                                            // flat
        default: img[p] = ((x / 3 + y / 2) % 2) ? 255 : 0;        // checkerboard
      endcase
    end
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      in_we = 1; in_addr = AW'(p); in_data = PIX_W'(img[p]);
    end
    @(negedge clk);
    in_we = 0;
  endtask

  task automatic run_frame(int thr, bit poke);
    int t0, t_done;
    threshold = GRAD_W'(thr);
    k_res = 0;
    in_frame = 1;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    if (poke) begin
      int idx_before;
      repeat (50) @(negedge clk);
      idx_before = int'(dut.u_ser.idx);
      start = 1;
      @(negedge clk);
      start = 0;
      // an honoured start would send the serializer back to pixel 0
      checks++;
      if (int'(dut.u_ser.idx) < idx_before) begin
        failures++;
        $display("FAIL start while busy restarted the frame");
      end else n_ignored++;
    end
    while (!done) @(negedge clk);
    t_done = cyc;
    @(negedge clk);
    in_frame = 0;
    checks += 2;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    // one pixel per N clocks, plus the filter and register latency
    if (t_done - t0 < FRAME_CLKS || t_done - t0 > FRAME_CLKS + 2 * N + 4) begin
      failures++;
      $display("FAIL frame took %0d clocks, expected about %0d", t_done - t0, FRAME_CLKS);
    end
    if (poke) $display("frame time %0d clocks (%0d pixel slots of %0d clocks)", t_done - t0, NP + W + 1, N);
    checks++;
    if (k_res != NP + W + 1) begin failures++; $display("FAIL %0d results", k_res); end
  endtask

  task automatic read_check(int thr);
    for (int p = 0; p < NP; p++) begin
      int e, x, y;
      out_addr = AW'(p);
      @(negedge clk);
      x = p % W; y = p / W;
      e = expected(img, W, H, x, y, thr);
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        $display("FAIL out (%0d,%0d): %0d vs %0d", x, y, out_data, e);
      end
      if (is_border(W, H, x, y)) n_border++;
      else if (e != 0) n_edge++;
      else n_flat++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // noise, with a start pulse in the middle that must be ignored
    load_image(0);  run_frame(300, 1); read_check(300);
    load_image(1);  run_frame(100, 0); read_check(100);
    load_image(2);  run_frame(100, 0); read_check(100);
    load_image(3);  run_frame(0, 0);   read_check(0);
    load_image(4);  run_frame(500, 0); read_check(500);
    // back to back: the next frame is started right after done
    run_frame(900, 0); read_check(900);
    begin
      checks += 8;
      if (n_edge == 0)    begin failures++; $display("FAIL no edge pixel"); end
      if (n_flat == 0)    begin failures++; $display("FAIL no non-edge pixel"); end
      if (n_border == 0)  begin failures++; $display("FAIL no border pixel"); end
      if (n_negx == 0)    begin failures++; $display("FAIL no negative Gx"); end
      if (n_negy == 0)    begin failures++; $display("FAIL no negative Gy"); end
      if (n_pad == 0)     begin failures++; $display("FAIL no padding pixel"); end
      if (n_wrap == 0)    begin failures++; $display("FAIL no line buffer wrap"); end
      if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    end
    $display("mechanisms: edge=%0d non_edge=%0d border=%0d neg_gx=%0d neg_gy=%0d pad=%0d wrap=%0d ignored_start=%0d",
             n_edge, n_flat, n_border, n_negx, n_negy, n_pad, n_wrap, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
