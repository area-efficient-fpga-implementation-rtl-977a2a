// tb_sobel_full: one complete frame through the edge detector at its default
// size (256 x 256 pixels of 8 bits). The test image is generated here: a
// synthetic aerial-like scene of fields with different gray levels, a
// diagonal road, a bright square and mild noise. The whole output frame is
// compared with the reference model, and the start-to-done time with one
// pixel per 8 clocks.
module tb_sobel_full;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 256, H = 256, NP = W * H, AW = $clog2(NP), N = PIX_W;
  localparam int THR = 160;

  logic clk = 0, rst_n = 0;
  logic in_we = 0, start = 0;
  logic [AW-1:0] in_addr = '0, out_addr = '0;
  logic [PIX_W-1:0] in_data = '0, out_data;
  logic [GRAD_W-1:0] threshold = GRAD_W'(THR);
  logic busy, done, grad_valid, grad_edge;
  logic [GRAD_W-1:0] grad_mag;

  sobel_edge_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_edge = 0;
  img_t img;

  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_done;
    img = new[NP];
    for (int p = 0; p < NP; p++) begin
      int x, y, v;
      x = p % W; y = p / W;
      v = 60 + 40 * (((x / 64) + 2 * (y / 48)) % 4);             // fields
      if (x - y > -6 && x - y < 6) v = 200;                        // road
      if (x >= 150 && x < 190 && y >= 30 && y < 70) v = 250;       // building
      v += $urandom_range(0, 15);                                  // texture
      img[p] = v > 255 ? 255 : v;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      in_we = 1; in_addr = AW'(p); in_data = PIX_W'(img[p]);
      @(negedge clk);
    end
    in_we = 0;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t_done = cyc;
    checks++;
    if (t_done - t0 < N * (NP + W + 1) || t_done - t0 > N * (NP + W + 1) + 2 * N + 4) begin
      failures++;
      $display("FAIL frame took %0d clocks", t_done - t0);
    end
    $display("frame of %0dx%0d took %0d clocks", W, H, t_done - t0);
    for (int p = 0; p < NP; p++) begin
      int e;
      out_addr = AW'(p);
      @(negedge clk);
      e = expected(img, W, H, p % W, p / W, THR);
      if (e != 0) n_edge++;
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL out (%0d,%0d): %0d vs %0d", p % W, p / W, out_data, e);
      end
    end
    checks++;
    if (n_edge == 0 || n_edge > NP / 2) begin failures++; $display("FAIL edge count %0d", n_edge); end
    $display("edge pixels: %0d of %0d", n_edge, NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
