// tb_image_serializer: a small frame in a memory model, strobes every N
// clocks. Checks raster order, start-of-frame, the IMG_W+1 zero padding
// pixels, one pixel per strobe, busy, and that start while busy is ignored.
// Two frames are sent back to back.
module tb_image_serializer;
  localparam int W = 5, H = 4, PW = 8, N = 8, NP = W * H, AW = 5;
  logic clk = 0, rst_n = 0, start = 0, load;
  logic [AW-1:0] mem_raddr;
  logic [PW-1:0] mem_rdata, pix;
  logic busy, pix_valid, pix_sof;
  logic [PW-1:0] img [NP];
  int checks = 0, failures = 0, cyc = 0;

  image_serializer #(.IMG_W(W), .IMG_H(H), .PIX_W(PW)) dut (.*);

  always #5 clk = ~clk;

  // synchronous-read memory model
  always @(posedge clk) mem_rdata <= img[mem_raddr];

  // strobe every N clocks, restarted by start
  int ph = 0;
  always @(posedge clk) begin
    cyc++;
    ph <= ((start && !busy) || ph == N - 1) ? 0 : ph + 1;
  end
  assign load = !(start && !busy) && ph == N - 1;

  initial begin
    wait (cyc >= 20000);
    failures++;
    $display("FAIL watchdog cyc=%0d t=%0t", cyc, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      int got, last_cyc;
      bit poked;
      for (int i = 0; i < NP; i++) img[i] = PW'($urandom_range(1, 255));
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy after start"); end
      got = 0; last_cyc = cyc; poked = 0;
      while (busy) begin
        if (got == 3 && !poked) begin start = 1; poked = 1; end  // must be ignored
        @(negedge clk);
        start = 0;
        if (pix_valid) begin
          int e;
          e = (got < NP) ? int'(img[got]) : 0;
          checks += 3;
          if (int'(pix) != e) begin failures++; $display("FAIL f%0d pixel %0d: %0d vs %0d", f, got, pix, e); end
          if (pix_sof !== (got == 0)) begin failures++; $display("FAIL sof at %0d", got); end
          if (cyc - last_cyc != N) begin failures++; $display("FAIL spacing %0d at %0d", cyc - last_cyc, got); end
          last_cyc = cyc;
          got++;
        end
      end
      checks++;
      if (got != NP + W + 1) begin failures++; $display("FAIL %0d pixels", got); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
