// tb_image_deserializer: feeds result streams of NP + W + 1 edge bits and
// checks that the first W+1 are dropped, that the rest are written to
// consecutive raster addresses, that border pixels are written as 0 and the
// inside as all ones or 0, and that 'done' pulses after the last write.
// Two frames, the second with gaps between results.
module tb_image_deserializer;
  localparam int W = 6, H = 5, PW = 8, NP = W * H, AW = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_edge = 0;
  logic mem_we, active, done;
  logic [AW-1:0] mem_waddr;
  logic [PW-1:0] mem_wdata;
  int checks = 0, failures = 0;
  int bits [NP + W + 1];
  int written [NP];
  int nwr, ndone, n_border, n_edge;

  image_deserializer #(.IMG_W(W), .IMG_H(H), .PIX_W(PW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (mem_we) begin
      if (int'(mem_waddr) < NP) written[mem_waddr] = int'(mem_wdata);
      nwr++;
    end
    if (done) ndone++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      nwr = 0; ndone = 0; n_border = 0; n_edge = 0;
      for (int i = 0; i < NP; i++) written[i] = -1;
      for (int k = 0; k < NP + W + 1; k++) begin
        bits[k] = $urandom_range(0, 1);
        in_valid = 1; in_sof = (k == 0); in_edge = bits[k][0];
        @(negedge clk);
        in_valid = 0; in_sof = 0;
        if (f == 1) repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        int x, y, e;
        x = p % W; y = p / W;
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) begin
          e = 0; n_border++;
        end else begin
          e = bits[p + W + 1] ? 255 : 0;
          if (e != 0) n_edge++;
        end
        checks++;
        if (written[p] != e) begin
          failures++;
          $display("FAIL frame %0d pixel (%0d,%0d): %0d vs %0d", f, x, y, written[p], e);
        end
      end
      checks += 4;
      if (nwr != NP) begin failures++; $display("FAIL %0d writes", nwr); end
      if (ndone != 1) begin failures++; $display("FAIL %0d done pulses", ndone); end
      if (active) begin failures++; $display("FAIL still active"); end
      if (n_border == 0 || n_edge == 0) begin failures++; $display("FAIL coverage"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
