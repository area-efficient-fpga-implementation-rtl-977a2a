// tb_da_filter_3x3: streams random three-row pixel columns into a horizontal
// and a vertical filter, one column per N clocks, and compares each result
// with a direct 3x3 convolution computed here. Also checks the N+1 clock
// latency from load to result_valid.
module tb_da_filter_3x3;
  import sobel_pkg::*;
  localparam int N = PIX_W;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2:0][N-1:0] row_pix = '0;
  logic signed [GRAD_W-1:0] rx, ry;
  logic vx, vy;
  int checks = 0, failures = 0;
  int mx [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  int my [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int col [$][3];  // columns sent, [row]

  da_filter_3x3 #(.N(N), .MASK(MASK_X)) ux (.clk, .rst_n, .load, .row_pix,
                                            .result(rx), .result_valid(vx));
  da_filter_3x3 #(.N(N), .MASK(MASK_Y)) uy (.clk, .rst_n, .load, .row_pix,
                                            .result(ry), .result_valid(vy));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_x [$], exp_y [$], load_cyc [$];
  int cyc = 0, nres = 0;
  always @(posedge clk) cyc++;

  // driver: one column per N clocks, with a long pause in the middle after
  // which the window history is all zeros again
  initial begin
    int pix [3];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) col.push_back('{0, 0, 0});
    for (int i = 0; i < 1000; i++) begin
      if (i == 500) begin
        repeat (3 * N) @(negedge clk);
        for (int k = 0; k < 2; k++) col.push_back('{0, 0, 0});
      end
      for (int r = 0; r < 3; r++) begin
        // saturated patterns on some columns drive the extremes
        if (i % 10 < 3) pix[r] = ((i / 3 + r) % 2) ? 255 : 0;
        else pix[r] = $urandom_range(0, 255);
        row_pix[r] = N'(pix[r]);
      end
      col.push_back(pix);
      begin
        int ex, ey;
        ex = 0; ey = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            ex += mx[r][c] * col[col.size() - 3 + c][r];
            ey += my[r][c] * col[col.size() - 3 + c][r];
          end
        exp_x.push_back(ex);
        exp_y.push_back(ey);
      end
      load = 1;
      load_cyc.push_back(cyc);
      @(negedge clk);
      load = 0;
      repeat (N - 1) @(negedge clk);
    end
    repeat (2 * N) @(negedge clk);
    checks++;
    if (nres != 1000) begin failures++; $display("FAIL %0d results", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: compare every result with the convolution of its window
  always @(negedge clk) begin
    checks++;
    if (vx !== vy) begin failures++; $display("FAIL valid mismatch"); end
    if (vx) begin
      int ex, ey, lc;
      nres++;
      ex = exp_x.pop_front();
      ey = exp_y.pop_front();
      lc = load_cyc.pop_front();
      checks += 3;
      if (cyc - lc != N + 1) begin failures++; $display("FAIL latency %0d", cyc - lc); end
      if (int'(rx) != ex) begin failures++; $display("FAIL Gx %0d: %0d vs %0d", nres, rx, ex); end
      if (int'(ry) != ey) begin failures++; $display("FAIL Gy %0d: %0d vs %0d", nres, ry, ey); end
    end
  end
endmodule
