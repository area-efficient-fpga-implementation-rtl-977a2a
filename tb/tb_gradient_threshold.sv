// tb_gradient_threshold: random and extreme gradient pairs and thresholds;
// checks |Gx|+|Gy|, the strict greater-than decision (including G equal to
// the threshold) and the one-clock register stage.
module tb_gradient_threshold;
  import sobel_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic signed [GRAD_W-1:0] gx = '0, gy = '0;
  logic [GRAD_W-1:0] threshold = '0, mag;
  logic out_valid, out_sof, edge_o;
  int checks = 0, failures = 0;
  int n_edge = 0, n_flat = 0;

  gradient_threshold dut (.*);

  always #5 clk = ~clk;

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
    for (int i = 0; i < 3000; i++) begin
      int x, y, t, g;
      x = (i % 11 == 0) ? -1020 : $urandom_range(0, 2040) - 1020;
      y = (i % 13 == 0) ? 1020 : $urandom_range(0, 2040) - 1020;
      g = (x < 0 ? -x : x) + (y < 0 ? -y : y);
      t = (i % 4 == 0) ? g : $urandom_range(0, 2040);
      gx = GRAD_W'(x); gy = GRAD_W'(y); threshold = GRAD_W'(t);
      in_valid = (i % 9 != 5);
      in_sof = (i % 17 == 0);
      @(negedge clk);
      checks += 2;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid"); end
      if (out_sof !== (in_valid && in_sof)) begin failures++; $display("FAIL sof"); end
      if (in_valid) begin
        checks += 2;
        if (int'(mag) != g) begin failures++; $display("FAIL mag %0d %0d: %0d vs %0d", x, y, mag, g); end
        if (edge_o !== (g > t)) begin failures++; $display("FAIL edge g=%0d t=%0d", g, t); end
        if (g > t) n_edge++; else n_flat++;
      end
    end
    checks++;
    if (n_edge == 0 || n_flat == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
