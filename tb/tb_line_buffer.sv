// tb_line_buffer: pushes random pixels with random gaps in 'in_valid' and
// checks that, once LEN pixels have passed, 'dout' in a valid clock is the
// pixel pushed LEN valid clocks earlier; a second buffer in series gives the
// pixel 2*LEN earlier.
module tb_line_buffer;
  localparam int LEN = 13, DW = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] din = '0, dout, dout2;
  int hist [$];
  int checks = 0, failures = 0;

  line_buffer #(.LEN(LEN), .DATA_W(DW)) dut (.*);
  line_buffer #(.LEN(LEN), .DATA_W(DW)) dut2 (.clk, .rst_n, .in_valid,
                                              .din(dout), .dout(dout2));

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
      in_valid = ($urandom_range(0, 3) != 0);
      din = DW'($urandom);
      #1;
      if (in_valid) begin
        int n;
        hist.push_back(int'(din));
        n = hist.size();
        if (n > LEN) begin
          checks++;
          if (int'(dout) != hist[n - 1 - LEN]) begin
            failures++;
            $display("FAIL push %0d: %0d vs %0d", n, dout, hist[n - 1 - LEN]);
          end
        end
        if (n > 2 * LEN) begin
          checks++;
          if (int'(dout2) != hist[n - 1 - 2 * LEN]) begin
            failures++;
            $display("FAIL second line push %0d", n);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
