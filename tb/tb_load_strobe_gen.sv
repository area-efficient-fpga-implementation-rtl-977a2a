// tb_load_strobe_gen: checks that 'load' is high for exactly one clock in
// every N, and that after 'restart' the next strobe comes exactly N clocks
// later.
module tb_load_strobe_gen;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, restart = 0, load;
  int checks = 0, failures = 0;
  int last_load, cyc = 0;

  load_strobe_gen #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_load = -1;
    // free-running period
    for (int i = 0; i < 40 * N; i++) begin
      @(negedge clk);
      if (load) begin
        if (last_load >= 0) begin
          checks++;
          if (cyc - last_load != N) begin
            failures++;
            $display("FAIL period %0d", cyc - last_load);
          end
        end
        last_load = cyc;
      end
    end
    // restarts at different phases
    for (int r = 0; r < 20; r++) begin
      repeat ($urandom_range(0, 2 * N)) @(negedge clk);
      restart = 1;
      @(negedge clk);
      restart = 0;
      for (int k = 1; k <= N; k++) begin
        checks++;
        if (load !== (k == N)) begin
          failures++;
          $display("FAIL restart %0d: load=%0b at clock %0d", r, load, k);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
