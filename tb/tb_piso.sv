// tb_piso: loads random words every N clocks and checks that the serial
// output gives bit 0 to bit N-1 in the N clocks after each load.
module tb_piso;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0, sout;
  logic [N-1:0] din = '0, word;
  int checks = 0, failures = 0;

  piso #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      word = N'($urandom);
      din = word; load = 1;
      @(negedge clk);
      load = 0; din = N'($urandom);
      for (int b = 0; b < N; b++) begin
        checks++;
        if (sout !== word[b]) begin
          failures++;
          $display("FAIL word %0d bit %0d: got %0b", w, b, sout);
        end
        if (b < N - 1) @(negedge clk);
      end
      // extra idle clocks now and then: zeros shift in
      if (w % 7 == 3) begin
        @(negedge clk);
        checks++;
        if (sout !== 1'b0) begin failures++; $display("FAIL zero fill"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
