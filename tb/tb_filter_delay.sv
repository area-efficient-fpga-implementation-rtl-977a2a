// tb_filter_delay: drives random words and checks that each leaves exactly
// DEPTH clocks later, and that the output is zero right after reset.
module tb_filter_delay;
  localparam int DEPTH = 9, W = 2;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  filter_delay #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    din = '0;
    for (int i = 0; i < DEPTH; i++) hist.push_back('0);
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (dout !== hist[0]) begin
        failures++;
        $display("FAIL clock %0d: got %b expected %b", i, dout, hist[0]);
      end
      din = W'($urandom);
      @(negedge clk);
      void'(hist.pop_front());
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
