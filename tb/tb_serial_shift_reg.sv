// tb_serial_shift_reg: drives a random bit stream and checks that the output
// is the input of N clocks earlier.
module tb_serial_shift_reg;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, sin = 0, sout;
  logic hist [$];
  int checks = 0, failures = 0;

  serial_shift_reg #(.N(N)) dut (.*);

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
    for (int i = 0; i < N; i++) hist.push_back(1'b0);  // reset contents
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (sout !== hist[0]) begin
        failures++;
        $display("FAIL clock %0d: got %0b expected %0b", i, sout, hist[0]);
      end
      sin = 1'($urandom);
      @(negedge clk);
      void'(hist.pop_front());
      hist.push_back(sin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
