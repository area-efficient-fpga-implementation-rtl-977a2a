// tb_shift_accumulator: feeds N random signed table words per product (with
// 'first' and 'last' marking bits 0 and N-1) and checks that 'c' equals
// sum_j P_j * 2^j one clock after 'last', with 'c_valid' high for that clock.
module tb_shift_accumulator;
  localparam int N = 8, IN_W = 6, OUT_W = IN_W + N;
  logic clk = 0, rst_n = 0, first = 0, last = 0;
  logic signed [IN_W-1:0] din = '0;
  logic signed [OUT_W-1:0] c;
  logic c_valid;
  int checks = 0, failures = 0;

  shift_accumulator #(.N(N), .IN_W(IN_W)) dut (.*);

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
    for (int p = 0; p < 500; p++) begin
      longint exp;
      exp = 0;
      for (int j = 0; j < N; j++) begin
        int v;
        // extremes now and then
        if (p % 5 == 0) v = (j % 2) ? -(1 << (IN_W - 1)) : (1 << (IN_W - 1)) - 1;
        else if (p % 5 == 1) v = -(1 << (IN_W - 1));
        else v = $urandom_range(0, (1 << IN_W) - 1) - (1 << (IN_W - 1));
        din = IN_W'(v);
        first = (j == 0);
        last = (j == N - 1);
        exp += longint'(v) <<< j;
        @(negedge clk);
        checks++;
        if (c_valid !== (j == N - 1)) begin
          failures++;
          $display("FAIL c_valid=%0b at bit %0d", c_valid, j);
        end
      end
      first = 0; last = 0;
      checks++;
      if (longint'(c) != exp) begin
        failures++;
        $display("FAIL product %0d: got %0d expected %0d", p, c, exp);
      end
      // idle clocks between products on odd ones
      if (p % 2) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
