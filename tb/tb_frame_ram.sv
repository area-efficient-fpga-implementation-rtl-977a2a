// tb_frame_ram: self-checking test of the frame memory.
// Fills a small memory with random words, reads every address back and
// checks the one-clock read latency, that the last word written wins, and
// that a read of an address written in the same clock returns the old word.
module tb_frame_ram;
  localparam int DEPTH = 64, DW = 8, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // two passes: the second overwrites the first
    for (int pass = 0; pass < 2; pass++)
      for (int a = 0; a < DEPTH; a++) begin
        we = 1; waddr = AW'(a); wdata = DW'($urandom);
        model[a] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      @(negedge clk);
      check(rdata, model[a], $sformatf("read %0d", a));
    end
    // read-during-write: old word first, new word next clock
    raddr = 6'd7; we = 1; waddr = 6'd7; wdata = ~model[7];
    @(negedge clk);
    check(rdata, model[7], "read during write returns old word");
    we = 0;
    @(negedge clk);
    check(rdata, ~model[7], "written word after write");
    // latency: changing the address changes rdata only after the clock
    raddr = 6'd3;
    #1 check(rdata, ~model[7], "rdata holds until the clock");
    @(negedge clk);
    check(rdata, model[3], "rdata one clock after address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
