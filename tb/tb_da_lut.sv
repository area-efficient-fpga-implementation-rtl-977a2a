// tb_da_lut: checks every entry of the look-up table for both Sobel masks
// against sums of coefficients written out here as plain integers.
module tb_da_lut;
  import sobel_pkg::*;
  logic [TAPS-1:0] addr = '0;
  logic signed [LUT_W-1:0] dx, dy;
  int checks = 0, failures = 0;
  // [row][col], row 0 = top, col 0 = left
  int mx [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  int my [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};

  da_lut #(.MASK(MASK_X)) ux (.addr, .data(dx));
  da_lut #(.MASK(MASK_Y)) uy (.addr, .data(dy));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << TAPS); a++) begin
      int ex, ey;
      ex = 0; ey = 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          if (a[3*r + c]) begin ex += mx[r][c]; ey += my[r][c]; end
      addr = TAPS'(a);
      #1;
      checks += 2;
      if (int'(dx) != ex) begin failures++; $display("FAIL X addr %0d: %0d vs %0d", a, dx, ex); end
      if (int'(dy) != ey) begin failures++; $display("FAIL Y addr %0d: %0d vs %0d", a, dy, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
