// da_filter_3x3: one 3x3 Sobel convolution by bit-serial distributed
// arithmetic.
//
// Each clock-n 'load' brings the newest pixel of each of the three window
// rows (row 0 = two lines back, row 2 = current line). Per row, a
// parallel-in serial-out register takes the pixel and shifts it out LSB
// first; two serial shift registers behind it replay the previous two
// pixels of that row bit for bit, so at any bit clock the nine serial bits of
// the whole 3x3 window are present together. Those nine bits address the
// look-up table of pre-computed coefficient sums, and the 2^-1 scaling
// accumulator adds the table words over the N bit clocks.
//
// Timing: 'load' must come every N clocks while a frame streams. The result
// for the window whose newest pixel came with a load appears on 'result' with
// 'result_valid' N+1 clocks after that load and stays until the next one.
// Column 2 of the window is the newest pixel, column 0 the oldest.
//
// Interpretation: the multiplier word A in the serial registers is the image
// pixel and the pre-computed table holds sums of the fixed mask coefficients.
// The accumulator is LUT_W + N bits wide so that it holds any mask of the
// package's format; for the Sobel masks the result fits GRAD_W bits, so the
// top accumulator bits are only sign copies and are left unused (lint
// reports them as unused bits).
module da_filter_3x3
  import sobel_pkg::*;
#(
  parameter int    N    = PIX_W,
  parameter mask_t MASK = MASK_X
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [2:0][N-1:0]        row_pix,
  output logic signed [GRAD_W-1:0] result,
  output logic                     result_valid
);

  localparam int ACC_W = LUT_W + N;

  // bit-serial taps, index 3*row + col
  logic [TAPS-1:0] tap;

  for (genvar r = 0; r < 3; r++) begin : g_row
    logic s_new, s_mid, s_old;

    piso #(.N(N)) u_piso (
      .clk, .rst_n, .load, .din(row_pix[r]), .sout(s_new)
    );
    serial_shift_reg #(.N(N)) u_sr1 (
      .clk, .rst_n, .sin(s_new), .sout(s_mid)
    );
    serial_shift_reg #(.N(N)) u_sr2 (
      .clk, .rst_n, .sin(s_mid), .sout(s_old)
    );

    assign tap[3*r + 2] = s_new;
    assign tap[3*r + 1] = s_mid;
    assign tap[3*r + 0] = s_old;
  end

  // bit position of the word now leaving the serial registers
  localparam int BW = (N > 1) ? $clog2(N) : 1;
  logic [BW-1:0] bit_idx;
  logic          bit_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_busy <= 1'b0;
      bit_idx  <= '0;
    end else if (load) begin
      bit_busy <= 1'b1;
      bit_idx  <= '0;
    end else if (bit_busy) begin
      bit_idx  <= bit_idx + 1'b1;
      if (int'(bit_idx) == N - 1) bit_busy <= 1'b0;
    end
  end

  logic first, last;
  assign first = bit_busy && (bit_idx == '0);
  assign last  = bit_busy && (int'(bit_idx) == N - 1);

  logic signed [LUT_W-1:0] lut_word;
  logic signed [ACC_W-1:0] product;

  da_lut #(.MASK(MASK)) u_lut (.addr(tap), .data(lut_word));

  shift_accumulator #(.N(N), .IN_W(LUT_W)) u_acc (
    .clk, .rst_n, .first, .last, .din(lut_word),
    .c(product), .c_valid(result_valid)
  );

  // a 3x3 Sobel sum of N-bit pixels fits in N+4 signed bits
  if (ACC_W >= GRAD_W) begin : g_narrow
    assign result = product[GRAD_W-1:0];
  end else begin : g_wide
    assign result = GRAD_W'(product);
  end

endmodule
