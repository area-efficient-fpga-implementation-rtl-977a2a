// da_lut: look-up table of a distributed-arithmetic multiplier.
//
// For the nine taps of a 3x3 window, entry 'addr' holds the sum of the mask
// coefficients whose address bit is 1: bit k = 3*row + col selects
// MASK[row][col]. Every one of the 2^9 combinations is pre-computed at
// elaboration from the MASK parameter, so the table changes with the mask
// and nothing has to be loaded at run time. Each address bit is the current
// serial bit of one window pixel, so the output is the partial sum of
// products for that bit weight. Purely combinational. A table of all
// pre-computed sums follows the published design; holding the mask sums
// (rather than pixel sums) and the 6-bit word are this design's choices.
module da_lut
  import sobel_pkg::*;
#(
  parameter mask_t MASK = MASK_X
) (
  input  logic [TAPS-1:0]         addr,
  output logic signed [LUT_W-1:0] data
);

  typedef logic signed [LUT_W-1:0] word_t;
  localparam int ENTRIES = 1 << TAPS;
  typedef word_t table_t [ENTRIES];

  // entry a = sum of MASK[k/3][k%3] over the set bits k of a
  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < ENTRIES; a++) begin
      t[a] = '0;
      for (int k = 0; k < TAPS; k++)
        if (a[k]) t[a] += word_t'(MASK[k / 3][k % 3]);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];

endmodule
