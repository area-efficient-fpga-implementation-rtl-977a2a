// sobel_pkg: types and constants shared by the Sobel edge detector.
//
// Pixels are unsigned PIX_W-bit gray values. A 3x3 mask is held as nine
// signed COEF_W-bit coefficients, indexed [row][col] with row 0 the oldest
// (top) image line and col 0 the oldest (left) pixel of the window. The two
// masks are the Sobel operators of the design: MASK_X weights the bottom row
// minus the top row, MASK_Y the right column minus the left column. The pixel
// width, coefficient width and gradient width are this design's choices.
package sobel_pkg;

  localparam int PIX_W  = 8;   // gray pixel width
  localparam int COEF_W = 3;   // signed coefficient width, holds -2..2
  localparam int TAPS   = 9;   // 3x3 window
  // width of one LUT word: a signed sum of up to nine coefficients of
  // magnitude <= 2 lies in -18..18 for any mask of this format
  localparam int LUT_W  = 6;
  // signed filter result: |G| <= 4 * (2^PIX_W - 1) needs PIX_W + 3 bits + sign
  localparam int GRAD_W = PIX_W + 4;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [2:0][2:0] mask_t;

  // Horizontal operator: [-1 -2 -1; 0 0 0; 1 2 1]
  localparam mask_t MASK_X = '{'{coef_t'(1),  coef_t'(2),  coef_t'(1)},
                               '{coef_t'(0),  coef_t'(0),  coef_t'(0)},
                               '{coef_t'(-1), coef_t'(-2), coef_t'(-1)}};
  // Vertical operator: [-1 0 1; -2 0 2; -1 0 1]
  localparam mask_t MASK_Y = '{'{coef_t'(1),  coef_t'(0),  coef_t'(-1)},
                               '{coef_t'(2),  coef_t'(0),  coef_t'(-2)},
                               '{coef_t'(1),  coef_t'(0),  coef_t'(-1)}};

  // Sideband that travels with the pixel stream.
  typedef struct packed {
    logic valid;  // a pixel (or its result) is present this cycle
    logic sof;    // first pixel of a frame
  } strm_tag_t;

endpackage
