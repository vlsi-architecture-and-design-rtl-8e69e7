// scaler_pkg: widths, types and constants shared by the adaptive 2x video
// scaler. Luma samples are 8-bit, Sobel gradients 12-bit two's complement,
// orientations 3-bit codes k meaning an edge angle of 22.5*k degrees
// (atan(-fx/fy), taken modulo 180 degrees). Filter coefficients are 11-bit
// two's complement with 9 fraction bits; a neighbourhood is 4x4 = 16 taps and
// there are three interpolated output phases per input pixel.
// The 8-bit pixel, 12-bit gradient, 3-bit orientation, 11-bit coefficient,
// 16-tap and "more than 6 of 16" threshold values follow the source design;
// the coefficient fraction position and the phase numbering are choices of
// this implementation.
package scaler_pkg;
  localparam int unsigned PIX_W       = 8;
  localparam int unsigned GRAD_W      = 12;
  localparam int unsigned ANG_W       = 3;
  localparam int unsigned NUM_ORIENT  = 8;
  localparam int unsigned COEF_W      = 11;
  localparam int unsigned COEF_FRAC   = 9;
  localparam int unsigned TAPS        = 16;
  localparam int unsigned PHASES      = 3;   // right, below, diagonal
  localparam int unsigned NUM_SETS    = NUM_ORIENT + 1;
  localparam int unsigned BILIN_SET   = NUM_ORIENT; // set index of the bilinear filter
  localparam int unsigned HIST_THRESH = 6;   // oriented if count > HIST_THRESH
  localparam int unsigned CNT_W       = 5;   // 0..16 occurrences

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [ANG_W-1:0]         angle_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [3:0]               set_t;   // 0..8

  // Output phase of an interpolated pixel relative to input pixel p[0,0]
  // at output position (2i, 2j): phase 0 -> (2i, 2j+1), 1 -> (2i+1, 2j),
  // 2 -> (2i+1, 2j+1). The pixel at (2i, 2j) is p[0,0] itself.
  typedef enum logic [1:0] {PH_RIGHT = 2'd0, PH_BELOW = 2'd1, PH_DIAG = 2'd2} phase_e;

  // Bilinear coefficient of tap t (t = 4*row + col, row/col 0..3 standing for
  // offsets -1..2) for phase ph, in COEF_FRAC fraction bits.
  function automatic coef_t bilinear_coef(input int unsigned ph, input int unsigned t);
    int unsigned r, c;
    r = t / 4;
    c = t % 4;
    bilinear_coef = '0;
    case (ph)
      0: if (r == 1 && (c == 1 || c == 2)) bilinear_coef = coef_t'(1 << (COEF_FRAC - 1));
      1: if (c == 1 && (r == 1 || r == 2)) bilinear_coef = coef_t'(1 << (COEF_FRAC - 1));
      default: if ((r == 1 || r == 2) && (c == 1 || c == 2)) bilinear_coef = coef_t'(1 << (COEF_FRAC - 2));
    endcase
  endfunction
endpackage
