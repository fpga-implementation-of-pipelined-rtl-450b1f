// steer_pkg: types and constants shared by the steerable Gaussian smoother.
//
// The filter smooths an 8-bit greyscale image in two steps. First an
// isotropic 9x9 Gaussian is applied as a 9x1 vertical pass followed by a 1x9
// horizontal pass. Then a 7-tap 1-D Gaussian is applied along one or more
// chosen directions. The image size (48x48) and the kernel lengths (9 and 7)
// follow the design description. The pixel width, the integer weights and
// the direction encoding are choices of this implementation.
//
// Weights are binomial coefficients, the usual integer approximation of a
// sampled Gaussian: C(8,k) for the 9-tap kernel (sum 256, sigma = sqrt(2))
// and C(6,k) for the 7-tap kernel (sum 64, sigma = sqrt(1.5)). Because both
// sums are powers of two, each pass normalises with a rounding right shift.
package steer_pkg;

  localparam int PIX_W  = 8;    // pixel width
  localparam int COEF_W = 8;    // weight width (largest weight is 70)

  localparam int IMG_W  = 48;   // input image width
  localparam int IMG_H  = 48;   // input image height

  localparam int SEP_TAPS = 9;  // vertical 9x1 and horizontal 1x9 passes
  localparam int DIR_TAPS = 7;  // directional 1x7 pass

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [COEF_W-1:0] coef_t;

  // 9-tap binomial kernel, sum 256 -> shift 8. Index 0 is the first tap.
  localparam logic [SEP_TAPS-1:0][COEF_W-1:0] G9 =
    {8'd1, 8'd8, 8'd28, 8'd56, 8'd70, 8'd56, 8'd28, 8'd8, 8'd1};
  localparam int G9_SHIFT = 8;

  // 7-tap binomial kernel, sum 64 -> shift 6.
  localparam logic [DIR_TAPS-1:0][COEF_W-1:0] G7 =
    {8'd1, 8'd6, 8'd15, 8'd20, 8'd15, 8'd6, 8'd1};
  localparam int G7_SHIFT = 6;

  // Direction of the steerable pass: the step, in pixels, between two
  // neighbouring taps before the decimation stride is applied. (1,0) is the
  // horizontal 1x7 filter, (0,1) the vertical 7x1 filter; (1,1) and (1,-1)
  // give the two diagonals. x grows to the right, y grows downwards.
  typedef struct packed {
    logic signed [1:0] dx;
    logic signed [1:0] dy;
  } dir_t;

  localparam dir_t DIR_H   = '{dx: 2'sd1, dy: 2'sd0};
  localparam dir_t DIR_V   = '{dx: 2'sd0, dy: 2'sd1};

endpackage
