// stereo_pkg: types and constants shared by the stereo-vision pipeline.
//
// Pixels are 8-bit intensities (the camera delivers one byte per pixel).
// Image coordinates are signed fixed point with COORD_FRAC fractional bits;
// four fractional bits follow the 12-bit request layout of the parallel
// access scheme (8 integer request bits, 4 fixed bits). The integer part is
// widened here to 11 bits so a 1280x960 frame fits, plus a sign bit so that
// transformed coordinates falling outside the frame can be represented.
// The feature descriptor layout (intensity, two horizontal Sobel values,
// one vertical Sobel value, 5x5 census) follows the demonstrator's feature
// set; the bit widths are this design's choice.
package stereo_pkg;

  localparam int PIX_W      = 8;
  localparam int COORD_INT  = 12;          // signed integer bits
  localparam int COORD_FRAC = 4;           // fractional bits
  localparam int COORD_W    = COORD_INT + COORD_FRAC;

  typedef logic [PIX_W-1:0]          pixel_t;
  typedef logic signed [COORD_W-1:0] coord_t;   // Q12.4, signed

  typedef struct packed {
    coord_t x;
    coord_t y;
  } coord_pair_t;

  // Sobel of 8-bit pixels with [1 2 1] x [-1 0 1] kernels spans +-1020.
  localparam int SOBEL_W  = 11;
  localparam int CENSUS_W = 24;            // 5x5 window without the centre
  typedef logic signed [SOBEL_W-1:0] sobel_t;

  typedef struct packed {
    pixel_t                intensity;
    sobel_t                sobel_h_left;   // horizontal Sobel at x-1
    sobel_t                sobel_h_right;  // horizontal Sobel at x+1
    sobel_t                sobel_v;        // vertical Sobel at x
    logic [CENSUS_W-1:0]   census;
  } descriptor_t;

  // Matching energy (dissimilarity) of one descriptor pair.
  localparam int ENERGY_W = 14;
  typedef logic [ENERGY_W-1:0] energy_t;

  // Reconstruction methods of the spatial transformation.
  typedef enum logic [0:0] {
    RECON_NEAREST  = 1'b0,
    RECON_BILINEAR = 1'b1
  } recon_mode_e;

endpackage
